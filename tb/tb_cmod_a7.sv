// tb_cmod_a7: the capture logic with the RAM. Replays the example capture (AB 01,
// then 11 at 150 us, 10 at 195 us, 01 at 240 us; stored bytes 2D, 5B, 5A), then a
// random walk of quadrature states; after empty rises the read button must return
// every stored byte in order, with the AB left and the duration of each state
// (within one microsecond of the stimulus, as detection lags by up to two ticks).
// Also checks that reading is refused while empty is low and that the
// encoder-operation button rewinds the write address.
module tb_cmod_a7;
  import enc_pkg::*;
  logic clk = 1'b0, rst = 1'b1, ce = 1'b1;
  ab_t ab = 2'b01;
  logic empty = 1'b0, btn_encop = 1'b0, btn_read = 1'b0;
  logic ram_ce_n, ram_oe_n, ram_we_n, data_valid, read_data;
  logic [ADDR_W-1:0] mem_adr, wr_count;
  logic [DATA_W-1:0] mem_db_out, mem_db_in;
  logic rec_valid;
  logic [ADDR_W-1:0] rec_addr;
  logic [5:0] rec_ts;
  ab_t rec_ab;
  int checks = 0, failures = 0;
  always #50 clk = ~clk;

  cmod_a7 dut (.clk, .rst, .ce, .ab, .empty, .btn_encop, .btn_read, .ram_ce_n, .ram_oe_n,
    .ram_we_n, .mem_adr, .mem_db_out, .data_valid, .read_data, .wr_count);
  memory_ram u_ram (.clk, .ce, .ram_ce_n, .ram_oe_n, .ram_we_n, .db_in(mem_db_out),
    .db_out(mem_db_in), .mem_adr);
  data_to_file u_sink (.clk, .rst, .ce, .ram_oe_n, .mem_adr, .mem_db(mem_db_in), .rec_valid,
    .rec_addr, .rec_ts, .rec_ab);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok && failures < 20) $display("FAIL: %s", what);
    if (!ok) failures++;
  endtask

  initial begin
    #400_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int tick = 0;
  always @(posedge clk) tick <= tick + 1;

  ab_t rec_ab_q[$];
  int  rec_ts_q[$], rec_addr_q[$];
  always @(posedge clk) if (rec_valid) begin
    rec_ab_q.push_back(rec_ab); rec_ts_q.push_back(int'(rec_ts)); rec_addr_q.push_back(int'(rec_addr));
  end

  // Stimulus state i of the walk lasts dur[i] ticks and has value val[i].
  ab_t val[$];
  int  dur[$];
  int  t0, n, exp_us;

  function automatic ab_t step(input ab_t v, input bit fwd);
    case (v)
      2'b10: return fwd ? 2'b11 : 2'b00;
      2'b11: return fwd ? 2'b01 : 2'b10;
      2'b01: return fwd ? 2'b00 : 2'b11;
      default: return fwd ? 2'b10 : 2'b01;
    endcase
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0; btn_encop = 1'b1;
    @(posedge clk);
    #1 btn_encop = 1'b0;
    t0 = tick;
    wait (tick == t0 + 1500); #1 ab = 2'b11;
    wait (tick == t0 + 1950); #1 ab = 2'b10;
    wait (tick == t0 + 2400); #1 ab = 2'b01;
    // Random walk: mostly 440-ish tick states, some long and short ones.
    for (int i = 0; i < 200; i++) begin
      int d;
      d = ($urandom_range(0, 9) == 0) ? $urandom_range(20, 1270) : $urandom_range(430, 450);
      val.push_back(ab); dur.push_back(d);
      repeat (d) @(posedge clk);
      #1 ab = step(ab, $urandom_range(0, 4) != 0);
    end
    repeat (20) @(posedge clk);
    check(wr_count == 203, $sformatf("%0d bytes written", wr_count));
    // Read refused while writing.
    #1 btn_read = 1'b1;
    repeat (1000) @(posedge clk);
    #1 btn_read = 1'b0;
    check(rec_ab_q.size() == 0, "no read while empty is low");
    empty = 1'b1;
    @(posedge clk);
    #1 btn_read = 1'b1;
    repeat (3) @(posedge clk);
    #1 btn_read = 1'b0;
    wait (rec_ab_q.size() == 203);
    repeat (5) @(posedge clk);
    check(rec_addr_q[0] == 0 && rec_ab_q[0] == 2'b01 && rec_ts_q[0] == 6'h0B, "byte 0 is 2D");
    check(rec_ab_q[1] == 2'b11 && rec_ts_q[1] == 6'h16, "byte 1 is 5B");
    check(rec_ab_q[2] == 2'b10 && rec_ts_q[2] == 6'h16, "byte 2 is 5A");
    foreach (val[i]) begin
      int got;
      check(rec_addr_q[i+3] == i + 3, $sformatf("address %0d", rec_addr_q[i+3]));
      check(rec_ab_q[i+3] == val[i], $sformatf("record %0d AB %b expected %b", i + 3, rec_ab_q[i+3], val[i]));
      exp_us = dur[i] / 10;
      got = rec_ts_q[i+3] * 2;
      // Stored value is duration[6:1] (bit 0 dropped); floor-based timing and the
      // detection lag allow one microsecond more or less: compare modulo 128.
      check(((got - exp_us + 2) % 128 + 128) % 128 <= 3,
            $sformatf("record %0d duration %0d us stored %0d", i + 3, exp_us, got));
    end
    // Rewind: a new run writes from address zero again.
    empty = 1'b0;
    @(posedge clk);
    #1 btn_encop = 1'b1;
    @(posedge clk);
    #1 btn_encop = 1'b0;
    repeat (3) @(posedge clk);
    check(wr_count == 0, "encoder-operation button rewinds the write address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
