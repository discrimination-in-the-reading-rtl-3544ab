// tb_trans_change_ab: replays the capture example of the design description (AB = 01,
// then 11 at 150 us, 10 at 195 us, 01 at 240 us) and expects the records
// {01, 150 us}, {11, 45 us}, {10, 45 us}, i.e. the bytes 2D, 5B, 5A once packed;
// then random AB changes, checking each record's previous state, its duration
// (whole microseconds, modulo 128) and a detection delay of at most two ticks.
module tb_trans_change_ab;
  import enc_pkg::*;
  logic clk = 1'b0, rst = 1'b1, ce = 1'b1;
  ab_t ab_channel = 2'b01, ab_out;
  logic [TS_W-1:0] ts_diff;
  logic data_valid;
  int checks = 0, failures = 0;
  always #50 clk = ~clk;   // 10 MHz, one RAM tick per cycle

  trans_change_ab dut (.clk, .rst, .ce, .ab_channel, .ab_out, .ts_diff, .data_valid);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Tick counter: tick n starts at the n-th rising edge after reset.
  int tick = 0;
  always @(posedge clk) if (!rst) tick <= tick + 1;

  // Records as seen by a downstream sampler.
  ab_t rec_ab[$];
  int  rec_ts[$], rec_tick[$];
  logic dv_q = 1'b0;
  always @(posedge clk) begin
    if (data_valid && !rst) begin
      rec_ab.push_back(ab_out);
      rec_ts.push_back(int'(ts_diff));
      rec_tick.push_back(tick);
    end
    if (!rst) begin
      checks++;
      if (data_valid && dv_q) begin failures++; $display("FAIL: data_valid longer than one tick"); end
    end
    dv_q = data_valid;
  end

  int chg_tick[$];
  ab_t chg_from[$];
  int det, det_prev;
  initial begin
    rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    // Time zero is this edge; the example's change times in ticks of 100 ns.
    wait (tick == 1500); #1 ab_channel = 2'b11;
    wait (tick == 1950); #1 ab_channel = 2'b10;
    wait (tick == 2400); #1 ab_channel = 2'b01;
    wait (tick == 2410);
    check(rec_ab.size() == 3, $sformatf("%0d records", rec_ab.size()));
    if (rec_ab.size() == 3) begin
      check(pack_record(TS_W'(rec_ts[0]), rec_ab[0]) == 8'h2D, $sformatf("first byte %h", pack_record(TS_W'(rec_ts[0]), rec_ab[0])));
      check(pack_record(TS_W'(rec_ts[1]), rec_ab[1]) == 8'h5B, $sformatf("second byte %h", pack_record(TS_W'(rec_ts[1]), rec_ab[1])));
      check(pack_record(TS_W'(rec_ts[2]), rec_ab[2]) == 8'h5A, $sformatf("third byte %h", pack_record(TS_W'(rec_ts[2]), rec_ab[2])));
      check(rec_ts[0] == 150 % 128 && rec_ts[1] == 45 && rec_ts[2] == 45, "durations 150, 45, 45 us");
    end
    rec_ab.delete(); rec_ts.delete(); rec_tick.delete();
    // Random changes, at least 3 ticks apart.
    for (int i = 0; i < 300; i++) begin
      ab_t nxt;
      repeat ($urandom_range(3, 1500)) @(posedge clk);
      #1;
      do nxt = ab_t'($urandom_range(0, 3)); while (nxt == ab_channel);
      chg_from.push_back(ab_channel);
      chg_tick.push_back(tick);
      ab_channel = nxt;
    end
    repeat (10) @(posedge clk);
    #1;
    check(rec_ab.size() == chg_tick.size(), $sformatf("%0d records for %0d changes", rec_ab.size(), chg_tick.size()));
    for (int i = 1; i < rec_ab.size() && i < chg_tick.size(); i++) begin
      // The change happens during tick chg_tick; data_valid is seen at most two
      // ticks later; the duration is measured between the detecting ticks.
      det = rec_tick[i] - 1;
      det_prev = rec_tick[i-1] - 1;
      check(rec_ab[i] == chg_from[i], $sformatf("record %0d AB %b expected %b", i, rec_ab[i], chg_from[i]));
      check(rec_tick[i] - chg_tick[i] >= 1 && rec_tick[i] - chg_tick[i] <= 3,
            $sformatf("record %0d delay %0d", i, rec_tick[i] - chg_tick[i]));
      check(rec_ts[i] == ((det / 10) - (det_prev / 10)) % 128,
            $sformatf("record %0d duration %0d expected %0d", i, rec_ts[i], ((det / 10) - (det_prev / 10)) % 128));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
