// project_monitor: watches the top level of the encoder project through one run and
// its read-back, and checks it.
//
// During the run it counts the mechanisms of the design (turn-around, lost counts
// played forward and backward, transition writes) and keeps every byte written to
// the RAM. During the read-back it checks that each byte read is the one written at
// that address. report() then checks the captured sequence itself: successive AB
// values are neighbouring quadrature states, clean states last one T_state (64 ticks
// of 0.68 us = 43.5 us, stored as 21 or 22 after bit 0 is dropped), the forward half
// of the capture holds backward steps (the signature of a lost count) and the number
// of records matches the distance travelled.
module project_monitor
  import enc_pkg::*;
#(
  parameter int unsigned MAX_POS  = 1536000,
  // Stored duration field of a clean state (43.5 us -> 43 or 44 us -> 21 or 22).
  parameter int unsigned CLEAN_LO = 21,
  parameter int unsigned CLEAN_HI = 22
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   ce_enc,
  input  logic                   ce_ram,
  input  ab_t                    channel_ab,
  input  logic                   empty,
  input  logic                   running,
  input  logic signed [EU_W-1:0] position_eu,
  input  logic                   error,
  input  logic [EU_W-1:0]        error_pos,
  input  logic                   ram_ce_n,
  input  logic                   ram_oe_n,
  input  logic                   ram_we_n,
  input  logic [ADDR_W-1:0]      mem_adr,
  input  logic [DATA_W-1:0]      mem_db_wr,
  input  logic [DATA_W-1:0]      mem_db_rd,
  input  logic                   data_valid,
  input  logic                   read_data,
  input  logic [ADDR_W-1:0]      wr_count
);

  int checks = 0, failures = 0;
  int n_turn = 0, n_err_fwd = 0, n_err_back = 0, n_writes = 0, n_read_pulses = 0;
  int n_reads = 0, n_read_bad = 0, n_empty_rise = 0;
  int peak = 0, turn_addr = -1;
  logic [DATA_W-1:0] written [int];
  logic prev_err = 1'b0, prev_empty = 1'b1, pend = 1'b0;
  logic [ADDR_W-1:0] rd_adr;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok && failures < 20) $display("FAIL: %s", what);
    if (!ok) failures++;
  endtask

  always @(posedge clk) if (!rst) begin
    if (ce_enc) begin
      if (error && !prev_err) begin
        if (error_pos[7:0] == 8'h7F) n_err_fwd++; else n_err_back++;
      end
      prev_err <= error;
      if (position_eu > peak) peak = position_eu;
      if (running && position_eu == MAX_POS && turn_addr < 0) begin
        n_turn++;
        turn_addr = int'(wr_count);
      end
      if (empty && !prev_empty) n_empty_rise++;
      prev_empty <= empty;
    end
    if (ce_ram) begin
      if (data_valid) n_writes++;
      if (read_data) n_read_pulses++;
      if (!ram_ce_n && !ram_we_n) written[int'(mem_adr)] = mem_db_wr;
      if (pend) begin
        n_reads++;
        if (!written.exists(int'(rd_adr)) || written[int'(rd_adr)] != mem_db_rd) begin
          n_read_bad++;
          if (n_read_bad < 5) $display("FAIL: read address %0d returned %h", rd_adr, mem_db_rd);
        end
      end
      pend   <= !ram_ce_n && !ram_oe_n;
      rd_adr <= mem_adr;
    end
  end

  function automatic int phase(input ab_t v);
    case (v) 2'b10: return 0; 2'b11: return 1; 2'b01: return 2; default: return 3; endcase
  endfunction

  task automatic report(output int c, output int f);
    int n, n_clean = 0, n_back_fwd = 0, n_fwd_back = 0, d, exp_states;
    ab_t a, b;
    n = written.num();
    check(n == int'(wr_count) && n == n_writes, $sformatf("%0d bytes stored, %0d written, wr_count %0d", n, n_writes, wr_count));
    for (int i = 1; i < n; i++) begin
      a = written[i-1][1:0];
      b = written[i][1:0];
      d = (phase(b) - phase(a) + 4) % 4;
      check(d == 1 || d == 3, $sformatf("records %0d,%0d: AB %b then %b", i - 1, i, a, b));
      if (i < turn_addr && d == 3) n_back_fwd++;
      if (i > turn_addr + 2 && d == 1) n_fwd_back++;
      if (written[i][7:2] >= 6'(CLEAN_LO) && written[i][7:2] <= 6'(CLEAN_HI)) n_clean++;
    end
    exp_states = 2 * MAX_POS / 64;
    check(n >= exp_states - 2 && n <= exp_states + 8 * (n_err_fwd + n_err_back) + 4,
          $sformatf("%0d records for %0d states of travel", n, exp_states));
    check(n_clean * 10 >= n * 9, $sformatf("only %0d of %0d records last one T_state", n_clean, n));
    check(peak == MAX_POS, $sformatf("peak position %0d", peak));
    // Mechanisms that must have happened at least once.
    check(n_turn == 1, $sformatf("turn-arounds %0d", n_turn));
    check(n_err_fwd >= 1, "lost count played going forward");
    check(n_err_back >= 1, "lost count played going backward");
    check(n_back_fwd >= n_err_fwd, $sformatf("%0d backward steps in the forward half for %0d errors", n_back_fwd, n_err_fwd));
    check(n_writes >= 1, "transition writes");
    check(n_read_pulses >= n, $sformatf("%0d read pulses", n_read_pulses));
    check(n_reads >= n && n_read_bad == 0, $sformatf("%0d reads, %0d wrong", n_reads, n_read_bad));
    check(n_empty_rise >= 1, "empty raised at the end of the run");
    $display("run: peak %0d, records %0d, errors forward %0d backward %0d, backward steps in forward half %0d, forward steps in backward half %0d, reads %0d",
             peak, n, n_err_fwd, n_err_back, n_back_fwd, n_fwd_back, n_reads);
    c = checks;
    f = failures;
  endtask

endmodule
