// tb_encoder_emulation: a shortened round trip of the encoder emulation. Checks that
// AB only ever steps to a neighbouring quadrature state, that away from errors each
// state lasts 64 ticks and steps in the direction of travel, that errors happen in
// both directions, that the position peaks at MAX_POS and that empty is raised at
// the end.
module tb_encoder_emulation;
  import enc_pkg::*;
  localparam int MAXP = 24576;
  logic clk = 1'b0, rst = 1'b1, ce = 1'b1, btn = 1'b0;
  ab_t ab;
  logic empty, running, error;
  logic signed [EU_W-1:0] position_eu;
  logic [EU_W-1:0] error_pos;
  logic [4:0] q_errors;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  encoder_emulation #(.MAX_POS(MAXP), .MAX_FIRST_ERR(32'h20), .ERR_SPAN(32'h10)) dut (
    .clk, .rst, .ce, .btn_encop(btn), .channel_ab(ab), .empty, .running,
    .position_eu, .error, .error_pos, .q_errors);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok && failures < 20) $display("FAIL: %s", what);
    if (!ok) failures++;
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Position in the forward cycle 10 -> 11 -> 01 -> 00.
  function automatic int phase(input ab_t v);
    case (v) 2'b10: return 0; 2'b11: return 1; 2'b01: return 2; default: return 3; endcase
  endfunction

  ab_t prev_ab;
  int n_changes = 0, since = 0, quiet = 1000, peak = 0, n_fwd_err = 0, n_back_err = 0, n_steps = 0;
  logic prev_err = 1'b0;
  int d;
  always @(posedge clk) begin
    #1;
    if (!rst) begin
      if (error && !prev_err) begin
        if (error_pos[7:0] == 8'h7F) n_fwd_err++; else n_back_err++;
      end
      if (error) quiet = 0;
      if (position_eu > peak) peak = position_eu;
      since++;
      if (ab != prev_ab) begin
        d = (phase(ab) - phase(prev_ab) + 4) % 4;
        check(d == 1 || d == 3, $sformatf("AB jumped %b -> %b", prev_ab, ab));
        if (running && quiet > 700 && n_changes > 1 && position_eu < MAXP - 64) begin
          n_steps++;
          check(since == 64, $sformatf("state lasted %0d ticks at %0d", since, position_eu));
          check((dut.speed > 0) == (d == 1),
                $sformatf("step %0d against direction at %0d ab %b->%b speed %0d", d, position_eu, prev_ab, ab, dut.speed));
        end
        since = 0;
        n_changes++;
      end
      quiet++;
      prev_err = error;
      prev_ab = ab;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    repeat (5) @(posedge clk);
    btn <= 1'b1;
    repeat (4) @(posedge clk);
    btn <= 1'b0;
    wait (running);
    check(!empty || position_eu == 0, "empty low once moving");
    wait (!running);
    repeat (10) @(posedge clk);
    #1;
    check(position_eu == 0 && empty, "back at zero with empty high");
    check(peak == MAXP, $sformatf("peak %0d", peak));
    check(n_fwd_err >= 1 && n_fwd_err <= q_errors, $sformatf("forward errors %0d", n_fwd_err));
    check(n_back_err >= 1, $sformatf("backward errors %0d", n_back_err));
    check(n_steps > MAXP / 64, $sformatf("clean steps %0d", n_steps));
    $display("errors forward %0d backward %0d, list %0d, clean steps %0d", n_fwd_err, n_back_err, q_errors, n_steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
