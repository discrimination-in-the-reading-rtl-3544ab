// tb_error_generator: runs error_generator against an ideal position integrator that
// obeys error / e_block_minus, first forward then backward, with a small error list.
// Checks the list size, where each error fires (position + 2 = {hi, 7F} forward,
// position = {hi, 3F} backward), the range of the drawn positions, the 320-tick
// playback and its minus/hold/minus profile forward and pure hold backward.
module tb_error_generator;
  import enc_pkg::*;
  localparam int MAXF = 6, SPAN = 3, QMIN = 3;
  logic clk = 1'b0, rst = 1'b1, ce = 1'b1, enable = 1'b0;
  logic signed [EU_W-1:0] pos = '0, speed = '0;
  logic error, e_block_minus;
  logic [EU_W-1:0] error_pos;
  logic [2:0] q_errors;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  error_generator #(.MAX_ERRORS(4), .QERR_MIN(QMIN), .QERR_RAND_BITS(1),
                    .MAX_FIRST_ERR(MAXF), .ERR_SPAN(SPAN), .SEED(32'h1234_5678)) dut (
    .clk, .rst, .ce, .enable, .pos_eu_in(pos), .direction(speed),
    .error, .e_block_minus, .error_pos, .q_errors);

  // Ideal eu_pos.
  always_ff @(posedge clk)
    if (ce) begin
      if (!error) pos <= pos + speed;
      else if (!e_block_minus) pos <= pos - speed;
    end

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

  int n_fwd = 0, n_back = 0, len, n_minus, n_hold, first_hold, last_hold;
  logic was_error = 1'b0;
  logic signed [EU_W-1:0] pos_at_start;

  // Watch every playback from its first tick.
  always @(posedge clk) begin
    #1;
    if (error && !was_error) begin
      // The match was seen on the previous tick with the position before the move.
      if (speed > 0) begin
        n_fwd++;
        check(error_pos[7:0] == 8'h7F, $sformatf("forward suffix %h", error_pos));
        check(pos_at_start + 2 == error_pos, $sformatf("forward match pos %h err %h", pos_at_start, error_pos));
      end else begin
        n_back++;
        check(error_pos[7:0] == 8'h3F, $sformatf("backward suffix %h", error_pos));
        check(pos_at_start == error_pos, $sformatf("backward match pos %h err %h", pos_at_start, error_pos));
      end
      check(error_pos[EU_W-1:8] <= MAXF + SPAN, $sformatf("error position %h out of range", error_pos));
      len = 0; n_minus = 0; n_hold = 0; first_hold = -1; last_hold = -1;
    end
    if (error) begin
      if (e_block_minus) begin
        n_hold++;
        if (first_hold < 0) first_hold = len;
        last_hold = len;
      end else n_minus++;
      len++;
    end
    if (!error && was_error) begin
      check(len == 320, $sformatf("playback length %0d", len));
      if (speed > 0) check(n_minus == 192 && n_hold == 128 && first_hold == 128 && last_hold == 255,
                           $sformatf("forward profile minus %0d hold %0d from %0d to %0d",
                                     n_minus, n_hold, first_hold, last_hold));
      else check(n_hold == 320, $sformatf("backward profile hold %0d", n_hold));
    end
    was_error = error;
    pos_at_start = pos;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    repeat (5) @(posedge clk);
    enable <= 1'b1;
    repeat (3) @(posedge clk);
    enable <= 1'b0;
    repeat (10) @(posedge clk);
    #2 check(q_errors == QMIN || q_errors == QMIN + 1, $sformatf("q_errors %0d", q_errors));
    speed <= 1;
    wait (pos >= ((MAXF + SPAN + 2) << 8));
    @(posedge clk);
    speed <= -1;
    wait (pos <= 0);
    @(posedge clk);
    speed <= 0;
    repeat (400) @(posedge clk);
    check(n_fwd >= 1 && n_fwd <= q_errors, $sformatf("forward errors %0d of %0d", n_fwd, q_errors));
    check(n_back >= 1, $sformatf("backward errors %0d", n_back));
    $display("forward errors %0d, backward errors %0d, list of %0d", n_fwd, n_back, q_errors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
