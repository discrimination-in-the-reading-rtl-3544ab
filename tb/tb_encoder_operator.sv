// tb_encoder_operator: closes the loop with an ideal integrator and checks the
// round trip: +1 eu/tick up to MAX_POS, -1 eu/tick back to 0, then idle; enable
// follows the button one tick later; the trip takes 2*MAX_POS ticks.
module tb_encoder_operator;
  import enc_pkg::*;
  localparam int MAXP = 1000;
  logic clk = 1'b0, rst = 1'b1, ce = 1'b1, speed_cte = 1'b0;
  logic signed [EU_W-1:0] position_eu = '0, accel_out, speed_out, pos_out;
  logic enable, running;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  encoder_operator #(.MAX_POS(MAXP)) dut (.clk, .rst, .ce, .speed_cte, .position_eu,
    .enable, .running, .accel_out, .speed_out, .pos_out);

  always_ff @(posedge clk) if (ce) position_eu <= position_eu + speed_out;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int peak = 0, ticks = 0, bad_speed = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    repeat (3) @(posedge clk);
    #1 check(speed_out == 0 && !running, "idle before the button");
    speed_cte = 1'b1;
    @(posedge clk); #1;
    check(enable, "enable follows the button");
    speed_cte = 1'b0;
    @(posedge clk); #1;
    check(!enable, "enable falls with the button");
    while (running && ticks < 10 * MAXP) begin
      if (position_eu > peak) peak = position_eu;
      if (accel_out != 0 || pos_out != 0) bad_speed++;
      if (speed_out != 1 && speed_out != -1) bad_speed++;
      @(posedge clk); #1;
      ticks++;
    end
    check(peak == MAXP, $sformatf("peak %0d", peak));
    check(position_eu == 0, $sformatf("end position %0d", position_eu));
    check(bad_speed == 0, "speed is +-1 and accel/pos outputs are 0 during the run");
    check(ticks >= 2 * MAXP - 2 && ticks <= 2 * MAXP + 2, $sformatf("trip took %0d ticks", ticks));
    repeat (20) @(posedge clk);
    #1 check(speed_out == 0 && position_eu == 0, "rests at zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
