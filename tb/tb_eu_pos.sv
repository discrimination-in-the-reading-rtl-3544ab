// tb_eu_pos: drives random acceleration, speed, initial position and error controls
// into eu_pos and compares the position with a reference integrator.
module tb_eu_pos;
  import enc_pkg::*;
  logic clk = 1'b0, rst = 1'b1, ce = 1'b0;
  logic error = 1'b0, e_block_minus = 1'b0;
  logic signed [EU_W-1:0] accel = '0, speed = '0, pos_in = '0, pos_out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  eu_pos dut (.clk, .rst, .ce, .error, .e_block_minus, .accel, .speed, .pos_in, .pos_out);

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [EU_W-1:0] m_acc = '0, m_pos = '0;
  int n_err = 0, n_blk = 0, n_minus = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      // Random stimulus, applied just after the clock edge.
      ce            <= ($urandom_range(0, 3) != 0);
      error         <= ($urandom_range(0, 4) == 0);
      e_block_minus <= $urandom_range(0, 1);
      accel         <= (i < 1500) ? '0 : EU_W'(signed'($urandom_range(0, 4)) - 2);
      speed         <= EU_W'(signed'($urandom_range(0, 6)) - 3);
      pos_in        <= (i % 500 < 250) ? '0 : EU_W'(1000);
      @(posedge clk);
      // Reference update with the values sampled at this edge.
      if (ce) begin
        if (!error) begin
          m_pos = m_pos + speed + m_acc;
          m_acc = m_acc + accel;
        end else if (!e_block_minus) begin
          m_pos = m_pos - (speed + m_acc);
          n_minus++;
        end else n_blk++;
        if (error) n_err++;
      end
      #1;
      checks++;
      if (pos_out !== m_pos + pos_in) begin
        failures++;
        if (failures < 10) $display("FAIL: step %0d pos_out %0d expected %0d", i, pos_out, m_pos + pos_in);
      end
    end
    checks++;
    if (n_blk == 0 || n_minus == 0) begin failures++; $display("FAIL: hold/minus never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
