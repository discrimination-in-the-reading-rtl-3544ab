// tb_read_ram: the read pulse train. With empty high a button press gives one-tick
// pulses every 202 ticks that keep coming after the button is released; empty low
// stops them and blocks the button.
module tb_read_ram;
  logic clk = 1'b0, rst = 1'b1, ce = 1'b1, button_read = 1'b0, empty = 1'b0;
  logic read_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  read_ram dut (.clk, .rst, .ce, .button_read, .empty, .read_data);

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

  int cyc = 0, n = 0, last = -1, press = 0;
  logic prev = 1'b0;
  always @(posedge clk) begin
    cyc++;
    if (read_data) begin
      n++;
      if (prev) begin checks++; failures++; $display("FAIL: pulse wider than one tick"); end
      if (last >= 0) check(cyc - last == 202, $sformatf("pulse spacing %0d", cyc - last));
      else check(cyc - press >= 200 && cyc - press <= 205, $sformatf("first pulse after %0d", cyc - press));
      last = cyc;
    end
    prev = read_data;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    // Not empty: the button does nothing.
    button_read <= 1'b1;
    repeat (600) @(posedge clk);
    button_read <= 1'b0;
    check(n == 0, "no pulses while writing");
    empty <= 1'b1;
    repeat (10) @(posedge clk);
    button_read <= 1'b1; press = cyc + 1;
    repeat (5) @(posedge clk);
    button_read <= 1'b0;
    repeat (202 * 10) @(posedge clk);
    check(n == 10, $sformatf("%0d pulses in 10 periods", n));
    empty <= 1'b0;
    repeat (5) @(posedge clk);
    n = 0;
    repeat (1000) @(posedge clk);
    check(n == 0, "pulses stop when empty falls");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
