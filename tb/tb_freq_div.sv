// tb_freq_div: checks the two strobe periods of freq_div (68 and 10 board cycles)
// and that each strobe is one cycle wide.
module tb_freq_div;
  logic clk = 1'b0, rst = 1'b1;
  logic ce_enc, ce_ram;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  freq_div dut (.clk, .rst, .ce_enc, .ce_ram);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, last_enc = -1, last_ram = -1, n_enc = 0, n_ram = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (5000) begin
      @(posedge clk);
      cyc++;
      if (ce_enc) begin
        if (last_enc >= 0) check(cyc - last_enc == 68, $sformatf("ce_enc period %0d", cyc - last_enc));
        last_enc = cyc; n_enc++;
      end
      if (ce_ram) begin
        if (last_ram >= 0) check(cyc - last_ram == 10, $sformatf("ce_ram period %0d", cyc - last_ram));
        last_ram = cyc; n_ram++;
      end
    end
    check(n_enc == 5000 / 68 || n_enc == 5000 / 68 + 1, $sformatf("ce_enc count %0d", n_enc));
    check(n_ram == 500, $sformatf("ce_ram count %0d", n_ram));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
