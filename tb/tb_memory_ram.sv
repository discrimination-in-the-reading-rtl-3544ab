// tb_memory_ram: random writes and reads on a reduced memory_ram against a reference
// array; checks one-tick read latency, that reads (WE high) do not write, and that
// nothing happens with CE high or without a tick.
module tb_memory_ram;
  localparam int AW = 10;
  logic clk = 1'b0, ce = 1'b1;
  logic ram_ce_n = 1'b1, ram_oe_n = 1'b1, ram_we_n = 1'b1;
  logic [7:0] db_in = '0, db_out;
  logic [AW-1:0] mem_adr = '0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  memory_ram #(.ADDR_W(AW)) dut (.clk, .ce, .ram_ce_n, .ram_oe_n, .ram_we_n, .db_in, .db_out, .mem_adr);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok && failures < 20) $display("FAIL: %s", what);
    if (!ok) failures++;
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] ref_mem [2**AW];
  initial begin
    @(posedge clk);
    // Fill every address.
    for (int a = 0; a < 2**AW; a++) begin
      ref_mem[a] = 8'($urandom());
      ram_ce_n <= 1'b0; ram_we_n <= 1'b0; ram_oe_n <= 1'b1; mem_adr <= AW'(a); db_in <= ref_mem[a];
      @(posedge clk);
    end
    // Random mix.
    for (int i = 0; i < 4000; i++) begin
      int a, op;
      a = $urandom_range(0, 2**AW - 1);
      op = $urandom_range(0, 3);
      mem_adr <= AW'(a);
      db_in <= 8'($urandom());
      ce <= (op != 3) || ($urandom_range(0, 1) == 0);
      case (op)
        0: begin ram_ce_n <= 1'b0; ram_we_n <= 1'b0; ram_oe_n <= 1'b1; end
        1, 3: begin ram_ce_n <= 1'b0; ram_we_n <= 1'b1; ram_oe_n <= 1'b0; end
        default: begin ram_ce_n <= 1'b1; ram_we_n <= 1'b0; ram_oe_n <= 1'b0; end
      endcase
      @(posedge clk);
      #1;
      if (ce && !ram_ce_n && !ram_we_n) ref_mem[a] = db_in;
      else if (ce && !ram_ce_n && !ram_oe_n)
        check(db_out == ref_mem[a], $sformatf("read %0d got %h expected %h", a, db_out, ref_mem[a]));
    end
    // Read back everything.
    ce <= 1'b1;
    for (int a = 0; a < 2**AW; a++) begin
      ram_ce_n <= 1'b0; ram_we_n <= 1'b1; ram_oe_n <= 1'b0; mem_adr <= AW'(a);
      @(posedge clk);
      #1 check(db_out == ref_mem[a], $sformatf("final read %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
