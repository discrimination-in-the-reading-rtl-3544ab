// tb_address_control: random write bursts (single and back-to-back requests) into
// address_control, with a reference RAM sampled on each tick; checks that every
// byte lands at the next consecutive address packed as {ts[6:1], AB}, that reads
// then return addresses 0, 1, 2, ... with OE low and WE high, that simultaneous
// requests are ignored and that rst_wr rewinds both counters.
module tb_address_control;
  import enc_pkg::*;
  logic clk = 1'b0, rst = 1'b1, ce = 1'b1, rst_wr = 1'b0;
  ab_t data_ab = '0;
  logic [TS_W-1:0] data_timestamp = '0;
  logic write_data = 1'b0, read_data = 1'b0;
  logic ram_ce_n, ram_oe_n, ram_we_n;
  logic [DATA_W-1:0] mem_db;
  logic [ADDR_W-1:0] mem_adr, wr_count;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  address_control dut (.clk, .rst, .ce, .rst_wr, .data_ab, .data_timestamp, .write_data,
    .read_data, .ram_ce_n, .ram_oe_n, .ram_we_n, .mem_db, .mem_adr, .wr_count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok && failures < 20) $display("FAIL: %s", what);
    if (!ok) failures++;
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference RAM port observer.
  logic [DATA_W-1:0] written[int];
  int wr_order[$], rd_order[$];
  always @(posedge clk) if (!rst && ce && !ram_ce_n) begin
    check(ram_we_n || ram_oe_n, "OE and WE low together");
    if (!ram_we_n) begin written[int'(mem_adr)] = mem_db; wr_order.push_back(int'(mem_adr)); end
    else if (!ram_oe_n) rd_order.push_back(int'(mem_adr));
  end

  logic [DATA_W-1:0] expect_q[$];
  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    // Requests change on the falling edge; about half the ticks carry a write, so
    // single and back-to-back writes both occur.
    begin
      int n = 0;
      while (n < 400) begin
        ab_t a; logic [TS_W-1:0] t;
        @(negedge clk);
        a = ab_t'($urandom()); t = TS_W'($urandom());
        data_ab = a; data_timestamp = t;
        write_data = ($urandom_range(0, 1) == 1);
        if (write_data) begin expect_q.push_back({t[6:1], a}); n++; end
      end
      @(negedge clk);
      write_data = 1'b0;
    end
    write_data <= 1'b0;
    repeat (3) @(posedge clk);
    check(wr_count == 400, $sformatf("wr_count %0d", wr_count));
    check(wr_order.size() == 400, $sformatf("%0d writes seen", wr_order.size()));
    foreach (wr_order[i]) check(wr_order[i] == i, $sformatf("write %0d at address %0d", i, wr_order[i]));
    for (int i = 0; i < 400; i++)
      check(written.exists(i) && written[i] == expect_q[i], $sformatf("byte %0d", i));
    // Both requests at once: nothing happens.
    write_data <= 1'b1; read_data <= 1'b1;
    @(posedge clk);
    write_data <= 1'b0; read_data <= 1'b0;
    repeat (3) @(posedge clk);
    check(wr_count == 400 && rd_order.size() == 0, "simultaneous requests ignored");
    // Reads, single and back to back.
    begin
      int n = 0;
      while (n < 50) begin
        @(negedge clk);
        read_data = ($urandom_range(0, 1) == 1);
        if (read_data) n++;
      end
      @(negedge clk);
    end
    read_data <= 1'b0;
    repeat (3) @(posedge clk);
    check(rd_order.size() == 50, $sformatf("%0d reads seen", rd_order.size()));
    foreach (rd_order[i]) check(rd_order[i] == i, $sformatf("read %0d at address %0d", i, rd_order[i]));
    // Rewind.
    rst_wr <= 1'b1;
    @(posedge clk);
    rst_wr <= 1'b0;
    @(posedge clk);
    check(wr_count == 0, "rst_wr clears the write address");
    wr_order.delete();
    rd_order.delete();
    data_ab <= 2'b11; data_timestamp <= 7'h55; write_data <= 1'b1;
    @(posedge clk);
    write_data <= 1'b0; read_data <= 1'b1;
    @(posedge clk);
    read_data <= 1'b0;
    repeat (3) @(posedge clk);
    check(wr_order.size() == 1 && wr_order[0] == 0 && written[0] == 8'hAB, "write after rewind at 0");
    check(rd_order.size() == 1 && rd_order[0] == 0, "read after rewind at 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
