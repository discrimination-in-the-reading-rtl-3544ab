// tb_encoder_project_full: one complete operation of the encoder project with every
// parameter at its default: a 20-inch (1,536,000 eu) trip out and back at 1.47 MHz
// with 16 to 19 random lost counts, about 48,000 transitions captured into the 512 kB
// RAM at 10 MHz, then the whole capture read back one byte every 20.2 us and checked
// by project_monitor. About 3.1 s of board time.
module tb_encoder_project_full;
  import enc_pkg::*;
  localparam int unsigned MAXP = 1536000;
  logic clk = 1'b0, rst = 1'b1, btn_encop = 1'b0, btn_read = 1'b0;
  logic ce_enc, ce_ram, empty, running, error;
  ab_t channel_ab;
  logic signed [EU_W-1:0] position_eu;
  logic [EU_W-1:0] error_pos;
  logic [4:0] q_errors;
  logic ram_ce_n, ram_oe_n, ram_we_n, data_valid, read_data;
  logic [ADDR_W-1:0] mem_adr, wr_count;
  logic [DATA_W-1:0] mem_db_wr, mem_db_rd;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  encoder_project dut (.*);
  project_monitor #(.MAX_POS(MAXP)) u_mon (.*);

  initial begin
    repeat (400_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_words;
  initial begin
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    repeat (100) @(posedge clk);
    btn_encop <= 1'b1;
    repeat (3 * 68) @(posedge clk);
    btn_encop <= 1'b0;
    wait (running);
    wait (!running);
    repeat (1000) @(posedge clk);
    n_words = int'(wr_count);
    btn_read <= 1'b1;
    repeat (1000) @(posedge clk);
    btn_read <= 1'b0;
    wait (u_mon.n_reads >= n_words);
    repeat (100) @(posedge clk);
    u_mon.report(checks, failures);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
