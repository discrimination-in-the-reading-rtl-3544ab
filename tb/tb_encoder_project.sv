// tb_encoder_project: end-to-end run of the encoder project on its 100 MHz clock with
// the document's rates (1.47 MHz emulation, 10 MHz capture) but a shortened trip of
// 32768 eu (0.85 inch) each way and the error cluster moved within it. Presses the
// encoder-operation button, waits for the round trip, presses the read button and
// lets project_monitor check every byte and the captured sequence.
module tb_encoder_project;
  import enc_pkg::*;
  localparam int unsigned MAXP = 32768;
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

  encoder_project #(.MAX_POS(MAXP), .MAX_FIRST_ERR(32'h30), .ERR_SPAN(32'h20)) dut (.*);
  project_monitor #(.MAX_POS(MAXP)) u_mon (.*);

  initial begin
    #200_000_000;
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
