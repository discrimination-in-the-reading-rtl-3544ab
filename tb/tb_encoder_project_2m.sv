// tb_encoder_project_2m: the 2 m capacity case. A round trip of 5,931,642 eu
// (78.86 in, 2 m) each way must fit the 24-bit position and the 512 kB RAM: about
// 185,000 transition records. To finish in seconds the emulation runs at 50 MHz
// (DIV_ENC = 2) and the capture at 50 MHz (DIV_RAM = 2) with a short read gap; one
// A/B state then lasts 128 cycles = 6.4 counted "microseconds", stored as 3.
// project_monitor checks every byte and the captured sequence as in the other
// end-to-end runs.
module tb_encoder_project_2m;
  import enc_pkg::*;
  localparam int unsigned MAXP = 5931642;
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

  encoder_project #(.MAX_POS(MAXP), .DIV_ENC(2), .DIV_RAM(2), .READ_GAP(4)) dut (.*);
  project_monitor #(.MAX_POS(MAXP), .CLEAN_LO(3), .CLEAN_HI(3)) u_mon (.*);

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_words;
  initial begin
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    repeat (10) @(posedge clk);
    btn_encop <= 1'b1;
    repeat (6) @(posedge clk);
    btn_encop <= 1'b0;
    wait (running);
    wait (!running);
    repeat (100) @(posedge clk);
    n_words = int'(wr_count);
    checks++;
    if (n_words < 2 * MAXP / 64) begin failures++; $display("FAIL: only %0d records", n_words); end
    btn_read <= 1'b1;
    repeat (10) @(posedge clk);
    btn_read <= 1'b0;
    // The pulse train runs past the last record; with the short gap the next pulse
    // comes 12 cycles later, so stop as soon as the last record is back.
    wait (u_mon.n_reads >= n_words);
    repeat (2) @(posedge clk);
    u_mon.report(checks, failures);
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
