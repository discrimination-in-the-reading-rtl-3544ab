// encoder_project: encoder emulation, capture logic and RAM on one 100 MHz clock.
//
// freq_div makes the 1.47 MHz tick of the encoder emulation and the 10 MHz tick of
// the capture logic and RAM. Pressing btn_encop starts a 20-inch out-and-back run
// of the emulated encoder with randomly placed lost counts and, in the capture logic,
// rewinds the RAM write address; each AB transition of the run is stored as one byte
// {duration[6:1], AB} in the 512 kB RAM. When the run is over (empty high), pressing
// btn_read reads the RAM back, one byte every 20.2 us; each byte appears on mem_db_rd
// one RAM tick after ram_oe_n falls, and is meant to be logged as a line of the
// capture file together with the address on mem_adr.
//
// Interface: clk (100 MHz), synchronous active-high rst, the two buttons. The
// remaining outputs show the RAM bus and the emulation's state: channel_ab, empty,
// position_eu, error (a lost count being played), error_pos and q_errors.
// error_pos[7] is constant 0: both error suffixes (7F and 3F) have bit 7 clear.
module encoder_project
  import enc_pkg::*;
#(
  parameter int unsigned DIV_ENC        = 68,
  parameter int unsigned DIV_RAM        = 10,
  parameter int unsigned TICKS_PER_US   = 10,
  parameter int unsigned READ_GAP       = 200,
  parameter int unsigned MAX_POS        = 1536000,
  parameter int unsigned MAX_ERRORS     = 19,
  parameter int unsigned QERR_MIN       = 16,
  parameter int unsigned QERR_RAND_BITS = 2,
  parameter int unsigned MAX_FIRST_ERR  = 32'h16BE,
  parameter int unsigned ERR_SPAN       = 32'hB1,
  parameter logic [31:0] SEED           = 32'h0000_03E7
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   btn_encop,
  input  logic                   btn_read,
  output logic                   ce_enc,
  output logic                   ce_ram,
  output ab_t                    channel_ab,
  output logic                   empty,
  output logic                   running,
  output logic signed [EU_W-1:0] position_eu,
  output logic                   error,
  output logic [EU_W-1:0]        error_pos,
  output logic [$clog2(MAX_ERRORS+1)-1:0] q_errors,
  output logic                   ram_ce_n,
  output logic                   ram_oe_n,
  output logic                   ram_we_n,
  output logic [ADDR_W-1:0]      mem_adr,
  output logic [DATA_W-1:0]      mem_db_wr,
  output logic [DATA_W-1:0]      mem_db_rd,
  output logic                   data_valid,
  output logic                   read_data,
  output logic [ADDR_W-1:0]      wr_count
);

  freq_div #(.DIV_ENC(DIV_ENC), .DIV_RAM(DIV_RAM)) u_div (
    .clk, .rst,
    .ce_enc(ce_enc),
    .ce_ram(ce_ram)
  );

  encoder_emulation #(
    .MAX_POS       (MAX_POS),
    .MAX_ERRORS    (MAX_ERRORS),
    .QERR_MIN      (QERR_MIN),
    .QERR_RAND_BITS(QERR_RAND_BITS),
    .MAX_FIRST_ERR (MAX_FIRST_ERR),
    .ERR_SPAN      (ERR_SPAN),
    .SEED          (SEED)
  ) u_emul (
    .clk, .rst,
    .ce         (ce_enc),
    .btn_encop  (btn_encop),
    .channel_ab (channel_ab),
    .empty      (empty),
    .running    (running),
    .position_eu(position_eu),
    .error      (error),
    .error_pos  (error_pos),
    .q_errors   (q_errors)
  );

  cmod_a7 #(.TICKS_PER_US(TICKS_PER_US), .READ_GAP(READ_GAP)) u_cmod (
    .clk, .rst,
    .ce        (ce_ram),
    .ab        (channel_ab),
    .empty     (empty),
    .btn_encop (btn_encop),
    .btn_read  (btn_read),
    .ram_ce_n  (ram_ce_n),
    .ram_oe_n  (ram_oe_n),
    .ram_we_n  (ram_we_n),
    .mem_adr   (mem_adr),
    .mem_db_out(mem_db_wr),
    .data_valid(data_valid),
    .read_data (read_data),
    .wr_count  (wr_count)
  );

  memory_ram #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_ram (
    .clk,
    .ce      (ce_ram),
    .ram_ce_n(ram_ce_n),
    .ram_oe_n(ram_oe_n),
    .ram_we_n(ram_we_n),
    .db_in   (mem_db_wr),
    .db_out  (mem_db_rd),
    .mem_adr (mem_adr)
  );

endmodule
