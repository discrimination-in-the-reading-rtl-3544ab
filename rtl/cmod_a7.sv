// cmod_a7: the capture logic meant for the FPGA board.
//
// trans_change_ab turns every change of the A and B channels into a write request
// carrying the state just left and its duration in microseconds; address_control
// stores each as one byte in the RAM at consecutive addresses. After the run (empty
// high) the read button starts read_ram's pulse train, and address_control reads the
// RAM back in the order it was written. The encoder-operation button clears the
// address counters, so a new run overwrites the RAM from address zero.
//
// Interface: clk, synchronous active-high rst, ce (the 10 MHz tick), the AB channels
// and empty from the encoder, the two buttons, and the RAM's control, address and
// write-data signals. data_valid and read_data are the internal write and read
// requests, brought out for observation; wr_count is the number of bytes written.
module cmod_a7
  import enc_pkg::*;
#(
  parameter int unsigned TICKS_PER_US = 10,
  parameter int unsigned READ_GAP     = 200
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ce,
  input  ab_t               ab,
  input  logic              empty,
  input  logic              btn_encop,
  input  logic              btn_read,
  output logic              ram_ce_n,
  output logic              ram_oe_n,
  output logic              ram_we_n,
  output logic [ADDR_W-1:0] mem_adr,
  output logic [DATA_W-1:0] mem_db_out,
  output logic              data_valid,
  output logic              read_data,
  output logic [ADDR_W-1:0] wr_count
);

  ab_t             ab_prev;
  logic [TS_W-1:0] ts_diff;

  trans_change_ab #(.TICKS_PER_US(TICKS_PER_US)) u_trans (
    .clk, .rst, .ce,
    .ab_channel(ab),
    .ab_out    (ab_prev),
    .ts_diff   (ts_diff),
    .data_valid(data_valid)
  );

  read_ram #(.GAP(READ_GAP)) u_read (
    .clk, .rst, .ce,
    .button_read(btn_read),
    .empty      (empty),
    .read_data  (read_data)
  );

  address_control u_addr (
    .clk, .rst, .ce,
    .rst_wr        (btn_encop),
    .data_ab       (ab_prev),
    .data_timestamp(ts_diff),
    .write_data    (data_valid),
    .read_data     (read_data),
    .ram_ce_n      (ram_ce_n),
    .ram_oe_n      (ram_oe_n),
    .ram_we_n      (ram_we_n),
    .mem_db        (mem_db_out),
    .mem_adr       (mem_adr),
    .wr_count      (wr_count)
  );

endmodule
