// address_control: memory controller of the capture side.
//
// A three-state machine (idle, write, read) turns write and read requests into the
// active-low CE, OE and WE of the RAM, its address and its write data. A write stores
// the byte {ts[6:1], AB} at the write address; the write address then advances, so
// transitions fill the RAM in order. A read puts the read address on the bus with CE
// and OE low and advances the read address, so the RAM is read back first in, first
// out. Requests may follow each other tick by tick; with no request the machine
// releases the strobes and returns to idle. Simultaneous read and write requests are
// both ignored, as in the original.
//
// rst_wr (the encoder-operation button) clears both address counters, so every run
// writes from address zero. Unlike the original, a read keeps WE high and a write
// keeps OE high whatever the previous state; an assertion checks that the two never
// fall together.
//
// Interface: clk, synchronous active-high rst, ce (10 MHz tick). The strobes, address
// and data are registered: a request seen at one tick drives the RAM during the next,
// and the RAM acts on the tick after that. wr_count is the number of bytes written.
module address_control
  import enc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              ce,
  input  logic              rst_wr,
  input  ab_t               data_ab,
  input  logic [TS_W-1:0]   data_timestamp,
  input  logic              write_data,
  input  logic              read_data,
  output logic              ram_ce_n,
  output logic              ram_oe_n,
  output logic              ram_we_n,
  output logic [DATA_W-1:0] mem_db,
  output logic [ADDR_W-1:0] mem_adr,
  output logic [ADDR_W-1:0] wr_count
);

  typedef enum logic [1:0] {S0_IDLE, S1_WRITE, S2_READ} ctrl_state_t;
  ctrl_state_t state;

  logic [ADDR_W-1:0] addr_w, addr_r;
  logic              do_write, do_read;

  assign do_write = write_data && !read_data;
  assign do_read  = read_data && !write_data;

  always_ff @(posedge clk) begin
    if (rst || (ce && rst_wr)) begin
      state    <= S0_IDLE;
      addr_w   <= '0;
      addr_r   <= '0;
      mem_adr  <= '0;
      mem_db   <= '0;
      ram_ce_n <= 1'b1;
      ram_oe_n <= 1'b1;
      ram_we_n <= 1'b1;
    end else if (ce) begin
      // Leaving the write state: the byte just written is done.
      if (state == S1_WRITE) begin
        addr_w  <= addr_w + 1'b1;
        mem_adr <= addr_w + 1'b1;
      end
      if (do_write) begin
        ram_ce_n <= 1'b0;
        ram_we_n <= 1'b0;
        ram_oe_n <= 1'b1;
        mem_db   <= pack_record(data_timestamp, data_ab);
        if (state != S1_WRITE) mem_adr <= addr_w;
        state    <= S1_WRITE;
      end else if (do_read) begin
        ram_ce_n <= 1'b0;
        ram_oe_n <= 1'b0;
        ram_we_n <= 1'b1;
        mem_adr  <= addr_r;
        addr_r   <= addr_r + 1'b1;
        state    <= S2_READ;
      end else begin
        ram_ce_n <= 1'b1;
        ram_oe_n <= 1'b1;
        ram_we_n <= 1'b1;
        state    <= S0_IDLE;
      end
    end
  end

  assign wr_count = addr_w;

  // The RAM must never see a read and a write at once.
  always @(posedge clk) begin
    if (!rst) assert (ram_oe_n || ram_we_n)
      else $error("address_control: OE and WE low together");
  end

endmodule
