// data_to_file: simulation-only sink for the RAM read-back.
//
// On a RAM tick where OE is low the address is latched; on the next tick the byte the
// RAM returns is split into its 6-bit duration and 2-bit AB and presented as one
// record (rec_valid for one tick). With VERBOSE set each record is also printed as a
// text line "address duration AB", the format of the capture file. Not synthesizable
// logic: it stands for the host side that stores the capture.
module data_to_file
  import enc_pkg::*;
#(
  parameter bit VERBOSE = 1'b0
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ce,
  input  logic              ram_oe_n,
  input  logic [ADDR_W-1:0] mem_adr,
  input  logic [DATA_W-1:0] mem_db,
  output logic              rec_valid,
  output logic [ADDR_W-1:0] rec_addr,
  output logic [5:0]        rec_ts,
  output ab_t               rec_ab
);

  logic              pending = 1'b0;
  logic [ADDR_W-1:0] adr_q;

  initial rec_valid = 1'b0;

  always @(posedge clk) begin
    if (rst) begin
      pending   <= 1'b0;
      rec_valid <= 1'b0;
    end else if (ce) begin
      rec_valid <= 1'b0;
      if (pending) begin
        rec_valid <= 1'b1;
        rec_addr  <= adr_q;
        rec_ts    <= mem_db[7:2];
        rec_ab    <= mem_db[1:0];
        if (VERBOSE) $display("%0d %b %b", adr_q, mem_db[7:2], mem_db[1:0]);
      end
      pending <= !ram_oe_n;
      adr_q   <= mem_adr;
    end
  end

endmodule
