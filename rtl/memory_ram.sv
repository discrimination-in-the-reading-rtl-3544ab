// memory_ram: the 512 kB, 8-bit board SRAM as a synchronous memory.
//
// 2^ADDR_W bytes with the board's active-low chip enable, output enable and write
// enable. On a RAM tick with CE and WE low the byte on db_in is stored at the
// address; with CE and OE low (WE high) the addressed byte appears on db_out after
// the tick and is held until the next read. The data bus is split into an input and
// an output instead of the board's bidirectional bus. Requiring WE low for a write is
// this implementation's reading of the SRAM protocol; the contents are not
// initialised.
//
// Interface: clk, ce (10 MHz tick). One tick of latency on reads.
module memory_ram #(
  parameter int unsigned ADDR_W = 19,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              ce,
  input  logic              ram_ce_n,
  input  logic              ram_oe_n,
  input  logic              ram_we_n,
  input  logic [DATA_W-1:0] db_in,
  output logic [DATA_W-1:0] db_out,
  input  logic [ADDR_W-1:0] mem_adr
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (ce && !ram_ce_n) begin
      if (!ram_we_n) mem[mem_adr] <= db_in;
      else if (!ram_oe_n) db_out <= mem[mem_adr];
    end
  end

endmodule
