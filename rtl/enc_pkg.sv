// enc_pkg: widths, constants and helpers shared by the encoder emulation and the
// capture logic.
//
// The emulated strip encoder has 150 lines per inch and four quadrature states per
// line, so one physical encoder unit (peu) is 1/600 inch. Each peu is split into
// 2^7 = 128 encoder units (eu), the resolution of the emulation; each of the four AB
// states therefore lasts 64 eu. Positions are 24-bit two's-complement eu counts, the
// sign of the speed giving the direction of travel. The capture side stores one byte
// per AB transition: the upper six bits of a 7-bit microsecond duration and the two AB
// bits, into a 2^19-byte (512 kB) memory.
package enc_pkg;

  // Encoder-unit position and speed width (sign bit included).
  localparam int unsigned EU_W = 24;
  // Position bits that select one of the four AB states inside a peu.
  localparam int unsigned STATE_LSB = 6;
  // RAM geometry: 19 address bits, 8 data bits.
  localparam int unsigned ADDR_W = 19;
  localparam int unsigned DATA_W = 8;
  // Width of the transition duration measured in microseconds.
  localparam int unsigned TS_W = 7;

  // Quadrature channels, {A, B}.
  typedef logic [1:0] ab_t;

  // AB value for position bits [7:6]. Increasing position walks the forward cycle
  // 00 -> 10 -> 11 -> 01 -> 00 on {A,B}.
  function automatic ab_t ab_of_state(input logic [1:0] st);
    unique case (st)
      2'b00:   return 2'b10;
      2'b01:   return 2'b11;
      2'b10:   return 2'b01;
      default: return 2'b00;
    endcase
  endfunction

  // Byte stored in RAM for one transition: duration bits [6:1] followed by AB.
  function automatic logic [DATA_W-1:0] pack_record(input logic [TS_W-1:0] ts, input ab_t ab);
    return {ts[TS_W-1:1], ab};
  endfunction

endpackage
