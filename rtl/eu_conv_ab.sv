// eu_conv_ab: encoder-unit position to quadrature channels.
//
// A peu is 128 eu, so position bits [7:6] name the quarter of the current line and
// hence the AB state: 00 -> AB 10, 01 -> 11, 10 -> 01, 11 -> 00. Going forward the
// channels walk 10, 11, 01, 00; going back the same cycle in reverse. Bits [7:6] are
// registered once per tick and decoded.
//
// empty is high while the position is zero: before a run and after the round trip
// has come back to its origin, which tells the capture side that writing is over.
//
// Interface: clk, synchronous active-high rst (AB then decodes state 00, i.e. 10),
// ce (1.47 MHz tick). channel_ab lags position_eu by one tick; empty is combinational.
module eu_conv_ab
  import enc_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            ce,
  input  logic [EU_W-1:0] position_eu,
  output logic            empty,
  output ab_t             channel_ab
);

  logic [1:0] state_bits;

  always_ff @(posedge clk) begin
    if (rst)     state_bits <= 2'b00;
    else if (ce) state_bits <= position_eu[STATE_LSB+1:STATE_LSB];
  end

  assign channel_ab = ab_of_state(state_bits);
  assign empty      = (position_eu == '0);

endmodule
