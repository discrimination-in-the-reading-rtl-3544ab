// eu_pos: encoder-unit position integrator.
//
// Each tick the acceleration is added into an acceleration register and the position
// advances by speed plus that accumulated acceleration, so that position is the
// integral of speed and speed the integral of acceleration; the output is this
// integral offset by pos_in, the initial position.
//
// While error is high the integrators freeze and the position either steps back by
// the current velocity (e_block_minus = 0) or holds (e_block_minus = 1). The error
// generator uses these two moves to reproduce on the A/B channels the pattern left by
// a lost count. Stepping back by exactly one velocity step is this implementation's
// reading of "decrease".
//
// Interface: clk, synchronous active-high rst, ce (1.47 MHz tick). pos_out is
// registered: it reflects the inputs of the previous tick.
module eu_pos
  import enc_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   ce,
  input  logic                   error,
  input  logic                   e_block_minus,
  input  logic signed [EU_W-1:0] accel,
  input  logic signed [EU_W-1:0] speed,
  input  logic signed [EU_W-1:0] pos_in,
  output logic signed [EU_W-1:0] pos_out
);

  logic signed [EU_W-1:0] accel_reg;
  logic signed [EU_W-1:0] pos_reg;
  logic signed [EU_W-1:0] velocity;

  assign velocity = speed + accel_reg;

  always_ff @(posedge clk) begin
    if (rst) begin
      accel_reg <= '0;
      pos_reg   <= '0;
    end else if (ce) begin
      if (!error) begin
        accel_reg <= accel_reg + accel;
        pos_reg   <= pos_reg + velocity;
      end else if (!e_block_minus) begin
        pos_reg   <= pos_reg - velocity;
      end
    end
  end

  assign pos_out = pos_reg + pos_in;

endmodule
