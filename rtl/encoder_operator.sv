// encoder_operator: motion profile of the encoder emulation.
//
// A press of the "encoder operation" button starts a constant-speed round trip: the
// speed output is +1 eu per tick until the position reaches MAX_POS (20 inches,
// 1,536,000 eu), then -1 eu per tick until the position is back at zero, after which
// the block returns to idle with speed 0. The acceleration output is always zero and
// the initial-position output is always zero, as in the original design, where the
// constant-acceleration profile was dropped (its acceleration, of the order of 1e-6
// eu per tick squared, would need fixed-point arithmetic).
//
// enable is the button registered once per tick; the error generator builds its
// list of error positions on its falling edge, i.e. when the button is released.
//
// The turn-around and the stop are decided one step early (at MAX_POS-1 going
// forward, at 1 going back), so that the position peaks at exactly MAX_POS and comes
// to rest at exactly zero; this exact-landing detail is this implementation's choice.
//
// Interface: clk, synchronous active-high rst, ce (1.47 MHz tick). speed_out is
// combinational from the state; state changes take effect on the next tick.
module encoder_operator
  import enc_pkg::*;
#(
  parameter int unsigned MAX_POS = 1536000
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   ce,
  input  logic                   speed_cte,    // constant-speed button
  input  logic signed [EU_W-1:0] position_eu,  // feedback of the current position
  output logic                   enable,
  output logic                   running,
  output logic signed [EU_W-1:0] accel_out,
  output logic signed [EU_W-1:0] speed_out,
  output logic signed [EU_W-1:0] pos_out
);

  typedef enum logic [1:0] {OP_IDLE, OP_FORWARD, OP_BACKWARD} op_state_t;
  op_state_t state;

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= OP_IDLE;
      enable <= 1'b0;
    end else if (ce) begin
      enable <= speed_cte;
      unique case (state)
        OP_IDLE:     if (speed_cte) state <= OP_FORWARD;
        OP_FORWARD:  if (position_eu >= EU_W'(signed'(MAX_POS - 1))) state <= OP_BACKWARD;
        OP_BACKWARD: if (position_eu <= EU_W'(1)) state <= OP_IDLE;
        default:     state <= OP_IDLE;
      endcase
    end
  end

  always_comb begin
    unique case (state)
      OP_FORWARD:  speed_out = EU_W'(1);
      OP_BACKWARD: speed_out = -EU_W'(1);
      default:     speed_out = '0;
    endcase
  end

  assign running   = (state != OP_IDLE);
  assign accel_out = '0;
  assign pos_out   = '0;

endmodule
