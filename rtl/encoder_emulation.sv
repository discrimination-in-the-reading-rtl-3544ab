// encoder_emulation: an optical strip encoder with lost counts, in logic.
//
// encoder_operator sets the motion (a constant-speed round trip of MAX_POS eu out and
// back after the button is pressed); eu_pos integrates it into the encoder-unit
// position; error_generator watches that position and, at randomly drawn places,
// makes eu_pos step back or hold so that the AB channels show the pattern of a lost
// count; eu_conv_ab turns position bits [7:6] into the A and B channels and raises
// empty when the position is back at zero. At one eu per tick and 64 eu per AB state,
// each state lasts 64 ticks, 43.5 us at 1.47 MHz.
//
// Interface: clk, synchronous active-high rst, ce (the 1.47 MHz tick), btn_encop (the
// encoder-operation button). channel_ab and empty go to the capture side;
// position_eu, error, error_pos and q_errors are for observation.
module encoder_emulation
  import enc_pkg::*;
#(
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
  input  logic                   ce,
  input  logic                   btn_encop,
  output ab_t                    channel_ab,
  output logic                   empty,
  output logic                   running,
  output logic signed [EU_W-1:0] position_eu,
  output logic                   error,
  output logic [EU_W-1:0]        error_pos,
  output logic [$clog2(MAX_ERRORS+1)-1:0] q_errors
);

  logic                   enable;
  logic                   e_block_minus;
  logic signed [EU_W-1:0] accel, speed, pos_init;

  encoder_operator #(.MAX_POS(MAX_POS)) u_operator (
    .clk, .rst, .ce,
    .speed_cte  (btn_encop),
    .position_eu(position_eu),
    .enable     (enable),
    .running    (running),
    .accel_out  (accel),
    .speed_out  (speed),
    .pos_out    (pos_init)
  );

  eu_pos u_eu_pos (
    .clk, .rst, .ce,
    .error        (error),
    .e_block_minus(e_block_minus),
    .accel        (accel),
    .speed        (speed),
    .pos_in       (pos_init),
    .pos_out      (position_eu)
  );

  error_generator #(
    .MAX_ERRORS    (MAX_ERRORS),
    .QERR_MIN      (QERR_MIN),
    .QERR_RAND_BITS(QERR_RAND_BITS),
    .MAX_FIRST_ERR (MAX_FIRST_ERR),
    .ERR_SPAN      (ERR_SPAN),
    .SEED          (SEED)
  ) u_error_gen (
    .clk, .rst, .ce,
    .enable       (enable),
    .pos_eu_in    (position_eu),
    .direction    (speed),
    .error        (error),
    .e_block_minus(e_block_minus),
    .error_pos    (error_pos),
    .q_errors     (q_errors)
  );

  eu_conv_ab u_conv_ab (
    .clk, .rst, .ce,
    .position_eu(position_eu),
    .empty      (empty),
    .channel_ab (channel_ab)
  );

endmodule
