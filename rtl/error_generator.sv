// error_generator: random lost-count errors for the encoder emulation.
//
// Error list. When the operator's enable falls (button released), the block draws the
// number of errors, QERR_MIN plus QERR_RAND_BITS random bits (16 to 19), and a first
// error uniformly in [0, MAX_FIRST_ERR]; the remaining errors are drawn uniformly in
// [first, first + ERR_SPAN], ERR_SPAN = 177 being 1.5 cm of strip in units of 256 eu.
// Only the upper 16 bits of each 24-bit error position are kept; the lower byte is a
// direction-dependent suffix, 7F going forward and 3F going back, the last eu of the
// AB state in which a lost count first shows. One list entry is written per tick
// after the falling edge. Random numbers come from a free-running 32-bit LFSR
// (x^32+x^22+x^2+x+1), scaled to a range by multiply-and-shift.
//
// Matching. Going forward an entry matches when {entry, 7F} equals position + 2;
// going back when {entry, 3F} equals the position. The hit entry, and any other entry
// holding the same value, is disarmed so that the position, which moves back over it
// while the error plays, cannot re-trigger it, and the entry hit before it is
// re-armed so that it can fire again on the return.
// Matching is suspended while an error plays.
//
// Playback. error stays high for ERR_TICKS (320 = 5 AB states) ticks. Forward, the
// position first steps back for MINUS1_TICKS (128), holds for BLOCK_TICKS (128), then
// steps back for the remaining 64; backward it only holds. error_pos is the 24-bit
// position of the last error hit.
//
// Choices of this implementation: the LFSR in place of a simulator random-number
// generator, drawing the list at the falling edge of enable instead of at reset,
// the sequential fill, and suspending the match during playback.
//
// Interface: clk, synchronous active-high rst, ce (1.47 MHz tick). error and
// e_block_minus are registered and change one tick after the match.
module error_generator
  import enc_pkg::*;
#(
  parameter int unsigned MAX_ERRORS     = 19,
  parameter int unsigned QERR_MIN       = 16,
  parameter int unsigned QERR_RAND_BITS = 2,
  parameter int unsigned MAX_FIRST_ERR  = 32'h16BE,
  parameter int unsigned ERR_SPAN       = 32'hB1,
  parameter int unsigned ERR_TICKS      = 320,
  parameter int unsigned MINUS1_TICKS   = 128,
  parameter int unsigned BLOCK_TICKS    = 128,
  parameter logic [31:0] SEED           = 32'h0000_03E7
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            ce,
  input  logic            enable,
  input  logic [EU_W-1:0] pos_eu_in,
  input  logic [EU_W-1:0] direction,       // speed; its sign bit is the direction
  output logic            error,
  output logic            e_block_minus,
  output logic [EU_W-1:0] error_pos,
  output logic [$clog2(MAX_ERRORS+1)-1:0] q_errors
);

  localparam int unsigned IDX_W = $clog2(MAX_ERRORS);
  localparam int unsigned CNT_W = $clog2(ERR_TICKS);
  localparam int unsigned HI_W  = EU_W - 8;

  // Free-running LFSR, advanced every clock cycle.
  logic [31:0] lfsr;
  always_ff @(posedge clk) begin
    if (rst) lfsr <= (SEED == 32'd0) ? 32'd1 : SEED;
    else     lfsr <= {lfsr[30:0], lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0]};
  end

  // Uniform draw in [0, span] from 16 random bits.
  function automatic logic [HI_W-1:0] draw(input logic [15:0] r, input int unsigned span);
    logic [31:0] prod;
    prod = 32'(r) * 32'(span + 1);
    return prod[31:16];
  endfunction

  logic [HI_W-1:0]     entries [MAX_ERRORS];
  logic [MAX_ERRORS-1:0] armed;
  logic [HI_W-1:0]     first_err;
  logic                filling;
  logic [IDX_W-1:0]    fill_idx;
  logic                enable_q;
  logic                have_last;
  logic [IDX_W-1:0]    last_idx;
  logic                active, fwd;
  logic [CNT_W-1:0]    cnt;

  logic [EU_W-1:0] pos_plus2;
  logic            moving_back;
  logic [7:0]      suffix;
  logic            hit;
  logic [IDX_W-1:0] hit_idx;
  logic [MAX_ERRORS-1:0] match;

  assign moving_back = direction[EU_W-1];
  assign suffix      = moving_back ? 8'h3F : 8'h7F;
  assign pos_plus2   = pos_eu_in + EU_W'(2);

  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int i = MAX_ERRORS - 1; i >= 0; i--) begin
      match[i] = armed[i] && ({entries[i], suffix} == (moving_back ? pos_eu_in : pos_plus2));
      if (match[i]) begin
        hit     = 1'b1;
        hit_idx = IDX_W'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      armed     <= '0;
      filling   <= 1'b0;
      fill_idx  <= '0;
      enable_q  <= 1'b0;
      have_last <= 1'b0;
      last_idx  <= '0;
      active    <= 1'b0;
      fwd       <= 1'b0;
      cnt       <= '0;
      first_err <= '0;
      q_errors  <= '0;
      error_pos <= '0;
      for (int i = 0; i < MAX_ERRORS; i++) entries[i] <= '0;
    end else if (ce) begin
      enable_q <= enable;
      if (enable_q && !enable) begin
        // Start a new list.
        q_errors  <= $bits(q_errors)'(QERR_MIN) + $bits(q_errors)'(lfsr[16 +: QERR_RAND_BITS]);
        first_err <= draw(lfsr[15:0], MAX_FIRST_ERR);
        entries[0] <= draw(lfsr[15:0], MAX_FIRST_ERR);
        armed     <= MAX_ERRORS'(1);
        have_last <= 1'b0;
        fill_idx  <= IDX_W'(1);
        filling   <= 1'b1;
      end else if (filling) begin
        entries[fill_idx] <= first_err + draw(lfsr[15:0], ERR_SPAN);
        armed[fill_idx]   <= 1'b1;
        if (32'(fill_idx) + 1 >= 32'(q_errors)) filling <= 1'b0;
        fill_idx <= fill_idx + 1'b1;
      end else if (!active && hit) begin
        active    <= 1'b1;
        fwd       <= !moving_back;
        cnt       <= '0;
        error_pos <= {entries[hit_idx], suffix};
        armed <= (armed & ~match) |
                 ((have_last && !match[last_idx]) ? (MAX_ERRORS'(1) << last_idx) : '0);
        have_last <= 1'b1;
        last_idx  <= hit_idx;
      end else if (active) begin
        if (cnt == CNT_W'(ERR_TICKS - 1)) begin
          active <= 1'b0;
          cnt    <= '0;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  assign error = active;
  assign e_block_minus = active &&
      (!fwd || (cnt >= CNT_W'(MINUS1_TICKS) && cnt < CNT_W'(MINUS1_TICKS + BLOCK_TICKS)));

endmodule
