// trans_change_ab: captures the transitions of the quadrature channels.
//
// The channels are sampled on alternate RAM ticks: on the first tick of a pair the
// current AB value is captured, on the following ticks it is compared with the input
// until they differ. At a change the block raises data_valid for one tick and presents
// the state being left (ab_out) together with how long it lasted, in whole
// microseconds, as a 7-bit value that wraps modulo 128 (ts_diff). A new capture
// follows on the next tick.
//
// Time is kept by a microsecond counter advanced every TICKS_PER_US RAM ticks
// (10 at 10 MHz); the duration is the difference between the counter at this change
// and at the previous one, so it equals floor(t_now) - floor(t_prev) in microseconds.
// The original measured time with the simulator clock; the counter is this
// implementation's synthesizable equivalent.
//
// Interface: clk, synchronous active-high rst, ce (10 MHz tick). ab_out, ts_diff and
// data_valid are registered and hold from the tick after the change for one tick.
module trans_change_ab
  import enc_pkg::*;
#(
  parameter int unsigned TICKS_PER_US = 10
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            ce,
  input  ab_t             ab_channel,
  output ab_t             ab_out,
  output logic [TS_W-1:0] ts_diff,
  output logic            data_valid
);

  localparam int unsigned SUB_W = (TICKS_PER_US > 1) ? $clog2(TICKS_PER_US) : 1;

  logic [SUB_W-1:0] sub_cnt;
  logic [TS_W-1:0]  us_cnt;
  logic [TS_W-1:0]  last_us;
  logic             compare;
  ab_t              ab_held;

  // Microsecond time base.
  always_ff @(posedge clk) begin
    if (rst) begin
      sub_cnt <= '0;
      us_cnt  <= '0;
    end else if (ce) begin
      if (sub_cnt == SUB_W'(TICKS_PER_US - 1)) begin
        sub_cnt <= '0;
        us_cnt  <= us_cnt + 1'b1;
      end else begin
        sub_cnt <= sub_cnt + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      compare    <= 1'b0;
      ab_held    <= '0;
      last_us    <= '0;
      ts_diff    <= '0;
      data_valid <= 1'b0;
    end else if (ce) begin
      if (!compare) begin
        ab_held    <= ab_channel;
        data_valid <= 1'b0;
        compare    <= 1'b1;
      end else if (ab_channel != ab_held) begin
        data_valid <= 1'b1;
        ts_diff    <= us_cnt - last_us;
        last_us    <= us_cnt;
        compare    <= 1'b0;
      end
    end
  end

  assign ab_out = ab_held;

endmodule
