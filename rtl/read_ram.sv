// read_ram: pulse train that reads the RAM back.
//
// Once the run is over (empty high) a press of the read button starts a train of
// one-tick read requests, one every GAP + 2 ticks (202 ticks, 20.2 us at 10 MHz),
// slow enough for each byte to be handed on before the next. The train runs until
// empty falls, i.e. until a new run starts, or reset. The gap is the original's; that
// reading waits for empty high follows its description ("it considers it empty if it
// has not finished writing yet"), not the opposite polarity of its listing.
//
// Interface: clk, synchronous active-high rst, ce (10 MHz tick). read_data is
// registered.
module read_ram #(
  parameter int unsigned GAP = 200
) (
  input  logic clk,
  input  logic rst,
  input  logic ce,
  input  logic button_read,
  input  logic empty,
  output logic read_data
);

  typedef enum logic [1:0] {R_IDLE, R_COUNT, R_PULSE} rd_state_t;
  rd_state_t state;
  logic [$clog2(GAP+1)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= R_IDLE;
      cnt       <= '0;
      read_data <= 1'b0;
    end else if (ce) begin
      unique case (state)
        R_IDLE: begin
          read_data <= 1'b0;
          cnt       <= '0;
          if (empty && button_read) state <= R_COUNT;
        end
        R_COUNT: begin
          read_data <= 1'b0;
          if (!empty) state <= R_IDLE;
          else if (cnt == $bits(cnt)'(GAP)) begin
            read_data <= 1'b1;
            state     <= R_PULSE;
          end else cnt <= cnt + 1'b1;
        end
        R_PULSE: begin
          read_data <= 1'b0;
          cnt       <= '0;
          state     <= empty ? R_COUNT : R_IDLE;
        end
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
