// freq_div: derives the two working rates of the design from the 100 MHz board clock.
//
// The encoder emulation must advance one encoder unit per tick at about 1.5 MHz
// (20 inches per second on a 150 LPI strip at 128 eu per peu); dividing 100 MHz by
// 68 gives 1.47 MHz, the closest rate reachable with an integer divisor. The capture
// logic and the RAM run at 10 MHz (divide by 10).
//
// Rather than producing divided clocks, the block produces clock-enable strobes: each
// output is high for one 100 MHz cycle once per period, and every other block runs on
// the single 100 MHz clock gated by its strobe. This keeps the design in one clock
// domain (no crossing between the emulation and the capture side); the divide ratios
// are those of the original design, the use of enables is this implementation's choice.
//
// Interface: clk, synchronous active-high rst. ce_enc pulses every DIV_ENC cycles,
// ce_ram every DIV_RAM cycles; the first pulse of each comes DIV-1 cycles after reset.
module freq_div #(
  parameter int unsigned DIV_ENC = 68,
  parameter int unsigned DIV_RAM = 10
) (
  input  logic clk,
  input  logic rst,
  output logic ce_enc,
  output logic ce_ram
);

  logic [$clog2(DIV_ENC)-1:0] cnt_enc;
  logic [$clog2(DIV_RAM)-1:0] cnt_ram;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_enc <= '0;
      cnt_ram <= '0;
      ce_enc  <= 1'b0;
      ce_ram  <= 1'b0;
    end else begin
      ce_enc <= (cnt_enc == $bits(cnt_enc)'(DIV_ENC - 2));
      ce_ram <= (cnt_ram == $bits(cnt_ram)'(DIV_RAM - 2));
      cnt_enc <= (cnt_enc == $bits(cnt_enc)'(DIV_ENC - 1)) ? '0 : cnt_enc + 1'b1;
      cnt_ram <= (cnt_ram == $bits(cnt_ram)'(DIV_RAM - 1)) ? '0 : cnt_ram + 1'b1;
    end
  end

endmodule
