// tb_eu_conv_ab: random positions into eu_conv_ab; AB must follow bits [7:6] of the
// previous tick through the quadrature table, and empty must flag position zero.
module tb_eu_conv_ab;
  import enc_pkg::*;
  logic clk = 1'b0, rst = 1'b1, ce = 1'b1;
  logic [EU_W-1:0] position_eu = '0;
  logic empty;
  ab_t channel_ab;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  eu_conv_ab dut (.clk, .rst, .ce, .position_eu, .empty, .channel_ab);

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ab_t ref_ab(input logic [EU_W-1:0] p);
    // Quadrature table written out from the bit pair.
    case ({p[7], p[6]})
      2'd0: return 2'b10;
      2'd1: return 2'b11;
      2'd2: return 2'b01;
      default: return 2'b00;
    endcase
  endfunction

  logic [EU_W-1:0] prev;
  int n_zero = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (channel_ab !== 2'b10) begin failures++; $display("FAIL: AB after reset %b", channel_ab); end
    for (int i = 0; i < 2000; i++) begin
      prev = position_eu;
      position_eu = (i % 7 == 0) ? '0 : EU_W'($urandom());
      #1;
      checks++;
      if (empty !== (position_eu == '0)) begin failures++; $display("FAIL: empty at %h", position_eu); end
      if (position_eu == '0) n_zero++;
      @(posedge clk);
      #1;
      checks++;
      if (channel_ab !== ref_ab(position_eu)) begin
        failures++;
        $display("FAIL: pos %h AB %b expected %b", position_eu, channel_ab, ref_ab(position_eu));
      end
    end
    // ce low holds the output.
    ce = 1'b0;
    prev = position_eu;
    position_eu = prev ^ 24'h0000C0;
    @(posedge clk); #1;
    checks++;
    if (channel_ab !== ref_ab(prev)) begin failures++; $display("FAIL: AB changed with ce low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
