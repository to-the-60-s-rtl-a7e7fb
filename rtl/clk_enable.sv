// clk_enable: derives the CPU rate from the board clock as a clock enable.
//
// A counter runs from 0 to DIV-1 on the board clock and ce is high for one
// board-clock cycle each time it wraps, so logic gated by ce advances at
// f_clk / DIV. With the defaults (50 MHz board clock, DIV = 10) the CPU runs
// at 5 MHz. Reset clears the counter; ce first rises DIV cycles after reset
// is released. DIV = 1 gives ce always high.
// The 50 MHz clock and the 5 MHz CPU rate are the document's; generating the
// slower rate as an enable rather than a second clock is this design's choice.
module clk_enable #(
  parameter int DIV = 10
) (
  input  logic clk,
  input  logic rst_n,
  output logic ce
);
  localparam int CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      ce  <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt <= '0;
      ce  <= 1'b1;
    end else begin
      cnt <= cnt + 1'b1;
      ce  <= 1'b0;
    end
  end
endmodule
