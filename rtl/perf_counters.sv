// perf_counters: cycle and instruction counters for measuring IPC.
//
// cycles counts CPU cycles (board-clock cycles with ce high) and instrs
// counts instructions that completed writeback (retired pulses, which are
// already qualified with ce). clear zeroes both. IPC is instrs / cycles.
// Both counters are 32 bits and saturate rather than wrap.
// The two counters are the document's; their width, clear input and
// saturation are this design's choice.
module perf_counters #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,
  input  logic         clear,
  input  logic         retired,
  output logic [W-1:0] cycles,
  output logic [W-1:0] instrs
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cycles <= '0;
      instrs <= '0;
    end else if (clear) begin
      cycles <= '0;
      instrs <= '0;
    end else begin
      if (ce && cycles != '1) cycles <= cycles + 1'b1;
      if (retired && instrs != '1) instrs <= instrs + 1'b1;
    end
  end
endmodule
