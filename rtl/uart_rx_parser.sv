// uart_rx_parser: byte-level receive side of the I/O unit.
//
// Takes bytes from the bit-level UART receiver (rx_valid pulses with
// rx_data) and reassembles the three-byte frames also used for transmit:
//   byte 0  {1'b1, w[14], 2'b00, ch[3:0]}   header: top bit set
//   byte 1  {1'b0, w[13:7]}
//   byte 2  {1'b0, w[6:0]}
// A byte with its top bit set always starts a new frame, discarding a
// partial one; a data byte with no header before it is dropped. After the
// third byte the parser pulses wr_en for one cycle with wr_ch and wr_data, if
// ch is an input channel (IN_BASE <= ch < 15); frames for other channels are
// counted in the dropped output but write nothing.
// The document says only that logic of its own design receives bytes into
// the input registers; the frame format and the resynchronisation rule are
// this design's choice.
module uart_rx_parser
  import agc_pkg::*;
#(
  parameter int IN_BASE = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            rx_valid,
  input  logic [7:0]      rx_data,
  output logic            wr_en,
  output logic [CH_W-1:0] wr_ch,
  output word_t           wr_data,
  output logic            dropped     // pulse: a byte or frame was discarded
);
  typedef enum logic [1:0] {S_HDR, S_B1, S_B2} state_e;
  state_e          state;
  logic [CH_W-1:0] ch;
  logic            w14;
  logic [6:0]      hi7;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_HDR;
      ch      <= '0;
      w14     <= 1'b0;
      hi7     <= '0;
      wr_en   <= 1'b0;
      wr_ch   <= '0;
      wr_data <= '0;
      dropped <= 1'b0;
    end else begin
      wr_en   <= 1'b0;
      dropped <= 1'b0;
      if (rx_valid) begin
        if (rx_data[7]) begin
          dropped <= (state != S_HDR);
          ch      <= rx_data[3:0];
          w14     <= rx_data[6];
          state   <= S_B1;
        end else begin
          unique case (state)
            S_HDR: dropped <= 1'b1;
            S_B1: begin
              hi7   <= rx_data[6:0];
              state <= S_B2;
            end
            S_B2: begin
              state <= S_HDR;
              if (int'(ch) >= IN_BASE && int'(ch) < NUM_CH) begin
                wr_en   <= 1'b1;
                wr_ch   <= ch;
                wr_data <= {w14, hi7, rx_data[6:0]};
              end else begin
                dropped <= 1'b1;
              end
            end
            default: state <= S_HDR;
          endcase
        end
      end
    end
  end
endmodule
