// uart_tx_framer: byte-level transmit side of the I/O unit.
//
// Whenever the CPU writes an output channel (wr_strobe/wr_ch) the channel is
// marked dirty. The framer repeatedly takes the lowest-numbered dirty channel,
// clears its mark, latches the register value from out_regs and sends a
// three-byte frame to the bit-level UART transmitter:
//   byte 0  {1'b1, w[14], 2'b00, ch[3:0]}   header: top bit set
//   byte 1  {1'b0, w[13:7]}
//   byte 2  {1'b0, w[6:0]}
// Only the header has its top bit set, so a receiver can resynchronise on
// any header. Bytes leave on a valid/ready handshake: tx_data is held stable
// with tx_valid high until tx_ready is seen. A channel written again while
// its frame is in flight is marked again and sent once more, so the last
// value written always goes out; repeated writes before a send merge.
// The document says only that logic of its own design sends the output
// registers as bytes to the bit-level transceiver; the frame format, the
// dirty marks and the handshake are this design's choice.
module uart_tx_framer
  import agc_pkg::*;
#(
  parameter int IN_BASE = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr_strobe,
  input  logic [CH_W-1:0] wr_ch,
  input  word_t           out_regs [NUM_CH],
  output logic [7:0]      tx_data,
  output logic            tx_valid,
  input  logic            tx_ready
);
  typedef enum logic [1:0] {S_IDLE, S_B0, S_B1, S_B2} state_e;
  state_e            state;
  logic [NUM_CH-1:0] dirty;   // only bits below IN_BASE are ever set
  logic [CH_W-1:0]   ch;
  word_t             w;
  logic              pick_v;
  logic [CH_W-1:0]   pick;

  always_comb begin
    pick_v = 1'b0;
    pick   = '0;
    for (int i = NUM_CH - 1; i >= 0; i--) begin
      if (dirty[i]) begin
        pick_v = 1'b1;
        pick   = CH_W'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      dirty <= '0;
      ch    <= '0;
      w     <= '0;
    end else begin
      if (state == S_IDLE && pick_v) begin
        dirty[pick] <= 1'b0;
        ch          <= pick;
        w           <= out_regs[pick];
        state       <= S_B0;
      end else if (tx_ready) begin
        unique case (state)
          S_B0:    state <= S_B1;
          S_B1:    state <= S_B2;
          S_B2:    state <= S_IDLE;
          default: ;
        endcase
      end
      // a new write wins over the clear of the same channel
      if (wr_strobe && int'(wr_ch) < IN_BASE) dirty[wr_ch] <= 1'b1;
    end
  end

  always_comb begin
    tx_valid = (state != S_IDLE);
    unique case (state)
      S_B0:    tx_data = {1'b1, w[14], 2'b00, ch};
      S_B1:    tx_data = {1'b0, w[13:7]};
      S_B2:    tx_data = {1'b0, w[6:0]};
      default: tx_data = '0;
    endcase
  end

  // handshake rule: the byte on offer does not change until it is taken
  a_tx_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                tx_valid && !tx_ready |=> tx_valid && $stable(tx_data))
    else $error("tx byte changed before it was accepted");
endmodule
