// QDI_TX: output pad interface, word channel to 1-of-4 four-phase channel.
//
// Drives a word as five 1-of-4 sets (set s carries bits 2s+1:2s) and runs the
// four-phase, return-to-zero handshake with the next chip: data valid, wait
// for pad_ack high, return all wires to zero, wait for pad_ack low. The
// encoding and handshake are the original ones; pad_ack is synchronised
// through SYNC flip-flops and the pad wires are driven from flip-flops, which
// is this design's clocked rendering of the asynchronous output.
//
// Interface: valid/ready channel in, pad_d / pad_ack towards the pads.
// A word is taken from in when the channel is idle and pad_ack is low; it
// drives the pads the next clock. With a receiver that acknowledges at once
// a word takes 2*SYNC+3 clocks.
module qdi_tx
  import grid_pkg::*;
#(
  parameter int unsigned SYNC = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  output logic     in_ready,
  input  word_t    in_data,
  output q4_word_t pad_d,
  input  logic     pad_ack
);
  typedef enum logic [1:0] {T_IDLE, T_DATA, T_RTZ} tstate_e;
  tstate_e    state;
  logic [SYNC-1:0] ack_q;
  logic       ack_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ack_q <= '0;
    else        ack_q <= {ack_q[SYNC-2:0], pad_ack};
  end
  assign ack_s = ack_q[SYNC-1];

  assign in_ready = (state == T_IDLE) && !ack_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= T_IDLE;
      pad_d <= '0;
    end else begin
      unique case (state)
        T_IDLE: if (in_valid && in_ready) begin
          pad_d <= enc_word(in_data);
          state <= T_DATA;
        end
        T_DATA: if (ack_s) begin
          pad_d <= '0;
          state <= T_RTZ;
        end
        T_RTZ:  if (!ack_s) state <= T_IDLE;
        default: state <= T_IDLE;
      endcase
    end
  end
endmodule
