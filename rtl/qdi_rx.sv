// QDI_RX: input pad interface, 1-of-4 four-phase channel to word channel.
//
// Off chip a word is five 1-of-4 sets (set 4 = bits 9:8 ... set 0 = bits
// 1:0) with a return-to-zero, four-phase handshake: the sender raises one
// wire per set, the receiver raises pad_ack once it has the word, the sender
// returns all wires to zero, and the receiver then lowers pad_ack. The data
// encoding and handshake are the original ones. That circuit is
// asynchronous; this clocked version passes every pad wire through a
// SYNC-stage synchroniser. That is safe because each wire changes only once
// per phase, so a set that reads as valid already holds its final symbol.
// The VN detector turns the synchronised sets into the word-valid state v.
//
// Interface: pad_d / pad_ack towards the pads, valid/ready channel out.
// A word is offered on out once v is high and is acknowledged on the pad in
// the clock after out takes it; pad_ack falls the clock after v falls.
// `err` flags a set with two wires high.
module qdi_rx
  import grid_pkg::*;
#(
  parameter int unsigned SYNC = 2   // synchroniser depth
) (
  input  logic     clk,
  input  logic     rst_n,
  input  q4_word_t pad_d,
  output logic     pad_ack,
  output logic     out_valid,
  input  logic     out_ready,
  output word_t    out_data,
  output logic     err
);
  q4_word_t sync_q [SYNC];
  logic     all_valid, all_neutral, v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(SYNC); i++) sync_q[i] <= '0;
    end else begin
      sync_q[0] <= pad_d;
      for (int i = 1; i < int'(SYNC); i++) sync_q[i] <= sync_q[i-1];
    end
  end

  vn #(.M(SETS)) u_vn (
    .clk, .rst_n,
    .d(sync_q[SYNC-1]),
    .all_valid, .all_neutral,
    .illegal(err),
    .v
  );

  assign out_data  = dec_word(sync_q[SYNC-1]);
  assign out_valid = v && !pad_ack && all_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     pad_ack <= 1'b0;
    else if (out_valid && out_ready) pad_ack <= 1'b1;
    else if (!v && all_neutral)     pad_ack <= 1'b0;
  end
endmodule
