// DCTL: decrement control. Decides which words are head words.
//
// The relay must decrement only the head word of each packet. DCTL watches
// the tail bit of every word that the decrementer takes (the F tap) and keeps
// one state bit h: h is set by an end-of-packet word and cleared by the next
// word. The borrow fed into the least-significant decrementer bit is
// b = h & ~tail, so the first word after a tail word (and the first word
// after reset) is decremented and all others pass unchanged. This follows
// the three handshake sequences of the original DCTL for DCTL; starting with h = 1 out
// of reset is this design's choice, so that the first packet is handled.
//
// Interface: f_fire marks the cycle in which the decrementer accepts a word,
// f_tail is that word's tail bit. b is combinational from h and f_tail; h
// updates on the clock edge of f_fire.
module dctl (
  input  logic clk,
  input  logic rst_n,
  input  logic f_fire,
  input  logic f_tail,
  output logic b
);
  logic h;

  assign b = h & ~f_tail;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      h <= 1'b1;
    else if (f_fire) h <= f_tail;
  end
endmodule
