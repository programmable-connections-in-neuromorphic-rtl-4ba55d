// FILTER: hands SRAM write data over, and deletes unwanted packet words.
//
// FILTER takes words from SWITCH port B on two commands from the memory
// controller:
//  * F: one word is passed on P to the SRAM as write data; F completes when
//    the SRAM takes it.
//  * E: words are read and dropped up to and including the end-of-packet
//    (tail) word; E completes with the tail word. It deletes the rest of a
//    programming packet and of a look-up packet that is not delivered.
// This is the original FILTER; its two E ports (one per use) are merged
// into one here because the two uses never overlap.
//
// Interface: valid/ready channels F, E (commands in), B (words in, with the
// request b_req to SWITCH), P (out).
// Combinational: each word moves in the cycle its handshakes meet.
module filter
  import grid_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  f_valid,
  output logic  f_ready,
  input  logic  e_valid,
  output logic  e_ready,
  output logic  b_req,
  input  logic  b_valid,
  output logic  b_ready,
  input  word_t b_data,
  output logic  p_valid,
  input  logic  p_ready,
  output word_t p_data
);
  assign p_data  = b_data;
  assign b_req   = f_valid || e_valid;
  assign p_valid = f_valid && b_valid;
  assign f_ready = b_valid && p_ready;
  assign b_ready = (f_valid && p_ready) || e_valid;
  assign e_ready = b_valid && is_tail(b_data) && !f_valid;

  a_one_command: assert property (@(posedge clk) disable iff (!rst_n) !(f_valid && e_valid));
endmodule
