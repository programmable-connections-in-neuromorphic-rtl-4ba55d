// SEND: delivers a looked-up packet to the on-chip receiver (with APP).
//
// When the memory controller starts SEND on J with the look-up byte k, SEND
// takes the remaining words of the packet from SWITCH port C (the row
// address, the column addresses and the tail word) and delivers each on D
// with k's bits 3:2 (AP, which of the four pixels of a group is targeted)
// appended; the appending is plain wiring (APP). J completes with the tail
// word, which is delivered too. The tail word's delivery follows the
// original SEND sequence; placing AP below the word in the delivered
// struct is this design's choice.
//
// Interface: valid/ready channels J (command with k), C (in, with the
// request c_req to SWITCH), D (out).
// Combinational: one word per cycle while the receiver is ready.
module send
  import grid_pkg::*;
#(
  parameter int unsigned KW = LUT_W
) (
  input  logic          j_valid,
  output logic          j_ready,
  input  logic [KW-1:0] j_k,
  output logic          c_req,
  input  logic          c_valid,
  output logic          c_ready,
  input  word_t         c_data,
  output logic          d_valid,
  input  logic          d_ready,
  output rcv_word_t     d_data
);
  // APP: append the targeting bits of the look-up byte.
  function automatic rcv_word_t app(word_t w, logic [KW-1:0] k);
    rcv_word_t r;
    r.w  = w;
    r.ap = k[AP_LSB +: AP_W];
    return r;
  endfunction

  assign d_data  = app(c_data, j_k);
  assign c_req   = j_valid;
  assign d_valid = j_valid && c_valid;
  assign c_ready = j_valid && d_ready;
  assign j_ready = c_valid && d_ready && is_tail(c_data);
endmodule
