// SWITCH: steers the memory-path words to the process that asks for them.
//
// Three processes take words from the memory path: the memory controller
// (port A: head word, SRAM address), FILTER (port B: SRAM write data and
// deleted words) and SEND (port C: words delivered to the receiver). In the
// original circuit SWITCH probes which of its passive ports has a pending
// request; here each port has a request line (x_req) that selects it and a
// ready line (x_ready) that completes the transfer, so a selected port sees
// the word (x_valid) even while it cannot take it yet. The controllers make
// sure that at most one port requests at a time (checked by an assertion);
// should two request anyway, A wins over B and B over C.
//
// Interface: valid/ready channel Q (in), A, B, C (out, with requests), all
// carrying the same word. Combinational, no latency.
module word_switch
  import grid_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  q_valid,
  output logic  q_ready,
  input  word_t q_data,
  input  logic  a_req,
  output logic  a_valid,
  input  logic  a_ready,
  input  logic  b_req,
  output logic  b_valid,
  input  logic  b_ready,
  input  logic  c_req,
  output logic  c_valid,
  input  logic  c_ready,
  output word_t data
);
  typedef enum logic [1:0] {SEL_NONE, SEL_A, SEL_B, SEL_C} sel_e;
  sel_e sel;

  always_comb begin
    if (a_req)      sel = SEL_A;
    else if (b_req) sel = SEL_B;
    else if (c_req) sel = SEL_C;
    else              sel = SEL_NONE;
  end

  assign data    = q_data;
  always_comb begin
    unique case (sel)
      SEL_A:   q_ready = a_ready;
      SEL_B:   q_ready = b_ready;
      SEL_C:   q_ready = c_ready;
      default: q_ready = 1'b0;
    endcase
  end
  assign a_valid = q_valid && (sel == SEL_A);
  assign b_valid = q_valid && (sel == SEL_B);
  assign c_valid = q_valid && (sel == SEL_C);

  a_one_request: assert property (@(posedge clk) disable iff (!rst_n)
    (32'(a_req) + 32'(b_req) + 32'(c_req)) <= 1);
endmodule
