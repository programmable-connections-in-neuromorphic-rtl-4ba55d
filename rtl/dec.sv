// DEC: head-word decrementer of the relay.
//
// Each word taken on channel A is forwarded on channel D. When the borrow
// input b (from DCTL) is set, the word is a head word and its chip-address
// field (bits 9:2) is decremented by a ripple of one-bit borrow cells, as in
// the original bit-level DEC chain; bits 1:0 pass unchanged. The borrow
// out of the most significant bit is the underflow u: it is set when the
// address was 0, i.e. when this chip is the packet's target. For a head word
// u is also sent on channel C, which feeds the memory controller.
// The original leaves implicit that C carries one bit per packet; sending it
// only for head words is this design's reading, since the memory controller
// reads one borrow per packet.
//
// Interface: valid/ready channels A (in), D and C (out). The stage is
// combinational: a word moves from A to D (and C) in the cycle in which all
// the channels it needs are ready.
module dec
  import grid_pkg::*;
(
  input  logic  a_valid,
  output logic  a_ready,
  input  word_t a_data,
  input  logic  b,
  output logic  d_valid,
  input  logic  d_ready,
  output word_t d_data,
  output logic  c_valid,
  input  logic  c_ready,
  output logic  c_data
);
  logic [CHIP_W:0] bor;  // bor[i] is the borrow into chip-address bit i

  assign bor[0] = b;
  for (genvar i = 0; i < CHIP_W; i++) begin : g_bit
    assign bor[i+1] = ~a_data[CHIP_LSB + i] & bor[i];
  end

  always_comb begin
    d_data = a_data;
    for (int i = 0; i < int'(CHIP_W); i++)
      d_data[CHIP_LSB + i] = a_data[CHIP_LSB + i] ^ bor[i];
  end

  assign c_data  = bor[CHIP_W];
  assign a_ready = d_ready && (!b || c_ready);
  assign d_valid = a_valid && (!b || c_ready);
  assign c_valid = a_valid && b && d_ready;
endmodule
