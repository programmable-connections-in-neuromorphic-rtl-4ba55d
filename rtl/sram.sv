// SRAM: the relay's connectivity look-up table, 256 words of 16 bits.
//
// One entry per relative source-chip address. A write stores the data word
// from FILTER (channel P, zero-extended to the SRAM width) at address ma; it
// takes place in the cycle in which the write command W and the data are
// both present. A read strobe r_valid reads address ma; the word appears on
// k_data with k_valid one clock later. The chip used a custom SRAM bank;
// this is a plain memory array with the same function. Contents are not
// reset: an entry must be programmed before it is looked up.
module sram
  import grid_pkg::*;
#(
  parameter int unsigned DEPTH = LUT_DEPTH,
  parameter int unsigned W     = LUT_W,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] ma,
  input  logic          w_valid,
  output logic          w_ready,
  input  logic          p_valid,
  output logic          p_ready,
  input  word_t         p_data,
  input  logic          r_valid,
  output logic          k_valid,
  output logic [W-1:0]  k_data
);
  logic [W-1:0] m [DEPTH];

  wire do_write = w_valid && p_valid;

  assign w_ready = p_valid;
  assign p_ready = w_valid;

  always_ff @(posedge clk) begin
    if (do_write) m[ma] <= W'(p_data);
    if (r_valid)  k_data <= m[ma];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) k_valid <= 1'b0;
    else        k_valid <= r_valid;
  end

  a_no_read_during_write: assert property (@(posedge clk) disable iff (!rst_n) !(do_write && r_valid));
endmodule
