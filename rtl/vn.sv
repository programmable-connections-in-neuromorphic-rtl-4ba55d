// VN: validity / neutrality detector for a word of 1-of-4 sets.
//
// Each set is reduced by a 4-input OR; the set is valid when one wire is
// high and neutral when none is. The word is valid when every set is valid
// and neutral when every set is neutral, which is what the OR-plus-C-element
// tree of the original circuit signals. Here the C-element's hold state is
// kept in a flip-flop: `v` rises once the word is fully valid, falls once it
// is fully neutral, and holds in between. `all_valid` / `all_neutral` are the
// combinational conditions; `illegal` flags a set with more than one wire
// high, which a correct sender never produces (this design's own addition).
//
// Timing: v follows all_valid / all_neutral one clock later.
module vn #(
  parameter int unsigned M = 5   // number of 1-of-4 sets
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [M-1:0][3:0] d,
  output logic           all_valid,
  output logic           all_neutral,
  output logic           illegal,
  output logic           v
);
  logic [M-1:0] set_or;
  logic [M-1:0] set_multi;

  always_comb begin
    for (int s = 0; s < int'(M); s++) begin
      set_or[s]    = |d[s];
      set_multi[s] = (d[s] & (d[s] - 4'd1)) != 4'd0;
    end
    all_valid   = &set_or;
    all_neutral = ~|set_or;
    illegal     = |set_multi;
  end

  // C-element: set on all valid, clear on all neutral, otherwise hold.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           v <= 1'b0;
    else if (all_valid)   v <= 1'b1;
    else if (all_neutral) v <= 1'b0;
  end
endmodule
