// SPLIT: two-way fork of the relay's datapath.
//
// Every word received on P is sent both on L (the off-chip path, towards the
// next chip) and on M (the memory path, towards SWITCH). Each branch has a
// one-word output register, so a word is taken from P only when both
// branches can take it, and either branch may be drained before the other.
// A new word is accepted in the same cycle as the registered ones leave,
// giving one word per clock when both branches keep up.
//
// Interface: valid/ready channels P (in), L and M (out). Latency one clock.
module split
  import grid_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  p_valid,
  output logic  p_ready,
  input  word_t p_data,
  output logic  l_valid,
  input  logic  l_ready,
  output word_t l_data,
  output logic  m_valid,
  input  logic  m_ready,
  output word_t m_data
);
  wire l_free = !l_valid || l_ready;
  wire m_free = !m_valid || m_ready;
  wire take   = p_valid && p_ready;

  assign p_ready = l_free && m_free;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_valid <= 1'b0;
      m_valid <= 1'b0;
    end else begin
      if (take)         l_valid <= 1'b1;
      else if (l_ready) l_valid <= 1'b0;
      if (take)         m_valid <= 1'b1;
      else if (m_ready) m_valid <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (take) begin
      l_data <= p_data;
      m_data <= p_data;
    end
  end
endmodule
