// FIFO: word buffer placed between the relay's processes.
//
// A circular buffer of DEPTH entries with a valid/ready channel on each side.
// A word is written when in_valid && in_ready and read when
// out_valid && out_ready, both on the rising clock edge; a full FIFO can
// accept a word in the same cycle one leaves. The output is the head entry,
// so a word written into an empty FIFO appears one cycle later.
// The relay spreads such buffers along its datapath to keep it streaming;
// their depth is not given and DEPTH = 2 is this design's choice.
module fifo #(
  parameter int unsigned W     = 10,
  parameter int unsigned DEPTH = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [AW:0]   count;

  wire push = in_valid && in_ready;
  wire pop  = out_valid && out_ready;

  assign out_valid = (count != '0);
  assign in_ready  = (count != (AW+1)'(DEPTH)) || out_ready;
  assign out_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= incr(wr_ptr);
      if (pop)  rd_ptr <= incr(rd_ptr);
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
endmodule
