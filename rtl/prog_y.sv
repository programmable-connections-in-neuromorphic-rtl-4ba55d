// PROG_Y: programmable relay for a grid of neuromorphic chips.
//
// Packets of 10-bit words arrive from the previous chip on the input pads.
// Every packet's head word (its relative chip address) is decremented and
// the packet is passed on to the next chip on the output pads. A copy of
// each packet goes to the memory path:
//  * if the decrement underflowed (head arrived as 0: this chip is the
//    target), the packet programs the look-up SRAM: word 1 is the address,
//    word 2 the data, and the rest is dropped;
//  * otherwise the decremented head, the relative address of the source
//    chip, indexes the SRAM. If bit 4 (K) of the entry is set, the remaining
//    words (row, columns, tail) are delivered to the on-chip receiver with
//    bits 3:2 (AP) appended; if not, they are dropped.
// Structure, following the original block diagram:
//   pads -> QDI_RX -> FIFO -> DEC(+DCTL) -> FIFO -> SPLIT -L-> FIFO -> QDI_TX -> pads
//                              |C                       |M
//                             FIFO -U-> MCTL  <-A-  FIFO -> SWITCH -B-> FILTER -P-> SRAM
//                                       |                         -C-> SEND -D-> receiver
// The original circuit is asynchronous (quasi-delay-insensitive); this
// version is a single-clock design in which each of its channels is a
// valid/ready pair, with clocked 1-of-4 four-phase interfaces at the pads.
//
// Interface: in_d/in_ack and out_d/out_ack are the 1-of-4 pad channels;
// rcv_* is the word channel to the receiver array; rx_err flags an illegal
// 1-of-4 input symbol. The relay streams one word per clock internally; the
// pad handshakes set the rate seen from outside.
module prog_y
  import grid_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 2,
  parameter int unsigned SYNC       = 2,
  parameter int unsigned DEPTH      = LUT_DEPTH,
  parameter int unsigned KW         = LUT_W
) (
  input  logic      clk,
  input  logic      rst_n,
  input  q4_word_t  in_d,
  output logic      in_ack,
  output q4_word_t  out_d,
  input  logic      out_ack,
  output logic      rcv_valid,
  input  logic      rcv_ready,
  output rcv_word_t rcv_data,
  output logic      rx_err
);
  localparam int unsigned AW = $clog2(DEPTH);

  // pad input -> FIFO
  logic  rx_valid, rx_ready;
  word_t rx_data;
  // FIFO -> DEC
  logic  a_valid, a_ready;
  word_t a_data;
  logic  borrow_in;
  // DEC -> FIFO -> SPLIT
  logic  d_valid, d_ready, p_valid, p_ready;
  word_t d_data, p_data;
  // DEC -> FIFO -> MCTL (underflow)
  logic  c_valid, c_ready, c_data, u_valid, u_ready, u_data;
  // SPLIT -> FIFO -> pad output
  logic  l_valid, l_ready, tx_valid, tx_ready;
  word_t l_data, tx_data;
  // SPLIT -> FIFO -> SWITCH
  logic  m_valid, m_ready, q_valid, q_ready;
  word_t m_data, q_data;
  // SWITCH ports
  logic  sa_valid, sa_ready, sb_req, sb_valid, sb_ready, sc_req, sc_valid, sc_ready;
  word_t sw_data;
  // MCTL <-> SRAM, FILTER, SEND
  logic [AW-1:0] ma;
  logic  w_valid, w_ready, r_valid, k_valid;
  logic [KW-1:0] k_data, j_k;
  logic  f_valid, f_ready, e_valid, e_ready, j_valid, j_ready;
  logic  fp_valid, fp_ready;
  word_t fp_data;

  qdi_rx #(.SYNC(SYNC)) u_rx (
    .clk, .rst_n, .pad_d(in_d), .pad_ack(in_ack),
    .out_valid(rx_valid), .out_ready(rx_ready), .out_data(rx_data), .err(rx_err)
  );

  fifo #(.W(WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo_in (
    .clk, .rst_n,
    .in_valid(rx_valid), .in_ready(rx_ready), .in_data(rx_data),
    .out_valid(a_valid), .out_ready(a_ready), .out_data(a_data)
  );

  dctl u_dctl (
    .clk, .rst_n, .f_fire(a_valid && a_ready), .f_tail(is_tail(a_data)), .b(borrow_in)
  );

  dec u_dec (
    .a_valid, .a_ready, .a_data, .b(borrow_in),
    .d_valid, .d_ready, .d_data,
    .c_valid, .c_ready, .c_data
  );

  fifo #(.W(WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo_d (
    .clk, .rst_n,
    .in_valid(d_valid), .in_ready(d_ready), .in_data(d_data),
    .out_valid(p_valid), .out_ready(p_ready), .out_data(p_data)
  );

  fifo #(.W(1), .DEPTH(FIFO_DEPTH)) u_fifo_u (
    .clk, .rst_n,
    .in_valid(c_valid), .in_ready(c_ready), .in_data(c_data),
    .out_valid(u_valid), .out_ready(u_ready), .out_data(u_data)
  );

  split u_split (
    .clk, .rst_n,
    .p_valid, .p_ready, .p_data,
    .l_valid, .l_ready, .l_data,
    .m_valid, .m_ready, .m_data
  );

  fifo #(.W(WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo_l (
    .clk, .rst_n,
    .in_valid(l_valid), .in_ready(l_ready), .in_data(l_data),
    .out_valid(tx_valid), .out_ready(tx_ready), .out_data(tx_data)
  );

  qdi_tx #(.SYNC(SYNC)) u_tx (
    .clk, .rst_n, .in_valid(tx_valid), .in_ready(tx_ready), .in_data(tx_data),
    .pad_d(out_d), .pad_ack(out_ack)
  );

  fifo #(.W(WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo_m (
    .clk, .rst_n,
    .in_valid(m_valid), .in_ready(m_ready), .in_data(m_data),
    .out_valid(q_valid), .out_ready(q_ready), .out_data(q_data)
  );

  word_switch u_switch (
    .clk, .rst_n,
    .q_valid, .q_ready, .q_data,
    .a_req(sa_ready), .a_valid(sa_valid), .a_ready(sa_ready),
    .b_req(sb_req),   .b_valid(sb_valid), .b_ready(sb_ready),
    .c_req(sc_req),   .c_valid(sc_valid), .c_ready(sc_ready),
    .data(sw_data)
  );

  mctl #(.AW(AW), .KW(KW)) u_mctl (
    .clk, .rst_n,
    .u_valid, .u_ready, .u_data,
    .a_valid(sa_valid), .a_ready(sa_ready), .a_data(sw_data),
    .ma, .w_valid, .w_ready, .r_valid, .k_valid, .k_data,
    .f_valid, .f_ready, .e_valid, .e_ready,
    .j_valid, .j_ready, .j_k
  );

  filter u_filter (
    .clk, .rst_n,
    .f_valid, .f_ready, .e_valid, .e_ready,
    .b_req(sb_req), .b_valid(sb_valid), .b_ready(sb_ready), .b_data(sw_data),
    .p_valid(fp_valid), .p_ready(fp_ready), .p_data(fp_data)
  );

  send #(.KW(KW)) u_send (
    .j_valid, .j_ready, .j_k,
    .c_req(sc_req), .c_valid(sc_valid), .c_ready(sc_ready), .c_data(sw_data),
    .d_valid(rcv_valid), .d_ready(rcv_ready), .d_data(rcv_data)
  );

  sram #(.DEPTH(DEPTH), .W(KW), .AW(AW)) u_sram (
    .clk, .rst_n, .ma,
    .w_valid, .w_ready,
    .p_valid(fp_valid), .p_ready(fp_ready), .p_data(fp_data),
    .r_valid, .k_valid, .k_data
  );
endmodule
