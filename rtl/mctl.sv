// MCTL: memory controller of the relay (the original MADR and MRD
// processes together with the AALAT address latch).
//
// For every packet MCTL takes the underflow bit u (one per packet, from the
// most-significant decrementer bit) together with the packet's head word
// from SWITCH port A, and then:
//  * u = 1, programming: the head word (always -1 here) is dropped, the
//    second word's bits 9:2 are latched as SRAM address, FILTER is asked (F)
//    to hand the third word to the SRAM as data while MCTL issues the write
//    (W), and once written FILTER is told (E) to delete the rest of the packet.
//  * u = 0, look-up: the head word's chip address (bits 9:2) is latched as
//    SRAM address and a read is issued (R). If bit 4 (K) of the byte read is
//    set, SEND is started (J) with the byte, and MCTL waits until SEND has
//    delivered the packet up to its tail word; otherwise FILTER is told (E)
//    to delete the rest of the packet.
// The sequence is the original one; collapsing its two handshake processes
// into one clocked state machine, and the SRAM read taking one clock, are
// this design's choices.
//
// Interface: valid/ready channels U, A (in), F, W, E, J (commands out; each
// completes when its ready is seen), R as a one-cycle read strobe, k_valid /
// k_data for the byte returned one cycle later. ma is the latched address.
// A programming packet takes HEAD, ADDR, WRITE, ERASE; a look-up takes HEAD,
// READ, RWAIT, then SEND or ERASE.
module mctl
  import grid_pkg::*;
#(
  parameter int unsigned AW = CHIP_W,  // SRAM address width
  parameter int unsigned KW = LUT_W    // SRAM word width
) (
  input  logic          clk,
  input  logic          rst_n,
  // underflow bit from DEC
  input  logic          u_valid,
  output logic          u_ready,
  input  logic          u_data,
  // words from SWITCH port A
  input  logic          a_valid,
  output logic          a_ready,
  input  word_t         a_data,
  // SRAM
  output logic [AW-1:0] ma,
  output logic          w_valid,
  input  logic          w_ready,
  output logic          r_valid,
  input  logic          k_valid,
  input  logic [KW-1:0] k_data,
  // FILTER
  output logic          f_valid,
  input  logic          f_ready,
  output logic          e_valid,
  input  logic          e_ready,
  // SEND
  output logic          j_valid,
  input  logic          j_ready,
  output logic [KW-1:0] j_k
);
  typedef enum logic [2:0] {
    S_HEAD, S_ADDR, S_WRITE, S_ERASE, S_READ, S_RWAIT, S_SEND
  } state_e;

  state_e state;
  logic   head_fire;

  assign head_fire = (state == S_HEAD) && u_valid && a_valid;

  assign u_ready = (state == S_HEAD) && a_valid;
  assign a_ready = ((state == S_HEAD) && u_valid) || (state == S_ADDR);
  assign f_valid = (state == S_WRITE);
  assign w_valid = (state == S_WRITE);
  assign e_valid = (state == S_ERASE);
  assign r_valid = (state == S_READ);
  assign j_valid = (state == S_SEND);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_HEAD;
      ma    <= '0;
      j_k   <= '0;
    end else begin
      unique case (state)
        S_HEAD: if (head_fire) begin
          if (u_data) begin
            state <= S_ADDR;                 // dump the head word
          end else begin
            ma    <= AW'(chip_of(a_data));   // head word addresses the read
            state <= S_READ;
          end
        end
        S_ADDR: if (a_valid) begin
          ma    <= AW'(chip_of(a_data));     // second word addresses the write
          state <= S_WRITE;
        end
        S_WRITE: if (w_ready) state <= S_ERASE;
        S_ERASE: if (e_ready) state <= S_HEAD;
        S_READ:  state <= S_RWAIT;
        S_RWAIT: if (k_valid) begin
          j_k   <= k_data;
          state <= k_data[K_BIT] ? S_SEND : S_ERASE;
        end
        S_SEND:  if (j_ready) state <= S_HEAD;
        default: state <= S_HEAD;
      endcase
    end
  end

  // FILTER passes the data word in the same cycle as the SRAM writes it.
  a_write_with_data: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_WRITE) |-> (w_ready == f_ready));
endmodule
