// Testbench for qdi_rx. A four-phase 1-of-4 sender model drives random
// words with random delays, raising the set wires one set at a time (as
// unequal wire delays would) and returning them to zero the same way; the
// word channel is stalled at random. Checked: every word arrives once and
// unchanged; the pad acknowledge rises only after the word was taken and
// falls only after the wires are neutral; with an always-ready consumer and
// a sender that answers at once, a word takes 2*(SYNC+2) clocks; an illegal
// symbol raises err.
module tb_qdi_rx;
  import grid_pkg::*;
  localparam int SYNC = 2;
  logic clk = 0, rst_n = 0;
  q4_word_t pad_d;
  logic pad_ack, out_valid, out_ready, err;
  word_t out_data;
  word_t sb[$];
  int checks = 0, failures = 0;
  int received = 0;
  bit fast = 0;

  qdi_rx #(.SYNC(SYNC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send_word(word_t w);
    q4_word_t q = enc_word(w);
    while (pad_ack) @(negedge clk);
    for (int s = 0; s < int'(SETS); s++) begin
      pad_d[s] = q[s];
      if (!fast) repeat ($urandom_range(0, 1)) @(negedge clk);
    end
    while (!pad_ack) @(negedge clk);
    for (int s = 0; s < int'(SETS); s++) begin
      pad_d[s] = '0;
      if (!fast) repeat ($urandom_range(0, 1)) @(negedge clk);
    end
  endtask

  // consumer
  always @(negedge clk) begin
    out_ready <= fast ? 1'b1 : ($urandom_range(0, 2) != 0);
  end
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      check(sb.size() > 0 && out_data == sb[0], $sformatf("got %h", out_data));
      if (sb.size() > 0) void'(sb.pop_front());
      received++;
      check(!pad_ack, "acknowledge not before the word is taken");
    end
  end
  // the acknowledge may only fall once the sender has returned to neutral
  logic ack_d = 0;
  int   n_fall = 0;
  always @(posedge clk) begin
    #1;
    if (ack_d && !pad_ack) begin
      check(pad_d == '0, "acknowledge falls only after neutral");
      n_fall++;
    end
    ack_d <= pad_ack;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0, t1;
    pad_d = '0; out_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      word_t w;
      w = word_t'($urandom);
      sb.push_back(w);
      send_word(w);
    end
    while (pad_ack) @(negedge clk);
    repeat (5) @(negedge clk);
    check(received == 300 && sb.size() == 0, $sformatf("received %0d of 300", received));
    // timing of one handshake with fast partners
    fast = 1;
    repeat (2) @(negedge clk);
    sb.push_back(10'h155); send_word(10'h155);
    while (pad_ack) @(negedge clk);
    t0 = $time;
    sb.push_back(10'h2aa); send_word(10'h2aa);
    while (pad_ack) @(negedge clk);
    t1 = $time;
    check((t1 - t0) / 10 == longint'(2 * (SYNC + 2)), $sformatf("handshake took %0d clocks", (t1 - t0) / 10));
    // illegal symbol
    pad_d[2] = 4'b0110;
    repeat (SYNC + 1) @(negedge clk);
    check(err, "illegal symbol flagged");
    pad_d = '0;
    repeat (SYNC + 1) @(negedge clk);
    check(!err, "err clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
