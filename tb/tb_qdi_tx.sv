// Testbench for qdi_tx. A four-phase 1-of-4 receiver model acknowledges
// after random delays; words are offered with random gaps. Checked: the
// pads always carry either a valid code (one wire per set) or all zeros;
// every word is decoded once and unchanged, in order; the pads return to
// zero only after the acknowledge; and with a receiver that answers on the
// next clock a word takes 2*SYNC+3 clocks.
module tb_qdi_tx;
  import grid_pkg::*;
  localparam int SYNC = 2;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, pad_ack;
  word_t in_data;
  q4_word_t pad_d;
  word_t sb[$];
  int checks = 0, failures = 0;
  int got = 0, sent = 0;
  bit fast = 0;

  qdi_tx #(.SYNC(SYNC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit all_valid(q4_word_t q);
    for (int s = 0; s < int'(SETS); s++) if (!$onehot(q[s])) return 0;
    return 1;
  endfunction

  // receiver model
  initial begin
    pad_ack = 0;
    forever begin
      @(negedge clk);
      if (rst_n) begin
        check(pad_d == '0 || all_valid(pad_d), "pads valid or neutral");
        if (!pad_ack && all_valid(pad_d)) begin
          if (!fast) repeat ($urandom_range(0, 3)) @(negedge clk);
          check(sb.size() > 0 && dec_word(pad_d) == sb[0], $sformatf("decoded %h", dec_word(pad_d)));
          if (sb.size() > 0) void'(sb.pop_front());
          got++;
          pad_ack = 1;
        end else if (pad_ack && pad_d == '0) begin
          if (!fast) repeat ($urandom_range(0, 3)) @(negedge clk);
          pad_ack = 0;
        end else if (pad_ack) begin
          check(all_valid(pad_d), "data held until neutral");
        end
      end
    end
  end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0, t1;
    in_valid = 0; in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    while (sent < 300) begin
      in_valid = ($urandom_range(0, 3) != 0);
      in_data  = word_t'($urandom);
      #1;
      if (in_valid && in_ready) begin sb.push_back(in_data); sent++; end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (60) @(negedge clk);
    check(got == 300 && sb.size() == 0, $sformatf("delivered %0d of 300", got));
    // rate with a prompt receiver and a word always waiting
    fast = 1;
    in_valid = 1;
    t0 = 0; t1 = 0;
    for (int n = 0; n < 3;) begin
      in_data = word_t'(n);
      #1;
      if (in_ready) begin
        sb.push_back(in_data);
        if (n == 1) t0 = $time;
        if (n == 2) t1 = $time;
        n++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (30) @(negedge clk);
    check((t1 - t0) / 10 == 2 * SYNC + 3, $sformatf("word period %0d clocks", (t1 - t0) / 10));
    check(sb.size() == 0, "fast words delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
