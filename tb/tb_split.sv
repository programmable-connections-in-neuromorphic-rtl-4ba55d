// Testbench for split: a numbered word stream is offered with random gaps
// while L and M are stalled at random, independently. Each branch must see
// the complete stream in order; with both always ready the fork must carry
// one word per clock after its one-clock latency.
module tb_split;
  import grid_pkg::*;
  logic clk = 0, rst_n = 0;
  logic p_valid, p_ready, l_valid, l_ready, m_valid, m_ready;
  word_t p_data, l_data, m_data;
  int checks = 0, failures = 0;
  int next_l = 0, next_m = 0, sent = 0;

  split dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int l_cnt, first_l;
    p_valid = 0; l_ready = 0; m_ready = 0; p_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    while (next_l < 800 || next_m < 800) begin
      p_valid = (sent < 800) && ($urandom_range(0, 3) != 0);
      p_data  = word_t'(sent);
      l_ready = ($urandom_range(0, 2) != 0);
      m_ready = ($urandom_range(0, 1) != 0);
      #1;
      if (l_valid && l_ready) begin
        check(l_data == word_t'(next_l), $sformatf("L got %0d expected %0d", l_data, next_l));
        next_l++;
      end
      if (m_valid && m_ready) begin
        check(m_data == word_t'(next_m), $sformatf("M got %0d expected %0d", m_data, next_m));
        next_m++;
      end
      if (p_valid && p_ready) sent++;
      @(negedge clk);
    end
    // throughput with both branches ready
    l_ready = 1; m_ready = 1; p_valid = 1;
    l_cnt = 0; first_l = -1;
    for (int c = 0; c < 40; c++) begin
      p_data = word_t'(c);
      #1;
      check(p_ready, "never stalls when both ready");
      if (l_valid) begin
        if (first_l < 0) first_l = c;
        l_cnt++;
      end
      @(negedge clk);
    end
    check(first_l == 1, $sformatf("latency %0d clocks", first_l));
    check(l_cnt == 39, $sformatf("%0d words in 39 clocks", l_cnt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
