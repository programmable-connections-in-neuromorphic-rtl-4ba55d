// Testbench for filter: alternating F commands (one word must appear on P,
// only when the SRAM side is ready) and E commands (words must be consumed
// and dropped up to the tail word, E completing exactly on the tail word,
// nothing appearing on P).
module tb_filter;
  import grid_pkg::*;
  logic clk = 0, rst_n = 0;
  logic f_valid, f_ready, e_valid, e_ready, b_req, b_valid, b_ready, p_valid, p_ready;
  word_t b_data, p_data;
  int checks = 0, failures = 0;

  filter dut (.*);

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
    f_valid = 0; e_valid = 0; b_valid = 0; p_ready = 0; b_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      word_t w;
      bit done;
      // F: pass one word
      @(negedge clk);
      f_valid = 1;
      w = word_t'($urandom);
      done = 0;
      while (!done) begin
        b_valid = ($urandom_range(0, 2) != 0);
        p_ready = ($urandom_range(0, 2) != 0);
        b_data  = w;
        #1;
        check(b_req, "F requests SWITCH port B");
        check(p_valid == b_valid, "P valid with B");
        check(b_ready == p_ready, "B taken only when SRAM takes it");
        check(f_ready == (b_valid && p_ready), "F completes with the transfer");
        check(!e_ready, "no E completion during F");
        if (p_valid) check(p_data == w, "P data");
        done = b_valid && p_ready;
        @(negedge clk);
      end
      f_valid = 0;
      // E: drop up to tail
      e_valid = 1;
      begin
        int len, i;
        len = $urandom_range(1, 5); i = 0;
        while (i < len) begin
          b_valid = ($urandom_range(0, 2) != 0);
          p_ready = ($urandom_range(0, 1) != 0);
          b_data  = word_t'($urandom) & ~word_t'(1);
          if (i == len - 1) b_data[0] = 1'b1;
          #1;
          check(b_ready && b_req, "E consumes every word");
          check(!p_valid, "nothing written during E");
          check(e_ready == (b_valid && i == len - 1), "E completes on the tail");
          if (b_valid) i++;
          @(negedge clk);
        end
      end
      e_valid = 0; b_valid = 0;
      #1; check(!b_req, "no request when idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
