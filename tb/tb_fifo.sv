// Testbench for fifo: random valid and ready on both sides; every word
// read must be the oldest word written (scoreboard queue). Also checked:
// in_ready falls only when DEPTH words are held and the output is stalled,
// a word written into an empty FIFO is visible after one clock, and with
// both sides always ready the FIFO moves one word per clock.
module tb_fifo;
  localparam int W = 10, DEPTH = 2;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  int checks = 0, failures = 0;
  logic [W-1:0] sb[$];
  int n_full = 0;

  fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

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
    int moved;
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // latency: write into empty FIFO, visible one clock later
    check(!out_valid, "empty after reset");
    in_valid = 1; in_data = 10'h2a5;
    @(negedge clk);
    in_valid = 0;
    check(out_valid && out_data == 10'h2a5, "one-clock latency");
    out_ready = 1;
    @(negedge clk);
    out_ready = 0;
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      in_valid  = ($urandom_range(0, 3) != 0);
      in_data   = W'($urandom);
      out_ready = ($urandom_range(0, 2) != 0);
      #1;
      check(in_ready == ((sb.size() < DEPTH) || out_ready), "in_ready rule");
      check(out_valid == (sb.size() != 0), "out_valid rule");
      if (sb.size() == DEPTH && !out_ready) n_full++;
      if (out_valid && out_ready) begin
        check(out_data == sb[0], $sformatf("data %h expected %h", out_data, sb[0]));
        void'(sb.pop_front());
      end
      if (in_valid && in_ready) sb.push_back(in_data);
      @(negedge clk);
    end
    check(n_full > 10, "full FIFO seen");
    // throughput: both sides ready
    in_valid = 0; out_ready = 1;
    repeat (4) @(negedge clk);
    sb.delete();
    moved = 0;
    in_valid = 1;
    for (int n = 0; n < 50; n++) begin
      in_data = W'(n);
      #1;
      if (out_valid && out_ready) moved++;
      @(negedge clk);
    end
    check(moved == 49, $sformatf("throughput %0d words in 50 clocks", moved));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
