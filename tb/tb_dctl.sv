// Testbench for dctl: a stream of packets of random length is accepted
// word by word (with idle cycles in between); the borrow must be set for
// exactly the first word after reset and the first word after every tail
// word, and never for a tail word.
module tb_dctl;
  logic clk = 0, rst_n = 0;
  logic f_fire, f_tail, b;
  int checks = 0, failures = 0;

  dctl dut (.*);

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
    int heads;
    heads = 0;
    f_fire = 0; f_tail = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 300; p++) begin
      int len;
      len = $urandom_range(2, 6);
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin
          f_fire = 0; f_tail = ($urandom_range(0, 1) != 0);  // tail seen without a transfer is ignored
          @(negedge clk);
        end
        f_fire = 1;
        f_tail = (i == len - 1);
        #1;
        check(b == (i == 0), $sformatf("packet %0d word %0d b=%0b", p, i, b));
        if (b) heads++;
      end
    end
    @(negedge clk); f_fire = 0;
    check(heads == 300, "one head per packet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
