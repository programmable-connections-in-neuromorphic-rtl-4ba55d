// Testbench for sram: every one of the 256 entries is written with a random
// value (the write happening only when command and data are both present),
// then random reads and rewrites are checked against a reference array; a
// read's data must appear exactly one clock after the strobe.
module tb_sram;
  import grid_pkg::*;
  localparam int DEPTH = 256, W = 16, AW = 8;
  logic clk = 0, rst_n = 0;
  logic [AW-1:0] ma;
  logic w_valid, w_ready, p_valid, p_ready, r_valid, k_valid;
  word_t p_data;
  logic [W-1:0] k_data;
  logic [W-1:0] ref_m [DEPTH];
  int checks = 0, failures = 0;

  sram #(.DEPTH(DEPTH), .W(W), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic write(int a, word_t d);
    ma = AW'(a); p_data = d;
    // data first, command later, then both
    p_valid = 1; w_valid = 0; #1;
    check(!w_ready || !w_valid, "no write without command");
    @(negedge clk);
    w_valid = 1; #1;
    check(w_ready && p_ready, "write acknowledged");
    @(negedge clk);
    w_valid = 0; p_valid = 0;
    ref_m[a] = W'(d);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ma = '0; w_valid = 0; p_valid = 0; r_valid = 0; p_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) write(a, word_t'($urandom));
    for (int n = 0; n < 1500; n++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      if ($urandom_range(0, 3) == 0) write(a, word_t'($urandom));
      else begin
        ma = AW'(a); r_valid = 1;
        @(negedge clk);
        r_valid = 0; ma = AW'($urandom);
        check(k_valid, "read data after one clock");
        check(k_data == ref_m[a], $sformatf("read %0d got %h expected %h", a, k_data, ref_m[a]));
        @(negedge clk);
        check(!k_valid, "k_valid is one clock");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
