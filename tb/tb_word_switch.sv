// Testbench for word_switch: each of the ports A, B, C requests in turn
// (random order, random input validity, random readiness); the word must be
// shown to the requesting port only, Q must be acknowledged only when the
// requesting port is ready, and the data must be passed unchanged.
module tb_word_switch;
  import grid_pkg::*;
  logic clk = 0, rst_n = 0;
  logic q_valid, q_ready, a_req, a_valid, a_ready, b_req, b_valid, b_ready, c_req, c_valid, c_ready;
  word_t q_data, data;
  int checks = 0, failures = 0;
  int hits[3] = '{0, 0, 0};

  word_switch dut (.*);

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
    q_valid = 0; a_req = 0; b_req = 0; c_req = 0; a_ready = 0; b_ready = 0; c_ready = 0; q_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int port;
      @(negedge clk);
      port    = $urandom_range(0, 3);   // 3: nobody asks
      a_req   = (port == 0);
      b_req   = (port == 1);
      c_req   = (port == 2);
      a_ready = (port == 0) && ($urandom_range(0, 2) != 0);
      b_ready = (port == 1) && ($urandom_range(0, 2) != 0);
      c_ready = (port == 2) && ($urandom_range(0, 2) != 0);
      q_valid = ($urandom_range(0, 3) != 0);
      q_data  = word_t'($urandom);
      #1;
      check(q_ready == (a_ready || b_ready || c_ready), "Q acknowledged when the requester is ready");
      check(a_valid == (q_valid && port == 0), "A valid");
      check(b_valid == (q_valid && port == 1), "B valid");
      check(c_valid == (q_valid && port == 2), "C valid");
      check(data == q_data, "data passes");
      if (q_valid && port < 3) hits[port]++;
    end
    check(hits[0] > 100 && hits[1] > 100 && hits[2] > 100, "all ports served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
