// Testbench for send: for each delivered packet the look-up byte k is given
// on J and the packet's remaining words arrive on C with random gaps while
// the receiver is stalled at random. Every word must reach D unchanged with
// k's bits 3:2 appended, and J must complete exactly with the tail word.
module tb_send;
  import grid_pkg::*;
  logic j_valid, j_ready, c_req, c_valid, c_ready, d_valid, d_ready;
  logic [15:0] j_k;
  word_t c_data;
  rcv_word_t d_data;
  int checks = 0, failures = 0;
  int stalls = 0;

  send #(.KW(16)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    j_valid = 0; c_valid = 0; d_ready = 0; j_k = '0; c_data = '0;
    #10;
    // idle: nothing moves without J
    c_valid = 1; d_ready = 1; #1;
    check(!d_valid && !c_ready && !c_req, "idle without J");
    #9;
    for (int p = 0; p < 400; p++) begin
      int len, i;
      len = $urandom_range(2, 6); i = 0;
      j_valid = 1;
      j_k = 16'($urandom);
      while (i < len) begin
        c_valid = ($urandom_range(0, 2) != 0);
        d_ready = ($urandom_range(0, 2) != 0);
        c_data  = word_t'($urandom) & ~word_t'(1);
        if (i == len - 1) c_data[0] = 1'b1;
        #1;
        check(c_req, "J requests SWITCH port C");
        check(d_valid == c_valid, "D valid with C");
        check(c_ready == d_ready, "C taken when receiver ready");
        if (d_valid) begin
          check(d_data.w == c_data && d_data.ap == j_k[3:2], "word with AP appended");
          if (!d_ready) stalls++;
        end
        check(j_ready == (c_valid && d_ready && i == len - 1), "J completes on the tail");
        if (c_valid && d_ready) i++;
        #9;
      end
      j_valid = 0;
    end
    check(stalls > 50, "receiver stalls seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
