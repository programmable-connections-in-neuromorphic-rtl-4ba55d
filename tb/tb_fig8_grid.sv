// Workload testbench: the chip's two-chip functional test.
//
// A host sends packets into chip 0; chip 0 relays to chip 1; chip 1 relays
// to a capture device that acknowledges slowly (as a logic analyser behind
// a CPLD would). Two experiments are run, each a programming packet for
// chip 0 (head 0, table address 11) followed by one address event (row 54,
// column 269):
//  * filter: the entry's K bit is clear, chip 0 delivers nothing;
//  * deliver: K is set, chip 0 delivers row, column and tail, with AP.
// The words captured behind chip 1 are compared bit for bit with the
// 1-of-4 symbols recorded in that test: both heads decremented twice
// (programming head -2), the table address, data and tail words unchanged.
// The event is sent with head 12, so that after chip 0's decrement it
// selects entry 11, the one just programmed; behind chip 1 its head
// therefore reads 10.
module tb_fig8_grid;
  import grid_pkg::*;
  logic clk = 0, rst_n = 0;
  q4_word_t host_d, link_d, cap_d;
  logic host_ack, link_ack, cap_ack;
  logic rv0, rr0, rv1, err0, err1;
  rcv_word_t rd0, rd1;

  prog_y chip0 (.clk, .rst_n, .in_d(host_d), .in_ack(host_ack), .out_d(link_d), .out_ack(link_ack),
                .rcv_valid(rv0), .rcv_ready(rr0), .rcv_data(rd0), .rx_err(err0));
  prog_y chip1 (.clk, .rst_n, .in_d(link_d), .in_ack(link_ack), .out_d(cap_d), .out_ack(cap_ack),
                .rcv_valid(rv1), .rcv_ready(1'b1), .rcv_data(rd1), .rx_err(err1));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // words as printed in the capture, set 4 first
  function automatic word_t from_sets(q4_t s4, q4_t s3, q4_t s2, q4_t s1, q4_t s0);
    return dec_word('{s4, s3, s2, s1, s0});
  endfunction

  task automatic host_word(word_t w);
    while (host_ack) @(negedge clk);
    host_d = enc_word(w);
    while (!host_ack) @(negedge clk);
    host_d = '0;
  endtask

  // capture device
  word_t cap_q[$];
  initial begin
    cap_ack = 0;
    forever begin
      @(negedge clk);
      if (!cap_ack && cap_d[0] != 0 && cap_d[1] != 0 && cap_d[2] != 0 && cap_d[3] != 0 && cap_d[4] != 0) begin
        repeat (6) @(negedge clk);
        cap_q.push_back(dec_word(cap_d));
        cap_ack = 1;
      end else if (cap_ack && cap_d == '0) begin
        repeat (6) @(negedge clk);
        cap_ack = 0;
      end
    end
  end

  // chip 0's receiver
  rcv_word_t got0[$];
  always @(posedge clk) if (rst_n && rv0 && rr0) got0.push_back(rd0);
  assign rr0 = 1'b1;

  task automatic experiment(bit deliver);
    word_t data_w = deliver ? from_sets(4'b0001, 4'b0001, 4'b0010, 4'b0001, 4'b0001)
                            : from_sets(4'b0001, 4'b0001, 4'b0001, 4'b0001, 4'b0001);
    word_t exp_cap[8];
    int t0;
    cap_q.delete(); got0.delete();
    // programming packet, as recorded: head 0, address 11, data, tail
    host_word(word_t'(0));
    host_word(from_sets(4'b0001, 4'b0001, 4'b0100, 4'b1000, 4'b0001));
    host_word(data_w);
    host_word(from_sets(4'b0001, 4'b0001, 4'b0001, 4'b0001, 4'b0010));
    // address event: head 12, row 54, column 269, tail
    host_word({8'd12, 2'b00});
    host_word(from_sets(4'b0001, 4'b0010, 4'b0100, 4'b1000, 4'b0001));
    host_word(from_sets(4'b0100, 4'b0001, 4'b0010, 4'b0100, 4'b0100));
    host_word(from_sets(4'b0001, 4'b0001, 4'b0001, 4'b0001, 4'b0010));
    t0 = 0;
    while (cap_q.size() < 8 && t0 < 5000) begin @(negedge clk); t0++; end
    repeat (50) @(negedge clk);
    exp_cap = '{from_sets(4'b1000, 4'b1000, 4'b1000, 4'b0100, 4'b0001),   // Head = -2
                from_sets(4'b0001, 4'b0001, 4'b0100, 4'b1000, 4'b0001),   // SRAM address 11
                data_w,                                                    // SRAM data
                from_sets(4'b0001, 4'b0001, 4'b0001, 4'b0001, 4'b0010),   // tail
                {8'd10, 2'b00},                                            // head 12 - 2
                from_sets(4'b0001, 4'b0010, 4'b0100, 4'b1000, 4'b0001),   // row 54
                from_sets(4'b0100, 4'b0001, 4'b0010, 4'b0100, 4'b0100),   // column 269
                from_sets(4'b0001, 4'b0001, 4'b0001, 4'b0001, 4'b0010)};  // tail
    check(cap_q.size() == 8, $sformatf("captured %0d words", cap_q.size()));
    for (int i = 0; i < 8 && i < cap_q.size(); i++)
      check(cap_q[i] == exp_cap[i], $sformatf("capture word %0d: %b expected %b", i, cap_q[i], exp_cap[i]));
    check(exp_cap[1][9:2] == 8'd11 && exp_cap[5][9:1] == 9'd54 && exp_cap[6][9:1] == 9'd269 &&
          exp_cap[0][9:2] == 8'hfe, "recorded values decode as labelled");
    if (deliver) begin
      check(got0.size() == 3, $sformatf("chip 0 delivered %0d words", got0.size()));
      if (got0.size() == 3)
        check(got0[0].w[9:1] == 9'd54 && got0[1].w[9:1] == 9'd269 && got0[2].w[0] &&
              got0[0].ap == data_w[3:2], "row, column, tail delivered with AP");
    end else begin
      check(got0.size() == 0, $sformatf("chip 0 filtered, delivered %0d", got0.size()));
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  initial begin
    host_d = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    experiment(0);
    experiment(1);
    check(!err0 && !err1, "no illegal symbols");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
