// Testbench for mctl. The testbench plays the underflow FIFO, SWITCH port A,
// the SRAM, FILTER and SEND, and runs random programming and look-up
// packets through the controller with random response delays. Checked per
// packet: the head word and its underflow bit are taken together; for
// programming the second word's chip field becomes the SRAM address and the
// write (W together with F) is followed by deletion (E); for a look-up the
// head's chip field is the address, the read strobe comes one clock after
// the head and lasts one clock, and the byte read starts SEND (J, carrying
// the byte) when bit 4 is set, or deletion (E) when it is not.
module tb_mctl;
  import grid_pkg::*;
  logic clk = 0, rst_n = 0;
  logic u_valid, u_ready, u_data, a_valid, a_ready;
  word_t a_data;
  logic [7:0] ma;
  logic w_valid, w_ready, r_valid, k_valid;
  logic [15:0] k_data, j_k;
  logic f_valid, f_ready, e_valid, e_ready, j_valid, j_ready;
  int checks = 0, failures = 0;
  int n_write = 0, n_send = 0, n_drop = 0;

  mctl #(.AW(8), .KW(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic idle_inputs();
    u_valid = 0; a_valid = 0; w_ready = 0; f_ready = 0; k_valid = 0;
    e_ready = 0; j_ready = 0;
  endtask

  // wait a random number of clocks holding a command, checking it stays up
  task automatic hold(ref logic sig, input string name);
    int n = $urandom_range(0, 4);
    repeat (n) begin
      #1; check(sig, {name, " held"});
      @(negedge clk);
    end
  endtask

  task automatic erase();
    #1; check(e_valid && !j_valid && !w_valid && !r_valid, "E requested");
    hold(e_valid, "E");
    e_ready = 1; @(negedge clk); e_ready = 0;
    n_drop++;
  endtask

  task automatic do_program(logic [7:0] addr, word_t data);
    // head word: -1 after the decrement, underflow set
    u_valid = 1; u_data = 1; a_valid = 1; a_data = {8'hff, 2'b00};
    #1; check(u_ready && a_ready, "head and underflow taken together");
    @(negedge clk); u_valid = 0; a_valid = 0;
    #1; check(a_ready && !r_valid, "asks for address word");
    repeat ($urandom_range(0, 3)) @(negedge clk);
    a_valid = 1; a_data = {addr, 2'b00};
    @(negedge clk); a_valid = 0;
    #1; check(w_valid && f_valid && ma == addr, $sformatf("write to %0d, ma=%0d", addr, ma));
    check(!a_ready, "no more words on A");
    hold(w_valid, "W");
    w_ready = 1; f_ready = 1; @(negedge clk); w_ready = 0; f_ready = 0;
    n_write++;
    erase();
  endtask

  task automatic lookup(logic [7:0] chip, logic [15:0] k);
    // some cycles with only one of the pair present: nothing is taken
    u_valid = 1; u_data = 0; a_valid = 0;
    #1; check(!u_ready, "underflow waits for the head word");
    @(negedge clk);
    a_valid = 1; a_data = {chip, 2'b10};
    #1; check(u_ready && a_ready, "head and underflow taken together");
    @(negedge clk); u_valid = 0; a_valid = 0;
    #1; check(r_valid && ma == chip, $sformatf("read of %0d one clock after the head, ma=%0d", chip, ma));
    @(negedge clk);
    k_valid = 1; k_data = k;
    #1; check(!r_valid, "read strobe lasts one clock");
    @(negedge clk); k_valid = 0;
    if (k[K_BIT]) begin
      #1; check(j_valid && j_k == k && !e_valid, "SEND started with the byte");
      hold(j_valid, "J");
      j_ready = 1; @(negedge clk); j_ready = 0;
      n_send++;
    end else begin
      erase();
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle_inputs(); u_data = 0; a_data = '0; k_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    #1; check(!a_ready && !u_ready, "idle without both");
    for (int n = 0; n < 400; n++) begin
      if ($urandom_range(0, 2) == 0) do_program(8'($urandom), word_t'($urandom));
      else lookup(8'($urandom), 16'($urandom));
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    check(n_write > 50 && n_send > 50 && n_drop > 100, "all three sequences run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
