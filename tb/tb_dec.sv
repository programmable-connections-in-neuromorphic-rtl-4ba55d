// Testbench for dec: random words with and without borrow, and random
// readiness of D and C. With borrow the chip field (bits 9:2) of the output
// must be the input's minus one (mod 256) and the underflow must be set only
// for chip field 0; without borrow the word must pass unchanged and nothing
// is sent on C. The handshake signals are checked against their rules.
module tb_dec;
  import grid_pkg::*;
  logic a_valid, a_ready, b, d_valid, d_ready, c_valid, c_ready, c_data;
  word_t a_data, d_data;
  int checks = 0, failures = 0;
  int n_under = 0;

  dec dut (.*);

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
    logic [7:0] chip, exp_chip;
    for (int n = 0; n < 4000; n++) begin
      a_valid = ($urandom_range(0, 3) != 0);
      d_ready = ($urandom_range(0, 3) != 0);
      c_ready = ($urandom_range(0, 3) != 0);
      b       = ($urandom_range(0, 1) != 0);
      a_data  = word_t'($urandom);
      if ($urandom_range(0, 7) == 0) a_data[9:2] = 8'h00;
      #1;
      chip = a_data[9:2];
      exp_chip = b ? chip - 8'd1 : chip;
      check(d_data[9:2] == exp_chip && d_data[1:0] == a_data[1:0],
            $sformatf("d=%h from %h b=%0b", d_data, a_data, b));
      if (b) begin
        check(c_data == (chip == 8'h00), "underflow bit");
        if (chip == 8'h00 && c_valid) n_under++;
      end
      check(a_ready == (d_ready && (!b || c_ready)), "a_ready rule");
      check(d_valid == (a_valid && (!b || c_ready)), "d_valid rule");
      check(c_valid == (a_valid && b && d_ready), "c_valid only for head words");
      #9;
    end
    // the defining case: head 0 becomes -1 with underflow
    a_valid = 1; d_ready = 1; c_ready = 1; b = 1; a_data = 10'b00000000_0_0;
    #1;
    check(d_data == 10'b11111111_0_0 && c_data && c_valid, "0 -> -1 with borrow");
    check(n_under > 10, "underflows seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
