// Testbench for vn: random words of 1-of-4 sets (valid, neutral, partly
// valid and illegal) are applied; the combinational flags are compared with
// a reference written from the definition of the code, and the C-element
// output v is checked to rise only on a fully valid word, fall only on a
// fully neutral one and hold otherwise.
module tb_vn;
  localparam int M = 5;
  logic clk = 0, rst_n = 0;
  logic [M-1:0][3:0] d;
  logic all_valid, all_neutral, illegal, v;
  int checks = 0, failures = 0;
  int n_rise = 0, n_fall = 0, n_hold = 0;

  vn #(.M(M)) dut (.clk, .rst_n, .d, .all_valid, .all_neutral, .illegal, .v);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int ones(logic [3:0] x);
    return int'(x[0]) + int'(x[1]) + int'(x[2]) + int'(x[3]);
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ev, en, il, v_exp;
    d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    v_exp = 0;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      int kind;
      kind = $urandom_range(0, 3);
      for (int s = 0; s < M; s++) begin
        case (kind)
          0: d[s] = 4'b0001 << $urandom_range(0, 3);          // valid
          1: d[s] = 4'b0000;                                   // neutral
          2: d[s] = ($urandom_range(0, 1) != 0) ? (4'b0001 << $urandom_range(0, 3)) : 4'b0000;
          default: d[s] = 4'($urandom_range(0, 15));           // anything
        endcase
      end
      #1;
      ev = 1; en = 1; il = 0;
      for (int s = 0; s < M; s++) begin
        if (ones(d[s]) == 0) ev = 0;
        if (ones(d[s]) != 0) en = 0;
        if (ones(d[s]) > 1)  il = 1;
      end
      check(all_valid == ev,   $sformatf("all_valid d=%h", d));
      check(all_neutral == en, $sformatf("all_neutral d=%h", d));
      check(illegal == il,     $sformatf("illegal d=%h", d));
      @(posedge clk); #1;
      if (ev)      begin if (!v_exp) n_rise++; v_exp = 1; end
      else if (en) begin if (v_exp) n_fall++;  v_exp = 0; end
      else n_hold++;
      check(v == v_exp, $sformatf("v=%0b expected %0b", v, v_exp));
    end
    check(n_rise > 10 && n_fall > 10 && n_hold > 10, "all C-element cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
