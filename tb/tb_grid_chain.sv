// Workload testbench: a grid of NCHIP relays in series, with random traffic.
//
// A host feeds chip 0; each chip forwards to the next; the last chip feeds a
// sink. Every chip's receiver stalls at random. The testbench first programs
// a random set of entries in every chip (a programming packet for chip i
// carries head i, so it arrives there as 0), then sends address events with
// random heads, rows and one to three columns. A reference model walks each
// packet through the chain, chip by chip: the head as it arrives at chip i
// is the host's head minus i; chip i either writes its table (head 0) or
// looks up entry head-1 and delivers, with that entry's AP, when K is set.
// Programming packets that pass non-target chips are looked up there too,
// also after their target, where their head has gone negative; entries the
// test never writes hold whatever the tables start with, so the model copies
// each table's start-up contents once at time zero.
// Checked: the words leaving the last chip, and the words each chip
// delivers, in order; deliveries must happen on every chip, and packets must
// be filtered on every chip.
module tb_grid_chain;
  import grid_pkg::*;
  localparam int NCHIP = 3;
  logic clk = 0, rst_n = 0;
  q4_word_t link_d [NCHIP+1];
  logic     link_ack [NCHIP+1];
  logic     rv [NCHIP], rr [NCHIP], err [NCHIP];
  rcv_word_t rd [NCHIP];

  for (genvar i = 0; i < NCHIP; i++) begin : g_chip
    prog_y chip (.clk, .rst_n, .in_d(link_d[i]), .in_ack(link_ack[i]),
                 .out_d(link_d[i+1]), .out_ack(link_ack[i+1]),
                 .rcv_valid(rv[i]), .rcv_ready(rr[i]), .rcv_data(rd[i]), .rx_err(err[i]));
  end

  always #5 clk = ~clk;

  // start-up contents of the tables (never reset)
  for (genvar i = 0; i < NCHIP; i++) begin : g_init
    initial begin
      #1;
      for (int e = 0; e < 256; e++) lut_ref[i][e] = g_chip[i].chip.u_sram.m[e];
    end
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // reference model
  logic [15:0] lut_ref [NCHIP][256];
  bit          lut_set [NCHIP][256];
  rcv_word_t   dlv_q [NCHIP][$];
  word_t       out_q [$];
  int n_dlv [NCHIP], n_filt [NCHIP];

  task automatic model(word_t pkt[$]);
    word_t p[$] = pkt;
    for (int i = 0; i < NCHIP; i++) begin
      chip_t c = chip_of(p[0]);
      p[0][9:2] = c - 8'd1;
      if (c == 8'd0) begin
        lut_ref[i][chip_of(p[1])] = 16'(p[2]);
        lut_set[i][chip_of(p[1])] = 1;
      end else if (lut_ref[i][c - 8'd1][K_BIT]) begin
        for (int w = 1; w < p.size(); w++) dlv_q[i].push_back('{w: p[w], ap: lut_ref[i][c - 8'd1][3:2]});
        n_dlv[i]++;
      end else begin
        n_filt[i]++;
      end
    end
    foreach (p[w]) out_q.push_back(p[w]);
  endtask

  task automatic host_word(word_t w);
    q4_word_t q = enc_word(w);
    while (link_ack[0]) @(negedge clk);
    link_d[0] = q;
    while (!link_ack[0]) @(negedge clk);
    link_d[0] = '0;
  endtask

  task automatic send_packet(word_t pkt[$]);
    model(pkt);
    foreach (pkt[w]) host_word(pkt[w]);
  endtask

  // sink behind the last chip
  initial begin
    link_ack[NCHIP] = 0;
    forever begin
      @(negedge clk);
      if (!link_ack[NCHIP] && link_d[NCHIP][0] != 0 && link_d[NCHIP][1] != 0 && link_d[NCHIP][2] != 0 &&
          link_d[NCHIP][3] != 0 && link_d[NCHIP][4] != 0) begin
        repeat ($urandom_range(0, 4)) @(negedge clk);
        check(out_q.size() != 0 && dec_word(link_d[NCHIP]) == out_q[0], "word behind the last chip");
        if (out_q.size() != 0) void'(out_q.pop_front());
        link_ack[NCHIP] = 1;
      end else if (link_ack[NCHIP] && link_d[NCHIP] == '0) begin
        link_ack[NCHIP] = 0;
      end
    end
  end

  // receivers
  for (genvar i = 0; i < NCHIP; i++) begin : g_rcv
    always @(negedge clk) rr[i] <= ($urandom_range(0, 2) != 0);
    always @(posedge clk) if (rst_n && rv[i] && rr[i]) begin
      check(dlv_q[i].size() != 0 && rd[i] == dlv_q[i][0], $sformatf("chip %0d delivery", i));
      if (dlv_q[i].size() != 0) void'(dlv_q[i].pop_front());
    end
  end

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  initial begin
    word_t pkt[$];
    int guard;
    link_d[0] = '0;
    for (int i = 0; i < NCHIP; i++) begin
      n_dlv[i] = 0; n_filt[i] = 0;
      for (int e = 0; e < 256; e++) lut_set[i][e] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // program entries 0..7 of every chip, the nearest chip first, so that
    // a programming packet for a farther chip is looked up on its way only
    // at entries already programmed (and may be delivered there)
    for (int i = 0; i < NCHIP; i++)
      for (int e = 0; e < 8; e++) begin
        pkt = '{{8'(i), 2'b00}, {8'(e), 2'b00},
                {5'($urandom), 1'(e % 2), 2'($urandom), 2'b00}, 10'h001};  // K alternates
        send_packet(pkt);
      end
    // address events: the head arriving at chip i is h - i, looking up h - i - 1
    for (int n = 0; n < 150; n++) begin
      int h, ncol;
      h = $urandom_range(NCHIP, 8);
      ncol = $urandom_range(1, 3);
      pkt.delete();
      pkt.push_back({8'(h), 2'b00});
      pkt.push_back({9'($urandom_range(0, 239)), 1'b0});
      for (int c = 0; c < ncol; c++) pkt.push_back({9'($urandom_range(0, 319)), 1'b0});
      pkt.push_back(10'h001);
      send_packet(pkt);
    end
    guard = 0;
    while (guard < 50000 && (out_q.size() != 0 || dlv_q[0].size() != 0 ||
                             dlv_q[1].size() != 0 || dlv_q[2].size() != 0)) begin
      @(negedge clk); guard++;
    end
    repeat (50) @(negedge clk);
    check(out_q.size() == 0, "all words left the last chip");
    for (int i = 0; i < NCHIP; i++) begin
      check(dlv_q[i].size() == 0, $sformatf("chip %0d delivered everything", i));
      check(n_dlv[i] > 0 && n_filt[i] > 0, $sformatf("chip %0d delivered %0d, filtered %0d", i, n_dlv[i], n_filt[i]));
      check(!err[i], "no illegal symbols");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
