// End-to-end testbench for prog_y at its default sizes.
//
// The testbench plays the previous chip (a four-phase 1-of-4 sender on the
// input pads), the next chip (a four-phase receiver on the output pads that
// acknowledges after random, sometimes long, delays) and the on-chip
// receiver array (a word sink that stalls at random). A reference model
// written from the packet rules predicts both outputs:
//  * every packet leaves on the output pads with its head chip field
//    decremented, all other words unchanged;
//  * a packet whose head arrives as 0 writes its third word into the table
//    at the chip field of its second word;
//  * any other packet looks up the entry at its decremented head; if bit 4
//    of the entry is set, its words after the head are delivered with the
//    entry's bits 3:2 appended, otherwise nothing is delivered.
// First the two experiments of the chip's functional test are replayed
// (program an entry to filter, send an event; program it to deliver, send
// the event again), then random programming and address-event packets with
// one to four column words. Each mechanism is counted and must occur:
// table writes, deliveries, filtered look-ups, underflows, multi-column
// packets, programming packets relayed to a farther chip, output-pad
// back-pressure, receiver stalls and a full input FIFO.
module tb_prog_y;
  import grid_pkg::*;
  logic clk = 0, rst_n = 0;
  q4_word_t in_d, out_d;
  logic in_ack, out_ack, rcv_valid, rcv_ready, rx_err;
  rcv_word_t rcv_data;

  prog_y dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- reference model ----------------
  logic [15:0] lut_ref [256];
  bit          lut_set [256];
  word_t       fwd_q[$];
  rcv_word_t   dlv_q[$];
  int n_prog_ref = 0, n_dlv_ref = 0, n_filt_ref = 0;

  function automatic word_t mk(int unsigned field9_2, logic b1, logic tail);
    return {8'(field9_2), b1, tail};
  endfunction
  function automatic word_t mk9(int unsigned field9_1, logic tail);
    return {9'(field9_1), tail};
  endfunction

  task automatic model(word_t pkt[$]);
    word_t h = pkt[0];
    chip_t c = chip_of(h);
    h[9:2] = c - 8'd1;
    fwd_q.push_back(h);
    for (int i = 1; i < pkt.size(); i++) fwd_q.push_back(pkt[i]);
    if (c == 8'd0) begin
      lut_ref[chip_of(pkt[1])] = 16'(pkt[2]);
      lut_set[chip_of(pkt[1])] = 1;
      n_prog_ref++;
    end else begin
      logic [15:0] k = lut_ref[c - 8'd1];
      if (k[K_BIT]) begin
        for (int i = 1; i < pkt.size(); i++) dlv_q.push_back('{w: pkt[i], ap: k[3:2]});
        n_dlv_ref++;
      end else n_filt_ref++;
    end
  endtask

  // ---------------- previous chip: input pad sender ----------------
  bit fast_send = 0;   // no sender delays: the pads set the pace
  task automatic send_word(word_t w);
    q4_word_t q = enc_word(w);
    while (in_ack) @(negedge clk);
    if (!fast_send) repeat ($urandom_range(0, 2)) @(negedge clk);
    for (int s = 0; s < int'(SETS); s++) begin
      in_d[s] = q[s];
      if (!fast_send && $urandom_range(0, 3) == 0) @(negedge clk);
    end
    while (!in_ack) @(negedge clk);
    in_d = '0;
  endtask

  task automatic send_packet(word_t pkt[$]);
    model(pkt);
    foreach (pkt[i]) send_word(pkt[i]);
  endtask

  // ---------------- next chip: output pad receiver ----------------
  int  slow_ack = 0;     // 0: prompt, else up to this many clocks of delay
  int  fwd_got = 0;
  initial begin
    out_ack = 0;
    forever begin
      @(negedge clk);
      if (!out_ack && out_d[0] != 4'b0 && out_d[1] != 4'b0 && out_d[2] != 4'b0 &&
          out_d[3] != 4'b0 && out_d[4] != 4'b0) begin
        repeat ($urandom_range(0, slow_ack)) @(negedge clk);
        check(fwd_q.size() > 0 && dec_word(out_d) == fwd_q[0],
              $sformatf("forwarded %h expected %h", dec_word(out_d), (fwd_q.size() != 0) ? fwd_q[0] : '0));
        if (fwd_q.size() > 0) void'(fwd_q.pop_front());
        fwd_got++;
        out_ack = 1;
      end else if (out_ack && out_d == '0) begin
        repeat ($urandom_range(0, slow_ack)) @(negedge clk);
        out_ack = 0;
      end
    end
  end

  // ---------------- on-chip receiver ----------------
  int rcv_stall_pct = 0;
  int dlv_got = 0;
  always @(negedge clk) rcv_ready <= ($urandom_range(0, 99) >= rcv_stall_pct);
  always @(posedge clk) begin
    if (rst_n && rcv_valid && rcv_ready) begin
      check(dlv_q.size() > 0 && rcv_data == dlv_q[0],
            $sformatf("delivered %h/%0d", rcv_data.w, rcv_data.ap));
      if (dlv_q.size() > 0) void'(dlv_q.pop_front());
      dlv_got++;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_write = 0, n_deliver = 0, n_read = 0, n_under = 0;
  int n_pass = 0;
  int n_tx_stall = 0, n_rcv_stall = 0, n_in_full = 0, n_multicol = 0, n_err = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.w_valid && dut.w_ready) n_write++;
    if (dut.j_valid && dut.j_ready) n_deliver++;
    if (dut.r_valid) n_read++;
    if (dut.u_valid && dut.u_ready && dut.u_data) n_under++;
    if (dut.tx_valid && !dut.tx_ready) n_tx_stall++;
    if (rcv_valid && !rcv_ready) n_rcv_stall++;
    if (dut.rx_valid && !dut.rx_ready) n_in_full++;
    if (rx_err) n_err++;
  end

  // acknowledge spacing during the burst
  bit burst_on = 0;
  int n_burst_ok = 0, n_burst_bad = 0, ack_seen = 0;
  longint last_ack_rise = -1, cyc = 0;
  logic in_ack_d = 0;
  always @(posedge clk) begin
    cyc++;
    if (in_ack && !in_ack_d) begin
      if (burst_on && last_ack_rise >= 0) begin
        ack_seen++;
        if (ack_seen > 3) begin
          if (cyc - last_ack_rise == 8) n_burst_ok++; else n_burst_bad++;
        end
      end
      last_ack_rise = cyc;
    end
    if (!burst_on) ack_seen = 0;
    in_ack_d <= in_ack;
  end

  task automatic drain();
    int guard = 0;
    while ((fwd_q.size() != 0 || dlv_q.size() != 0) && guard < 20000) begin
      @(negedge clk); guard++;
    end
    repeat (20) @(negedge clk);
    check(fwd_q.size() == 0, $sformatf("%0d forwarded words missing", fwd_q.size()));
    check(dlv_q.size() == 0, $sformatf("%0d delivered words missing", dlv_q.size()));
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  initial begin
    word_t pkt[$];
    int dl0;
    in_d = '0;
    foreach (lut_set[i]) lut_set[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // Experiment 1: entry 10 programmed to filter (K = 0), then an event
    // whose head arrives as 11 (10 after this chip's decrement): row 54, col 269.
    pkt = '{mk(0, 0, 0), mk(10, 0, 0), 10'b000000_0_00_0 | 10'h000, mk(0, 0, 1)};
    send_packet(pkt);
    pkt = '{mk(11, 0, 0), mk9(54, 0), mk9(269, 0), mk(0, 0, 1)};
    dl0 = dlv_got;
    send_packet(pkt);
    drain();
    check(dlv_got == dl0, "filtered: nothing delivered");
    // Experiment 2: the same entry programmed to deliver (K = bit 4 set).
    pkt = '{mk(0, 0, 0), mk(10, 0, 0), 10'b0000010000, mk(0, 0, 1)};
    send_packet(pkt);
    pkt = '{mk(11, 0, 0), mk9(54, 0), mk9(269, 0), mk(0, 0, 1)};
    dl0 = dlv_got;
    send_packet(pkt);
    drain();
    check(dlv_got == dl0 + 3, "delivered: row, column and tail");
    check(n_write == 2 && n_deliver == 1, "two writes, one delivery");

    // Random traffic in three phases: prompt partners, slow next chip,
    // stalling receiver.
    for (int phase = 0; phase < 3; phase++) begin
      slow_ack      = (phase == 1) ? 12 : 0;
      rcv_stall_pct = (phase == 2) ? 70 : 0;
      for (int n = 0; n < 60; n++) begin
        int unsigned e;
        int sel;
        pkt.delete();
        sel = $urandom_range(0, 5);
        if (sel == 5) begin
          // programming packet for a farther chip: looked up here like an event
          int tries;
          tries = 0;
          do begin e = $urandom_range(0, 254); tries++; end while (!lut_set[e] && tries < 1000);
          if (!lut_set[e]) continue;
          pkt.push_back(mk(e + 1, 1'b0, 0));
          pkt.push_back(mk($urandom_range(0, 255), 1'b0, 0));
          pkt.push_back({5'($urandom), 1'($urandom), 2'($urandom), 1'b0, 1'b0});
          pkt.push_back({9'($urandom), 1'b1});
          n_pass++;
        end else if (sel < 2) begin
          // programming packet: entry e, K and AP random
          e = $urandom_range(0, 255);
          pkt.push_back(mk(0, 1'($urandom), 0));
          pkt.push_back(mk(e, 1'($urandom), 0));
          pkt.push_back({5'($urandom), 1'($urandom), 2'($urandom), 1'($urandom), 1'b0});
          pkt.push_back({9'($urandom), 1'b1});
        end else begin
          // address event from a source whose entry is programmed
          int ncol, tries;
          ncol = $urandom_range(1, 4);
          tries = 0;
          do begin e = $urandom_range(0, 254); tries++; end while (!lut_set[e] && tries < 1000);
          if (!lut_set[e]) continue;
          pkt.push_back(mk(e + 1, 1'($urandom), 0));
          pkt.push_back(mk9($urandom_range(0, 239), 0));          // row
          for (int c = 0; c < ncol; c++) pkt.push_back(mk9($urandom_range(0, 319), 0));  // columns
          pkt.push_back({9'($urandom), 1'b1});
          if (ncol > 1) n_multicol++;
        end
        send_packet(pkt);
      end
      drain();
    end

    // Burst: one delivered event with 40 columns, prompt partners. The core
    // must keep up with the input pads, whose handshake takes 2*(SYNC+2) = 8
    // clocks per word, so every acknowledge after the first few must follow
    // the previous one by exactly 8 clocks.
    begin
      int unsigned e;
      int tries;
      tries = 0;
      do begin e = $urandom_range(0, 254); tries++; end
      while (!(lut_set[e] && lut_ref[e][K_BIT]) && tries < 5000);
      check(lut_set[e] && lut_ref[e][K_BIT], "a delivering entry exists");
      slow_ack = 0; rcv_stall_pct = 0; fast_send = 1;
      pkt.delete();
      pkt.push_back(mk(e + 1, 1'b0, 0));
      pkt.push_back(mk9(7, 0));
      for (int c = 0; c < 40; c++) pkt.push_back(mk9(c, 0));
      pkt.push_back(mk(0, 0, 1));
      n_burst_bad = 0; n_burst_ok = 0; last_ack_rise = -1;
      burst_on = 1;
      send_packet(pkt);
      burst_on = 0;
      drain();
      fast_send = 0;
      check(n_burst_ok >= 35 && n_burst_bad == 0,
            $sformatf("burst: %0d acknowledges 8 clocks apart, %0d not", n_burst_ok, n_burst_bad));
    end
    $display("mech pass=%0d burst_ok=%0d", n_pass, n_burst_ok);
    $display("mech writes=%0d deliveries=%0d reads=%0d underflows=%0d multicol=%0d tx_stall=%0d rcv_stall=%0d in_full=%0d",
             n_write, n_deliver, n_read, n_under, n_multicol, n_tx_stall, n_rcv_stall, n_in_full);
    check(n_write == n_prog_ref && n_write > 0, "table writes");
    check(n_deliver == n_dlv_ref && n_deliver > 0, "deliveries");
    check(n_read - n_deliver == n_filt_ref && n_filt_ref > 0, "filtered look-ups");
    check(n_under == n_prog_ref, "underflows");
    check(n_multicol > 0, "multi-column packets");
    check(n_pass > 0, "programming packets for farther chips");
    check(n_tx_stall > 0, "output pad back-pressure");
    check(n_rcv_stall > 0, "receiver stalls");
    check(n_in_full > 0, "input FIFO full");
    check(n_err == 0, "no illegal symbols");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
