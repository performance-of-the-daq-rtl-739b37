// tb_elink_balancer: checks the data balancing over the two upstream e-links.
// A main FIFO model holds frames (MDC header, ToASt blocks, MDC trailer); the two link sinks
// accept words with random ready. Checks: a frame below the split threshold goes entirely to
// link 0 and nothing to link 1; a frame at or above it sends header and trailer on both links,
// every ToASt block whole on one link, the blocks together complete and in order per link, and
// the word counts of the two links differ by at most one block; readback words are sent on link
// 0 between frames; random back-pressure loses or duplicates nothing. Frames of 482 words, written
// one word per clock into a model of the 256-word main FIFO, must start on a full FIFO (the frame
// is not complete yet) and stream through split over both links.
module tb_elink_balancer;
  import mdc_pkg::*;
  logic clk = 0, rst_n = 0, frame_done = 0, sc_valid = 0;
  logic [31:0] mf_dout, sc_word = 0;
  logic mf_empty, mf_rd, sc_ready, split_mode, frame_sent;
  logic [8:0] mf_level;
  logic mf_full;
  logic [15:0] split_th = 16'd40;
  logic [1:0] tx_valid, tx_ready = 2'b11;
  logic [1:0][31:0] tx_word;
  int checks = 0, failures = 0;
  logic [31:0] mq[$], l0[$], l1[$];
  logic rnd = 0;
  int nsplit = 0, nsingle = 0, nbig_full = 0;

  elink_balancer dut (.clk, .rst_n, .mf_dout, .mf_empty, .mf_level, .mf_full, .mf_rd,
    .frame_done, .split_th, .sc_valid, .sc_word, .sc_ready, .tx_valid, .tx_word, .tx_ready,
    .split_mode, .frame_sent);

  assign mf_dout  = (mq.size() > 0) ? mq[0] : 32'h0;
  assign mf_empty = (mq.size() == 0);
  assign mf_level = 9'(mq.size());
  assign mf_full  = (mq.size() >= 256);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (tx_valid[0] && tx_ready[0]) l0.push_back(tx_word[0]);
      if (tx_valid[1] && tx_ready[1]) l1.push_back(tx_word[1]);
      if (mf_rd) void'(mq.pop_front());
      if (mf_full) nbig_full++;
      if (frame_sent) begin if (split_mode) nsplit++; else nsingle++; end
    end
    tx_ready <= rnd ? 2'($urandom) : 2'b11;
  end

  // writes one word into the main FIFO model; when big, at most one word per clock and never
  // beyond the 256-word capacity, as the readout FSM writes it
  task automatic mq_put(input logic [31:0] w, input logic big);
    if (big) begin
      @(negedge clk);
      while (mq.size() >= 256) @(negedge clk);
    end
    mq.push_back(w);
  endtask

  // builds a frame with nb ToASt blocks of random sizes (10 hits each when big); returns the blocks
  task automatic put_frame(input int f, input int nb, input logic big, output logic [31:0] blocks[$][$]);
    logic [31:0] b[$];
    blocks.delete();
    @(negedge clk);
    mq_put({U_MDC_HDR, 12'h0, 16'(f)}, big);
    for (int k = 0; k < nb; k++) begin
      int n = big ? 10 : $urandom_range(1, 12);
      b.delete();
      b.push_back({U_TST_HDR, 8'h0, 4'(k), 16'(f)});
      for (int h = 0; h < n; h++) b.push_back({T_HIT, 30'($urandom)});
      b.push_back({U_TST_TRL, 4'h0, 8'h00, 16'(n)});
      foreach (b[j]) mq_put(b[j], big);
      blocks.push_back(b);
    end
    mq_put({U_MDC_TRL, 12'h0, 16'(f)}, big);
    frame_done = 1; @(negedge clk); frame_done = 0;
  endtask

  // splits a link's word list into blocks and checks header/trailer framing
  task automatic check_link(input logic [31:0] l[$], input int f, output logic [31:0] bl[$][$], output int nw);
    logic [31:0] b[$];
    bl.delete(); nw = 0;
    chk(l.size() >= 2 && l[0] == {U_MDC_HDR, 12'h0, 16'(f)}, "MDC header first");
    chk(l.size() >= 2 && l[l.size() - 1] == {U_MDC_TRL, 12'h0, 16'(f)}, "MDC trailer last");
    for (int i = 1; i < l.size() - 1; i++) begin
      b.push_back(l[i]);
      if (l[i][31:28] == U_TST_TRL) begin bl.push_back(b); nw += b.size(); b.delete(); end
    end
    chk(b.size() == 0, "no block cut between links");
  endtask

  task automatic run_frame(input int f, input int nb, input logic big = 1'b0);
    logic [31:0] blocks[$][$], b0[$][$], b1[$][$];
    int n0, n1, total, i0, i1, maxb;
    logic expect_split;
    put_frame(f, nb, big, blocks);
    total = 0; maxb = 0;
    foreach (blocks[k]) begin total += blocks[k].size(); if (blocks[k].size() > maxb) maxb = blocks[k].size(); end
    expect_split = (total + 2 >= int'(split_th));
    while (mq.size() > 0) @(negedge clk);
    repeat (5) @(negedge clk);
    check_link(l0, f, b0, n0);
    if (expect_split) begin
      check_link(l1, f, b1, n1);
      chk(n0 - n1 <= maxb && n1 - n0 <= maxb, $sformatf("balance %0d vs %0d (block %0d)", n0, n1, maxb));
      // blocks on each link keep their order and together form the frame
      i0 = 0; i1 = 0;
      foreach (blocks[k]) begin
        if (i0 < b0.size() && b0[i0] == blocks[k]) i0++;
        else if (i1 < b1.size() && b1[i1] == blocks[k]) i1++;
        else chk(0, $sformatf("block %0d missing", k));
      end
      chk(i0 == b0.size() && i1 == b1.size(), "no extra blocks");
    end else begin
      chk(l1.size() == 0, "small frame uses link 0 only");
      chk(b0.size() == blocks.size(), "all blocks on link 0");
      foreach (blocks[k]) if (k < b0.size()) chk(b0[k] == blocks[k], "block content");
    end
    l0.delete(); l1.delete();
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 60; f++) begin
      rnd = (f >= 30);
      run_frame(f, $urandom_range(0, 8));
    end
    // frames larger than the 256-word main FIFO: must start on a full FIFO and stream through
    for (int f = 60; f < 63; f++) begin
      rnd = (f == 62);
      nbig_full = 0;
      run_frame(f, 40, 1'b1);
      chk(nbig_full > 0, "oversized frame filled the main FIFO");
    end
    // readback word between frames
    @(negedge clk); sc_valid = 1; sc_word = {U_RDBK, 4'h1, 8'h05, 16'hBEEF};
    #1;
    while (!sc_ready) @(negedge clk);
    @(negedge clk); sc_valid = 0;
    repeat (3) @(negedge clk);
    chk(l0.size() == 1 && l0[0] == {U_RDBK, 4'h1, 8'h05, 16'hBEEF} && l1.size() == 0, $sformatf("readback on link 0: %0d %0d", l0.size(), l1.size()));
    l0.delete();
    chk(nsplit > 5 && nsingle > 5, $sformatf("both modes used: split %0d single %0d", nsplit, nsingle));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
