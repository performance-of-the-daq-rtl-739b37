// tb_mdc_top: end-to-end test of the MDC at its default sizes.
//
// Set-up as on the bench: two ToASt chips with two links each feed input channels 0..3, the
// other twelve inputs stay silent; a configuration model of the two chips sits on the shared
// configuration line; two reference e-link receivers decode the upstream links; commands are
// sent over the downstream line.
// Sequence: the four links lock (with bitslips, each link starts at a different bit offset) and
// the silent ones stay inactive; status registers are read back; a configuration sequence is
// written (one write corrupted by the chip model, so it must be rewritten) and its results come
// back; bad commands give error words; a sync reset restarts frame numbering; a test pulse run
// of three pulses makes every link send a frame of 32 hits (128 hits per frame, as in the bench
// test) at the 39.1 kHz pulse rate, and these frames go out split over both links; small
// frames go out on link 0 alone, links without hits are suppressed; one frame overflows a
// channel FIFO, one carries a wrong frame number and one misses a channel (timeout).
// Every decoded frame is compared with what was sent (hits per channel, CRC, hit counts, status
// bits) and each mechanism is counted; one that never happened counts as a failure.
module tb_mdc_top;
  import mdc_pkg::*;
  localparam int NCH = 16, NL = 4;
  logic clk = 0, rst_n = 0;
  logic [NCH-1:0] ch_rx, ch_locked, ch_active;
  logic elink_down = 0, cfg_tx, cfg_rx, sync_reset, test_pulse;
  logic [1:0][1:0] elink_up;
  logic [15:0] clk_skew;
  logic [NL-1:0] lpush = '0, lbusy;
  logic [NL-1:0][31:0] lword = '0;
  int checks = 0, failures = 0, cyc = 0;

  mdc_top dut (.clk, .rst_n, .ch_rx, .elink_down, .elink_up, .cfg_tx, .cfg_rx, .sync_reset,
               .test_pulse, .clk_skew, .ch_locked, .ch_active);

  for (genvar i = 0; i < NL; i++) begin : g_link
    toast_link_model #(.SKEW(5 + 7 * i)) u_link (.clk, .en(1'b1), .push(lpush[i]), .word(lword[i]),
                                                .sdo(ch_rx[i]), .busy(lbusy[i]));
  end
  assign ch_rx[NCH-1:NL] = '0;
  toast_cfg_model #(.DIV(16), .PRESENT(16'h0003)) u_chips (.clk, .cfg_tx, .cfg_rx);
  elink_rx_model u_rx0 (.clk, .rst_n, .din(elink_up[0]));
  elink_rx_model u_rx1 (.clk, .rst_n, .din(elink_up[1]));

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_bitslip = 0, n_tp = 0, n_sync = 0, n_split = 0, n_single = 0, n_zero = 0, n_ovf = 0;
  int n_ferr = 0, n_cerr = 0, n_tmo = 0, n_rewrite = 0, n_cfg_ok = 0, n_cmd_err = 0, n_rr = 0;
  logic tp_q = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (dut.g_ch[0].u_ch.bitslip || dut.g_ch[1].u_ch.bitslip ||
          dut.g_ch[2].u_ch.bitslip || dut.g_ch[3].u_ch.bitslip) n_bitslip++;
      if (test_pulse && !tp_q) n_tp++;
      if (sync_reset) n_sync++;
    end
    tp_q <= test_pulse;
  end

  // ---------------- downstream commands ----------------
  task automatic send_cmd(input logic [3:0] op, input logic [3:0] chip, input logic [7:0] a, input logic [15:0] d);
    logic [31:0] w;
    w = {op, chip, a, d};
    @(negedge clk); elink_down = 1;
    for (int i = 31; i >= 0; i--) begin @(negedge clk); elink_down = w[i]; end
    @(negedge clk); elink_down = ^w;
    @(negedge clk); elink_down = 0;
    repeat (4) @(negedge clk);
  endtask

  // ---------------- front-end frames ----------------
  logic [31:0] sent[int][NL][$];     // hits sent, per frame number and link
  int          sent_n[int][NL];      // hit count written into the trailer

  task automatic push_words(input int l, input logic [31:0] ws[$]);
    foreach (ws[k]) begin
      @(negedge clk); lword[l] = ws[k]; lpush[l] = 1; @(negedge clk); lpush[l] = 0;
    end
  endtask

  // sends frame f on link l with n hits (n < 0: nothing); hdr_f overrides the frame number
  task automatic fe_frame(input int f, input int l, input int n, input int hdr_f);
    logic [31:0] ws[$];
    if (n < 0) return;
    ws.push_back({T_FHDR, 12'h000, 16'(hdr_f)});
    for (int h = 0; h < n; h++) begin
      logic [31:0] w;
      w = {T_HIT, 6'(l), 8'(h), 16'($urandom)};
      ws.push_back(w);
      sent[f][l].push_back(w);
    end
    ws.push_back({T_FTRL, 12'h000, 16'(n)});
    sent_n[f][l] = n;
    push_words(l, ws);
  endtask

  task automatic all_links(input int f, input int n0, input int n1, input int n2, input int n3);
    fork
      fe_frame(f, 0, n0, f);
      fe_frame(f, 1, n1, f);
      fe_frame(f, 2, n2, f);
      fe_frame(f, 3, n3, f);
    join
  endtask

  // ---------------- upstream decoding ----------------
  typedef struct {
    int          nlinks;
    logic [11:0] status;
    logic [31:0] hits[NCH][$];
    int          nhits[NCH];
    logic [7:0]  crc[NCH];
    int          first_ch;
  } rframe_t;
  rframe_t     frames[int];
  logic [31:0] rb[$];
  int          ptr[2] = '{0, 0};

  function automatic logic [7:0] ref_crc(input logic [31:0] ws[$]);
    logic [7:0] c = 8'h00;
    foreach (ws[k]) for (int b = 31; b >= 0; b--) begin
      logic top = c[7] ^ ws[k][b];
      c = c << 1;
      if (top) c = c ^ 8'h07;
    end
    return c;
  endfunction

  // consumes complete frames and readback words decoded so far on both links
  task automatic parse();
    for (int l = 0; l < 2; l++) begin
      logic [31:0] q[$];
      q = (l == 0) ? u_rx0.words : u_rx1.words;
      while (ptr[l] < q.size()) begin
        logic [31:0] w;
        int e, f, ch;
        w = q[ptr[l]];
        if (w[31:28] == U_RDBK) begin rb.push_back(w); ptr[l]++; continue; end
        // need a complete frame
        e = ptr[l];
        while (e < q.size() && q[e][31:28] != U_MDC_TRL) e++;
        if (e >= q.size()) break;
        chk(w[31:28] == U_MDC_HDR, $sformatf("link %0d frame starts with MDC header (%h)", l, w));
        f = int'(w[15:0]);
        if (!frames.exists(f)) begin
          frames[f].nlinks = 0;
          frames[f].first_ch = -1;
          for (int c = 0; c < NCH; c++) frames[f].nhits[c] = -1;
        end
        frames[f].nlinks++;
        frames[f].status = q[e][27:16];
        chk(int'(q[e][15:0]) == f, "MDC trailer frame number");
        ch = -1;
        for (int k = ptr[l] + 1; k < e; k++) begin
          w = q[k];
          if (w[31:28] == U_TST_HDR) begin
            ch = int'(w[19:16]);
            if (frames[f].first_ch < 0) frames[f].first_ch = ch;
            chk(int'(w[15:0]) == f, "ToASt header frame number");
          end else if (w[31:28] == U_TST_TRL) begin
            frames[f].nhits[ch] = int'(w[15:0]);
            frames[f].crc[ch] = w[23:16];
          end else if (ch >= 0) frames[f].hits[ch].push_back(w);
        end
        ptr[l] = e + 1;
      end
    end
  endtask

  // waits for frame f and checks it against what was sent
  task automatic check_frame(input int f, input logic [3:0] exp_status, input int min_links,
                             input int max_links, input string what);
    int t = 0;
    while (!(frames.exists(f) && frames[f].nlinks >= min_links) && t < 30000) begin
      repeat (50) @(negedge clk); t += 50; parse();
    end
    repeat (max_links > min_links ? 3000 : 400) @(negedge clk); parse();
    chk(frames.exists(f), $sformatf("%s: frame %0d received", what, f));
    if (!frames.exists(f)) return;
    chk(frames[f].nlinks >= min_links && frames[f].nlinks <= max_links,
        $sformatf("%s: frame on %0d links", what, frames[f].nlinks));
    if (frames[f].nlinks == 2) n_split++; else n_single++;
    chk(frames[f].status[3:0] == exp_status, $sformatf("%s: status %h expected %h", what, frames[f].status[3:0], exp_status));
    if (frames[f].status[0]) n_ferr++;
    if (frames[f].status[1]) n_cerr++;
    if (frames[f].status[2]) n_ovf++;
    if (frames[f].status[3]) n_tmo++;
    if (frames[f].first_ch != f % NCH && frames[f].first_ch >= 0) n_rr++;
    for (int l = 0; l < NL; l++) begin
      int nsent;
      nsent = sent.exists(f) ? sent[f][l].size() : 0;
      if (nsent == 0) begin
        chk(frames[f].nhits[l] < 0, $sformatf("%s: link %0d without hits is suppressed", what, l));
        if (sent_n.exists(f) && sent_n[f][l] == 0) n_zero++;
        continue;
      end
      if (exp_status[2]) continue;   // overflowing frame: checked separately
      chk(frames[f].hits[l].size() == nsent, $sformatf("%s: link %0d %0d hits, sent %0d", what, l, frames[f].hits[l].size(), nsent));
      for (int k = 0; k < nsent && k < frames[f].hits[l].size(); k++)
        chk(frames[f].hits[l][k] == sent[f][l][k], $sformatf("%s: hit %0d of link %0d", what, k, l));
      chk(frames[f].nhits[l] == nsent, $sformatf("%s: trailer hit count", what));
      chk(frames[f].crc[l] == ref_crc(sent[f][l]), $sformatf("%s: CRC of link %0d", what, l));
    end
  endtask

  task automatic expect_rb(input logic [31:0] mask, input logic [31:0] val, input string what);
    int t = 0;
    while (t < 4000) begin
      parse();
      foreach (rb[k]) if ((rb[k] & mask) == val) begin
        chk(1, what);
        rb.delete(k);
        return;
      end
      repeat (20) @(negedge clk); t += 20;
    end
    chk(0, $sformatf("%s: readback not seen", what));
  endtask

  initial begin
    int f, t_tp;
    repeat (4) @(negedge clk);
    rst_n = 1;
    // ---- link start-up ----
    repeat (6000) @(negedge clk);
    chk(ch_locked == 16'h000F, $sformatf("links 0..3 locked (%h)", ch_locked));
    chk(ch_active == 16'h000F, $sformatf("silent links stay inactive (%h)", ch_active));
    chk(u_rx0.locked && u_rx1.locked, "upstream receivers aligned on the idle comma");
    send_cmd(OP_RD_REG, 0, REG_STATUS_LCK, 0);
    expect_rb(32'hFFFF_FFFF, {U_RDBK, RB_REG, REG_STATUS_LCK, 16'h000F}, "locked status read back");
    // ---- bad commands ----
    send_cmd(4'hB, 0, 0, 0);
    expect_rb(32'hFFFF_FFFF, {U_RDBK, RB_ERR, 8'hB0, 12'h0, 4'(ERR_UNKNOWN_CMD)}, "unknown command flagged");
    send_cmd(OP_CFG_END, 0, 0, 0);
    expect_rb(32'hFFFF_FFFF, {U_RDBK, RB_ERR, OP_CFG_END, 4'h0, 12'h0, 4'(ERR_SEQUENCE)}, "wrong sequence flagged");
    n_cmd_err = 2;
    // ---- front-end configuration with read-back ----
    u_chips.bad_writes[1] = 1;
    send_cmd(OP_CFG_BEGIN, 0, 0, 0);
    send_cmd(OP_CFG_WRITE, 4'hF, 8'h30, 16'h0123);
    send_cmd(OP_CFG_WRITE, 4'h1, 8'h31, 16'h4567);
    send_cmd(OP_CFG_END, 0, 0, 0);
    expect_rb(32'hFFFF_FFFF, {U_RDBK, RB_CFG_OK, 8'h30, 4'hF, 4'h0, 8'd1}, "broadcast write verified after one rewrite");
    expect_rb(32'hFFFF_FFFF, {U_RDBK, RB_CFG_OK, 8'h31, 4'h1, 4'h0, 8'd0}, "single write verified");
    chk(u_chips.regs[0][8'h30] == 16'h0123 && u_chips.regs[1][8'h30] == 16'h0123 &&
        u_chips.regs[1][8'h31] == 16'h4567, "front-end registers hold the configuration");
    n_rewrite = 1; n_cfg_ok = 2;
    // ---- sync reset and test pulse run: 3 pulses, 32 hits per link per pulse ----
    send_cmd(OP_SYNC_RST, 0, 0, 0);
    send_cmd(OP_WR_REG, 0, REG_TP_COUNT, 16'd3);
    send_cmd(OP_WR_REG, 0, REG_TP_DELAY, 16'd10);
    send_cmd(OP_WR_REG, 0, REG_TP_CTRL, 16'h0010);
    send_cmd(OP_TP_START, 0, 0, 0);
    f = 0;
    t_tp = 0;
    for (int p = 0; p < 3; p++) begin
      int t0;
      @(posedge test_pulse);
      t0 = cyc;
      if (p > 0) chk(t0 - t_tp == 4096, $sformatf("test pulse period %0d clocks", t0 - t_tp));
      t_tp = t0;
      all_links(f, 32, 32, 32, 32);
      f++;
    end
    for (int k = 0; k < 3; k++) check_frame(k, 4'h0, 2, 2, $sformatf("test pulse frame %0d", k));
    chk(n_tp == 3, $sformatf("test pulses seen %0d", n_tp));
    // ---- small frames: link 0 only, zero suppression ----
    all_links(f, 1, 0, 0, 2); check_frame(f, 4'h0, 1, 1, "small frame"); f++;
    all_links(f, 0, 0, 3, 0); check_frame(f, 4'h0, 1, 1, "small frame 2"); f++;
    // ---- wrong frame number on link 1 ----
    fork
      fe_frame(f, 0, 2, f);
      fe_frame(f, 1, 2, f + 7);
      fe_frame(f, 2, 2, f);
      fe_frame(f, 3, 2, f);
    join
    check_frame(f, 4'h1, 1, 1, "wrong frame number"); f++;
    // ---- overflow of channel 2 (80 hits into a 64-word FIFO) ----
    all_links(f, 2, 2, 80, 2);
    check_frame(f, 4'h6, 1, 2, "overflow");
    chk(frames.exists(f) && frames[f].hits[2].size() == 62 && frames[f].nhits[2] == 62,
        "overflowing channel keeps 62 hits and reports the count it kept");
    f++;
    // ---- channel 3 misses a frame: timeout ----
    all_links(f, 1, 1, 1, -1);
    check_frame(f, 4'h8, 1, 1, "timeout"); f++;
    // ---- end ----
    chk(n_bitslip > 0, $sformatf("bitslips: %0d", n_bitslip));
    chk(n_split >= 3, $sformatf("split frames: %0d", n_split));
    chk(n_single >= 3, $sformatf("single-link frames: %0d", n_single));
    chk(n_zero > 0, $sformatf("zero-suppressed channels: %0d", n_zero));
    chk(n_rr > 0, $sformatf("round-robin start rotated: %0d", n_rr));
    chk(n_ovf > 0 && n_cerr > 0 && n_ferr > 0 && n_tmo > 0,
        $sformatf("overflow %0d, count error %0d, frame error %0d, timeout %0d", n_ovf, n_cerr, n_ferr, n_tmo));
    chk(n_sync == 1, "sync reset pulse");
    chk(u_rx0.bad_symbols == 0 && u_rx1.bad_symbols == 0 && u_rx0.bad_words == 0 && u_rx1.bad_words == 0,
        "upstream symbols all valid");
    $display("mechanisms: bitslip=%0d tp=%0d sync=%0d split=%0d single=%0d zero=%0d rr=%0d ovf=%0d cnt_err=%0d frame_err=%0d timeout=%0d rewrite=%0d cfg_ok=%0d cmd_err=%0d",
             n_bitslip, n_tp, n_sync, n_split, n_single, n_zero, n_rr, n_ovf, n_cerr, n_ferr, n_tmo, n_rewrite, n_cfg_ok, n_cmd_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
