// tb_mdc_occupancy: MDC at its default sizes under 50 % occupancy on all 16 input links.
//
// Eight front-end chips with two links each (16 links, 64 strips per chip) answer each test
// pulse with 16 hits per link, i.e. 256 hits per frame: half of all strips hit. Test pulses come
// at the default 39.06 kHz rate (4096 clocks). One output frame is 2 + 16 x 18 = 290 words plus
// the duplicated MDC header and trailer, more than the 256-word main FIFO holds, so the readout
// FSM stalls on a full main FIFO while the upstream logic already streams the frame out over
// both e-links.
// Checks: all 16 links lock; every frame arrives complete on both links (every hit, hit counts,
// CRC, clean status); the words are split evenly (the two links differ by at most one ToASt
// block); each frame has fully left the chip before the next test pulse, so the rate is
// sustained; the main FIFO did run full (back-pressure happened) and no hit was lost.
module tb_mdc_occupancy;
  import mdc_pkg::*;
  localparam int NCH = 16, NHITS = 16, NPULSE = 3, PERIOD = 4096;
  logic clk = 0, rst_n = 0;
  logic [NCH-1:0] ch_rx, ch_locked, ch_active;
  logic elink_down = 0, cfg_tx, cfg_rx, sync_reset, test_pulse;
  logic [1:0][1:0] elink_up;
  logic [15:0] clk_skew;
  logic [NCH-1:0] lpush = '0, lbusy;
  logic [NCH-1:0][31:0] lword = '0;
  int checks = 0, failures = 0, cyc = 0;

  mdc_top dut (.clk, .rst_n, .ch_rx, .elink_down, .elink_up, .cfg_tx, .cfg_rx, .sync_reset,
               .test_pulse, .clk_skew, .ch_locked, .ch_active);

  for (genvar i = 0; i < NCH; i++) begin : g_link
    toast_link_model #(.SKEW((3 + 5 * i) % 32)) u_link (.clk, .en(1'b1), .push(lpush[i]),
                                                      .word(lword[i]), .sdo(ch_rx[i]), .busy(lbusy[i]));
  end
  assign cfg_rx = 1'b0;
  elink_rx_model u_rx0 (.clk, .rst_n, .din(elink_up[0]));
  elink_rx_model u_rx1 (.clk, .rst_n, .din(elink_up[1]));

  always #5 clk = ~clk;
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // back-pressure: cycles with a full main FIFO
  int n_full = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && dut.mf_full) n_full++;
  end

  task automatic send_cmd(input logic [3:0] op, input logic [7:0] a, input logic [15:0] d);
    logic [31:0] w;
    w = {op, 4'h0, a, d};
    @(negedge clk); elink_down = 1;
    for (int i = 31; i >= 0; i--) begin @(negedge clk); elink_down = w[i]; end
    @(negedge clk); elink_down = ^w;
    @(negedge clk); elink_down = 0;
    repeat (4) @(negedge clk);
  endtask

  // ---------------- front-end frames ----------------
  logic [31:0] sent[NPULSE][NCH][$];

  task automatic fe_frame(input int f, input int l);
    logic [31:0] ws[$];
    ws.push_back({T_FHDR, 12'h000, 16'(f)});
    for (int h = 0; h < NHITS; h++) begin
      logic [31:0] w;
      w = {T_HIT, 6'(l), 8'(h), 16'($urandom)};
      ws.push_back(w);
      sent[f][l].push_back(w);
    end
    ws.push_back({T_FTRL, 12'h000, 16'(NHITS)});
    foreach (ws[k]) begin
      @(negedge clk); lword[l] = ws[k]; lpush[l] = 1; @(negedge clk); lpush[l] = 0;
    end
  endtask

  // ---------------- upstream decoding ----------------
  logic [31:0] hits[NPULSE][NCH][$];
  int          nhits[NPULSE][NCH];
  logic [7:0]  crc[NPULSE][NCH];
  logic [11:0] status[NPULSE][2];
  int          nwords[NPULSE][2];
  int          t_end[NPULSE][2];
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

  task automatic parse();
    for (int l = 0; l < 2; l++) begin
      logic [31:0] q[$];
      int          qc[$];
      q  = (l == 0) ? u_rx0.words : u_rx1.words;
      qc = (l == 0) ? u_rx0.word_cycle : u_rx1.word_cycle;
      while (ptr[l] < q.size()) begin
        int e, f, ch;
        e = ptr[l];
        while (e < q.size() && q[e][31:28] != U_MDC_TRL) e++;
        if (e >= q.size()) break;
        chk(q[ptr[l]][31:28] == U_MDC_HDR, $sformatf("link %0d frame starts with MDC header", l));
        f = int'(q[ptr[l]][15:0]);
        if (f >= NPULSE) begin chk(0, $sformatf("unexpected frame %0d", f)); ptr[l] = e + 1; continue; end
        status[f][l] = q[e][27:16];
        nwords[f][l] = e - ptr[l] + 1;
        t_end[f][l]  = qc[e];
        ch = -1;
        for (int k = ptr[l] + 1; k < e; k++) begin
          if (q[k][31:28] == U_TST_HDR) ch = int'(q[k][19:16]);
          else if (q[k][31:28] == U_TST_TRL) begin
            nhits[f][ch] = int'(q[k][15:0]);
            crc[f][ch]   = q[k][23:16];
          end else if (ch >= 0) hits[f][ch].push_back(q[k]);
        end
        ptr[l] = e + 1;
      end
    end
  endtask

  initial begin
    int t_tp[NPULSE];
    for (int f = 0; f < NPULSE; f++) begin
      for (int l = 0; l < 2; l++) begin nwords[f][l] = 0; t_end[f][l] = 0; status[f][l] = '0; end
      for (int c = 0; c < NCH; c++) nhits[f][c] = -1;
    end
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (8000) @(negedge clk);
    chk(ch_locked == 16'hFFFF, $sformatf("all 16 links locked (%h)", ch_locked));
    chk(u_rx0.locked && u_rx1.locked, "upstream receivers aligned");
    send_cmd(OP_SYNC_RST, 0, 0);
    send_cmd(OP_WR_REG, REG_TP_COUNT, 16'(NPULSE));
    send_cmd(OP_WR_REG, REG_TP_DELAY, 16'd10);
    send_cmd(OP_TP_START, 0, 0);
    for (int p = 0; p < NPULSE; p++) begin
      @(posedge test_pulse);
      t_tp[p] = cyc;
      if (p > 0) chk(t_tp[p] - t_tp[p-1] == PERIOD, "test pulse period");
      for (int l = 0; l < NCH; l++) begin
        automatic int ll = l, pp = p;
        fork fe_frame(pp, ll); join_none
      end
      wait fork;
    end
    repeat (PERIOD) @(negedge clk);
    parse();
    for (int f = 0; f < NPULSE; f++) begin
      int total;
      total = 0;
      for (int l = 0; l < 2; l++) begin
        chk(nwords[f][l] > 0, $sformatf("frame %0d arrived on link %0d", f, l));
        chk(status[f][l][3:0] == 4'h0, $sformatf("frame %0d link %0d status %h", f, l, status[f][l]));
        chk(int'(status[f][l][11:4]) == NCH, $sformatf("frame %0d: %0d channels with hits", f, status[f][l][11:4]));
        chk(t_end[f][l] - t_tp[f] < PERIOD,
            $sformatf("frame %0d left link %0d %0d clocks after its test pulse", f, l, t_end[f][l] - t_tp[f]));
      end
      chk(nwords[f][0] - nwords[f][1] <= NHITS + 2 && nwords[f][1] - nwords[f][0] <= NHITS + 2,
          $sformatf("frame %0d split %0d / %0d words", f, nwords[f][0], nwords[f][1]));
      for (int c = 0; c < NCH; c++) begin
        total += hits[f][c].size();
        chk(hits[f][c].size() == NHITS && nhits[f][c] == NHITS, $sformatf("frame %0d channel %0d hit count", f, c));
        for (int k = 0; k < NHITS && k < hits[f][c].size(); k++)
          chk(hits[f][c][k] == sent[f][c][k], $sformatf("frame %0d channel %0d hit %0d", f, c, k));
        chk(crc[f][c] == ref_crc(sent[f][c]), $sformatf("frame %0d channel %0d CRC", f, c));
      end
      chk(total == NCH * NHITS, $sformatf("frame %0d carries %0d hits", f, total));
      $display("frame %0d: %0d + %0d words, last word %0d / %0d clocks after the pulse",
               f, nwords[f][0], nwords[f][1], t_end[f][0] - t_tp[f], t_end[f][1] - t_tp[f]);
    end
    chk(n_full > 0, $sformatf("main FIFO ran full for %0d cycles", n_full));
    chk(u_rx0.bad_symbols == 0 && u_rx1.bad_symbols == 0 && u_rx0.bad_words == 0 && u_rx1.bad_words == 0,
        "upstream symbols all valid");
    $display("mechanisms: main_fifo_full_cycles=%0d", n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
