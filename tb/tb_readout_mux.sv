// tb_readout_mux: checks the readout FSM / multiplexer.
// Sixteen channel FIFO models are filled with frames (header, random number of hits, trailer);
// an independent model computes the expected output: MDC header, per channel with hits in
// round-robin order (start channel advancing every frame) a ToASt header, the hits and a trailer
// with hit count and CRC-8, then the MDC trailer with the status bits. Covered: zero
// suppression, round-robin rotation, wrong frame number, wrong hit count, a channel overflow
// flag, a channel that never delivers (timeout), and random back-pressure from the main FIFO.
// Without back-pressure the frame must be built at one word per clock (plus one cycle per
// channel visited without data).
module tb_readout_mux;
  import mdc_pkg::*;
  localparam int NCH = 16, TMO = 8192;
  logic clk = 0, rst_n = 0, sync_rst = 0, mf_full = 0, sticky_clr = 0;
  logic [NCH-1:0] ch_active = '0, ch_ready = '0, ch_empty = '1, ch_ovf = '0, ch_rd_en;
  logic [NCH-1:0][31:0] ch_dout = '0;
  logic mf_wr, frame_done;
  logic [31:0] mf_din;
  logic [NCH-1:0] err_mask;
  logic [15:0] frame_no;
  int checks = 0, failures = 0, cyc = 0;
  logic [31:0] cq[NCH][$];
  logic [31:0] got[$], expq[$];
  int hdr_cyc = 0, trl_cyc = 0;
  logic rand_full = 0;

  readout_mux dut (.clk, .rst_n, .sync_rst, .ch_active, .ch_ready,
    .ch_empty, .ch_dout, .ch_ovf, .ch_rd_en, .mf_wr, .mf_din, .mf_full, .frame_done,
    .sticky_clr, .err_mask, .frame_no);

  always #5 clk = ~clk;
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // channel FIFO models and main FIFO sink
  always @(posedge clk) begin
    cyc++;
    if (rst_n && mf_wr) begin
      got.push_back(mf_din);
      if (mf_din[31:28] == U_MDC_HDR) hdr_cyc = cyc;
      if (mf_din[31:28] == U_MDC_TRL) trl_cyc = cyc;
    end
    for (int i = 0; i < NCH; i++) begin
      int ntrl;
      if (ch_rd_en[i] && cq[i].size() > 0) void'(cq[i].pop_front());
      ntrl = 0;
      foreach (cq[i][j]) if (cq[i][j][31:28] == T_FTRL) ntrl++;
      ch_dout[i]  <= (cq[i].size() > 0) ? cq[i][0] : 32'h0;
      ch_empty[i] <= (cq[i].size() == 0);
      ch_ready[i] <= (ntrl > 0);
    end
    mf_full <= rand_full ? ($urandom_range(0, 3) == 0) : 1'b0;
  end

  function automatic logic [7:0] ref_crc(input logic [31:0] ws[$]);
    logic [7:0] c = 8'h00;
    foreach (ws[k]) for (int b = 31; b >= 0; b--) begin
      logic top = c[7] ^ ws[k][b];
      c = c << 1;
      if (top) c = c ^ 8'b0000_0111;
    end
    return c;
  endfunction

  // Pushes one frame into the channel models and appends the expected output to expq.
  // nh[i] < 0: channel i sends nothing.
  task automatic frame(input int f, input int nh[NCH], input int bad_frame_ch, input int bad_count_ch,
                       input logic ovf, input logic tmo);
    logic [31:0] hits[NCH][$];
    int nwith = 0, start;
    logic fe = 0, ce = 0;
    for (int i = 0; i < NCH; i++) begin
      if (nh[i] < 0) continue;
      cq[i].push_back({T_FHDR, 12'h000, 16'(i == bad_frame_ch ? f + 3 : f)});
      for (int h = 0; h < nh[i]; h++) begin
        logic [31:0] w = {T_HIT, 30'($urandom)};
        cq[i].push_back(w);
        hits[i].push_back(w);
      end
      cq[i].push_back({T_FTRL, 12'h000, 16'(i == bad_count_ch ? nh[i] + 1 : nh[i])});
      if (i == bad_frame_ch) fe = 1;
      if (i == bad_count_ch) ce = 1;
    end
    start = f % NCH;
    expq.push_back({U_MDC_HDR, 12'h000, 16'(f)});
    for (int k = 0; k < NCH; k++) begin
      int i = (start + k) % NCH;
      if (nh[i] <= 0) continue;
      nwith++;
      expq.push_back({U_TST_HDR, 8'h00, 4'(i), 16'(f)});
      foreach (hits[i][h]) expq.push_back(hits[i][h]);
      expq.push_back({U_TST_TRL, 4'h0, ref_crc(hits[i]), 16'(nh[i])});
    end
    expq.push_back({U_MDC_TRL, 8'(nwith), tmo, ovf, ce, fe, 16'(f)});
  endtask

  task automatic compare(input string what);
    int t = 0;
    while (got.size() < expq.size() && t < 20000) begin @(negedge clk); t++; end
    repeat (5) @(negedge clk);
    chk(got.size() == expq.size(), $sformatf("%s: %0d words, expected %0d", what, got.size(), expq.size()));
    for (int k = 0; k < expq.size() && k < got.size(); k++)
      chk(got[k] == expq[k], $sformatf("%s word %0d: %h expected %h", what, k, got[k], expq[k]));
    got.delete();
    expq.delete();
  endtask

  initial begin
    int nh[NCH];
    int f = 0, words;
    repeat (3) @(negedge clk);
    rst_n = 1;
    ch_active = 16'h00FF;
    // normal frames, some channels without hits
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < NCH; i++) nh[i] = (i < 8) ? $urandom_range(0, 2) * $urandom_range(0, 5) : -1;
      frame(f, nh, -1, -1, 1'b0, 1'b0);
      compare($sformatf("frame %0d", f));
      f++;
    end
    // one-word-per-clock throughput with every channel active
    ch_active = '1;
    for (int i = 0; i < NCH; i++) nh[i] = 10;
    words = 2 + NCH * 12;
    frame(f, nh, -1, -1, 1'b0, 1'b0); compare("full frame"); f++;
    chk(trl_cyc - hdr_cyc + 1 == words + NCH, $sformatf("frame of %0d words took %0d clocks", words, trl_cyc - hdr_cyc + 1));
    ch_active = 16'h00FF;
    for (int i = 0; i < NCH; i++) nh[i] = (i < 8) ? 3 : -1;
    // wrong frame number on channel 3, wrong count on channel 5
    frame(f, nh, 3, -1, 1'b0, 1'b0); compare("bad frame number"); f++;
    frame(f, nh, -1, 5, 1'b0, 1'b0); compare("bad hit count"); f++;
    chk(err_mask == 16'h0028, $sformatf("sticky error mask %h", err_mask));
    sticky_clr = 1; @(negedge clk); sticky_clr = 0;
    chk(err_mask == 0, "error mask cleared");
    // overflow flag reported in the frame it occurred in
    @(negedge clk); ch_ovf[2] = 1; @(negedge clk); ch_ovf[2] = 0;
    frame(f, nh, -1, -1, 1'b1, 1'b0); compare("overflow flag"); f++;
    // channel 6 never delivers: timeout
    nh[6] = -1;
    frame(f, nh, -1, -1, 1'b0, 1'b1); compare("timeout"); f++;
    ch_active[6] = 0;
    // random back-pressure
    rand_full = 1;
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < NCH; i++) nh[i] = (i < 8 && i != 6) ? $urandom_range(0, 8) : -1;
      frame(f, nh, -1, -1, 1'b0, 1'b0);
      compare($sformatf("stalled frame %0d", f));
      f++;
    end
    rand_full = 0;
    // sync reset restarts the numbering
    @(negedge clk); sync_rst = 1; @(negedge clk); sync_rst = 0;
    chk(frame_no == 0, "frame number restarts after sync reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
