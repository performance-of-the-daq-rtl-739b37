// tb_readout_channel: checks one MDC input channel end to end.
// A ToASt link model with a bit skew sends idle words, then frames of random size. Checks: the
// channel becomes active and locks (through bitslips); idle words never reach the FIFO; every
// stored frame is header, hits, trailer exactly as sent; frame_ready follows the number of
// complete frames; a frame larger than the FIFO loses hits, keeps its trailer and raises ovf;
// after the link is switched off the channel leaves the active state after the timeout, and
// a disabled channel (ch_en low) stays inactive. Also checks the input rate: a word every 32
// clocks.
module tb_readout_channel;
  import mdc_pkg::*;
  localparam int DEPTH = 64, ACT_TO = 256;
  logic clk = 0, rst_n = 0, ch_en = 1, rd_en = 0, link_en = 1, push = 0;
  logic [31:0] word = 0, dout;
  logic sdin, active, locked, ovf, empty, frame_ready, lbusy;
  int checks = 0, failures = 0, novf = 0, cyc = 0;

  toast_link_model #(.SKEW(13)) u_link (.clk, .en(link_en), .push, .word, .sdo(sdin), .busy(lbusy));
  readout_channel dut (
    .clk, .rst_n, .ch_en, .sdin, .active, .locked, .ovf, .rd_en, .dout, .empty, .frame_ready);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && ovf) novf++;
  end
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

  task automatic send(input logic [31:0] w);
    @(negedge clk); push = 1; word = w; @(negedge clk); push = 0;
  endtask

  // sends a frame and returns the words the FIFO should then hold
  task automatic send_frame(input int f, input int n, ref logic [31:0] exp[$]);
    logic [31:0] w;
    w = {T_FHDR, 12'h000, 16'(f)}; send(w); exp.push_back(w);
    for (int i = 0; i < n; i++) begin
      w = {T_HIT, 30'($urandom)}; send(w);
      if (i < DEPTH - 2) exp.push_back(w);     // frame header takes one entry, trailer one
    end
    w = {T_FTRL, 12'h000, 16'(n)}; send(w); exp.push_back(w);
  endtask

  task automatic drain(ref logic [31:0] exp[$]);
    while (exp.size() > 0) begin
      @(negedge clk);
      if (!empty) begin
        chk(dout == exp[0], $sformatf("word %h expected %h", dout, exp[0]));
        void'(exp.pop_front());
        rd_en = 1; @(negedge clk); rd_en = 0;
      end
    end
  endtask

  initial begin
    logic [31:0] exp[$];
    int t0, t1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // lock on idle words
    repeat (100 * 32) @(negedge clk);
    chk(active, "link detected as active");
    chk(locked, "word alignment locked");
    chk(empty, "idle words are not stored");
    // frames of random size that fit
    for (int f = 0; f < 20; f++) begin
      send_frame(f, $urandom_range(0, DEPTH - 2), exp);
      wait (!lbusy); repeat (64) @(negedge clk);
      chk(frame_ready, "complete frame flagged");
      drain(exp);
      @(negedge clk);
      chk(!frame_ready && empty, "frame_ready clears after the trailer is read");
    end
    // two frames queued: frame_ready stays up after the first is read
    send_frame(100, 3, exp); send_frame(101, 2, exp);
    wait (!lbusy); repeat (64) @(negedge clk);
    for (int i = 0; i < 5; i++) begin
      chk(dout == exp[0], "first frame word"); void'(exp.pop_front());
      rd_en = 1; @(negedge clk); rd_en = 0;
    end
    chk(frame_ready, "second frame still ready");
    drain(exp);
    // rate: one word per 32 clocks
    @(negedge clk);
    push = 1; word = {T_FHDR, 28'h0}; @(negedge clk); word = {T_HIT, 30'h1}; @(negedge clk);
    word = {T_FTRL, 12'h0, 16'd1}; @(negedge clk); push = 0;
    wait (!empty); t0 = cyc; @(negedge clk); rd_en = 1; @(negedge clk); rd_en = 0;
    wait (!empty); t1 = cyc; @(negedge clk); rd_en = 1; @(negedge clk); rd_en = 0;
    chk((t1 - t0) == 32, $sformatf("word spacing %0d clocks", t1 - t0));
    wait (!empty); @(negedge clk); rd_en = 1; @(negedge clk); rd_en = 0;
    // overflow: more hits than the FIFO holds
    novf = 0;
    send_frame(7, DEPTH + 5, exp);
    wait (!lbusy); repeat (64) @(negedge clk);
    chk(novf == 7, $sformatf("dropped hits flagged: %0d", novf));
    chk(frame_ready, "overflowing frame still ends with its trailer");
    drain(exp);
    // link switched off: channel goes to power saving
    link_en = 0;
    repeat (ACT_TO + 40) @(negedge clk);
    chk(!active && !locked, "silent link becomes inactive");
    link_en = 1;
    repeat (100 * 32) @(negedge clk);
    chk(active && locked, "link re-detected and re-locked");
    ch_en = 0;
    repeat (4) @(negedge clk);
    chk(!active && !locked, "disabled channel is inactive");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
