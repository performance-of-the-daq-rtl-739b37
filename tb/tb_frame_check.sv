// tb_frame_check: checks the frame alignment and consistency checker.
// Applies matching and mismatching frame numbers and hit counts on several channels and checks
// the per-frame flags, their clearing, and the sticky per-channel mask and its clearing.
module tb_frame_check;
  logic clk = 0, rst_n = 0, clr = 0, sticky_clr = 0, hdr_chk = 0, trl_chk = 0;
  logic [3:0] chan = 0;
  logic [15:0] hdr_frame = 0, exp_frame = 0, trl_nhits = 0, cnt_nhits = 0;
  logic frame_err, count_err;
  logic [15:0] err_mask;
  int checks = 0, failures = 0;

  frame_check dut (.clk, .rst_n, .clr, .sticky_clr, .chan, .hdr_chk, .hdr_frame,
    .exp_frame, .trl_chk, .trl_nhits, .cnt_nhits, .frame_err, .count_err, .err_mask);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    logic [15:0] exp_mask;
    logic fe, ce;
    repeat (2) @(negedge clk);
    rst_n = 1;
    exp_mask = 0;
    for (int f = 0; f < 40; f++) begin
      clr = 1; exp_frame = 16'(f); @(negedge clk); clr = 0;
      chk(!frame_err && !count_err, "flags cleared at frame start");
      fe = 0; ce = 0;
      for (int c = 0; c < 4; c++) begin
        int ch;
        logic bad_f, bad_c;
        ch = $urandom_range(0, 15);
        bad_f = ($urandom_range(0, 9) == 0);
        bad_c = ($urandom_range(0, 9) == 0);
        chan = 4'(ch); hdr_chk = 1; hdr_frame = bad_f ? 16'(f + 1) : 16'(f);
        @(negedge clk); hdr_chk = 0;
        trl_chk = 1; trl_nhits = 16'($urandom_range(0, 60)); cnt_nhits = bad_c ? trl_nhits + 1 : trl_nhits;
        @(negedge clk); trl_chk = 0;
        fe |= bad_f; ce |= bad_c;
        if (bad_f || bad_c) exp_mask[ch] = 1'b1;
        chk(frame_err == fe, "frame number flag");
        chk(count_err == ce, "hit count flag");
        chk(err_mask == exp_mask, "sticky channel mask");
      end
      if (f == 20) begin
        sticky_clr = 1; @(negedge clk); sticky_clr = 0;
        exp_mask = 0;
        chk(err_mask == 0, "sticky mask cleared");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
