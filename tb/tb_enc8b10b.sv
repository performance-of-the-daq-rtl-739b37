// tb_enc8b10b: checks the 8b/10b encoder against the reference tables.
// All 256 data bytes are encoded from both running disparities and compared with the reference
// encoder of ref8b10b_pkg, together with the disparity that follows; K28.5 is checked against
// its two printed forms; a long random stream is checked for balance (running disparity stays
// within +-1 at symbol ends) and for the maximum run length of five equal bits.
module tb_enc8b10b;
  import ref8b10b_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, k = 0;
  logic [7:0] din = 0;
  logic [9:0] code;
  logic rd;
  int checks = 0, failures = 0;

  enc8b10b dut (.clk, .rst_n, .en, .k, .din, .code, .rd);

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

  initial begin
    logic [10:0] e;
    logic [19:0] hist;
    int disp, run;
    logic last;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // exhaustive from both disparities: drive the encoder into the wanted disparity first
    for (int want = 0; want < 2; want++) begin
      for (int b = 0; b < 256; b++) begin
        // get to rd == want by sending D.0.0 (unbalanced, flips rd) if needed
        if (rd != 1'(want)) begin
          k = 0; din = 8'h00; en = 1; @(posedge clk); #1; en = 0;
        end
        k = 0; din = 8'(b); #1;
        e = enc(8'(b), 1'b0, rd);
        chk(code == e[10:1], $sformatf("D%0d.%0d rd=%0d got %b exp %b", b%32, b/32, rd, code, e[10:1]));
        en = 1; @(posedge clk); #1; en = 0;
        chk(rd == e[0], $sformatf("rd after byte %0d", b));
      end
    end
    // K28.5 in both disparities
    for (int i = 0; i < 2; i++) begin
      k = 1; din = 8'hBC; #1;
      chk(code == (rd ? 10'b1100000101 : 10'b0011111010), "K28.5");
      en = 1; @(posedge clk); #1; en = 0;
    end
    // random stream: balance and run length
    disp = 0; run = 0; last = 0;
    for (int n = 0; n < 4000; n++) begin
      k = ($urandom_range(0, 7) == 0); din = k ? 8'hBC : 8'($urandom); #1;
      for (int i = 9; i >= 0; i--) begin
        disp += code[i] ? 1 : -1;
        if (n == 0 && i == 9) run = 1; else run = (code[i] == last) ? run + 1 : 1;
        last = code[i];
        if (run > 5) begin chk(0, "run length above 5"); run = 0; end
      end
      chk(disp == 0 || disp == 2 || disp == -2, $sformatf("running disparity %0d", disp));
      en = 1; @(posedge clk); #1; en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
