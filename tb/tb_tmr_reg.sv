// tb_tmr_reg: checks the triple-redundant register.
// Writes random values and reads them back; injects single-copy bit flips and checks that the
// voted output never changes, that the mismatch flag rises and that the copy is repaired one
// cycle later; shows that flips in two copies at the same bit do change the output (the limit
// of the scheme), and checks the reset value.
module tb_tmr_reg;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, we = 0;
  logic [W-1:0] d = 0, q;
  logic [2:0][W-1:0] seu_flip = '0;
  logic mismatch;
  int checks = 0, failures = 0;

  tmr_reg #(.W(W), .RST(16'hA5C3)) dut (.clk, .rst_n, .we, .d, .seu_flip, .q, .mismatch);
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
    logic [W-1:0] v;
    repeat (2) @(negedge clk);
    chk(q == 16'hA5C3, "reset value");
    rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      v = 16'($urandom);
      we = 1; d = v; @(negedge clk); we = 0; d = 16'($urandom);
      chk(q == v && !mismatch, "write");
      // single upset in a random copy and bit
      seu_flip[$urandom_range(0, 2)][$urandom_range(0, W - 1)] = 1'b1;
      @(negedge clk); seu_flip = '0;
      chk(q == v, "voted value survives a single upset");
      chk(mismatch, "upset detected");
      @(negedge clk);
      chk(q == v && !mismatch, "copy repaired");
    end
    // double upset on the same bit defeats the voter
    we = 1; d = 16'h0000; @(negedge clk); we = 0;
    seu_flip[0][3] = 1'b1; seu_flip[2][3] = 1'b1;
    @(negedge clk); seu_flip = '0;
    chk(q == 16'h0008, "two equal upsets outvote the good copy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
