// tb_sync_fifo: checks the first-word-fall-through FIFO against a queue model.
// Random pushes and pops (also simultaneous, also against full and empty) for many cycles, at
// the default 32 x 256 size. Checks dout, empty, full and level each cycle, and that a word
// pushed in one cycle is visible at dout the next.
module tb_sync_fifo;
  localparam int DEPTH = 256;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0;
  logic [31:0] din = 0, dout;
  logic empty, full;
  logic [8:0] level;
  int checks = 0, failures = 0;
  logic [31:0] model[$];

  sync_fifo dut (.clk, .rst_n, .wr_en, .din, .rd_en, .dout,
                                              .empty, .full, .level);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    int bias;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(empty && level == 0, "empty after reset");
    for (int n = 0; n < 20000; n++) begin
      bias = (n / 2000) % 2 ? 30 : 70;      // alternate filling and draining phases
      wr_en = ($urandom_range(0, 99) < bias) && !full;
      rd_en = ($urandom_range(0, 99) < 100 - bias) && !empty;
      din = $urandom;
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(din);
      @(negedge clk);
      chk(level == 9'(model.size()), $sformatf("level %0d model %0d", level, model.size()));
      chk(empty == (model.size() == 0), "empty flag");
      chk(full == (model.size() == DEPTH), "full flag");
      if (model.size() > 0) chk(dout == model[0], "dout is the oldest word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
