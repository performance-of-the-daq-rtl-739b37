// tb_elink_tx: checks the upstream e-link transmitter.
// Random words are offered with random gaps; a reference receiver (comma alignment, table
// decoding) must recover exactly the same words, with no undecodable symbol. Also checks the
// throughput: back-to-back words leave at one word per 20 clocks (4 symbols x 10 bits at 2 bits
// per clock), and ready timing.
module tb_elink_tx;
  logic clk = 0, rst_n = 0, valid = 0;
  logic [31:0] word = 0;
  logic ready;
  logic [1:0] dout;
  int checks = 0, failures = 0;
  logic [31:0] sent[$];

  elink_tx dut (.clk, .rst_n, .valid, .word, .ready, .dout);
  elink_rx_model u_rx (.clk, .rst_n, .din(dout));

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

  task automatic put(input logic [31:0] w);
    @(negedge clk);
    valid = 1; word = w;
    while (!ready) @(negedge clk);
    sent.push_back(w);
    @(negedge clk); valid = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (100) @(negedge clk);
    chk(u_rx.locked, "receiver finds the comma while idle");
    // random gaps
    for (int n = 0; n < 200; n++) begin
      put($urandom);
      repeat ($urandom_range(0, 30)) @(negedge clk);
    end
    // back to back: keep valid high
    @(negedge clk);
    for (int n = 0; n < 100; n++) begin
      valid = 1; word = $urandom;
      @(posedge clk);
      while (!ready) @(posedge clk);
      sent.push_back(word);
      @(negedge clk);
    end
    valid = 0;
    repeat (200) @(negedge clk);
    chk(u_rx.words.size() == sent.size(), $sformatf("received %0d of %0d words", u_rx.words.size(), sent.size()));
    for (int i = 0; i < sent.size() && i < u_rx.words.size(); i++)
      chk(u_rx.words[i] == sent[i], $sformatf("word %0d: %h vs %h", i, u_rx.words[i], sent[i]));
    chk(u_rx.bad_symbols == 0 && u_rx.bad_words == 0, "all symbols valid");
    // spacing of the back-to-back words
    for (int i = 201; i < 300 && i < u_rx.word_cycle.size(); i++)
      chk(u_rx.word_cycle[i] - u_rx.word_cycle[i - 1] == 20, $sformatf("spacing %0d", u_rx.word_cycle[i] - u_rx.word_cycle[i - 1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
