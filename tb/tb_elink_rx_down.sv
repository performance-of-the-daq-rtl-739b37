// tb_elink_rx_down: checks the downstream command receiver.
// Sends random commands with correct parity and random idle gaps (also back to back), and some
// with a wrong parity bit; checks every received word, the parity error pulses, that no command
// is reported for a bad frame, and the latency from the parity bit to cmd_valid.
module tb_elink_rx_down;
  logic clk = 0, rst_n = 0, sdin = 0;
  logic [31:0] cmd;
  logic cmd_valid, par_err;
  int checks = 0, failures = 0;
  int cyc = 0, par_cyc = 0;
  logic [31:0] exp_q[$];
  int nerr_exp = 0, nerr = 0, nok = 0;

  elink_rx_down dut (.clk, .rst_n, .sdin, .cmd, .cmd_valid, .par_err);
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
    cyc++;
    if (rst_n && cmd_valid) begin
      nok++;
      chk(exp_q.size() > 0 && cmd == exp_q[0], $sformatf("command word %h exp %h n=%0d cyc=%0d", cmd, exp_q.size() > 0 ? exp_q[0] : 0, nok, cyc));
      chk(cyc - par_cyc == 2, $sformatf("latency %0d", cyc - par_cyc));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
    if (rst_n && par_err) nerr++;
  end

  task automatic send(input logic [31:0] w, input logic bad);
    @(negedge clk); sdin = 1;
    for (int i = 31; i >= 0; i--) begin @(negedge clk); sdin = w[i]; end
    @(negedge clk); sdin = (^w) ^ bad; par_cyc = cyc + 1;
    @(negedge clk); sdin = 0;
  endtask

  initial begin
    logic [31:0] w;
    logic bad;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      w = $urandom; bad = ($urandom_range(0, 7) == 0);
      if (!bad) exp_q.push_back(w); else nerr_exp++;
      send(w, bad);
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    chk(exp_q.size() == 0, "all commands received");
    chk(nerr == nerr_exp, $sformatf("parity errors %0d expected %0d", nerr, nerr_exp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
