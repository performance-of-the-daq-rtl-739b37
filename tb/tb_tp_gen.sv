// tb_tp_gen: checks the test pulse generator.
// Runs a sequence of 5 pulses with delay 7, width 3 and positive polarity, then 3 pulses with
// inverted polarity and delay 0, at the default reference period of 4096 clocks (39.06 kHz,
// checked tick to tick). Every output edge is checked against the reference tick (rising
// edge exactly delay clocks after the tick, width clocks long), as are the number of pulses, the end of busy and the idle level. A stop in the
// middle of a sequence is checked to end it.
module tb_tp_gen;
  localparam int PERIOD = 4096;
  logic clk = 0, rst_n = 0, start = 0, stop = 0, polarity = 0;
  logic [15:0] count = 0, delay = 0;
  logic [7:0] width = 0;
  logic tp_out, ref_tick, busy;
  logic [15:0] pulses;
  int checks = 0, failures = 0;
  int cyc = 0, last_tick = -1000, rise_at = -1, npulse = 0;
  logic tp_q = 0;

  tp_gen dut (.clk, .rst_n, .start, .stop, .count, .delay, .width,
                                 .polarity, .tp_out, .ref_tick, .busy, .pulses);
  always #5 clk = ~clk;
  initial begin
    repeat (400 * PERIOD) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (cycle %0d)", msg, cyc); end
  endtask

  // edge monitor, in units of clock cycles
  always @(posedge clk) begin
    cyc++;
    if (rst_n && ref_tick) begin
      // reference rate: 160 MHz / 4096 = 39.06 kHz, the published 39.1 kHz test pulse rate
      if (last_tick > 0) chk(cyc - last_tick == PERIOD, $sformatf("reference period %0d", cyc - last_tick));
      last_tick = cyc;
    end
    if (rst_n && (tp_out ^ polarity) && !tp_q) begin
      rise_at = cyc;
      npulse++;
      chk(cyc - last_tick == int'(delay), $sformatf("pulse start %0d after tick, want %0d", cyc - last_tick, delay));
    end
    if (rst_n && !(tp_out ^ polarity) && tp_q)
      chk(cyc - rise_at == int'(width), $sformatf("pulse width %0d want %0d", cyc - rise_at, width));
    tp_q <= tp_out ^ polarity;
  end

  task automatic run(input int n, input int d, input int w, input logic pol);
    @(negedge clk);
    count = 16'(n); delay = 16'(d); width = 8'(w); polarity = pol;
    npulse = 0;
    @(negedge clk);
    chk(tp_out == pol, "idle level equals polarity");
    start = 1; @(negedge clk); start = 0;
    chk(busy, "busy after start");
    while (busy) @(negedge clk);
    repeat (PERIOD) @(negedge clk);
    chk(npulse == n, $sformatf("pulses seen %0d want %0d", npulse, n));
    chk(pulses == 16'(n), "pulse counter");
    chk(tp_out == pol, "idle level after sequence");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(5, 7, 3, 1'b0);
    run(3, 0, 5, 1'b1);
    run(1, 40, 20, 1'b0);
    // stop in the middle
    @(negedge clk);
    count = 100; delay = 2; width = 2; polarity = 0; npulse = 0;
    start = 1; @(negedge clk); start = 0;
    repeat (3 * PERIOD) @(negedge clk);
    stop = 1; @(negedge clk); stop = 0;
    @(negedge clk);
    chk(!busy, "stop ends the sequence");
    repeat (2 * PERIOD) @(negedge clk);
    chk(npulse >= 2 && npulse <= 4, $sformatf("pulses before stop %0d", npulse));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
