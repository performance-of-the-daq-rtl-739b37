// tp_gen: calibration and test pulse generator.
//
// A free-running internal reference repeats every PERIOD clocks (ref_tick marks its start).
// After start, the next count reference periods each carry one test pulse that begins delay
// clocks (6.25 ns steps at 160 MHz) after the reference tick and lasts width clocks; then busy
// falls. stop ends a sequence at once. polarity inverts the output: the idle level of tp_out
// equals polarity. The same pulse goes to all front-end chips in parallel. pulses counts pulses
// sent since start. Timing: tp_out changes exactly delay clocks after ref_tick rises (both are
// registered). delay + width must not exceed PERIOD.
// Programmable count, polarity and 6.25 ns delay steps follow the published design. The default
// PERIOD of 4096 clocks (25.6 us, 39.06 kHz) is chosen to give the 39.1 kHz test pulse rate used
// in the published measurements; the pulse width control is this design's own addition.
module tp_gen #(
  parameter int unsigned PERIOD = 4096,
  localparam int unsigned PW = $clog2(PERIOD)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        stop,
  input  logic [15:0] count,
  input  logic [15:0] delay,
  input  logic [7:0]  width,
  input  logic        polarity,
  output logic        tp_out,
  output logic        ref_tick,
  output logic        busy,
  output logic [15:0] pulses
);
  logic [PW-1:0] refcnt;
  logic [15:0]   remaining;
  logic          armed;
  logic          in_pulse;
  logic          pulse_end;
  logic          tp_q;
  logic          arm_now;

  assign arm_now   = armed || (busy && refcnt == '0 && remaining != '0);
  assign in_pulse  = arm_now && (32'(refcnt) >= 32'(delay)) &&
                     (32'(refcnt) < 32'(delay) + 32'(width));
  assign pulse_end = arm_now && (32'(refcnt) == 32'(delay) + 32'(width) - 1);
  assign tp_out    = tp_q ^ polarity;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      refcnt    <= '0;
      ref_tick  <= 1'b0;
      remaining <= '0;
      armed     <= 1'b0;
      busy      <= 1'b0;
      tp_q      <= 1'b0;
      pulses    <= '0;
    end else begin
      refcnt   <= (refcnt == PW'(PERIOD - 1)) ? '0 : refcnt + 1'b1;
      ref_tick <= (refcnt == '0);
      tp_q     <= in_pulse && !stop;
      if (stop) begin
        busy      <= 1'b0;
        armed     <= 1'b0;
        remaining <= '0;
      end else if (start && !busy) begin
        busy      <= (count != '0);
        remaining <= count;
        pulses    <= '0;
      end else begin
        if (arm_now && width != '0) armed <= 1'b1;
        if (pulse_end) begin
          armed     <= 1'b0;
          remaining <= remaining - 1'b1;
          pulses    <= pulses + 1'b1;
          if (remaining == 16'd1) busy <= 1'b0;
        end
      end
    end
  end
endmodule
