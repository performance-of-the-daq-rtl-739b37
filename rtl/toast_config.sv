// toast_config: configuration of the ToASt front-end chips with read-back verification.
//
// For each request {chip, addr, data} the block writes the register over the shared serial
// configuration line cfg_tx, either to one chip or to all chips at once (chip = 4'hF,
// broadcast). It then reads the register back from every addressed chip (for a broadcast: each
// chip set in chip_mask) over cfg_rx and compares it with the written value. On a mismatch, or if
// a chip does not answer within RESP_TIMEOUT bit periods, it writes that chip again, individually,
// and re-reads it, up to MAX_RETRY times; then the request ends as failed. The result is offered
// on resp_* (valid/ready) with the number of rewrites.
// Line format (both directions idle low, one bit per DIV clocks, most significant bit first):
//   MDC -> chips: start(1), rw(1 = write), chip[3:0], addr[7:0], data[15:0]   (30 bits)
//   chip -> MDC : start(1), data[15:0], sent by the addressed chip after a read frame
// After an answer the block waits two bit periods before it drives the line again.
// The write / read-back / rewrite policy and broadcast mode follow the published design; the
// line format, bit period and retry limit are this design's own choices, as the front-end
// protocol is not part of the published description.
module toast_config
  import mdc_pkg::*;
#(
  parameter int unsigned DIV          = 16,
  parameter int unsigned MAX_RETRY    = 3,
  parameter int unsigned RESP_TIMEOUT = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] chip_mask,
  input  logic        req_valid,
  input  cfg_req_t    req,
  output logic        req_ready,
  output logic        resp_valid,
  output logic        resp_ok,
  output cfg_req_t    resp_req,
  output logic [7:0]  resp_retries,
  input  logic        resp_ready,
  output logic        cfg_tx,
  input  logic        cfg_rx
);
  typedef enum logic [3:0] {S_IDLE, S_WRITE, S_NEXT, S_READ, S_WAIT, S_RECV, S_GAP, S_CHECK,
                            S_DONE} st_e;
  st_e          st;
  cfg_req_t     cur;
  logic [15:0]  pending;      // chips still to be verified
  logic [3:0]   rb_chip;      // chip being verified
  logic [7:0]   retry;        // rewrites of the current chip
  logic [7:0]   retries;      // rewrites of the whole request
  logic         ok;

  // bit timing
  logic [$clog2(DIV)-1:0]          div_cnt;
  logic                            tick;
  logic [4:0]                      nbit;
  logic [29:0]                     txsh;
  logic [15:0]                     rxsh;
  logic [$clog2(RESP_TIMEOUT*DIV+1)-1:0] tmo;
  logic                            rx_q;
  logic [3:0]                      first_chip;

  assign tick      = (div_cnt == $bits(div_cnt)'(DIV - 1));
  assign req_ready = (st == S_IDLE);
  assign resp_valid   = (st == S_DONE);
  assign resp_ok      = ok;
  assign resp_req     = cur;
  assign resp_retries = retries;
  assign cfg_tx       = (st == S_WRITE || st == S_READ) ? txsh[29] : 1'b0;

  always_comb begin
    first_chip = '0;
    for (int i = 15; i >= 0; i--) if (pending[i]) first_chip = 4'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      cur     <= '0;
      pending <= '0;
      rb_chip <= '0;
      retry   <= '0;
      retries <= '0;
      ok      <= 1'b0;
      div_cnt <= '0;
      nbit    <= '0;
      txsh    <= '0;
      rxsh    <= '0;
      tmo     <= '0;
      rx_q    <= 1'b0;
    end else begin
      rx_q <= cfg_rx;
      unique case (st)
        S_IDLE: if (req_valid) begin
          cur     <= req;
          pending <= (req.chip == CHIP_BCAST) ? chip_mask : (16'd1 << req.chip);
          retry   <= '0;
          retries <= '0;
          txsh    <= {1'b1, 1'b1, req.chip, req.addr, req.data};
          div_cnt <= '0;
          nbit    <= '0;
          st      <= S_WRITE;
        end
        S_WRITE, S_READ: begin
          div_cnt <= tick ? '0 : div_cnt + 1'b1;
          if (tick) begin
            txsh <= {txsh[28:0], 1'b0};
            nbit <= nbit + 1'b1;
            if (nbit == 5'd29) begin
              tmo <= '0;
              st  <= (st == S_WRITE) ? S_NEXT : S_WAIT;
            end
          end
        end
        S_NEXT: begin                       // choose the next chip to verify
          if (pending == '0) begin
            ok <= 1'b1;
            st <= S_DONE;
          end else begin
            rb_chip <= first_chip;
            txsh    <= {1'b1, 1'b0, first_chip, cur.addr, 16'h0000};
            div_cnt <= '0;
            nbit    <= '0;
            st      <= S_READ;
          end
        end
        S_WAIT: begin                       // wait for the answer's start bit
          tmo <= tmo + 1'b1;
          if (rx_q) begin
            div_cnt <= '0;
            nbit    <= '0;
            st      <= S_RECV;
          end else if (tmo == $bits(tmo)'(RESP_TIMEOUT * DIV)) begin
            rxsh <= ~cur.data;              // no answer counts as a mismatch
            st   <= S_CHECK;
          end
        end
        S_RECV: begin                       // sample in the middle of each bit
          div_cnt <= tick ? '0 : div_cnt + 1'b1;
          if (div_cnt == $bits(div_cnt)'(DIV / 2)) begin
            if (nbit != '0) rxsh <= {rxsh[14:0], rx_q};
            nbit <= nbit + 1'b1;
            if (nbit == 5'd16) begin
              tmo <= '0;
              st  <= S_GAP;
            end
          end
        end
        S_GAP: begin                        // line turnaround: two bit periods of silence
          tmo <= tmo + 1'b1;
          if (tmo == $bits(tmo)'(2 * DIV)) st <= S_CHECK;
        end
        S_CHECK: begin
          if (rxsh == cur.data) begin
            pending[rb_chip] <= 1'b0;
            retry            <= '0;
            st               <= S_NEXT;
          end else if (retry == 8'(MAX_RETRY)) begin
            ok <= 1'b0;
            st <= S_DONE;
          end else begin
            retry   <= retry + 1'b1;
            retries <= retries + 1'b1;
            txsh    <= {1'b1, 1'b1, rb_chip, cur.addr, cur.data};
            div_cnt <= '0;
            nbit    <= '0;
            st      <= S_WRITE;
          end
        end
        S_DONE: if (resp_ready) begin
          ok <= 1'b0;
          st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
