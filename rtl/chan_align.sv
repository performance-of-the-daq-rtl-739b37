// chan_align: word-alignment state machine (FSM align) of one ToASt input link.
//
// While searching, every deserialized word is compared with the idle pattern. A mismatch
// requests one bitslip and the next word is ignored (it straddles the old and new boundary).
// LOCK_N consecutive idle words declare lock. While locked, a word that is none of the legal
// word types counts as an error; UNLOCK_N consecutive errors drop the lock and the search starts
// again. The idle pattern is unequal to all of its rotations, so at most 31 bitslips are needed.
// The bitslip/lock handshake follows the published channel diagram; the counts and the idle
// pattern are this design's own choice.
module chan_align
  import mdc_pkg::*;
#(
  parameter int unsigned LOCK_N   = 4,
  parameter int unsigned UNLOCK_N = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [31:0] word,
  input  logic        word_valid,
  output logic        bitslip,
  output logic        locked
);
  typedef enum logic [1:0] {S_SEARCH, S_SKIP, S_LOCKED} st_e;
  st_e         st;
  logic [3:0]  cnt;
  logic        legal;

  assign legal = (word == TOAST_IDLE) || (word[31:30] == T_HIT) ||
                 ((word[31:28] == T_FHDR || word[31:28] == T_FTRL) && word[27:16] == 12'h000);
  assign locked = (st == S_LOCKED);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_SEARCH;
      cnt     <= '0;
      bitslip <= 1'b0;
    end else begin
      bitslip <= 1'b0;
      if (!en) begin
        st  <= S_SEARCH;
        cnt <= '0;
      end else if (word_valid) begin
        unique case (st)
          S_SEARCH: begin
            if (word == TOAST_IDLE) begin
              if (cnt == 4'(LOCK_N - 1)) begin
                st  <= S_LOCKED;
                cnt <= '0;
              end else cnt <= cnt + 1'b1;
            end else begin
              bitslip <= 1'b1;
              cnt     <= '0;
              st      <= S_SKIP;
            end
          end
          S_SKIP: st <= S_SEARCH;
          S_LOCKED: begin
            if (!legal) begin
              if (cnt == 4'(UNLOCK_N - 1)) begin
                st  <= S_SEARCH;
                cnt <= '0;
              end else cnt <= cnt + 1'b1;
            end else cnt <= '0;
          end
          default: st <= S_SEARCH;
        endcase
      end
    end
  end
endmodule
