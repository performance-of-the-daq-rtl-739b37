// enc8b10b: 8b/10b encoder (IBM/Widmer-Franaszek code) with running disparity.
//
// Encodes one byte (data character D.x.y, or control character K28.y when k is high) into a
// 10-bit symbol, listed as abcdei_fghj with bit 9 = 'a' = the bit sent first. The 5b/6b and
// 3b/4b sub-blocks use the standard tables; the current running disparity (rd, 1 = positive)
// selects between the two complementary forms, and the alternate D.x.A7 form is used where the
// standard requires it to limit run lengths. Only K28.y control characters are supported (K28.5
// is the comma that the e-link sends while idle). code is combinational; rd advances on the
// clock edge when en is high. Reset sets negative running disparity.
// The upstream serializer of the published design encodes with 8b/10b; this encoder is an
// independent implementation of the standard code.
module enc8b10b (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       k,
  input  logic [7:0] din,
  output logic [9:0] code,
  output logic       rd
);
  logic [4:0] x;
  logic [2:0] y;
  logic [5:0] c6_neg, c6;
  logic [3:0] c4_neg, c4;
  logic       rd6, rd_next;
  logic       use_a7;

  assign x = k ? 5'd28 : din[4:0];
  assign y = din[7:5];

  always_comb begin
    unique case (x)
      5'd0:  c6_neg = 6'b100111;  5'd1:  c6_neg = 6'b011101;
      5'd2:  c6_neg = 6'b101101;  5'd3:  c6_neg = 6'b110001;
      5'd4:  c6_neg = 6'b110101;  5'd5:  c6_neg = 6'b101001;
      5'd6:  c6_neg = 6'b011001;  5'd7:  c6_neg = 6'b111000;
      5'd8:  c6_neg = 6'b111001;  5'd9:  c6_neg = 6'b100101;
      5'd10: c6_neg = 6'b010101;  5'd11: c6_neg = 6'b110100;
      5'd12: c6_neg = 6'b001101;  5'd13: c6_neg = 6'b101100;
      5'd14: c6_neg = 6'b011100;  5'd15: c6_neg = 6'b010111;
      5'd16: c6_neg = 6'b011011;  5'd17: c6_neg = 6'b100011;
      5'd18: c6_neg = 6'b010011;  5'd19: c6_neg = 6'b110010;
      5'd20: c6_neg = 6'b001011;  5'd21: c6_neg = 6'b101010;
      5'd22: c6_neg = 6'b011010;  5'd23: c6_neg = 6'b111010;
      5'd24: c6_neg = 6'b110011;  5'd25: c6_neg = 6'b100110;
      5'd26: c6_neg = 6'b010110;  5'd27: c6_neg = 6'b110110;
      5'd28: c6_neg = k ? 6'b001111 : 6'b001110;
      5'd29: c6_neg = 6'b101110;
      5'd30: c6_neg = 6'b011110;  5'd31: c6_neg = 6'b101011;
      default: c6_neg = 6'b000000;
    endcase
    // unbalanced codes and D.07 are complemented when the running disparity is positive
    c6  = (rd && ($countones(c6_neg) != 3 || x == 5'd7)) ? ~c6_neg : c6_neg;
    rd6 = ($countones(c6) != 3) ? ~rd : rd;

    use_a7 = (y == 3'd7) && ((!rd6 && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
                             ( rd6 && (x == 5'd11 || x == 5'd13 || x == 5'd14)) || k);
    unique case (y)
      3'd0: c4_neg = 4'b1011;
      3'd1: c4_neg = 4'b1001;
      3'd2: c4_neg = 4'b0101;
      3'd3: c4_neg = 4'b1100;
      3'd4: c4_neg = 4'b1101;
      3'd5: c4_neg = 4'b1010;
      3'd6: c4_neg = 4'b0110;
      3'd7: c4_neg = use_a7 ? 4'b0111 : 4'b1110;
      default: c4_neg = 4'b0000;
    endcase
    if (k && (y == 3'd1 || y == 3'd2 || y == 3'd5 || y == 3'd6))
      c4 = rd6 ? c4_neg : ~c4_neg;     // K28.1/.2/.5/.6: complemented after a negative 6b block
    else
      c4 = (rd6 && ($countones(c4_neg) != 2 || y == 3'd3)) ? ~c4_neg : c4_neg;
    rd_next = ($countones(c4) != 2) ? ~rd6 : rd6;
    code    = {c6, c4};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rd <= 1'b0;
    else if (en) rd <= rd_next;
  end
endmodule
