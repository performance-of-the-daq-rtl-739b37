// ref8b10b_pkg: reference 8b/10b code tables for testbenches.
//
// Holds both running-disparity columns of the standard 5b/6b and 3b/4b tables written out in
// full (not derived by complementing), an encoder built from them and a brute-force decoder
// that searches all 512 data symbols plus the K28.5 comma. Symbols are abcdei_fghj with bit 9
// sent first; rd = 1 means positive running disparity.
package ref8b10b_pkg;

  function automatic logic [5:0] t6(input logic [4:0] x, input logic rd);
    logic [5:0] m, p;   // RD- and RD+ columns
    case (x)
      0:  begin m = 6'b100111; p = 6'b011000; end
      1:  begin m = 6'b011101; p = 6'b100010; end
      2:  begin m = 6'b101101; p = 6'b010010; end
      3:  begin m = 6'b110001; p = 6'b110001; end
      4:  begin m = 6'b110101; p = 6'b001010; end
      5:  begin m = 6'b101001; p = 6'b101001; end
      6:  begin m = 6'b011001; p = 6'b011001; end
      7:  begin m = 6'b111000; p = 6'b000111; end
      8:  begin m = 6'b111001; p = 6'b000110; end
      9:  begin m = 6'b100101; p = 6'b100101; end
      10: begin m = 6'b010101; p = 6'b010101; end
      11: begin m = 6'b110100; p = 6'b110100; end
      12: begin m = 6'b001101; p = 6'b001101; end
      13: begin m = 6'b101100; p = 6'b101100; end
      14: begin m = 6'b011100; p = 6'b011100; end
      15: begin m = 6'b010111; p = 6'b101000; end
      16: begin m = 6'b011011; p = 6'b100100; end
      17: begin m = 6'b100011; p = 6'b100011; end
      18: begin m = 6'b010011; p = 6'b010011; end
      19: begin m = 6'b110010; p = 6'b110010; end
      20: begin m = 6'b001011; p = 6'b001011; end
      21: begin m = 6'b101010; p = 6'b101010; end
      22: begin m = 6'b011010; p = 6'b011010; end
      23: begin m = 6'b111010; p = 6'b000101; end
      24: begin m = 6'b110011; p = 6'b001100; end
      25: begin m = 6'b100110; p = 6'b100110; end
      26: begin m = 6'b010110; p = 6'b010110; end
      27: begin m = 6'b110110; p = 6'b001001; end
      28: begin m = 6'b001110; p = 6'b001110; end
      29: begin m = 6'b101110; p = 6'b010001; end
      30: begin m = 6'b011110; p = 6'b100001; end
      default: begin m = 6'b101011; p = 6'b010100; end
    endcase
    return rd ? p : m;
  endfunction

  function automatic logic [3:0] t4(input logic [2:0] y, input logic rd, input logic alt7);
    logic [3:0] m, p;
    case (y)
      0: begin m = 4'b1011; p = 4'b0100; end
      1: begin m = 4'b1001; p = 4'b1001; end
      2: begin m = 4'b0101; p = 4'b0101; end
      3: begin m = 4'b1100; p = 4'b0011; end
      4: begin m = 4'b1101; p = 4'b0010; end
      5: begin m = 4'b1010; p = 4'b1010; end
      6: begin m = 4'b0110; p = 4'b0110; end
      default: begin
        if (alt7) begin m = 4'b0111; p = 4'b1000; end
        else      begin m = 4'b1110; p = 4'b0001; end
      end
    endcase
    return rd ? p : m;
  endfunction

  function automatic int ones(input logic [9:0] v, input int n);
    int c = 0;
    for (int i = 0; i < n; i++) c += v[i];
    return c;
  endfunction

  // returns {code, rd_out}
  function automatic logic [10:0] enc(input logic [7:0] b, input logic k, input logic rd);
    logic [5:0] s6;
    logic [3:0] s4;
    logic       r;
    logic [4:0] x;
    logic [2:0] y;
    logic       a7;
    x = b[4:0];
    y = b[7:5];
    if (k) begin   // only K28.5 is used
      s6 = rd ? 6'b110000 : 6'b001111;
      s4 = rd ? 4'b0101   : 4'b1010;
      return {s6, s4, ~rd};
    end
    s6 = t6(x, rd);
    r  = (ones({4'b0, s6}, 6) == 3) ? rd : ~rd;
    a7 = (!r && (x == 17 || x == 18 || x == 20)) || (r && (x == 11 || x == 13 || x == 14));
    s4 = t4(y, r, a7);
    r  = (ones({6'b0, s4}, 4) == 2) ? r : ~r;
    return {s6, s4, r};
  endfunction

  // returns {valid, k, byte}; decodes any data symbol of either disparity, or K28.5
  function automatic logic [9:0] dec(input logic [9:0] code);
    logic [10:0] e;
    if (code == 10'b0011111010 || code == 10'b1100000101) return {1'b1, 1'b1, 8'hBC};
    for (int rd = 0; rd < 2; rd++)
      for (int b = 0; b < 256; b++) begin
        e = enc(8'(b), 1'b0, 1'(rd));
        if (e[10:1] == code) return {1'b1, 1'b0, 8'(b)};
      end
    return '0;
  endfunction
endpackage
