// 8B/10B code tables and the per-symbol encoding step.
//
// Standard 8B/10B line code (the wire code of the transceiver). A byte HGFEDCBA
// is split into the 5-bit x = EDCBA and the 3-bit y = HGF; x maps to a 6-bit
// sub-block abcdei and y to a 4-bit sub-block fghj. Each table below holds the
// form used at negative running disparity; where a sub-block has two forms the
// other one is its complement. The 10-bit code is stored with a in bit 0 and j
// in bit 9, and bit 0 is sent first, so K28.5 at negative disparity reads
// 10'b0101111100. Twelve control characters exist: K28.0 to K28.7, K23.7,
// K27.7, K29.7 and K30.7.
package lll_8b10b_pkg;

  // 6-bit sub-block, bit 0 = a ... bit 5 = i, negative-disparity form.
  function automatic logic [5:0] tab6(input logic [4:0] x);
    logic [5:0] abcdei;
    unique case (x)
      5'd0:  abcdei = 6'b100111;  5'd1:  abcdei = 6'b011101;
      5'd2:  abcdei = 6'b101101;  5'd3:  abcdei = 6'b110001;
      5'd4:  abcdei = 6'b110101;  5'd5:  abcdei = 6'b101001;
      5'd6:  abcdei = 6'b011001;  5'd7:  abcdei = 6'b111000;
      5'd8:  abcdei = 6'b111001;  5'd9:  abcdei = 6'b100101;
      5'd10: abcdei = 6'b010101;  5'd11: abcdei = 6'b110100;
      5'd12: abcdei = 6'b001101;  5'd13: abcdei = 6'b101100;
      5'd14: abcdei = 6'b011100;  5'd15: abcdei = 6'b010111;
      5'd16: abcdei = 6'b011011;  5'd17: abcdei = 6'b100011;
      5'd18: abcdei = 6'b010011;  5'd19: abcdei = 6'b110010;
      5'd20: abcdei = 6'b001011;  5'd21: abcdei = 6'b101010;
      5'd22: abcdei = 6'b011010;  5'd23: abcdei = 6'b111010;
      5'd24: abcdei = 6'b110011;  5'd25: abcdei = 6'b100110;
      5'd26: abcdei = 6'b010110;  5'd27: abcdei = 6'b110110;
      5'd28: abcdei = 6'b001110;  5'd29: abcdei = 6'b101110;
      5'd30: abcdei = 6'b011110;  default: abcdei = 6'b101011;
    endcase
    // The table is written a..i left to right; reverse to put a in bit 0.
    return {abcdei[0], abcdei[1], abcdei[2], abcdei[3], abcdei[4], abcdei[5]};
  endfunction

  // True when the 6-bit sub-block has a complemented form at positive disparity.
  function automatic logic alt6(input logic [4:0] x);
    return x inside {5'd0, 5'd1, 5'd2, 5'd4, 5'd7, 5'd8, 5'd15, 5'd16,
                     5'd23, 5'd24, 5'd27, 5'd29, 5'd30, 5'd31};
  endfunction

  localparam logic [5:0] K28_6B = 6'b111100;  // abcdei = 001111, a in bit 0

  // 4-bit sub-block, bit 0 = f ... bit 3 = j, negative-disparity form.
  // y = 8 stands for the alternate A7 form of y = 7.
  function automatic logic [3:0] tab4(input logic [3:0] y, input logic k);
    logic [3:0] fghj;
    if (!k) begin
      unique case (y)
        4'd0: fghj = 4'b1011;  4'd1: fghj = 4'b1001;
        4'd2: fghj = 4'b0101;  4'd3: fghj = 4'b1100;
        4'd4: fghj = 4'b1101;  4'd5: fghj = 4'b1010;
        4'd6: fghj = 4'b0110;  4'd7: fghj = 4'b1110;
        default: fghj = 4'b0111;
      endcase
    end else begin
      unique case (y)
        4'd0: fghj = 4'b1011;  4'd1: fghj = 4'b0110;
        4'd2: fghj = 4'b1010;  4'd3: fghj = 4'b1100;
        4'd4: fghj = 4'b1101;  4'd5: fghj = 4'b0101;
        4'd6: fghj = 4'b1001;  default: fghj = 4'b0111;
      endcase
    end
    return {fghj[0], fghj[1], fghj[2], fghj[3]};
  endfunction

  function automatic logic alt4(input logic [3:0] y, input logic k);
    return k || (y inside {4'd0, 4'd3, 4'd4, 4'd7, 4'd8});
  endfunction

  function automatic logic valid_k(input logic [7:0] b);
    return (b[4:0] == 5'd28) ||
           (b[7:5] == 3'd7 && b[4:0] inside {5'd23, 5'd27, 5'd29, 5'd30});
  endfunction

  function automatic int ones(input logic [9:0] v);
    int n = 0;
    for (int i = 0; i < 10; i++) n += int'(v[i]);
    return n;
  endfunction

  typedef struct packed {
    logic [9:0] code;
    logic       rd;
  } enc_t;

  // Encodes one symbol. rd_in is the running disparity before it (1 =
  // positive). Returns the 10-bit code, bit 0 = a, and the disparity after it.
  function automatic enc_t encode(input logic [7:0] b, input logic k, input logic rd_in);
    logic       rd;
    logic [4:0] x;
    logic [3:0] y;
    logic [5:0] s6;
    logic [3:0] s4;
    rd = rd_in;
    x = b[4:0];
    y = {1'b0, b[7:5]};
    if (k && x == 5'd28) s6 = K28_6B;
    else                 s6 = tab6(x);
    if (rd && (alt6(x) || (k && x == 5'd28))) s6 = ~s6;
    if (ones({4'b0, s6}) != 3) rd = ~rd;
    if (y == 4'd7 && (k || (!rd && (x inside {5'd17, 5'd18, 5'd20})) ||
                      (rd && (x inside {5'd11, 5'd13, 5'd14}))))
      y = 4'd8;
    s4 = tab4(y, k);
    if (rd && alt4(y, k)) s4 = ~s4;
    if (ones({6'b0, s4}) != 2) rd = ~rd;
    return '{code: {s4, s6}, rd: rd};
  endfunction

  typedef struct packed {
    logic [7:0] b;
    logic       k;
    logic       code_err;
    logic       disp_err;
    logic       rd;
  } dec_t;

  // Decodes one 10-bit symbol. rd_in is the running disparity before it; the
  // returned rd follows the sub-blocks actually received, so a single error
  // does not leave the decoder out of step.
  function automatic dec_t decode(input logic [9:0] c, input logic rd_in);
    logic       rd;
    dec_t       r;
    logic [5:0] s6;
    logic [3:0] s4;
    logic       f6, f4, k28;
    int         n6, n4;
    logic [4:0] x;
    logic [2:0] y;
    rd = rd_in;
    s6 = c[5:0];
    s4 = c[9:6];
    r  = '0;
    x  = '0;
    y  = '0;
    f6 = 1'b0;
    f4 = 1'b0;
    k28 = (s6 == K28_6B) || (s6 == ~K28_6B);
    if (k28) begin
      x  = 5'd28;
      f6 = 1'b1;
    end
    for (int i = 0; i < 32; i++) begin
      if (s6 == tab6(5'(i)) || (alt6(5'(i)) && s6 == ~tab6(5'(i)))) begin
        x  = 5'(i);
        f6 = 1'b1;
      end
    end
    n6 = ones({4'b0, s6});
    if ((n6 == 4 && rd) || (n6 == 2 && !rd)) r.disp_err = 1'b1;
    if (n6 != 3) rd = (n6 > 3);
    // For K28 the 6-bit sub-block fixes the running disparity, and the 4-bit
    // forms of K28.1/K28.6 and K28.2/K28.5 are each other's complements, so
    // only the form for that disparity is accepted.
    for (int j = 0; j < 9; j++) begin
      if (k28 ? (s4 == (rd ? ~tab4(4'(j), 1'b1) : tab4(4'(j), 1'b1)))
              : (s4 == tab4(4'(j), 1'b0) || (alt4(4'(j), 1'b0) && s4 == ~tab4(4'(j), 1'b0)))) begin
        y  = (j == 8) ? 3'd7 : 3'(j);
        f4 = 1'b1;
        if (j == 8 && !k28 && (x inside {5'd23, 5'd27, 5'd29, 5'd30})) r.k = 1'b1;
      end
    end
    n4 = ones({6'b0, s4});
    if ((n4 == 3 && rd) || (n4 == 1 && !rd)) r.disp_err = 1'b1;
    if (n4 != 2) rd = (n4 > 2);
    if (k28) r.k = 1'b1;
    r.code_err = !f6 || !f4 || !(n6 inside {2, 3, 4}) || !(n4 inside {1, 2, 3});
    r.b  = {y, x};
    r.rd = rd;
    return r;
  endfunction

endpackage
