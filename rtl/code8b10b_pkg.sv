// code8b10b_pkg: the 8B/10B transmission code used by the DDL coding layer,
// the code of the Fibre Channel FC-1 layer. A byte HGF EDCBA is sent as the
// 6-bit sub-block abcdei (from EDCBA) followed by the 4-bit sub-block fghj
// (from HGF), 'a' first. Each sub-block has either equal ones and zeros or a
// surplus of two; the running disparity (RD) chooses between a code and its
// complement so that the line stays DC balanced. A 10-bit character is held as
// {a,b,c,d,e,i,f,g,h,j}, 'a' in bit 9. The tables below are the standard ones,
// written for RD negative; the RD-positive forms follow from the complement
// rules in enc6 and enc4.
//
// The document names only an FC-1 compatible 8B/10B code; the tables and
// the way they are coded here are the standard code, written out for this design.
package code8b10b_pkg;

  // abcdei for EDCBA = 0..31 at RD negative; K28 uses 001111.
  function automatic logic [5:0] tab6(input logic [4:0] x);
    case (x)
      5'd0:  tab6 = 6'b100111;  5'd1:  tab6 = 6'b011101;
      5'd2:  tab6 = 6'b101101;  5'd3:  tab6 = 6'b110001;
      5'd4:  tab6 = 6'b110101;  5'd5:  tab6 = 6'b101001;
      5'd6:  tab6 = 6'b011001;  5'd7:  tab6 = 6'b111000;
      5'd8:  tab6 = 6'b111001;  5'd9:  tab6 = 6'b100101;
      5'd10: tab6 = 6'b010101;  5'd11: tab6 = 6'b110100;
      5'd12: tab6 = 6'b001101;  5'd13: tab6 = 6'b101100;
      5'd14: tab6 = 6'b011100;  5'd15: tab6 = 6'b010111;
      5'd16: tab6 = 6'b011011;  5'd17: tab6 = 6'b100011;
      5'd18: tab6 = 6'b010011;  5'd19: tab6 = 6'b110010;
      5'd20: tab6 = 6'b001011;  5'd21: tab6 = 6'b101010;
      5'd22: tab6 = 6'b011010;  5'd23: tab6 = 6'b111010;
      5'd24: tab6 = 6'b110011;  5'd25: tab6 = 6'b100110;
      5'd26: tab6 = 6'b010110;  5'd27: tab6 = 6'b110110;
      5'd28: tab6 = 6'b001110;  5'd29: tab6 = 6'b101110;
      5'd30: tab6 = 6'b011110;  default: tab6 = 6'b101011;
    endcase
  endfunction

  // fghj for HGF = 0..7 at RD negative; index 8 is the alternate A7 form.
  function automatic logic [3:0] tab4(input logic [3:0] y);
    case (y)
      4'd0: tab4 = 4'b1011;  4'd1: tab4 = 4'b1001;
      4'd2: tab4 = 4'b0101;  4'd3: tab4 = 4'b1100;
      4'd4: tab4 = 4'b1101;  4'd5: tab4 = 4'b1010;
      4'd6: tab4 = 4'b0110;  4'd7: tab4 = 4'b1110;
      default: tab4 = 4'b0111;
    endcase
  endfunction

  function automatic int ones6(input logic [5:0] v);
    return int'(v[0]) + int'(v[1]) + int'(v[2]) + int'(v[3]) + int'(v[4]) + int'(v[5]);
  endfunction

  function automatic int ones4(input logic [3:0] v);
    return int'(v[0]) + int'(v[1]) + int'(v[2]) + int'(v[3]);
  endfunction

  // 6-bit sub-block for x at running disparity rdp (1 = positive).
  function automatic logic [5:0] enc6(input logic [4:0] x, input logic k28, input logic rdp);
    logic [5:0] c;
    c = k28 ? 6'b001111 : tab6(x);
    if (rdp && (ones6(c) != 3 || (!k28 && x == 5'd7))) c = ~c;
    return c;
  endfunction

  // 4-bit sub-block for y, given the running disparity after the 6-bit block.
  // alt7 selects the A7 form; kchar complements the balanced K forms.
  function automatic logic [3:0] enc4(input logic [2:0] y, input logic alt7,
                                      input logic kchar, input logic rdp);
    logic [3:0] c;
    logic       bal;
    c   = (y == 3'd7 && alt7) ? tab4(4'd8) : tab4({1'b0, y});
    bal = (ones4(c) == 2);
    if (kchar && bal && y != 3'd3) begin
      if (!rdp) c = ~c;
    end else if (rdp && (!bal || y == 3'd3)) begin
      c = ~c;
    end
    return c;
  endfunction

  // Running disparity after a sub-block.
  function automatic logic rd_after6(input logic [5:0] c, input logic rdp);
    int n;
    n = ones6(c);
    if (n > 3) return 1'b1;
    if (n < 3) return 1'b0;
    if (c == 6'b000111) return 1'b1;
    if (c == 6'b111000) return 1'b0;
    return rdp;
  endfunction

  function automatic logic rd_after4(input logic [3:0] c, input logic rdp);
    int n;
    n = ones4(c);
    if (n > 2) return 1'b1;
    if (n < 2) return 1'b0;
    if (c == 4'b0011) return 1'b1;
    if (c == 4'b1100) return 1'b0;
    return rdp;
  endfunction

  // Is {k,d} a defined control character? K28.0-7, K23.7, K27.7, K29.7, K30.7.
  function automatic logic kvalid(input logic [7:0] d);
    return d[4:0] == 5'd28 ||
           (d[7:5] == 3'd7 && (d[4:0] == 5'd23 || d[4:0] == 5'd27 ||
                               d[4:0] == 5'd29 || d[4:0] == 5'd30));
  endfunction

  // Does the A7 form replace P7 for data byte x.7 at this disparity?
  function automatic logic use_a7(input logic [4:0] x, input logic rdp6);
    return (!rdp6 && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
           ( rdp6 && (x == 5'd11 || x == 5'd13 || x == 5'd14));
  endfunction

endpackage
