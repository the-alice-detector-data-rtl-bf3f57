// dec8b10b: 8B/10B decoder of the DDL coding layer (Fibre Channel FC-1 code).
//
// Each enabled clock it decodes one 10-bit character {a,b,c,d,e,i,f,g,h,j}
// (bit 9 first on the line) into a byte and a control flag. It flags a code
// violation when the character is not in the code, and a disparity error when
// a sub-block has the wrong sign for the running disparity it tracks. The
// running disparity starts negative after reset and is always updated from the
// received bits, so one line error is reported once and not repeated.
// Outputs are registered: one clock of latency. The error detection is what
// gives the link its detected bit error rate; how it is done here is this
// design's choice.
module dec8b10b
  import code8b10b_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [9:0] din,
  output logic [7:0] dout,
  output logic       k,          // a control character was received
  output logic       code_err,   // not a valid character
  output logic       disp_err,   // running-disparity violation
  output logic       valid       // dout/k/flags hold the character of the last en
);

  logic [5:0] c6;
  logic [3:0] c4;
  logic [4:0] x;
  logic [2:0] y;
  logic       f6, f4, k28, a7, kc, cerr, derr, rd6, rd4;
  logic       rd;

  always_comb begin
    c6 = din[9:4];
    c4 = din[3:0];
    // 6-bit sub-block: search both disparity columns of the table.
    f6 = 1'b0; x = 5'd0; k28 = 1'b0;
    for (int i = 0; i < 32; i++) begin
      if (c6 == tab6(5'(i)) ||
          ((ones6(tab6(5'(i))) != 3 || i == 7) && c6 == ~tab6(5'(i)))) begin
        f6 = 1'b1; x = 5'(i);
      end
    end
    if (c6 == 6'b001111 || c6 == 6'b110000) begin
      f6 = 1'b1; x = 5'd28; k28 = 1'b1;
    end
    // 4-bit sub-block.
    f4 = 1'b0; y = 3'd0; a7 = 1'b0;
    rd6 = rd_after6(c6, rd);
    for (int j = 0; j < 8; j++) begin
      if (k28 ? (c4 == enc4(3'(j), 1'b0, 1'b1, rd6)) :
                (c4 == tab4(4'(j)) ||
                 ((ones4(tab4(4'(j))) != 2 || j == 3) && c4 == ~tab4(4'(j))))) begin
        f4 = 1'b1; y = 3'(j);
      end
    end
    if (c4 == 4'b0111 || c4 == 4'b1000) begin
      f4 = 1'b1; y = 3'd7; a7 = 1'b1;
    end
    // Control characters: K28.y, or Kx.7 written with the A7 form.
    kc = k28 || (a7 && (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30));
    // Running disparity and sign checks.
    rd4  = rd_after4(c4, rd6);
    derr = (ones6(c6) > 3 && rd) || (ones6(c6) < 3 && !rd) ||
           (c6 == 6'b111000 && rd) || (c6 == 6'b000111 && !rd) ||
           (ones4(c4) > 2 && rd6) || (ones4(c4) < 2 && !rd6) ||
           (c4 == 4'b1100 && rd6) || (c4 == 4'b0011 && !rd6);
    // A character is valid only if re-encoding it gives the same bits.
    cerr = !f6 || !f4;
    if (!cerr) begin
      if (kc) begin
        if (enc6(x, k28, rd) != c6 ||
            enc4(y, 1'b1, k28, rd_after6(enc6(x, k28, rd), rd)) != c4)
          cerr = !derr;  // a wrong sign alone is a disparity error
      end else begin
        if (enc6(x, 1'b0, rd) != c6 ||
            enc4(y, use_a7(x, rd_after6(enc6(x, 1'b0, rd), rd)), 1'b0,
                 rd_after6(enc6(x, 1'b0, rd), rd)) != c4)
          cerr = !derr;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout <= 8'h00; k <= 1'b0; code_err <= 1'b0; disp_err <= 1'b0;
      valid <= 1'b0; rd <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        dout     <= {y, x};
        k        <= kc && !cerr;
        code_err <= cerr;
        disp_err <= derr && !cerr;
        rd       <= rd4;
      end
    end
  end

endmodule
