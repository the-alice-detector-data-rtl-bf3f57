// enc8b10b: 8B/10B encoder of the DDL coding layer (Fibre Channel FC-1 code).
//
// Each enabled clock it encodes one byte, or one control character when k is
// set, into a 10-bit character {a,b,c,d,e,i,f,g,h,j} (bit 9 sent first) and
// updates the running disparity, which starts negative after reset. A request
// for a control character the code does not define raises kerr and sends
// K28.5 instead. The code tables are the standard ones; one character per
// clock, with one clock of latency, is this design's choice.
module enc8b10b
  import code8b10b_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,      // encode din/k this clock
  input  logic       k,       // din is a control character
  input  logic [7:0] din,
  output logic [9:0] dout,    // 10-bit character, valid the clock after en
  output logic       kerr,    // the requested control character is undefined
  output logic       rd       // running disparity after dout (1 = positive)
);

  logic [7:0] d;
  logic       kk, bad;
  logic [5:0] c6;
  logic [3:0] c4;
  logic       rd6, rd4;

  always_comb begin
    bad = k && !kvalid(din);
    d   = bad ? 8'hBC : din;
    kk  = k || bad;
    c6  = enc6(d[4:0], kk && d[4:0] == 5'd28, rd);
    rd6 = rd_after6(c6, rd);
    c4  = enc4(d[7:5], kk ? (d[7:5] == 3'd7) : use_a7(d[4:0], rd6),
               kk && d[4:0] == 5'd28, rd6);
    rd4 = rd_after4(c4, rd6);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout <= 10'b0011111010;   // K28.5 at RD negative
      kerr <= 1'b0;
      rd   <= 1'b0;
    end else if (en) begin
      dout <= {c6, c4};
      kerr <= bad;
      rd   <= rd4;
    end
  end

endmodule
