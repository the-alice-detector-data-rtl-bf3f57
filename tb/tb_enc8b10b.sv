// tb_enc8b10b: self-checking test of the 8B/10B encoder.
// Checks published characters of the code (K28.5, K28.1, K29.7, D0.0, D10.2,
// D21.5, D17.7, D23.0) at known running disparity, then sends every data byte
// and defined control character in random order and checks, independently of
// the code tables, that each character has 4 to 6 ones, that the running
// disparity stays within +/-1 at character ends, that no run of equal bits
// exceeds 5, and that different bytes never share a character at the same
// disparity.
//
// Expected values are published code groups and line properties worked out
// here, not the encoder's own tables; the code is the standard Fibre Channel
// one that the document refers to.
module tb_enc8b10b;
  logic clk = 0, rst_n = 0, en = 0, k = 0;
  logic [7:0] din = 0;
  logic [9:0] dout;
  logic kerr, rd;
  int checks = 0, failures = 0;

  enc8b10b dut (.*);

  always #5 clk = ~clk;

  task automatic send(input logic kk, input logic [7:0] d);
    k = kk; din = d; en = 1;
    @(posedge clk); #1;
    en = 0;
  endtask

  task automatic expect_char(input logic [9:0] exp, input string name);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", name, dout, exp);
    end
  endtask

  // line-level properties
  int disp = -1;        // running disparity on the line, starting negative
  int run = 0;
  logic last_bit = 1'b0;
  logic [9:0] seen [2][512];
  logic       used [2][512];

  task automatic line_check(input logic [9:0] c, input logic rd_before, input int idx);
    int n = 0;
    for (int b = 9; b >= 0; b--) begin
      n += int'(c[b]);
      if (c[b] == last_bit) run++; else run = 1;
      last_bit = c[b];
      checks++;
      if (run > 5) begin failures++; $display("FAIL run length %0d", run); end
    end
    checks++;
    if (n < 4 || n > 6) begin failures++; $display("FAIL ones=%0d in %b", n, c); end
    disp += 2 * n - 10;
    checks++;
    if (disp != -1 && disp != 1) begin failures++; $display("FAIL disparity %0d", disp); end
    // injectivity at equal starting disparity
    for (int j = 0; j < 512; j++)
      if (used[rd_before][j] && seen[rd_before][j] == c && j != idx) begin
        failures++; $display("FAIL code %b used for %0d and %0d", c, j, idx);
      end
    used[rd_before][idx] = 1'b1;
    seen[rd_before][idx] = c;
  endtask

  int order[$];
  initial begin
    repeat (20 * 700) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (used[i, j]) used[i][j] = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    send(1, 8'hBC); expect_char(10'b0011111010, "K28.5 RD-");
    send(1, 8'hBC); expect_char(10'b1100000101, "K28.5 RD+");
    send(1, 8'h3C); expect_char(10'b0011111001, "K28.1 RD-");
    send(1, 8'h3C); expect_char(10'b1100000110, "K28.1 RD+");
    send(0, 8'h00); expect_char(10'b1001110100, "D0.0 RD-");
    send(0, 8'h4A); expect_char(10'b0101010101, "D10.2");
    send(0, 8'hB5); expect_char(10'b1010101010, "D21.5");
    send(0, 8'hF1); expect_char(10'b1000110111, "D17.7 RD-");
    send(1, 8'hFD); expect_char(10'b0100010111, "K29.7 RD+");
    send(0, 8'h17); expect_char(10'b0001011011, "D23.0 RD+");
    send(1, 8'hBC); expect_char(10'b1100000101, "K28.5 RD+ again");
    send(0, 8'h17); expect_char(10'b1110100100, "D23.0 RD-");
    checks++;
    if (kerr) begin failures++; $display("FAIL kerr set for valid K"); end
    send(1, 8'h00);
    checks++;
    if (!kerr || dout != 10'b0011111010) begin failures++; $display("FAIL undefined K not flagged"); end
    // all characters, random order, several passes
    rst_n = 0; #1; rst_n = 1; #1;
    disp = -1; run = 0; last_bit = 1'b0;
    for (int pass = 0; pass < 3; pass++) begin
      order.delete();
      for (int i = 0; i < 256; i++) order.push_back(i);
      order.push_back(256 + 28);  order.push_back(256 + 60);
      order.push_back(256 + 92);  order.push_back(256 + 124);
      order.push_back(256 + 156); order.push_back(256 + 188);
      order.push_back(256 + 220); order.push_back(256 + 247);
      order.push_back(256 + 251); order.push_back(256 + 253);
      order.push_back(256 + 254);
      order.shuffle();
      foreach (order[i]) begin
        logic rb;
        rb = rd;
        send(order[i] >= 256, 8'(order[i]));
        line_check(dout, rb, order[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
