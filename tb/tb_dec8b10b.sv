// tb_dec8b10b: self-checking test of the 8B/10B decoder.
// Feeds the decoder with published characters (both disparities) and checks
// the decoded byte and control flag; sends a character of the wrong disparity
// and expects a disparity error; sends 10-bit patterns that are not in the code
// and expects code violations; then streams random bytes through the encoder,
// flips single line bits and checks that every flip is reported within the
// next 40 characters (a flip always shows as a code or disparity error) and
// that clean characters decode to what was sent.
//
// Expected bytes come from the inputs that produced the characters; the code is
// the standard one, the error-reporting behaviour checked is this design's.
module tb_dec8b10b;
  logic clk = 0, rst_n = 0, en = 0;
  logic [9:0] din = 0;
  logic [7:0] dout;
  logic k, code_err, disp_err, valid;
  int checks = 0, failures = 0;

  dec8b10b dut (.*);

  // reference encoder for the random stream
  logic e_en = 0, e_k = 0, e_kerr, e_rd;
  logic [7:0] e_din = 0;
  logic [9:0] e_dout;
  enc8b10b ref_enc (.clk, .rst_n, .en(e_en), .k(e_k), .din(e_din), .dout(e_dout),
                    .kerr(e_kerr), .rd(e_rd));

  always #5 clk = ~clk;

  task automatic feed(input logic [9:0] c);
    din = c; en = 1;
    @(posedge clk); #1;
    en = 0;
  endtask

  task automatic expect_dec(input logic [9:0] c, input logic ek, input logic [7:0] ed,
                            input string name);
    feed(c);
    checks++;
    if (!valid || dout != ed || k != ek || code_err || disp_err) begin
      failures++;
      $display("FAIL %s: d=%h k=%b cerr=%b derr=%b", name, dout, k, code_err, disp_err);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int errs_seen, flips;
    logic [7:0] sent [$];
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    // line starts at RD-
    expect_dec(10'b0011111010, 1, 8'hBC, "K28.5 RD-");   // -> RD+
    expect_dec(10'b1100000101, 1, 8'hBC, "K28.5 RD+");   // -> RD-
    expect_dec(10'b1001110100, 0, 8'h00, "D0.0 RD-");
    expect_dec(10'b1010101010, 0, 8'hB5, "D21.5");
    expect_dec(10'b1000110111, 0, 8'hF1, "D17.7 RD-");   // -> RD+
    expect_dec(10'b0100010111, 1, 8'hFD, "K29.7 RD+");   // -> RD+
    expect_dec(10'b0001011011, 0, 8'h17, "D23.0 RD+");   // -> RD+
    expect_dec(10'b1100000110, 1, 8'h3C, "K28.1 RD+");   // -> RD-
    expect_dec(10'b0101010101, 0, 8'h4A, "D10.2");
    // wrong disparity: RD is negative, send the RD+ form of D0.0
    feed(10'b0110001011);
    checks++;
    if (!disp_err) begin failures++; $display("FAIL disparity error not flagged"); end
    // not in the code
    rst_n = 0; #1; rst_n = 1; #1;
    feed(10'b1111110000);
    checks++;
    if (!code_err) begin failures++; $display("FAIL 1111110000 accepted"); end
    feed(10'b0000000000);
    checks++;
    if (!code_err) begin failures++; $display("FAIL 0000000000 accepted"); end
    // random stream through the reference encoder, with single-bit flips
    rst_n = 0; #1; rst_n = 1; #1;
    flips = 0; errs_seen = 0;
    for (int i = 0; i < 3000; i++) begin
      logic [9:0] c;
      logic flip;
      e_k = 0; e_din = 8'($urandom); e_en = 1;
      @(posedge clk); #1;
      e_en = 0;
      c = e_dout;
      flip = (i % 50 == 25);
      if (flip) c[$urandom_range(9, 0)] ^= 1'b1;
      feed(c);
      if (flip) begin
        int seen;
        flips++;
        seen = int'(code_err || disp_err);
        // an error may surface at one of the next characters
        for (int j = 0; j < 40 && seen == 0; j++) begin
          e_din = 8'($urandom); e_en = 1;
          @(posedge clk); #1; e_en = 0;
          feed(e_dout);
          seen = int'(code_err || disp_err);
          i++;
        end
        checks++;
        if (seen == 0) begin failures++; $display("FAIL flip %0d not detected", flips); end
        else errs_seen++;
        // resynchronise: reset both ends
        rst_n = 0; #1; rst_n = 1; #1;
      end else begin
        checks++;
        if (dout != e_din || k || code_err || disp_err) begin
          failures++;
          $display("FAIL clean char %h decoded %h (cerr=%b derr=%b)", e_din, dout, code_err, disp_err);
        end
      end
    end
    $display("flips=%0d detected=%0d", flips, errs_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
