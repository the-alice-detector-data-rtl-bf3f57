// tb_ddl_endec: two framing/coding units connected back to back through two
// fibre models. Checks that commands, status words and a data block longer
// than one frame arrive in order, with their kinds and without errors; that a
// data block runs at 4 clocks per word plus the frame overhead; that XOFF
// stops the data stream within a bounded time and XON resumes it; and that a
// corrupted character is reported.
//
// The frame format and flow-control characters checked here are this design's
// own; the document names the framing layer but gives no format.
module tb_ddl_endec;
  import ddl_pkg::*;
  localparam int MAXW = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic a_tx_valid = 0, a_tx_ready, a_pause = 0, a_rx_valid, a_far;
  kind_e a_tx_kind = KIND_DATA, a_rx_kind;
  logic [31:0] a_tx_word = 0, a_rx_word;
  logic [9:0] a_tx_char, a_rx_char;
  rxerr_t a_rx_err, a_evt;
  logic b_tx_valid = 0, b_tx_ready, b_pause = 0, b_rx_valid, b_far;
  kind_e b_tx_kind = KIND_DATA, b_rx_kind;
  logic [31:0] b_tx_word = 0, b_rx_word;
  logic [9:0] b_tx_char, b_rx_char;
  rxerr_t b_rx_err, b_evt;
  logic [9:0] flip_ab = 0;

  ddl_endec #(.MAX_FRAME_WORDS(MAXW)) ua (.clk, .rst_n, .tx_valid(a_tx_valid), .tx_kind(a_tx_kind),
    .tx_word(a_tx_word), .tx_ready(a_tx_ready), .pause_far(a_pause), .tx_char(a_tx_char),
    .rx_char(a_rx_char), .rx_valid(a_rx_valid), .rx_kind(a_rx_kind), .rx_word(a_rx_word),
    .rx_err(a_rx_err), .err_evt(a_evt), .far_paused(a_far));
  ddl_endec #(.MAX_FRAME_WORDS(MAXW)) ub (.clk, .rst_n, .tx_valid(b_tx_valid), .tx_kind(b_tx_kind),
    .tx_word(b_tx_word), .tx_ready(b_tx_ready), .pause_far(b_pause), .tx_char(b_tx_char),
    .rx_char(b_rx_char), .rx_valid(b_rx_valid), .rx_kind(b_rx_kind), .rx_word(b_rx_word),
    .rx_err(b_rx_err), .err_evt(b_evt), .far_paused(b_far));
  ddl_fibre_model #(.DELAY(8)) fab (.clk, .din(a_tx_char), .flip(flip_ab), .dout(b_rx_char));
  ddl_fibre_model #(.DELAY(8)) fba (.clk, .din(b_tx_char), .flip(10'd0), .dout(a_rx_char));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // expected stream at B
  typedef struct { kind_e kind; logic [31:0] w; } item_t;
  item_t exp_q[$];
  int got = 0, errs_b = 0, evt_b = 0;
  int last_rx_cycle = 0, cycle = 0;
  bit compare = 1;
  always @(posedge clk) cycle++;
  always @(posedge clk) if (rst_n) begin
    if (b_evt != '0 && cycle > 40) evt_b++;
    if (b_rx_valid) begin
      last_rx_cycle = cycle;
      if (b_rx_err != '0) errs_b++;
      else if (!compare) ;
      else if (exp_q.size() == 0) begin failures++; checks++; $display("FAIL unexpected word %h", b_rx_word); end
      else begin
        item_t e;
        e = exp_q.pop_front();
        checks++;
        if (e.kind != b_rx_kind || e.w != b_rx_word) begin
          failures++;
          $display("FAIL word %0d: got %0d/%h expected %0d/%h", got, b_rx_kind, b_rx_word, e.kind, e.w);
        end
        got++;
      end
    end
  end

  task automatic a_send(input kind_e k, input logic [31:0] w);
    item_t it;
    bit ok;
    it.kind = k; it.w = w;
    // called and left at a falling edge
    a_tx_valid = 1; a_tx_kind = k; a_tx_word = w;
    exp_q.push_back(it);
    forever begin #1; ok = a_tx_ready; @(negedge clk); if (ok) break; end
    a_tx_valid = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1, n;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (20) @(posedge clk);
    @(negedge clk);
    // command and status frames
    a_send(KIND_CMD, 32'h1234_5602);
    a_send(KIND_STW, 32'hCAFE_0013);
    // a data block of 3.5 frames, back to back
    n = MAXW * 3 + MAXW / 2;
    t0 = cycle;
    for (int i = 0; i < n; i++) a_send(KIND_DATA, 32'hD000_0000 + i);
    t1 = cycle;
    a_send(KIND_STW, 32'h0000_0024);
    repeat (40) @(posedge clk);
    check(exp_q.size() == 0, "all words of the block delivered");
    check(got == n + 3, $sformatf("delivered %0d words", got));
    check(errs_b == 0 && evt_b == 0, "no errors on a clean line");
    // 4 clocks per word plus two frame characters per frame
    check(t1 - t0 <= 4 * n + 2 * (n / MAXW + 1) + 2,
          $sformatf("block of %0d words took %0d clocks", n, t1 - t0));
    $display("throughput: %0d words in %0d clocks", n, t1 - t0);
    // flow control: B asks A to pause
    @(negedge clk);
    fork
      for (int i = 0; i < 400; i++) a_send(KIND_DATA, 32'hE000_0000 + i);
      begin
        repeat (100) @(posedge clk);
        b_pause <= 1;
        repeat (60) @(posedge clk);
        check(a_far, "XOFF reached the far end");
        begin
          int nb;
          nb = got;
          repeat (200) @(posedge clk);
          check(got == nb, "no data while paused");
        end
        b_pause <= 0;
      end
    join
    repeat (60) @(posedge clk);
    check(!a_far, "XON reached the far end");
    check(exp_q.size() == 0, "paused block completed after XON");
    // a corrupted character in a data word
    @(negedge clk);
    compare = 0;
    fork
      for (int i = 0; i < 10; i++) a_send(KIND_DATA, 32'hF000_0000 + i);
      begin repeat (12) @(posedge clk); flip_ab <= 10'b0000100000; @(posedge clk); flip_ab <= 0; end
    join
    repeat (60) @(posedge clk);
    check(evt_b > 0, "line error reported");
    exp_q.delete();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
