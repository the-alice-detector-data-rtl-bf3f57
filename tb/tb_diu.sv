// tb_diu: the destination interface unit between an RORC-side driver and, over
// two fibre models, a framing unit standing in for the SIU. Checks that
// commands and download data reach the far end, that interface unit commands
// addressed to the DIU are answered locally and not sent, that received data
// and status words reach the input bus, that the DTSTW carries the number of
// data words received (event length), that a line error is added to the next
// CTSTW (error reporting), and that ib_xoff reaches the far end as XOFF.
//
// The DTSTW event length and DIU error report follow the document's Figure 7
// legend; their encodings are this design's.
module tb_diu;
  import ddl_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [9:0] d_tx, d_rx, f_tx, f_rx, flip = 0;
  logic ob_valid = 0, ob_ctrl = 0, ob_ready, ib_valid, ib_ctrl, ib_xoff = 0;
  logic [31:0] ob_d = 0, ib_d;
  diu #(.MAX_FRAME_WORDS(16)) dut (.clk, .rst_n, .tx_char(d_tx), .rx_char(d_rx), .ob_valid, .ob_ctrl,
    .ob_d, .ob_ready, .ib_valid, .ib_ctrl, .ib_d, .ib_xoff);
  ddl_fibre_model #(.DELAY(10)) f1 (.clk, .din(d_tx), .flip(10'd0), .dout(f_rx));
  ddl_fibre_model #(.DELAY(10)) f2 (.clk, .din(f_tx), .flip(flip), .dout(d_rx));

  logic s_tx_valid = 0, s_tx_ready, s_rx_valid, s_far;
  kind_e s_tx_kind = KIND_STW, s_rx_kind;
  logic [31:0] s_tx_word = 0, s_rx_word;
  rxerr_t s_rx_err, s_evt;
  ddl_endec #(.MAX_FRAME_WORDS(16)) far (.clk, .rst_n, .tx_valid(s_tx_valid), .tx_kind(s_tx_kind),
    .tx_word(s_tx_word), .tx_ready(s_tx_ready), .pause_far(1'b0), .tx_char(f_tx),
    .rx_char(f_rx), .rx_valid(s_rx_valid), .rx_kind(s_rx_kind), .rx_word(s_rx_word),
    .rx_err(s_rx_err), .err_evt(s_evt), .far_paused(s_far));

  typedef struct { logic ctrl; logic [31:0] w; } bw_t;
  typedef struct { kind_e kind; logic [31:0] w; } fw_t;
  bw_t ibq[$];
  fw_t farq[$];
  always @(posedge clk) if (rst_n) begin
    if (ib_valid) begin bw_t b; b.ctrl = ib_ctrl; b.w = ib_d; ibq.push_back(b); end
    if (s_rx_valid) begin fw_t f; f.kind = s_rx_kind; f.w = s_rx_word; farq.push_back(f); end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic rorc_send(input logic ctrl, input logic [31:0] w);  // at a falling edge
    bit ok;
    ob_valid = 1; ob_ctrl = ctrl; ob_d = w;
    forever begin #1; ok = ob_ready; @(negedge clk); if (ok) break; end
    ob_valid = 0;
  endtask
  task automatic far_send(input kind_e k, input logic [31:0] w);
    bit ok;
    s_tx_valid = 1; s_tx_kind = k; s_tx_word = w;
    forever begin #1; ok = s_tx_ready; @(negedge clk); if (ok) break; end
    s_tx_valid = 0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ddl_word_t g;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (40) @(negedge clk);
    // command and download data to the far end
    rorc_send(1, mkword(CMD_STBWR, 4'd1, 23'h0, 1'b0));
    for (int i = 0; i < 20; i++) rorc_send(0, 32'hABC0_0000 + i);
    rorc_send(1, mkword(CMD_EOBTR, 4'd2, 23'h0, 1'b0));
    repeat (60) @(negedge clk);
    check(farq.size() == 22, $sformatf("far end got %0d words", farq.size()));
    if (farq.size() == 22) begin
      int bad = 0;
      if (farq[0].kind != KIND_CMD || farq[0].w != mkword(CMD_STBWR, 4'd1, 23'h0, 1'b0)) bad++;
      for (int i = 0; i < 20; i++) if (farq[i+1].kind != KIND_DATA || farq[i+1].w != 32'hABC0_0000 + i) bad++;
      if (farq[21].kind != KIND_CMD) bad++;
      check(bad == 0, "command, download data, command in order");
    end
    farq.delete();
    // local interface unit status read-out
    rorc_send(1, mkword(CMD_IUSTRD, 4'd3, 23'h40_0000, 1'b0));
    repeat (20) @(negedge clk);
    check(farq.size() == 0, "DIU command not sent over the link");
    check(ibq.size() == 2, $sformatf("local reply: %0d words", ibq.size()));
    if (ibq.size() == 2) begin
      g = ibq[0].w;
      check(ibq[0].ctrl && g.code == STW_IUSTW && g.trid == 4'd3, "IUSTW from the DIU");
      g = ibq[1].w;
      check(ibq[1].ctrl && g.code == STW_CTSTW && g.trid == 4'd3 && !g.err, "CTSTW from the DIU");
    end
    ibq.delete();
    // an event of 37 words, then DTSTW: length filled in by the DIU
    for (int i = 0; i < 37; i++) far_send(KIND_DATA, 32'h5000_0000 + i);
    far_send(KIND_STW, mkword(STW_DTSTW, 4'd0, 23'h7, 1'b0));
    repeat (40) @(negedge clk);
    check(ibq.size() == 38, $sformatf("input bus got %0d words", ibq.size()));
    if (ibq.size() == 38) begin
      int bad = 0;
      for (int i = 0; i < 37; i++) if (ibq[i].ctrl || ibq[i].w != 32'h5000_0000 + i) bad++;
      check(bad == 0, "event data on the input bus");
      g = ibq[37].w;
      check(ibq[37].ctrl && g.code == STW_DTSTW && g.param == 23'd37 && !g.err,
            $sformatf("DTSTW event length %0d", g.param));
    end
    ibq.delete();
    // line error, then a CTSTW: the DIU reports it
    @(negedge clk); flip = 10'b1000000000; @(negedge clk); flip = 0;
    repeat (30) @(negedge clk);
    far_send(KIND_STW, mkword(STW_CTSTW, 4'd4, 23'h0, 1'b0));
    repeat (40) @(negedge clk);
    check(ibq.size() == 1, "CTSTW delivered");
    if (ibq.size() == 1) begin
      g = ibq[0].w;
      check(g.err && g.param[EB_DIU_FRAME:EB_DIU_CODE] != 0, $sformatf("error reported in CTSTW %h", g));
    end
    ibq.delete();
    // next CTSTW is clean again
    far_send(KIND_STW, mkword(STW_CTSTW, 4'd5, 23'h0, 1'b0));
    repeat (40) @(negedge clk);
    if (ibq.size() == 1) begin g = ibq[0].w; check(!g.err, "error reported only once"); end
    else check(0, "second CTSTW delivered");
    // flow control
    ib_xoff = 1;
    repeat (40) @(negedge clk);
    check(s_far, "XOFF reached the far end");
    ib_xoff = 0;
    repeat (40) @(negedge clk);
    check(!s_far, "XON reached the far end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
