// tb_siu: the source interface unit with a front-end model on its bus and, at
// the far end of two fibre models, a framing unit standing in for the DIU.
// Checks each transaction at the SIU: FEE status read-out (FESTW then CTSTW,
// reply parameter worked out here), a command corrupted on the fibre (CTSTW
// with error, nothing reaches the FEE), a status read-out the FEE never answers
// (time-out), event data transmission (CTSTW with SOTR, blocks, DTSTW per
// event, flow control by XOFF without loss), block download and read-back,
// interface unit status, the JTAG port, the self-test block and an unknown
// command.
//
// Transaction sequences checked follow the document's Figures 6 and 7; word
// formats, codes and error bits are this design's own.
module tb_siu;
  import ddl_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle++;

  // SIU and FEE
  logic [9:0] s_tx, s_rx, r_tx, r_rx, flip = 0;
  logic [31:0] fbd_i, fbd_o;
  logic fbten_i, fbctrl_i, fbten_o, fbctrl_o, fbd_oe, fidir, filf;
  logic tck, tms, tdi, trst_n, tdo;
  logic trigger = 0, mute = 0;
  int ev_words = 10;

  siu #(.MAX_FRAME_WORDS(32), .FEE_TIMEOUT(200)) dut (.clk, .rst_n, .tx_char(s_tx), .rx_char(s_rx),
    .fbd_i, .fbten_i, .fbctrl_i, .fbd_o, .fbten_o, .fbctrl_o, .fbd_oe, .fidir, .filf,
    .tck, .tms, .tdi, .trst_n, .tdo);
  fee_model fee (.clk, .rst_n, .fbd_i, .fbten_i, .fbctrl_i, .fbd_o, .fbten_o, .fbctrl_o,
    .fbd_oe, .fidir, .filf, .tck, .tms, .tdi, .trst_n, .tdo, .trigger, .ev_words, .mute);
  ddl_fibre_model #(.DELAY(12)) f_up (.clk, .din(s_tx), .flip(10'd0), .dout(r_rx));
  ddl_fibre_model #(.DELAY(12)) f_dn (.clk, .din(r_tx), .flip(flip), .dout(s_rx));

  // far end
  logic r_tx_valid = 0, r_tx_ready, r_pause = 0, r_rx_valid, r_far;
  kind_e r_tx_kind = KIND_CMD, r_rx_kind;
  logic [31:0] r_tx_word = 0, r_rx_word;
  rxerr_t r_rx_err, r_evt;
  ddl_endec #(.MAX_FRAME_WORDS(32)) far (.clk, .rst_n, .tx_valid(r_tx_valid), .tx_kind(r_tx_kind),
    .tx_word(r_tx_word), .tx_ready(r_tx_ready), .pause_far(r_pause), .tx_char(r_tx),
    .rx_char(r_rx), .rx_valid(r_rx_valid), .rx_kind(r_rx_kind), .rx_word(r_rx_word),
    .rx_err(r_rx_err), .err_evt(r_evt), .far_paused(r_far));

  typedef struct { kind_e kind; logic [31:0] w; int t; } item_t;
  item_t rxq[$];
  always @(posedge clk) if (rst_n && r_rx_valid) begin
    item_t it;
    it.kind = r_rx_kind; it.w = r_rx_word; it.t = cycle;
    rxq.push_back(it);
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic send(input kind_e k, input logic [31:0] w);   // at a falling edge
    bit ok;
    r_tx_valid = 1; r_tx_kind = k; r_tx_word = w;
    forever begin #1; ok = r_tx_ready; @(negedge clk); if (ok) break; end
    r_tx_valid = 0;
  endtask

  task automatic wait_words(input int n, input int limit);
    for (int i = 0; i < limit && rxq.size() < n; i++) @(negedge clk);
  endtask

  task automatic expect_stw(input logic [3:0] code, input logic [3:0] trid, input logic err,
                            input string msg, output ddl_word_t got);
    wait_words(1, 2000);
    if (rxq.size() == 0) begin check(0, {msg, ": nothing received"}); got = '0; return; end
    begin
      item_t it;
      it = rxq.pop_front();
      got = it.w;
      check(it.kind == KIND_STW && got.code == code && got.trid == trid && got.err == err,
            $sformatf("%s: got kind %0d word %h", msg, it.kind, it.w));
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ddl_word_t g;
    int ncmd, t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (30) @(negedge clk);
    rxq.delete();

    // --- FEE control then status read-out
    send(KIND_CMD, mkword(CMD_FECTRL, 4'd1, 23'h00_00F0, 1'b0));
    expect_stw(STW_CTSTW, 4'd1, 0, "CTSTW of FECTRL", g);
    t0 = cycle;
    send(KIND_CMD, mkword(CMD_FESTRD, 4'd2, 23'h12_3456, 1'b0));
    expect_stw(STW_FESTW, 4'd2, 0, "FESTW", g);
    check(g.param == (23'h12_3456 ^ 23'h00_00F0), $sformatf("FESTW parameter %h", g.param));
    expect_stw(STW_CTSTW, 4'd2, 0, "CTSTW of FESTRD", g);
    $display("status read-out round trip: %0d clocks", cycle - t0);

    // --- corrupted command: not forwarded, CTSTW with error
    ncmd = fee.n_cmds;
    fork
      send(KIND_CMD, mkword(CMD_FECTRL, 4'd3, 23'h1, 1'b0));
      begin repeat (4) @(posedge clk); flip = 10'b0000010000; @(posedge clk); flip = 0; end
    join
    expect_stw(STW_CTSTW, 4'd3, 1, "CTSTW of corrupted command", g);
    check(g.param[2:0] != 0, "line error flag in CTSTW");
    repeat (20) @(negedge clk);
    check(fee.n_cmds == ncmd, "corrupted command did not reach the FEE");

    // --- time-out
    mute = 1;
    send(KIND_CMD, mkword(CMD_FESTRD, 4'd4, 23'h5, 1'b0));
    expect_stw(STW_CTSTW, 4'd4, 1, "CTSTW after time-out", g);
    check(g.param[EB_TIMEOUT], "time-out flag");
    mute = 0;

    // --- event data transmission
    send(KIND_CMD, mkword(CMD_RDYRX, 4'd5, 23'h0, 1'b0));
    expect_stw(STW_CTSTW, 4'd5, 0, "CTSTW(SOTR) of RDYRX", g);
    check(g.param[EB_SOTR], "SOTR flag");
    ev_words = 150;
    for (int e = 0; e < 2; e++) begin
      @(negedge clk); trigger = 1; @(negedge clk); trigger = 0;
      if (e == 1) begin
        // pause the SIU half way through the second event
        repeat (200) @(negedge clk);
        r_pause = 1;
        repeat (300) @(negedge clk);
        check(filf, "FEE held off by link full while paused");
        r_pause = 0;
      end
      wait_words(ev_words + 1, 5000);
      begin
        int bad = 0;
        for (int i = 0; i < ev_words; i++) begin
          item_t it;
          it = rxq.pop_front();
          if (it.kind != KIND_DATA || it.w != {8'(e), 24'(i)}) bad++;
        end
        check(bad == 0, $sformatf("event %0d: %0d bad words", e, bad));
      end
      expect_stw(STW_DTSTW, 4'd0, 0, "DTSTW", g);
      check(g.param == 23'(e), "DTSTW carries the FEE's end-of-block parameter");
    end
    send(KIND_CMD, mkword(CMD_EOBTR, 4'd6, 23'h0, 1'b0));
    expect_stw(STW_CTSTW, 4'd6, 0, "CTSTW of EOBTR", g);

    // --- download and read-back
    send(KIND_CMD, mkword(CMD_STBWR, 4'd7, 23'h0, 1'b0));
    expect_stw(STW_CTSTW, 4'd7, 0, "CTSTW(SOTR) of STBWR", g);
    for (int i = 0; i < 40; i++) send(KIND_DATA, 32'h0D0D_0000 + i * 3);
    send(KIND_CMD, mkword(CMD_EOBTR, 4'd8, 23'h0, 1'b0));
    expect_stw(STW_CTSTW, 4'd8, 0, "CTSTW of download EOBTR", g);
    check(fee.dl_n == 40, $sformatf("FEE stored %0d download words", fee.dl_n));
    begin
      int bad = 0;
      for (int i = 0; i < 40; i++) if (fee.mem[i] != 32'h0D0D_0000 + i * 3) bad++;
      check(bad == 0, "download contents");
    end
    send(KIND_CMD, mkword(CMD_STBRD, 4'd9, 23'h0, 1'b0));
    expect_stw(STW_CTSTW, 4'd9, 0, "CTSTW(SOTR) of STBRD", g);
    wait_words(41, 3000);
    begin
      int bad = 0;
      for (int i = 0; i < 40; i++) begin
        item_t it;
        it = rxq.pop_front();
        if (it.kind != KIND_DATA || it.w != 32'h0D0D_0000 + i * 3) bad++;
      end
      check(bad == 0, "read-back contents");
    end
    expect_stw(STW_DTSTW, 4'd0, 0, "DTSTW of read-back", g);
    send(KIND_CMD, mkword(CMD_EOBTR, 4'd10, 23'h0, 1'b0));
    expect_stw(STW_CTSTW, 4'd10, 0, "CTSTW of read-back EOBTR", g);

    // --- interface unit status
    send(KIND_CMD, mkword(CMD_IUSTRD, 4'd11, 23'h0, 1'b0));
    expect_stw(STW_IUSTW, 4'd11, 0, "IUSTW", g);
    check(g.param[15:0] != 0, "SIU error counter counted the corrupted character");
    expect_stw(STW_CTSTW, 4'd11, 0, "CTSTW of IUSTRD", g);

    // --- JTAG: shift 8 bits through the FEE's 8-bit register twice
    send(KIND_CMD, mkword(CMD_JTAG, 4'd12, {3'd0, 8'hA7, 8'h00, 4'd8}, 1'b0));
    expect_stw(STW_IUSTW, 4'd12, 0, "IUSTW of first JTAG shift", g);
    expect_stw(STW_CTSTW, 4'd12, 0, "CTSTW of JTAG", g);
    send(KIND_CMD, mkword(CMD_JTAG, 4'd13, {3'd0, 8'h3C, 8'h00, 4'd8}, 1'b0));
    expect_stw(STW_IUSTW, 4'd13, 0, "IUSTW of second JTAG shift", g);
    check(g.param[7:0] == 8'hA7, $sformatf("TDO returned %h, expected the first TDI byte", g.param[7:0]));
    expect_stw(STW_CTSTW, 4'd13, 0, "CTSTW of JTAG", g);

    // --- self-test block
    send(KIND_CMD, mkword(CMD_SELFT, 4'd14, 23'd70, 1'b0));
    expect_stw(STW_CTSTW, 4'd14, 0, "CTSTW(SOTR) of self-test", g);
    wait_words(71, 3000);
    begin
      int bad = 0;
      for (int i = 0; i < 70; i++) begin
        item_t it;
        it = rxq.pop_front();
        if (it.kind != KIND_DATA || it.w != {~16'(i), 16'(i)}) bad++;
      end
      check(bad == 0, "self-test pattern");
    end
    expect_stw(STW_DTSTW, 4'd14, 0, "DTSTW of self-test", g);
    check(g.param == 23'd70, "self-test length");

    // --- unknown command
    send(KIND_CMD, mkword(4'd15, 4'd15, 23'h0, 1'b0));
    expect_stw(STW_CTSTW, 4'd15, 1, "CTSTW of unknown command", g);
    check(g.param[EB_UNKNOWN], "unknown-command flag");

    repeat (50) @(negedge clk);
    check(rxq.size() == 0, $sformatf("%0d stray words", rxq.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
