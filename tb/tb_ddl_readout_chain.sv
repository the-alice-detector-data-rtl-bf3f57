// tb_ddl_readout_chain: end-to-end test of the read-out chain at reduced
// buffer sizes: the host drives the RORC through its host port only; two
// front-end models sit behind the SIUs, connected through fibre models.
// Runs each DDL transaction from the host and counts each mechanism of the
// design, failing any that never happened:
//   FEE control and status read-out; a command hit by a line error (error
//   detected at the SIU, not executed, reported in the CTSTW); a line error
//   in the other direction (reported by the DIU); FEE time-out; event data
//   transmission on both channels at once, with a status read-out served
//   while the event is flowing, frames split at the maximum
//   frame length and the event length in the DTSTW; flow control (XOFF) when
//   the host stops reading; block download and read-back; interface unit
//   status of the SIU and of the DIU; JTAG; the DDL self-test block; the RORC
//   self-test and DDL self-test modes of the card; the status interrupt.
//
// The transactions follow the document's Figures 6 and 7 and its list of
// transactions; buffer sizes are reduced, everything else is at default.
module tb_ddl_readout_chain;
  import ddl_pkg::*;
  localparam int IN_DEPTH = 1024, MAXW = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle++;
  int checks = 0, failures = 0;

  logic [7:0] base_addr = 8'h40;
  logic hb_valid = 0, hb_write = 0, hb_ack, irq;
  logic [31:0] hb_addr = 0, hb_wdata = 0, hb_rdata;
  logic [1:0][9:0] diu_tx_char, diu_rx_char, siu_tx_char, siu_rx_char;
  logic [1:0][9:0] flip_dn = '0, flip_up = '0;
  logic [1:0][31:0] fbd_i, fbd_o;
  logic [1:0] fbten_i, fbctrl_i, fbten_o, fbctrl_o, fbd_oe, fidir, filf;
  logic [1:0] tck, tms, tdi, trst_n, tdo;
  logic [1:0] trigger = 0, mute = 0;
  int ev_words [2] = '{100, 100};

  ddl_readout_chain #(.IN_DEPTH(IN_DEPTH), .OUT_DEPTH(256), .ST_DEPTH(64),
                      .MAX_FRAME_WORDS(MAXW), .FEE_TIMEOUT(300)) dut (.*);

  for (genvar c = 0; c < 2; c++) begin : g_env
    ddl_fibre_model #(.DELAY(20)) f_dn (.clk, .din(diu_tx_char[c]), .flip(flip_dn[c]), .dout(siu_rx_char[c]));
    ddl_fibre_model #(.DELAY(20)) f_up (.clk, .din(siu_tx_char[c]), .flip(flip_up[c]), .dout(diu_rx_char[c]));
    fee_model fee (.clk, .rst_n, .fbd_i(fbd_i[c]), .fbten_i(fbten_i[c]), .fbctrl_i(fbctrl_i[c]),
      .fbd_o(fbd_o[c]), .fbten_o(fbten_o[c]), .fbctrl_o(fbctrl_o[c]), .fbd_oe(fbd_oe[c]),
      .fidir(fidir[c]), .filf(filf[c]), .tck(tck[c]), .tms(tms[c]), .tdi(tdi[c]),
      .trst_n(trst_n[c]), .tdo(tdo[c]), .trigger(trigger[c]), .ev_words(ev_words[c]), .mute(mute[c]));
  end

  // mechanism counters
  int n_festrd = 0, n_cmd_err = 0, n_diu_err = 0, n_timeout = 0, n_event = 0, n_split = 0,
      n_xoff = 0, n_download = 0, n_readback = 0, n_iustw_siu = 0, n_iustw_diu = 0,
      n_jtag = 0, n_selftest = 0, n_rorc_test = 0, n_ddl_test = 0, n_irq = 0, n_cmd_in_event = 0;
  logic [1:0] xoff_d = 0;
  always @(posedge clk) begin
    for (int c = 0; c < 2; c++) if (dut.ib_xoff[c] && !xoff_d[c]) n_xoff++;
    xoff_d <= dut.ib_xoff;
  end

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  // ---- host port
  function automatic logic [31:0] ra(input int c, input int r);
    return {base_addr, 24'(c * 256 + r)};
  endfunction
  task automatic wr(input int c, input int r, input logic [31:0] d);
    hb_valid = 1; hb_write = 1; hb_addr = ra(c, r); hb_wdata = d;
    @(negedge clk); hb_valid = 0;
  endtask
  task automatic rd(input int c, input int r, output logic [31:0] d);
    hb_valid = 1; hb_write = 0; hb_addr = ra(c, r);
    @(negedge clk); hb_valid = 0;
    d = hb_rdata;
  endtask
  task automatic command(input int c, input logic [3:0] code, input logic [3:0] trid,
                         input logic [22:0] param);
    logic [31:0] s;
    do rd(c, 0, s); while (s[0]);
    wr(c, 0, mkword(code, trid, param, 1'b0));
  endtask
  // next status word of channel c (waits up to 'limit' clocks)
  task automatic status(input int c, output ddl_word_t w, input int limit = 3000);
    logic [31:0] s;
    int t;
    t = 0;
    do begin rd(c, 0, s); t++; end while (s[3] && t < limit);
    if (s[3]) begin w = '0; chk(0, $sformatf("channel %0d: no status word", c)); end
    else rd(c, 8, w);
  endtask
  task automatic expect_stw(input int c, input logic [3:0] code, input logic [3:0] trid,
                            input logic err, input string m, output ddl_word_t w);
    status(c, w);
    chk(w.code == code && w.trid == trid && w.err == err, $sformatf("%s: got %h", m, w));
  endtask
  task automatic read_data(input int c, input int n, output int bad, input logic [31:0] first,
                           input int pattern);
    logic [31:0] d, s, exp;
    bad = 0;
    for (int i = 0; i < n; i++) begin
      int t;
      t = 0;
      do begin rd(c, 16, s); t++; end while (s == 0 && t < 5000);
      rd(c, 4, d);
      case (pattern)
        0: exp = first + 32'(i);                         // event: {event, index}
        1: exp = {~16'(i), 16'(i)};                      // self-test block
        default: exp = first + 32'(i * 7);               // download pattern
      endcase
      if (d != exp) bad++;
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ddl_word_t w;
    int bad, t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (60) @(negedge clk);

    // ---- FEE control, status read-out (channel A)
    command(0, CMD_FECTRL, 4'd1, 23'h00_0F0F);
    expect_stw(0, STW_CTSTW, 4'd1, 0, "CTSTW FECTRL", w);
    command(0, CMD_FESTRD, 4'd2, 23'h2A_0001);
    expect_stw(0, STW_FESTW, 4'd2, 0, "FESTW", w);
    chk(w.param == (23'h2A_0001 ^ 23'h00_0F0F), "FESTW parameter");
    expect_stw(0, STW_CTSTW, 4'd2, 0, "CTSTW FESTRD", w);
    n_festrd++;

    // ---- command hit by a line error on the way to the SIU
    fork
      command(0, CMD_FECTRL, 4'd3, 23'h1);
      begin
        wait (dut.u_rorc.g_ch[0].u_ch.ob_valid && dut.u_rorc.g_ch[0].u_ch.ob_ctrl);
        @(posedge clk); repeat (3) @(posedge clk);
        flip_dn[0] = 10'b0000001000; @(posedge clk); flip_dn[0] = 0;
      end
    join
    expect_stw(0, STW_CTSTW, 4'd3, 1, "CTSTW of corrupted command", w);
    if (w.err && w.param[2:0] != 0) n_cmd_err++;

    // ---- line error towards the DIU, reported in the next CTSTW
    @(negedge clk); flip_up[0] = 10'b0100000000; @(negedge clk); flip_up[0] = 0;
    repeat (40) @(negedge clk);
    command(0, CMD_FECTRL, 4'd4, 23'h00_0F0F);
    expect_stw(0, STW_CTSTW, 4'd4, 1, "CTSTW carrying the DIU's error report", w);
    if (w.param[EB_DIU_FRAME:EB_DIU_CODE] != 0) n_diu_err++;

    // ---- time-out
    mute[0] = 1;
    command(0, CMD_FESTRD, 4'd5, 23'h3);
    expect_stw(0, STW_CTSTW, 4'd5, 1, "CTSTW after time-out", w);
    if (w.param[EB_TIMEOUT]) n_timeout++;
    mute[0] = 0;

    // ---- event data transmission on both channels at once
    for (int c = 0; c < 2; c++) command(c, CMD_RDYRX, 4'd6, 23'h0);
    for (int c = 0; c < 2; c++) begin
      expect_stw(c, STW_CTSTW, 4'd6, 0, "CTSTW(SOTR) RDYRX", w);
      chk(w.param[EB_SOTR], "SOTR");
    end
    ev_words = '{150, 90};
    @(negedge clk); trigger = 2'b11; @(negedge clk); trigger = 0;
    // a status read-out while the event is still flowing (full duplex)
    repeat (100) @(negedge clk);
    command(0, CMD_FESTRD, 4'd7, 23'h11);
    expect_stw(0, STW_FESTW, 4'd7, 0, "FESTW during event", w);
    chk(w.param == (23'h11 ^ 23'h00_0F0F), "FESTW parameter during event");
    expect_stw(0, STW_CTSTW, 4'd7, 0, "CTSTW during event", w);
    if (w.code == STW_CTSTW && int'(dut.u_rorc.g_ch[0].u_ch.id_count) < ev_words[0]) n_cmd_in_event++;
    for (int c = 0; c < 2; c++) begin
      read_data(c, ev_words[c], bad, {8'd0, 24'd0}, 0);
      chk(bad == 0, $sformatf("channel %0d event data: %0d bad", c, bad));
      expect_stw(c, STW_DTSTW, 4'd0, 0, "DTSTW", w);
      chk(w.param == 23'(ev_words[c]), $sformatf("event length %0d", w.param));
      if (bad == 0 && w.param == 23'(ev_words[c])) n_event++;
    end
    if (ev_words[0] > MAXW) n_split++;

    // ---- flow control: an event larger than the input buffer, host reads late
    ev_words[0] = IN_DEPTH + 300;
    @(negedge clk); trigger = 2'b01; @(negedge clk); trigger = 0;
    repeat ((IN_DEPTH + 300) * 4 + 2000) @(negedge clk);
    chk(dut.ib_xoff[0], "XOFF raised while the input buffer is full");
    read_data(0, ev_words[0], bad, {8'd1, 24'd0}, 0);
    chk(bad == 0, $sformatf("flow-controlled event: %0d bad words", bad));
    expect_stw(0, STW_DTSTW, 4'd0, 0, "DTSTW of the flow-controlled event", w);
    chk(w.param == 23'(ev_words[0]), "length of the flow-controlled event");
    for (int c = 0; c < 2; c++) begin
      command(c, CMD_EOBTR, 4'd7, 23'h0);
      expect_stw(c, STW_CTSTW, 4'd7, 0, "CTSTW EOBTR", w);
    end

    // ---- block download and read-back (channel B)
    command(1, CMD_STBWR, 4'd8, 23'h0);
    for (int i = 0; i < 100; i++) wr(1, 4, 32'h7700_0000 + i * 7);
    command(1, CMD_EOBTR, 4'd9, 23'h0);
    expect_stw(1, STW_CTSTW, 4'd8, 0, "CTSTW(SOTR) STBWR", w);
    expect_stw(1, STW_CTSTW, 4'd9, 0, "CTSTW EOBTR after download", w);
    bad = 0;
    for (int i = 0; i < 100; i++) if (g_env[1].fee.mem[i] != 32'h7700_0000 + i * 7) bad++;
    chk(g_env[1].fee.dl_n == 100 && bad == 0, "download reached the FEE");
    if (bad == 0) n_download++;
    command(1, CMD_STBRD, 4'd10, 23'h0);
    expect_stw(1, STW_CTSTW, 4'd10, 0, "CTSTW(SOTR) STBRD", w);
    read_data(1, 100, bad, 32'h7700_0000, 2);
    chk(bad == 0, "read-back data");
    expect_stw(1, STW_DTSTW, 4'd0, 0, "DTSTW of read-back", w);
    command(1, CMD_EOBTR, 4'd11, 23'h0);
    expect_stw(1, STW_CTSTW, 4'd11, 0, "CTSTW EOBTR after read-back", w);
    if (bad == 0 && w.code == STW_CTSTW) n_readback++;

    // ---- interface unit status: SIU, then DIU
    command(0, CMD_IUSTRD, 4'd12, 23'h0);
    expect_stw(0, STW_IUSTW, 4'd12, 0, "IUSTW of SIU", w);
    chk(w.param[15:0] != 0, "SIU counted the line error");
    expect_stw(0, STW_CTSTW, 4'd12, 0, "CTSTW IUSTRD SIU", w);
    n_iustw_siu++;
    command(0, CMD_IUSTRD, 4'd13, 23'h40_0000);
    expect_stw(0, STW_IUSTW, 4'd13, 0, "IUSTW of DIU", w);
    chk(w.param[15:0] != 0, "DIU counted the line error");
    expect_stw(0, STW_CTSTW, 4'd13, 0, "CTSTW IUSTRD DIU", w);
    n_iustw_diu++;

    // ---- JTAG through the link
    command(1, CMD_JTAG, 4'd14, {3'd0, 8'h69, 8'h00, 4'd8});
    expect_stw(1, STW_IUSTW, 4'd14, 0, "IUSTW JTAG 1", w);
    expect_stw(1, STW_CTSTW, 4'd14, 0, "CTSTW JTAG 1", w);
    command(1, CMD_JTAG, 4'd15, {3'd0, 8'h00, 8'h00, 4'd8});
    expect_stw(1, STW_IUSTW, 4'd15, 0, "IUSTW JTAG 2", w);
    chk(w.param[7:0] == 8'h69, $sformatf("TDO %h", w.param[7:0]));
    if (w.param[7:0] == 8'h69) n_jtag++;
    expect_stw(1, STW_CTSTW, 4'd15, 0, "CTSTW JTAG 2", w);

    // ---- DDL self-test block
    command(0, CMD_SELFT, 4'd1, 23'd200);
    expect_stw(0, STW_CTSTW, 4'd1, 0, "CTSTW(SOTR) self-test", w);
    read_data(0, 200, bad, 0, 1);
    chk(bad == 0, "self-test block");
    expect_stw(0, STW_DTSTW, 4'd1, 0, "DTSTW self-test", w);
    chk(w.param == 23'd200, "self-test length");
    if (bad == 0) n_selftest++;

    // ---- RORC self-test mode on channel B
    wr(1, 12, 32'h1);
    for (int i = 0; i < 20; i++) wr(1, 4, 32'h3300_0000 + i * 7);
    wr(1, 0, mkword(CMD_FECTRL, 4'd2, 23'h5, 1'b0));
    repeat (20) @(negedge clk);
    read_data(1, 20, bad, 32'h3300_0000, 2);
    chk(bad == 0, "RORC self-test loop-back data");
    status(1, w);
    chk(w == mkword(CMD_FECTRL, 4'd2, 23'h5, 1'b0), "RORC self-test looped command");
    if (bad == 0) n_rorc_test++;
    wr(1, 12, 32'h0);

    // ---- DDL self-test mode on channel A: the SIU's test block comes back
    //      to it and is forwarded to the FEE as a download
    wr(0, 12, 32'h2);
    command(0, CMD_STBWR, 4'd3, 23'h0);
    expect_stw(0, STW_CTSTW, 4'd3, 0, "CTSTW(SOTR) STBWR for DDL self-test", w);
    command(0, CMD_SELFT, 4'd4, 23'd50);
    expect_stw(0, STW_CTSTW, 4'd4, 0, "CTSTW(SOTR) self-test in DDL self-test mode", w);
    expect_stw(0, STW_DTSTW, 4'd4, 0, "DTSTW", w);
    repeat (400) @(negedge clk);
    bad = 0;
    for (int i = 0; i < 50; i++) if (g_env[0].fee.mem[i] != {~16'(i), 16'(i)}) bad++;
    chk(g_env[0].fee.dl_n == 50 && bad == 0, $sformatf("echoed block at the FEE: %0d words, %0d bad", g_env[0].fee.dl_n, bad));
    if (bad == 0) n_ddl_test++;
    wr(0, 12, 32'h0);
    command(0, CMD_EOBTR, 4'd5, 23'h0);
    expect_stw(0, STW_CTSTW, 4'd5, 0, "CTSTW EOBTR", w);

    // ---- interrupt
    wr(0, 12, 32'h4);
    command(0, CMD_FECTRL, 4'd6, 23'h0);
    t0 = 0;
    while (!irq && t0 < 1000) begin @(negedge clk); t0++; end
    if (irq) n_irq++;
    expect_stw(0, STW_CTSTW, 4'd6, 0, "CTSTW with interrupt", w);
    @(negedge clk);
    chk(!irq, "interrupt gone after reading");

    $display("mechanisms: festrd=%0d cmd_in_event=%0d cmd_err=%0d diu_err=%0d timeout=%0d event=%0d split=%0d xoff=%0d",
             n_festrd, n_cmd_in_event, n_cmd_err, n_diu_err, n_timeout, n_event, n_split, n_xoff);
    $display("            download=%0d readback=%0d iustw_siu=%0d iustw_diu=%0d jtag=%0d selftest=%0d rorc_test=%0d ddl_test=%0d irq=%0d",
             n_download, n_readback, n_iustw_siu, n_iustw_diu, n_jtag, n_selftest, n_rorc_test, n_ddl_test, n_irq);
    chk(n_festrd > 0, "status read-out happened");
    chk(n_cmd_err > 0, "command error detection happened");
    chk(n_diu_err > 0, "DIU error reporting happened");
    chk(n_timeout > 0, "time-out happened");
    chk(n_event == 2, "events on both channels");
    chk(n_cmd_in_event > 0, "command served during an event transfer");
    chk(n_split > 0, "frame splitting happened");
    chk(n_xoff > 0, "flow control happened");
    chk(n_download > 0 && n_readback > 0, "download and read-back happened");
    chk(n_iustw_siu > 0 && n_iustw_diu > 0, "interface unit status happened");
    chk(n_jtag > 0, "JTAG happened");
    chk(n_selftest > 0, "DDL self-test block happened");
    chk(n_rorc_test > 0 && n_ddl_test > 0, "card self-test modes happened");
    chk(n_irq > 0, "interrupt happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
