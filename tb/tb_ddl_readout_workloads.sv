// tb_ddl_readout_workloads: the read-out chain at its default sizes running
// the block sizes the original system was measured with: event blocks of
// 400 bytes, 4 KB, 40 KB, 400 KB and 1 MB (100 to 262,144 words) sent by the
// front end of channel A and read by the host as they arrive, then a 16 KB
// download in the other direction.
// For each block it checks every word and the event length in the DTSTW, and
// measures the clocks from the trigger to the arrival of the DTSTW. The link
// must keep 100 MB/s at a 106.25 MHz character clock, i.e. at most 4.25
// clocks per 32-bit word, for blocks of 4 KB and more (the smallest block is
// dominated by the fixed latency of the transaction). The download must keep
// at least 10 MB/s, at most 42 clocks per word; it is checked against the
// same 4.25 clocks per word, since the link is symmetric.
// The block sizes and rates are the original system's figures; the clock
// rate is the Fibre Channel character rate for a 1.0625 Gbaud line.
module tb_ddl_readout_workloads;
  import ddl_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  longint cycle = 0;
  always @(posedge clk) cycle++;
  int checks = 0, failures = 0;

  logic [7:0] base_addr = 8'h22;
  logic hb_valid = 0, hb_write = 0, hb_ack, irq;
  logic [31:0] hb_addr = 0, hb_wdata = 0, hb_rdata;
  logic [1:0][9:0] diu_tx_char, diu_rx_char, siu_tx_char, siu_rx_char;
  logic [1:0][31:0] fbd_i, fbd_o;
  logic [1:0] fbten_i, fbctrl_i, fbten_o, fbctrl_o, fbd_oe, fidir, filf;
  logic [1:0] tck, tms, tdi, trst_n, tdo;
  logic [1:0] trigger = 0, mute = 0;
  int ev_words [2] = '{100, 100};

  ddl_readout_chain dut (.*);

  for (genvar c = 0; c < 2; c++) begin : g_env
    ddl_fibre_model #(.DELAY(20)) f_dn (.clk, .din(diu_tx_char[c]), .flip(10'd0), .dout(siu_rx_char[c]));
    ddl_fibre_model #(.DELAY(20)) f_up (.clk, .din(siu_tx_char[c]), .flip(10'd0), .dout(diu_rx_char[c]));
    fee_model fee (.clk, .rst_n, .fbd_i(fbd_i[c]), .fbten_i(fbten_i[c]), .fbctrl_i(fbctrl_i[c]),
      .fbd_o(fbd_o[c]), .fbten_o(fbten_o[c]), .fbctrl_o(fbctrl_o[c]), .fbd_oe(fbd_oe[c]),
      .fidir(fidir[c]), .filf(filf[c]), .tck(tck[c]), .tms(tms[c]), .tdi(tdi[c]),
      .trst_n(trst_n[c]), .tdo(tdo[c]), .trigger(trigger[c]), .ev_words(ev_words[c]), .mute(mute[c]));
  end

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic wr(input int r, input logic [31:0] d);
    hb_valid = 1; hb_write = 1; hb_addr = {base_addr, 24'(r)}; hb_wdata = d;
    @(negedge clk); hb_valid = 0;
  endtask
  task automatic rd(input int r, output logic [31:0] d);
    hb_valid = 1; hb_write = 0; hb_addr = {base_addr, 24'(r)};
    @(negedge clk); hb_valid = 0;
    d = hb_rdata;
  endtask
  task automatic command(input logic [3:0] code, input logic [3:0] trid);
    logic [31:0] s;
    do rd(0, s); while (s[0]);
    wr(0, mkword(code, trid, 23'd0, 1'b0));
  endtask
  task automatic expect_stw(input logic [3:0] code, input logic [3:0] trid,
                            input string m, output ddl_word_t w, output longint t);
    logic [31:0] s;
    int n;
    n = 0;
    do begin rd(0, s); n++; end while (s[3] && n < 100000);
    t = cycle;
    rd(8, w);
    chk(!s[3] && w.code == code && w.trid == trid && !w.err, $sformatf("%s: got %h", m, w));
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sizes [5] = '{100, 1024, 10240, 102400, 262144};
  initial begin
    ddl_word_t w;
    logic [31:0] d, s;
    longint t0, t1;
    int bad, got, n;
    real cpw;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (60) @(negedge clk);
    command(CMD_RDYRX, 4'd1);
    expect_stw(STW_CTSTW, 4'd1, "CTSTW(SOTR)", w, t1);
    for (int k = 0; k < 5; k++) begin
      ev_words[0] = sizes[k];
      @(negedge clk); trigger[0] = 1; @(negedge clk); trigger[0] = 0;
      t0 = cycle;
      bad = 0; got = 0;
      // read as the data arrive: fill level, then that many words
      while (got < sizes[k]) begin
        rd(16, s);
        n = int'(s);
        for (int i = 0; i < n; i++) begin
          rd(4, d);
          if (d != {8'(k), 24'(got)}) bad++;
          got++;
        end
      end
      expect_stw(STW_DTSTW, 4'd0, "DTSTW", w, t1);
      cpw = real'(t1 - t0) / sizes[k];
      $display("block %0d bytes: %0d clocks, %.3f clocks/word, %.1f MB/s at 106.25 MHz",
               sizes[k] * 4, t1 - t0, cpw, 4.0 * 106.25 / cpw);
      chk(bad == 0, $sformatf("%0d bad words in block %0d", bad, k));
      chk(w.param == 23'(sizes[k]), $sformatf("event length %0d, expected %0d", w.param, sizes[k]));
      if (sizes[k] >= 1024) chk(cpw <= 4.25, $sformatf("rate below 100 MB/s: %.3f clocks/word", cpw));
    end
    command(CMD_EOBTR, 4'd2);
    expect_stw(STW_CTSTW, 4'd2, "CTSTW EOBTR", w, t1);

    // 16 KB download
    command(CMD_STBWR, 4'd3);
    expect_stw(STW_CTSTW, 4'd3, "CTSTW(SOTR) STBWR", w, t1);
    t0 = cycle;
    for (int i = 0; i < 4096; i++) wr(4, 32'hA500_0000 + i);
    while (g_env[0].fee.dl_n < 4096 && cycle - t0 < 100000) @(negedge clk);
    t1 = cycle;
    cpw = real'(t1 - t0) / 4096;
    $display("download 16384 bytes: %0d clocks, %.3f clocks/word", t1 - t0, cpw);
    chk(g_env[0].fee.dl_n == 4096, "download word count");
    bad = 0;
    for (int i = 3072; i < 4096; i++) if (g_env[0].fee.mem[i % 1024] != 32'hA500_0000 + i) bad++;
    chk(bad == 0, $sformatf("%0d bad download words", bad));
    chk(cpw <= 4.25, "download rate");
    command(CMD_EOBTR, 4'd4);
    expect_stw(STW_CTSTW, 4'd4, "CTSTW EOBTR", w, t1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
