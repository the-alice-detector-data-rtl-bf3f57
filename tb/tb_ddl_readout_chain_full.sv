// tb_ddl_readout_chain_full: the read-out chain at its default (full) sizes,
// i.e. 3M x 32 input buffer, 512k x 32 output buffer and 64-word status FIFO
// per channel, 512-word frames. On both channels the host does one FEE status
// read-out, then one event transaction (RDYRX, a 3000-word event that spans
// several frames, DTSTW with the event length, EOBTR) and checks every word
// and status word. Host access is through the card's host port only.
//
// Buffer sizes are the document's (RORC feature list); the frame length and
// time-out are this design's defaults.
module tb_ddl_readout_chain_full;
  import ddl_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] base_addr = 8'h11;
  logic hb_valid = 0, hb_write = 0, hb_ack, irq;
  logic [31:0] hb_addr = 0, hb_wdata = 0, hb_rdata;
  logic [1:0][9:0] diu_tx_char, diu_rx_char, siu_tx_char, siu_rx_char;
  logic [1:0][31:0] fbd_i, fbd_o;
  logic [1:0] fbten_i, fbctrl_i, fbten_o, fbctrl_o, fbd_oe, fidir, filf;
  logic [1:0] tck, tms, tdi, trst_n, tdo;
  logic [1:0] trigger = 0, mute = 0;
  int ev_words [2] = '{3000, 3000};

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
  task automatic wr(input int c, input int r, input logic [31:0] d);
    hb_valid = 1; hb_write = 1; hb_addr = {base_addr, 24'(c * 256 + r)}; hb_wdata = d;
    @(negedge clk); hb_valid = 0;
  endtask
  task automatic rd(input int c, input int r, output logic [31:0] d);
    hb_valid = 1; hb_write = 0; hb_addr = {base_addr, 24'(c * 256 + r)};
    @(negedge clk); hb_valid = 0;
    d = hb_rdata;
  endtask
  task automatic command(input int c, input logic [3:0] code, input logic [3:0] trid,
                         input logic [22:0] param);
    logic [31:0] s;
    do rd(c, 0, s); while (s[0]);
    wr(c, 0, mkword(code, trid, param, 1'b0));
  endtask
  task automatic expect_stw(input int c, input logic [3:0] code, input logic [3:0] trid,
                            input string m, output ddl_word_t w);
    logic [31:0] s;
    int t;
    t = 0;
    do begin rd(c, 0, s); t++; end while (s[3] && t < 20000);
    rd(c, 8, w);
    chk(!s[3] && w.code == code && w.trid == trid && !w.err,
        $sformatf("channel %0d %s: got %h", c, m, w));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ddl_word_t w;
    logic [31:0] d, s;
    int bad;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (60) @(negedge clk);
    for (int c = 0; c < 2; c++) begin
      command(c, CMD_FESTRD, 4'd1, 23'h12_3456);
      expect_stw(c, STW_FESTW, 4'd1, "FESTW", w);
      chk(w.param == 23'h12_3456, "FESTW parameter");
      expect_stw(c, STW_CTSTW, 4'd1, "CTSTW", w);
      command(c, CMD_RDYRX, 4'd2, 23'h0);
      expect_stw(c, STW_CTSTW, 4'd2, "CTSTW(SOTR)", w);
    end
    @(negedge clk); trigger = 2'b11; @(negedge clk); trigger = 0;
    for (int c = 0; c < 2; c++) begin
      bad = 0;
      for (int i = 0; i < ev_words[c]; i++) begin
        do rd(c, 16, s); while (s == 0);
        rd(c, 4, d);
        if (d != 32'(i)) bad++;
      end
      chk(bad == 0, $sformatf("channel %0d: %0d bad event words", c, bad));
      expect_stw(c, STW_DTSTW, 4'd0, "DTSTW", w);
      chk(w.param == 23'(ev_words[c]), "event length");
      command(c, CMD_EOBTR, 4'd3, 23'h0);
      expect_stw(c, STW_CTSTW, 4'd3, "CTSTW EOBTR", w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
