// siu: source interface unit of the detector data link, the end of the link
// that sits on the front-end electronics (FEE).
//
// It connects the FEE's 32-bit bidirectional front-end bus and JTAG port to
// the fibre (one 8B/10B character per clock each way, through ddl_endec) and
// executes the DDL transactions at the front-end side:
//  * A command from the read-out receiver card (RORC) that arrived with a line
//    error is not passed on; the SIU answers with a command transmission status
//    word (CTSTW) carrying the error flags. Otherwise front-end commands
//    (FECTRL, FESTRD, RDYRX, EOBTR, STBWR, STBRD) are forwarded to the FEE, and
//    the SIU closes each with a CTSTW: at once for control commands, after the
//    FEE's status word (FESTW) for a status read-out (or with a time-out error
//    after FEE_TIMEOUT clocks), and with the start-of-transaction flag (SOTR)
//    for the commands that open a block transfer.
//  * Words the FEE sends are queued and sent: data words as data frames,
//    status words as status frames. The FEE's end-of-block status word
//    (FESTW with EOB) becomes the data transmission status word (DTSTW).
//  * Interface unit commands: IUCTRL (bit 0 clears the error counter, bit 1
//    holds the JTAG TRST line), IUSTRD (returns an interface unit status word,
//    IUSTW, with the error counter), JTAG (shifts up to 8 TMS/TDI bits and
//    returns the TDO bits in an IUSTW) and the self-test SELFT (sends a
//    generated block of param[15:0] words, word i = {~i, i}, and a DTSTW).
//  * Data words of a download (after STBWR, until EOBTR) go to the FEE.
// The next command is expected only after the CTSTW of the previous one; a
// command arriving earlier is dropped and flagged in the next CTSTW.
//
// Front-end bus: fidir=0 lets the FEE drive fbd_i/fbten_i/fbctrl_i (ctrl=1 for
// a status word), one word per clock. filf (link full) tells the FEE to stop
// sending; the FEE must obey it from the clock after it sees it, and the SIU
// accepts the word that may still be on the bus. filf is raised when the
// transmit queue nears full (the fibre carries one word per 4 clocks, and
// stops carrying data when the RORC sends XOFF) and before the SIU takes the
// bus: two clocks later it sets fidir=1 and drives fbd_o/fbten_o/fbctrl_o
// (fbd_oe=1), holding the bus for the whole of a download.
// The transactions and flags follow the DDL; the bus turn-around, the word
// formats, queue sizes and time-out are this design's choices.
module siu
  import ddl_pkg::*;
#(
  parameter int unsigned MAX_FRAME_WORDS = 512,
  parameter int unsigned TXQ_DEPTH       = 32,
  parameter int unsigned FEE_TIMEOUT     = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  // fibre side (serialiser/deserialiser characters)
  output logic [9:0]  tx_char,
  input  logic [9:0]  rx_char,
  // front-end bus
  input  logic [31:0] fbd_i,
  input  logic        fbten_i,
  input  logic        fbctrl_i,
  output logic [31:0] fbd_o,
  output logic        fbten_o,
  output logic        fbctrl_o,
  output logic        fbd_oe,
  output logic        fidir,
  output logic        filf,
  // JTAG port to the front-end TAP
  output logic        tck,
  output logic        tms,
  output logic        tdi,
  output logic        trst_n,
  input  logic        tdo
);

  // ---------------------------------------------------------------- link
  logic        tx_valid, tx_ready, rx_valid, far_paused;
  kind_e       tx_kind, rx_kind;
  logic [31:0] tx_word, rx_word;
  rxerr_t      rx_err, err_evt;

  ddl_endec #(.MAX_FRAME_WORDS(MAX_FRAME_WORDS)) u_endec (
    .clk, .rst_n, .tx_valid, .tx_kind, .tx_word, .tx_ready, .pause_far(1'b0), .tx_char,
    .rx_char, .rx_valid, .rx_kind, .rx_word, .rx_err, .err_evt, .far_paused);

  // ------------------------------------------------- transmit queue (to link)
  logic        txq_wr, txq_empty, txq_full, txq_af;
  logic [33:0] txq_wdata, txq_rdata;
  logic [$clog2(TXQ_DEPTH+1)-1:0] txq_count;

  ddl_fifo #(.W(34), .DEPTH(TXQ_DEPTH), .AF_LEVEL(TXQ_DEPTH - 6)) u_txq (
    .clk, .rst_n, .clear(1'b0), .wr_en(txq_wr), .wr_data(txq_wdata), .rd_en(tx_ready),
    .rd_data(txq_rdata), .empty(txq_empty), .full(txq_full), .almost_full(txq_af),
    .count(txq_count));

  assign tx_valid = !txq_empty;
  assign tx_kind  = kind_e'(txq_rdata[33:32]);
  assign tx_word  = txq_rdata[31:0];

  // ------------------------------------------------- queue to the front-end
  logic        feq_wr, feq_rd, feq_empty, feq_full, feq_af;
  logic [32:0] feq_wdata, feq_rdata;
  logic [3:0]  feq_count;

  ddl_fifo #(.W(33), .DEPTH(8), .AF_LEVEL(6)) u_feq (
    .clk, .rst_n, .clear(1'b0), .wr_en(feq_wr), .wr_data(feq_wdata), .rd_en(feq_rd),
    .rd_data(feq_rdata), .empty(feq_empty), .full(feq_full), .almost_full(feq_af),
    .count(feq_count));

  // ------------------------------------------------------------ FEE words in
  ddl_word_t fee_w;
  logic      fee_push, fee_is_festw;
  assign fee_w        = fbd_i;
  assign fee_push     = fbten_i && !fidir;
  assign fee_is_festw = fee_push && fbctrl_i && fee_w.code == STW_FESTW;

  // ------------------------------------------------------------ controller
  typedef enum logic [2:0] {S_IDLE, S_WAITFE, S_JTAG, S_IUSTW, S_CTSTW, S_SELFT, S_DTSTW} st_e;
  st_e         st;
  ddl_word_t   cmd;
  logic [22:0] flags;          // CTSTW parameter being built
  logic        sotr, selft_pend, dl_active, busy_flag, trst_hold;
  rxerr_t      sticky;         // line errors since the last CTSTW
  logic [15:0] err_count;
  logic [15:0] st_n, st_i;     // self-test length and index
  logic [$clog2(FEE_TIMEOUT+1)-1:0] timer;
  logic [22:0] iustw_param;
  logic        ctl_push;
  logic [33:0] ctl_word;
  logic        can_push;
  logic        fwd_cmd;
  logic        jtag_start, jtag_busy, jtag_done;
  logic [7:0]  tdo_bits;

  assign can_push = !fee_push && !txq_full;

  // what the controller pushes this clock
  always_comb begin
    ctl_push = 1'b0;
    ctl_word = '0;
    unique case (st)
      S_CTSTW: begin
        ctl_push = can_push;
        ctl_word = {KIND_STW, mkword(STW_CTSTW, cmd.trid,
                     flags | 23'(sticky) | (23'(sotr) << EB_SOTR) | (23'(busy_flag) << EB_BUSY),
                     (flags[5:0] != '0) || (sticky != '0) || busy_flag)};
      end
      S_IUSTW: begin
        ctl_push = can_push;
        ctl_word = {KIND_STW, mkword(STW_IUSTW, cmd.trid, iustw_param, 1'b0)};
      end
      S_SELFT: begin
        ctl_push = can_push && !txq_af;
        ctl_word = {KIND_DATA, ~st_i, st_i};
      end
      S_DTSTW: begin
        ctl_push = can_push;
        ctl_word = {KIND_STW, mkword(STW_DTSTW, cmd.trid, 23'(st_n), 1'b0)};
      end
      default: ;
    endcase
  end

  always_comb begin
    txq_wr    = fee_push || ctl_push;
    txq_wdata = ctl_word;
    if (fee_push) begin
      if (fbctrl_i)
        txq_wdata = {KIND_STW, (fee_w.code == STW_FEEOB) ?
                               mkword(STW_DTSTW, fee_w.trid, fee_w.param, fee_w.err) : fbd_i};
      else
        txq_wdata = {KIND_DATA, fbd_i};
    end
  end

  // commands from the link
  ddl_word_t rxw;
  logic      rx_cmd, rx_ok, is_fee_cmd;
  assign rxw        = rx_word;
  assign rx_cmd     = rx_valid && rx_kind == KIND_CMD;
  assign rx_ok      = rx_err == '0;
  assign is_fee_cmd = rxw.code inside {CMD_FECTRL, CMD_FESTRD, CMD_RDYRX, CMD_EOBTR,
                                       CMD_STBWR, CMD_STBRD};
  assign fwd_cmd    = rx_cmd && st == S_IDLE && rx_ok && is_fee_cmd;
  assign feq_wr     = fwd_cmd || (rx_valid && rx_kind == KIND_DATA && dl_active);
  assign feq_wdata  = {rx_kind == KIND_CMD, rx_word};
  assign jtag_start = rx_cmd && st == S_IDLE && rx_ok && rxw.code == CMD_JTAG;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cmd <= '0; flags <= '0; sotr <= 1'b0; selft_pend <= 1'b0;
      dl_active <= 1'b0; busy_flag <= 1'b0; trst_hold <= 1'b0; sticky <= '0;
      err_count <= '0; st_n <= '0; st_i <= '0; timer <= '0; iustw_param <= '0;
    end else begin
      // line errors
      if (err_evt != '0) begin
        sticky <= sticky | err_evt;
        if (err_count != '1) err_count <= err_count + 16'd1;
      end
      if (rx_valid && rx_kind == KIND_STW) sticky.frame <= 1'b1;   // no status words come this way
      if (rx_cmd && st != S_IDLE) busy_flag <= 1'b1;

      unique case (st)
        S_IDLE: if (rx_cmd) begin
          cmd   <= rx_word;
          flags <= '0;
          sotr  <= 1'b0;
          if (!rx_ok) begin
            flags <= 23'(rx_err);
            st    <= S_CTSTW;
          end else begin
            unique case (rxw.code)
              CMD_FECTRL: st <= S_CTSTW;
              CMD_EOBTR:  begin dl_active <= 1'b0; st <= S_CTSTW; end
              CMD_FESTRD: begin timer <= '0; st <= S_WAITFE; end
              CMD_RDYRX, CMD_STBRD: begin sotr <= 1'b1; st <= S_CTSTW; end
              CMD_STBWR:  begin sotr <= 1'b1; dl_active <= 1'b1; st <= S_CTSTW; end
              CMD_IUCTRL: begin
                if (rxw.param[0]) err_count <= '0;
                trst_hold <= rxw.param[1];
                st <= S_CTSTW;
              end
              CMD_IUSTRD: begin
                iustw_param <= {4'd0, trst_hold, far_paused, dl_active, err_count};
                st <= S_IUSTW;
              end
              CMD_JTAG:   st <= S_JTAG;
              CMD_SELFT:  begin
                sotr <= 1'b1; selft_pend <= 1'b1; st_n <= rxw.param[15:0]; st_i <= '0;
                st <= S_CTSTW;
              end
              default: begin flags[EB_UNKNOWN] <= 1'b1; st <= S_CTSTW; end
            endcase
          end
        end
        S_WAITFE: begin
          timer <= timer + 1'b1;
          if (fee_is_festw) st <= S_CTSTW;
          else if (timer == ($bits(timer))'(FEE_TIMEOUT)) begin
            flags[EB_TIMEOUT] <= 1'b1;
            st <= S_CTSTW;
          end
        end
        S_JTAG: if (jtag_done) begin
          iustw_param <= {15'd0, tdo_bits};
          st <= S_IUSTW;
        end
        S_IUSTW: if (ctl_push) st <= S_CTSTW;
        S_CTSTW: if (ctl_push) begin
          sticky    <= err_evt;
          busy_flag <= 1'b0;
          if (selft_pend) begin
            selft_pend <= 1'b0;
            st <= (st_n == '0) ? S_DTSTW : S_SELFT;
          end else begin
            st <= S_IDLE;
          end
        end
        S_SELFT: if (ctl_push) begin
          st_i <= st_i + 16'd1;
          if (st_i + 16'd1 == st_n) st <= S_DTSTW;
        end
        S_DTSTW: if (ctl_push) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  siu_jtag u_jtag (
    .clk, .rst_n, .start(jtag_start), .nbits(rxw.param[3:0]), .tms_bits(rxw.param[11:4]),
    .tdi_bits(rxw.param[19:12]), .trst_req(trst_hold), .busy(jtag_busy), .done(jtag_done),
    .tdo_bits, .tck, .tms, .tdi, .trst_n, .tdo);

  // ------------------------------------------------------------ bus control
  typedef enum logic [1:0] {B_FEE, B_REQ, B_SIU, B_REL} bst_e;
  bst_e       bst;
  logic [1:0] bcnt;

  assign feq_rd = (bst == B_SIU) && !feq_empty;
  assign filf   = txq_af || (bst != B_FEE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bst <= B_FEE; bcnt <= '0; fidir <= 1'b0; fbd_oe <= 1'b0;
      fbd_o <= '0; fbten_o <= 1'b0; fbctrl_o <= 1'b0;
    end else begin
      fbten_o <= 1'b0;
      unique case (bst)
        B_FEE: if (!feq_empty || dl_active) begin bst <= B_REQ; bcnt <= '0; end
        B_REQ: begin
          bcnt <= bcnt + 2'd1;
          if (bcnt == 2'd1) begin bst <= B_SIU; fidir <= 1'b1; fbd_oe <= 1'b1; end
        end
        B_SIU: begin
          if (!feq_empty) begin
            fbd_o    <= feq_rdata[31:0];
            fbctrl_o <= feq_rdata[32];
            fbten_o  <= 1'b1;
          end else if (!dl_active) begin
            bst <= B_REL;
          end
        end
        B_REL: begin fidir <= 1'b0; fbd_oe <= 1'b0; bst <= B_FEE; end
        default: bst <= B_FEE;
      endcase
    end
  end

  // The FEE must not drive the bus while the SIU owns it.
  a_bus_owner: assert property (@(posedge clk) disable iff (!rst_n) fidir |-> !fbten_i)
    else $error("FEE drove the front-end bus while the SIU owned it");

endmodule
