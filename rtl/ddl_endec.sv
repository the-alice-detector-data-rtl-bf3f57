// ddl_endec: signalling/framing and coding layers of one DDL interface unit
// (the "ENDEC" of the protocol engine).
//
// Transmit side: accepts a stream of 32-bit words, each tagged as command,
// status or data (tx_valid/tx_ready handshake), wraps them in frames and sends
// one 8B/10B character per clock on tx_char. A frame is a start-of-frame
// character naming its type, the words (four characters each, least
// significant byte first) and an end-of-frame character. A command or status
// frame carries exactly one word; a data frame carries up to MAX_FRAME_WORDS
// consecutive data words, so a data block becomes a train of data frames and a
// status word can follow any frame. Between words of an open frame and between
// frames the idle character is sent. A full data frame runs at 4 clocks per
// word. The pause_far input is the local receive buffer's "almost full": each
// change of it is sent at once as the XOFF/XON character, ahead of any other
// character. While the far end has sent XOFF, data words are not taken (command
// and status words still are, when they are next in the stream).
//
// Receive side: decodes rx_char, strips idles and flow-control characters,
// reassembles words and delivers them on rx_valid/rx_word/rx_kind (no
// back-pressure: the consumer must take one word per 4 clocks). Data words are
// delivered as they complete; a command or status word is delivered at its
// end-of-frame, so that a frame of the wrong length is flagged on the word
// itself. rx_err carries the errors seen in the word's characters; err_evt
// pulses for every error, also outside words (code violation, disparity,
// framing). Until seven error-free characters have been received after reset
// the receiver only waits for them (the link is not up yet): it reports no
// errors and delivers nothing.
//
// The use of Fibre Channel style ordered sets and 8B/10B follows the DDL's
// signalling and coding layers; the particular control characters, frame
// length and the XOFF/XON flow control are this design's choices.
module ddl_endec
  import ddl_pkg::*;
#(
  parameter int unsigned MAX_FRAME_WORDS = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  // words to send
  input  logic        tx_valid,
  input  kind_e       tx_kind,
  input  logic [31:0] tx_word,
  output logic        tx_ready,
  input  logic        pause_far,     // ask the far end to stop sending data
  output logic [9:0]  tx_char,       // to the serialiser
  // received words
  input  logic [9:0]  rx_char,       // from the deserialiser, one per clock
  output logic        rx_valid,
  output kind_e       rx_kind,
  output logic [31:0] rx_word,
  output rxerr_t      rx_err,
  output rxerr_t      err_evt,       // an error was seen this clock
  output logic        far_paused     // the far end sent XOFF
);

  // ------------------------------------------------------------ transmit
  typedef enum logic [1:0] {T_IDLE, T_OPEN, T_BYTES} tst_e;
  tst_e        tst;
  kind_e       okind;
  logic [$clog2(MAX_FRAME_WORDS+1)-1:0] tcnt;
  logic [1:0]  tbyte;
  logic [31:0] tbuf;
  logic        fc_state;              // pause state last announced
  logic        enc_k;
  logic [7:0]  enc_d;
  logic        stall, fc_now, close_now, take;

  always_comb begin
    fc_now    = (pause_far != fc_state);
    stall     = far_paused && tx_kind == KIND_DATA;
    close_now = (okind != KIND_DATA && tcnt == 1) ||
                (tx_valid && (tx_kind != okind || tcnt == $bits(tcnt)'(MAX_FRAME_WORDS)));
    take      = (tst == T_OPEN) && !fc_now && !close_now && tx_valid && !stall;
    tx_ready  = take;
    enc_k = 1'b1;
    enc_d = K_IDLE;
    if (fc_now) begin
      enc_d = pause_far ? K_XOFF : K_XON;
    end else begin
      unique case (tst)
        T_IDLE: if (tx_valid && !stall)
                  enc_d = (tx_kind == KIND_CMD) ? K_SOFCMD :
                          (tx_kind == KIND_STW) ? K_SOFSTW : K_SOFDAT;
        T_OPEN: if (close_now) enc_d = K_EOF;
                else if (take) begin enc_k = 1'b0; enc_d = tx_word[7:0]; end
        T_BYTES: begin enc_k = 1'b0; enc_d = tbuf[8*tbyte +: 8]; end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tst <= T_IDLE; okind <= KIND_DATA; tcnt <= '0; tbyte <= '0; tbuf <= '0;
      fc_state <= 1'b0;
    end else if (fc_now) begin
      fc_state <= pause_far;
    end else begin
      unique case (tst)
        T_IDLE: if (tx_valid && !stall) begin
          tst <= T_OPEN; okind <= tx_kind; tcnt <= '0;
        end
        T_OPEN: if (close_now) tst <= T_IDLE;
                else if (take) begin
                  tbuf <= tx_word; tbyte <= 2'd1; tcnt <= tcnt + 1'b1; tst <= T_BYTES;
                end
        T_BYTES: begin
          tbyte <= tbyte + 2'd1;
          if (tbyte == 2'd3) tst <= T_OPEN;
        end
        default: tst <= T_IDLE;
      endcase
    end
  end

  logic enc_kerr, enc_rd;
  enc8b10b u_enc (.clk, .rst_n, .en(1'b1), .k(enc_k), .din(enc_d), .dout(tx_char),
                  .kerr(enc_kerr), .rd(enc_rd));

  // ------------------------------------------------------------ receive
  logic [7:0] dd;
  logic       dk, dcerr, dderr, dval;
  dec8b10b u_dec (.clk, .rst_n, .en(1'b1), .din(rx_char), .dout(dd), .k(dk),
                  .code_err(dcerr), .disp_err(dderr), .valid(dval));

  logic        inframe;
  kind_e       fkind;
  logic [1:0]  rbyte;
  logic [31:0] racc;
  rxerr_t      rwerr;                 // errors in the word being assembled
  logic [1:0]  rcnt;                  // words in a command/status frame (saturating)
  logic [31:0] rhold;
  rxerr_t      rholderr;
  logic [2:0]  sync_cnt;              // error-free characters since reset, saturating
  logic        link_up;

  // Errors are reported only once the link is up: after SYNC_CHARS error-free
  // characters have been received since reset (power-up and reset transients).
  assign link_up = (sync_cnt == 3'd7);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inframe <= 1'b0; fkind <= KIND_DATA; rbyte <= '0; racc <= '0; rwerr <= '0;
      rcnt <= '0; rhold <= '0; rholderr <= '0;
      rx_valid <= 1'b0; rx_kind <= KIND_DATA; rx_word <= '0; rx_err <= '0;
      err_evt <= '0; far_paused <= 1'b0; sync_cnt <= '0;
    end else begin
      rx_valid <= 1'b0;
      err_evt  <= '0;
      if (dval && !link_up) begin
        sync_cnt <= (dcerr || dderr) ? 3'd0 : sync_cnt + 3'd1;
      end else if (dval) begin
        err_evt.code <= dcerr;
        err_evt.disp <= dderr;
        if (dk && !dcerr) begin
          unique case (dd)
            K_IDLE: ;
            K_XOFF: far_paused <= 1'b1;
            K_XON:  far_paused <= 1'b0;
            K_SOFCMD, K_SOFSTW, K_SOFDAT: begin
              if (inframe) err_evt.frame <= 1'b1;    // previous frame not closed
              inframe <= 1'b1;
              fkind   <= (dd == K_SOFCMD) ? KIND_CMD : (dd == K_SOFSTW) ? KIND_STW : KIND_DATA;
              rbyte   <= '0; rcnt <= '0; rwerr <= '0;
            end
            K_EOF: begin
              inframe <= 1'b0;
              if (!inframe || rbyte != 2'd0 || (fkind != KIND_DATA && rcnt != 2'd1))
                err_evt.frame <= 1'b1;
              if (inframe && fkind != KIND_DATA && rcnt != 2'd0) begin
                rx_valid <= 1'b1;
                rx_kind  <= fkind;
                rx_word  <= rhold;
                rx_err   <= rholderr;
                rx_err.frame <= rholderr.frame || rbyte != 2'd0 || rcnt != 2'd1;
              end
            end
            default: begin
              err_evt.frame <= 1'b1;
              if (inframe) rwerr.frame <= 1'b1;
            end
          endcase
        end else if (!inframe) begin
          if (!dcerr) err_evt.frame <= 1'b1;          // data byte outside a frame
        end else begin
          // a data byte, or a corrupted character standing in for one
          racc[8*rbyte +: 8] <= dd;
          rbyte <= rbyte + 2'd1;
          if (rbyte == 2'd3) begin
            rwerr <= '0;
            if (fkind == KIND_DATA) begin
              rx_valid <= 1'b1;
              rx_kind  <= KIND_DATA;
              rx_word  <= {dd, racc[23:0]};
              rx_err   <= '{frame: rwerr.frame, disp: rwerr.disp || dderr,
                            code: rwerr.code || dcerr};
            end else begin
              if (rcnt != 2'd3) rcnt <= rcnt + 2'd1;
              rhold    <= {dd, racc[23:0]};
              rholderr <= '{frame: rwerr.frame || rcnt != 2'd0, disp: rwerr.disp || dderr,
                            code: rwerr.code || dcerr};
            end
          end else begin
            rwerr.code <= rwerr.code || dcerr;
            rwerr.disp <= rwerr.disp || dderr;
          end
        end
      end
    end
  end

endmodule
