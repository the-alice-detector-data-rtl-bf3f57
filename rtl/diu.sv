// diu: destination interface unit of the detector data link, the end of the
// link that plugs into the read-out receiver card (RORC).
//
// RORC side: two 32-bit unidirectional buses. On the output bus the RORC
// offers words (ob_valid/ob_ready, ob_ctrl=1 for a command, 0 for a data word
// of a download). On the input bus the DIU delivers words (ib_valid, ib_ctrl=1
// for a status word, 0 for a data word); the RORC takes every word offered and
// raises ib_xoff when its input buffer is nearly full, which the DIU passes to
// the SIU as XOFF so that the SIU (and behind it the FEE) stops sending data.
//
// Protocol work done here (the upper three DDL layers, through ddl_endec):
//  * Commands and download data are framed and sent to the SIU. Interface unit
//    commands addressed to the DIU (parameter bit 22 set) are answered here:
//    IUCTRL (bit 0 clears the error counter) with a CTSTW, IUSTRD with an IUSTW
//    holding the error counter and link state, then a CTSTW.
//  * Error reporting: errors the DIU sees on the incoming fibre are collected
//    and added to the next command or data transmission status word (CTSTW,
//    DTSTW) in parameter bits 8-10, setting its error flag.
//  * Event length: the data words received since the last DTSTW are counted and
//    the count replaces the DTSTW parameter.
// Received words reach the input bus two clocks after their last character is
// decoded. Which work is done in the DIU (error reporting, event length)
// follows the DDL transactions; the bus signals and formats are this design's.
module diu
  import ddl_pkg::*;
#(
  parameter int unsigned MAX_FRAME_WORDS = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  // fibre side
  output logic [9:0]  tx_char,
  input  logic [9:0]  rx_char,
  // RORC output bus (RORC -> DIU)
  input  logic        ob_valid,
  input  logic        ob_ctrl,
  input  logic [31:0] ob_d,
  output logic        ob_ready,
  // RORC input bus (DIU -> RORC)
  output logic        ib_valid,
  output logic        ib_ctrl,
  output logic [31:0] ib_d,
  input  logic        ib_xoff
);

  logic        tx_valid, tx_ready, rx_valid, far_paused;
  kind_e       tx_kind, rx_kind;
  logic [31:0] tx_word, rx_word;
  rxerr_t      rx_err, err_evt;

  ddl_endec #(.MAX_FRAME_WORDS(MAX_FRAME_WORDS)) u_endec (
    .clk, .rst_n, .tx_valid, .tx_kind, .tx_word, .tx_ready, .pause_far(ib_xoff), .tx_char,
    .rx_char, .rx_valid, .rx_kind, .rx_word, .rx_err, .err_evt, .far_paused);

  // ------------------------------------------------ RORC -> link, local commands
  ddl_word_t obw;
  logic      local_cmd;
  assign obw       = ob_d;
  assign local_cmd = ob_ctrl && obw.param[PB_TO_DIU] &&
                     (obw.code == CMD_IUCTRL || obw.code == CMD_IUSTRD);

  typedef enum logic [1:0] {L_IDLE, L_IUSTW, L_CTSTW} lst_e;
  lst_e        lst;
  logic [3:0]  ltrid;
  logic [15:0] err_count;
  logic        lpush;
  logic [31:0] lword;

  assign tx_valid = ob_valid && !local_cmd;
  assign tx_kind  = ob_ctrl ? KIND_CMD : KIND_DATA;
  assign tx_word  = ob_d;
  assign ob_ready = local_cmd ? (lst == L_IDLE) : tx_ready;

  // ------------------------------------------------ link -> RORC
  ddl_word_t rxw;
  rxerr_t    sticky;
  logic      data_err;
  logic [22:0] evlen;
  assign rxw = rx_word;

  // a local reply goes out in a clock with no received word
  assign lpush = (lst != L_IDLE) && !rx_valid;
  always_comb begin
    lword = '0;
    if (lst == L_IUSTW) lword = mkword(STW_IUSTW, ltrid, {5'd0, ib_xoff, far_paused, err_count}, 1'b0);
    else                lword = mkword(STW_CTSTW, ltrid, '0, 1'b0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lst <= L_IDLE; ltrid <= '0; err_count <= '0; sticky <= '0; data_err <= 1'b0; evlen <= '0;
      ib_valid <= 1'b0; ib_ctrl <= 1'b0; ib_d <= '0;
    end else begin
      ib_valid <= 1'b0;
      if (err_evt != '0) begin
        sticky <= sticky | err_evt;
        if (err_count != '1) err_count <= err_count + 16'd1;
      end
      // local interface unit commands
      unique case (lst)
        L_IDLE: if (ob_valid && local_cmd) begin
          ltrid <= obw.trid;
          if (obw.code == CMD_IUCTRL) begin
            if (obw.param[0]) err_count <= '0;
            lst <= L_CTSTW;
          end else begin
            lst <= L_IUSTW;
          end
        end
        L_IUSTW: if (lpush) lst <= L_CTSTW;
        L_CTSTW: if (lpush) lst <= L_IDLE;
        default: lst <= L_IDLE;
      endcase
      if (lpush) begin
        ib_valid <= 1'b1; ib_ctrl <= 1'b1; ib_d <= lword;
      end
      // words from the SIU
      if (rx_valid) begin
        ib_valid <= 1'b1;
        ib_d     <= rx_word;
        ib_ctrl  <= rx_kind != KIND_DATA;
        if (rx_kind == KIND_DATA) begin
          evlen <= evlen + 23'd1;
          if (rx_err != '0) data_err <= 1'b1;
        end else if (rx_kind == KIND_STW &&
                     (rxw.code == STW_CTSTW || rxw.code == STW_DTSTW)) begin
          ddl_word_t o;
          rxerr_t    e;
          o = rx_word;
          e = sticky | err_evt | rx_err;
          if (rxw.code == STW_DTSTW) begin
            o.param = evlen;
            o.err   = o.err || data_err;
            evlen   <= '0;
            data_err <= 1'b0;
          end
          o.param[EB_DIU_FRAME:EB_DIU_CODE] = o.param[EB_DIU_FRAME:EB_DIU_CODE] | e;
          o.err   = o.err || (e != '0);
          ib_d   <= o;
          sticky <= '0;
        end else if (rx_kind == KIND_CMD) begin
          // the SIU never sends commands: report it as a framing error
          ib_valid <= 1'b0;
          sticky.frame <= 1'b1;
        end
      end
    end
  end

endmodule
