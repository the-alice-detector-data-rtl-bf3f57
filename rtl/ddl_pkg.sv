// ddl_pkg: types and constants shared by the detector data link (DDL) blocks.
//
// Every piece of information on the link is a 32-bit word. A word is either a
// command (read-out receiver card -> front-end), a status word (front-end or
// interface unit -> read-out receiver card) or a data word. Commands and status
// words share one layout, ddl_word_t: a 4-bit code, a 4-bit transaction id, a
// 23-bit parameter field and an error flag. The transaction names (FECTRL,
// FESTRD, RDYRX, EOBTR, FESTW, CTSTW, DTSTW, SOTR, EOB) are the DDL's own; the
// numeric codes, the field layout and the error-flag bit positions are choices
// of this implementation.
//
// On the fibre, words are carried in frames of 8B/10B characters: a start-of-
// frame control character naming the frame type, the words (four characters
// each, least significant byte first) and an end-of-frame character. K28.5 is
// the idle fill; K28.4 and K28.6 are flow-control ordered sets (stop / resume
// sending data) that may be inserted between any two characters.
package ddl_pkg;

  // ---- 8B/10B control characters (byte value with K=1) ----
  localparam logic [7:0] K_IDLE   = 8'hBC;  // K28.5, comma, idle fill
  localparam logic [7:0] K_SOFCMD = 8'h3C;  // K28.1, start of command frame
  localparam logic [7:0] K_SOFSTW = 8'h5C;  // K28.2, start of status frame
  localparam logic [7:0] K_SOFDAT = 8'h7C;  // K28.3, start of data frame
  localparam logic [7:0] K_XOFF   = 8'h9C;  // K28.4, far end: stop sending data
  localparam logic [7:0] K_XON    = 8'hDC;  // K28.6, far end: resume sending data
  localparam logic [7:0] K_EOF    = 8'hFD;  // K29.7, end of frame

  // ---- word kinds: what a word is, on the link and on the unit buses ----
  typedef enum logic [1:0] {
    KIND_DATA = 2'd0,
    KIND_CMD  = 2'd1,
    KIND_STW  = 2'd2
  } kind_e;

  // ---- command codes (read-out receiver card -> interface units / front-end) ----
  typedef enum logic [3:0] {
    CMD_FECTRL = 4'd1,   // front-end control
    CMD_FESTRD = 4'd2,   // front-end status read-out (parameter = address)
    CMD_RDYRX  = 4'd3,   // ready to receive: opens event data transmission
    CMD_EOBTR  = 4'd4,   // end of block transfer: closes a block transfer
    CMD_STBWR  = 4'd5,   // start of data block downloading (to the front-end)
    CMD_STBRD  = 4'd6,   // start of data block read-back (from the front-end)
    CMD_IUCTRL = 4'd7,   // interface unit control
    CMD_IUSTRD = 4'd8,   // interface unit status read-out
    CMD_JTAG   = 4'd9,   // SIU JTAG port: shift TMS/TDI bits, return TDO bits
    CMD_SELFT  = 4'd10   // self-test: SIU sends a generated test block
  } cmd_e;

  // ---- status word codes ----
  typedef enum logic [3:0] {
    STW_FESTW  = 4'd1,   // front-end status word
    STW_FEEOB  = 4'd2,   // front-end status word marking end of a data block (EOB)
    STW_CTSTW  = 4'd3,   // command transmission status word
    STW_DTSTW  = 4'd4,   // data transmission status word
    STW_IUSTW  = 4'd5    // interface unit status word
  } stw_e;

  typedef struct packed {
    logic        err;     // [31]    an error was detected
    logic [22:0] param;   // [30:8]  address, length, error flags, ...
    logic [3:0]  trid;    // [7:4]   transaction id, echoed in the replies
    logic [3:0]  code;    // [3:0]   cmd_e or stw_e
  } ddl_word_t;

  // Parameter bits of a CTSTW / DTSTW.
  localparam int unsigned EB_SIU_CODE  = 0;  // SIU saw an 8B/10B code violation
  localparam int unsigned EB_SIU_DISP  = 1;  // SIU saw a running-disparity error
  localparam int unsigned EB_SIU_FRAME = 2;  // SIU saw a framing error
  localparam int unsigned EB_UNKNOWN   = 3;  // unknown command
  localparam int unsigned EB_TIMEOUT   = 4;  // front-end did not answer
  localparam int unsigned EB_BUSY      = 5;  // command arrived during another transaction
  localparam int unsigned EB_DIU_CODE  = 8;  // DIU saw an 8B/10B code violation
  localparam int unsigned EB_DIU_DISP  = 9;  // DIU saw a running-disparity error
  localparam int unsigned EB_DIU_FRAME = 10; // DIU saw a framing error
  localparam int unsigned EB_SOTR      = 12; // start of transaction flag
  // An IU command addresses the DIU when this parameter bit is set, else the SIU.
  localparam int unsigned PB_TO_DIU    = 22;

  // Error flags of one received word: {frame, disparity, code}.
  typedef struct packed {
    logic frame;
    logic disp;
    logic code;
  } rxerr_t;

  // Working modes of a read-out receiver card channel.
  typedef enum logic [1:0] {
    MODE_NORMAL    = 2'd0,   // commands and data to the DIU, words from the DIU
    MODE_RORC_TEST = 2'd1,   // outgoing stream looped back inside the card
    MODE_DDL_TEST  = 2'd2    // received data copied to the output buffer and sent back
  } mode_e;

  function automatic logic [31:0] mkword(logic [3:0] code, logic [3:0] trid,
                                         logic [22:0] param, logic err);
    ddl_word_t w;
    w.err = err; w.param = param; w.trid = trid; w.code = code;
    return w;
  endfunction

endpackage
