// fee_model: behavioural model of the front-end electronics (FEE) as seen by
// the source interface unit over the front-end bus and the JTAG lines.
// It is test equipment, not part of the design.
//  * Commands: FECTRL stores its parameter in a control register; FESTRD
//    answers with a FESTW whose parameter is address XOR control register
//    (no answer while 'mute' is set); RDYRX enables events; STBWR starts
//    storing download data words (up to 1024); STBRD sends the stored words
//    back as a block followed by an end-of-block status word; EOBTR ends both.
//  * A trigger pulse while events are enabled queues one event of ev_words
//    data words, word i = {event number[7:0], i[23:0]}, then an end-of-block
//    status word (code FEEOB) whose parameter is the event number.
//  * It drives the bus only when it saw fidir=0 and filf=0 at the last edge.
//  * JTAG: an 8-bit shift register between TDI and TDO, shifted on the rising
//    edge of TCK (tdo = bit 0) and cleared by TRST.
module fee_model
  import ddl_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  output logic [31:0] fbd_i,
  output logic        fbten_i,
  output logic        fbctrl_i,
  input  logic [31:0] fbd_o,
  input  logic        fbten_o,
  input  logic        fbctrl_o,
  input  logic        fbd_oe,
  input  logic        fidir,
  input  logic        filf,
  input  logic        tck,
  input  logic        tms,
  input  logic        tdi,
  input  logic        trst_n,
  output logic        tdo,
  input  logic        trigger,
  input  int          ev_words,
  input  logic        mute
);
  logic [31:0] sendq [$];
  logic [32:0] ctlq [$];
  logic [31:0] mem [1024];
  int          dl_n = 0;
  logic        dl = 0, ev_en = 0;
  logic [22:0] ctrl_reg = 0;
  int          ev_no = 0;
  int          n_cmds = 0, n_dlwords = 0, n_events = 0;
  ddl_word_t   w;
  logic [7:0]  sr = 0;

  assign tdo = sr[0];
  always @(posedge tck or negedge trst_n)
    if (!trst_n) sr <= 0; else sr <= {tdi, sr[7:1]};

  // the model never looks at TMS or the output enable
  logic unused;
  assign unused = tms ^ fbd_oe;

  always @(posedge clk) begin
    if (!rst_n) begin
      fbten_i <= 0; fbctrl_i <= 0; fbd_i <= 0;
    end else begin
      // receive
      if (fidir && fbten_o) begin
        w = fbd_o;
        if (fbctrl_o) begin
          n_cmds++;
          case (w.code)
            CMD_FECTRL: ctrl_reg = w.param;
            CMD_FESTRD: if (!mute) ctlq.push_back({1'b1, mkword(STW_FESTW, w.trid, w.param ^ ctrl_reg, 1'b0)});
            CMD_RDYRX:  ev_en = 1;
            CMD_STBWR:  begin dl = 1; dl_n = 0; end
            CMD_STBRD:  begin
              for (int i = 0; i < dl_n; i++) sendq.push_back(mem[i]);
              sendq.push_back(32'hFFFF_FFFF);   // marker: end of block follows
            end
            CMD_EOBTR:  begin ev_en = 0; dl = 0; end
            default: ;
          endcase
        end else if (dl) begin
          mem[dl_n % 1024] = fbd_o;
          dl_n++;
          n_dlwords++;
        end
      end
      // send: status replies first, then queued block words
      if (!fidir && !filf && (ctlq.size() > 0 || sendq.size() > 0)) begin
        if (ctlq.size() > 0) begin
          logic [32:0] c;
          c = ctlq.pop_front();
          fbten_i <= 1; fbctrl_i <= c[32]; fbd_i <= c[31:0];
        end else begin
          logic [31:0] d;
          d = sendq.pop_front();
          if (d == 32'hFFFF_FFFF) begin
            fbten_i <= 1; fbctrl_i <= 1; fbd_i <= mkword(STW_FEEOB, 4'd0, 23'h7FFFFF, 1'b0);
          end else if (d == 32'hFFFF_FFFE) begin
            fbten_i <= 1; fbctrl_i <= 1; fbd_i <= mkword(STW_FEEOB, 4'd0, 23'(ev_no - 1), 1'b0);
          end else begin
            fbten_i <= 1; fbctrl_i <= 0; fbd_i <= d;
          end
        end
      end else begin
        fbten_i <= 0;
      end
      if (trigger && ev_en) begin
        for (int i = 0; i < ev_words; i++) sendq.push_back({8'(ev_no), 24'(i)});
        sendq.push_back(32'hFFFF_FFFE);
        ev_no++;
        n_events++;
      end
    end
  end
endmodule
