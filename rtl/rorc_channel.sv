// rorc_channel: one DDL channel of the read-out receiver card (RORC).
//
// It holds the two memory buffers and the status FIFO of the channel and the
// three multiplexers that give the card its self-test modes:
//  * Output buffer (OUT_DEPTH x 32): data blocks to send, written by the host
//    or, in DDL self-test mode, by the DDL test multiplexer.
//  * Output multiplexer: sends words from the output buffer as data words and
//    the pending host command (at most one, see cmd_busy) as soon as the data
//    words written before it have gone, so that "STBWR, data, EOBTR" arrives
//    in the order it was written.
//  * Loop-back multiplexer: the stream entering the channel is the DIU's input
//    bus in normal and DDL self-test mode, and the output multiplexer's own
//    stream in RORC self-test mode (nothing then goes to the DIU).
//  * Incoming data words go to the input buffer (IN_DEPTH x 32), status words
//    (and commands, looped back in RORC self-test) to the status FIFO
//    (ST_DEPTH x 32). A status word arriving at a full status FIFO is lost and
//    sets st_overflow until the next clear.
//  * DDL test multiplexer: in DDL self-test mode the words read from the input
//    buffer are written to the output buffer instead of going to the host, so
//    that received data goes back over the link.
//  * Control logic: ib_xoff (flow control towards the DIU) is raised while the
//    input buffer holds XOFF_LEVEL words or more, leaving room for the words
//    still on the fibre; irq is raised while the status FIFO is not empty.
// Host side: single-word writes (cmd_wr, od_wr) and pops (id_rd, st_rd) of
// the head words id_data/st_data, all in the clk domain.
// The buffer sizes, the three multiplexers, the modes and the interrupt event
// follow the prototype card; the ordering rule, flow-control threshold and
// overflow flag are this design's choices.
module rorc_channel
  import ddl_pkg::*;
#(
  parameter int unsigned IN_DEPTH   = 3 * 1024 * 1024,
  parameter int unsigned OUT_DEPTH  = 512 * 1024,
  parameter int unsigned ST_DEPTH   = 64,
  parameter int unsigned XOFF_LEVEL = IN_DEPTH - 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mode_e       mode,
  input  logic        clear,           // flush buffers and flags
  // host side
  input  logic        cmd_wr,
  input  logic [31:0] cmd_data,
  output logic        cmd_busy,
  input  logic        od_wr,
  input  logic [31:0] od_data,
  output logic        od_full,
  input  logic        id_rd,
  output logic [31:0] id_data,
  output logic        id_empty,
  output logic [$clog2(IN_DEPTH+1)-1:0] id_count,
  input  logic        st_rd,
  output logic [31:0] st_data,
  output logic        st_empty,
  output logic        st_overflow,
  output logic        irq,
  // DIU side
  output logic        ob_valid,
  output logic        ob_ctrl,
  output logic [31:0] ob_d,
  input  logic        ob_ready,
  input  logic        ib_valid,
  input  logic        ib_ctrl,
  input  logic [31:0] ib_d,
  output logic        ib_xoff
);

  // ---------------------------------------------------------- output side
  logic        cmd_pend;
  logic [31:0] cmd_reg;
  logic        obuf_wr, obuf_rd, obuf_empty, obuf_full, obuf_af;
  logic [31:0] obuf_wdata, obuf_rdata;
  logic [$clog2(OUT_DEPTH+1)-1:0] obuf_count;

  ddl_fifo #(.W(32), .DEPTH(OUT_DEPTH)) u_obuf (
    .clk, .rst_n, .clear, .wr_en(obuf_wr), .wr_data(obuf_wdata), .rd_en(obuf_rd),
    .rd_data(obuf_rdata), .empty(obuf_empty), .full(obuf_full), .almost_full(obuf_af),
    .count(obuf_count));

  // output multiplexer: the command goes once the data words written before
  // it (cmd_ahead of them) have gone
  logic        om_valid, om_ctrl, om_ready;
  logic [31:0] om_d;
  logic [$clog2(OUT_DEPTH+1)-1:0] cmd_ahead;
  assign om_ctrl  = cmd_pend && cmd_ahead == '0;
  assign om_valid = om_ctrl || !obuf_empty;
  assign om_d     = om_ctrl ? cmd_reg : obuf_rdata;

  // loop-back multiplexer
  logic        lb_valid, lb_ctrl;
  logic [31:0] lb_d;
  logic        ibuf_wr, ibuf_full, ibuf_af, ibuf_rd;
  logic        stf_wr, stf_full, stf_af;
  logic [$clog2(ST_DEPTH+1)-1:0] stf_count;

  always_comb begin
    if (mode == MODE_RORC_TEST) begin
      ob_valid = 1'b0;
      om_ready = om_ctrl ? 1'b1 : !ibuf_full;
      lb_valid = om_valid && om_ready;
      lb_ctrl  = om_ctrl;
      lb_d     = om_d;
    end else begin
      ob_valid = om_valid;
      om_ready = ob_ready;
      lb_valid = ib_valid;
      lb_ctrl  = ib_ctrl;
      lb_d     = ib_d;
    end
  end
  assign ob_ctrl = om_ctrl;
  assign ob_d    = om_d;
  assign obuf_rd = !om_ctrl && !obuf_empty && om_ready;

  // ---------------------------------------------------------- input side
  assign ibuf_wr = lb_valid && !lb_ctrl;
  assign stf_wr  = lb_valid && lb_ctrl;

  ddl_fifo #(.W(32), .DEPTH(IN_DEPTH), .AF_LEVEL(XOFF_LEVEL)) u_ibuf (
    .clk, .rst_n, .clear, .wr_en(ibuf_wr && !ibuf_full), .wr_data(lb_d), .rd_en(ibuf_rd),
    .rd_data(id_data), .empty(id_empty), .full(ibuf_full), .almost_full(ibuf_af),
    .count(id_count));

  ddl_fifo #(.W(32), .DEPTH(ST_DEPTH), .AF_LEVEL(ST_DEPTH - 1)) u_stf (
    .clk, .rst_n, .clear, .wr_en(stf_wr && !stf_full), .wr_data(lb_d), .rd_en(st_rd && !st_empty),
    .rd_data(st_data), .empty(st_empty), .full(stf_full), .almost_full(stf_af),
    .count(stf_count));

  // DDL test multiplexer
  logic ddl_copy;
  assign ddl_copy   = (mode == MODE_DDL_TEST) && !id_empty && !obuf_full;
  assign ibuf_rd    = ddl_copy || (mode != MODE_DDL_TEST && id_rd && !id_empty);
  assign obuf_wr    = ddl_copy || (mode != MODE_DDL_TEST && od_wr && !obuf_full);
  assign obuf_wdata = ddl_copy ? id_data : od_data;
  assign od_full    = obuf_full;

  // ---------------------------------------------------------- control logic
  assign cmd_busy = cmd_pend;
  assign ib_xoff  = ibuf_af;
  assign irq      = !st_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_pend <= 1'b0; cmd_reg <= '0; cmd_ahead <= '0; st_overflow <= 1'b0;
    end else if (clear) begin
      cmd_pend <= 1'b0; cmd_ahead <= '0; st_overflow <= 1'b0;
    end else begin
      if (om_ctrl && om_ready) cmd_pend <= 1'b0;
      if (cmd_pend && obuf_rd && cmd_ahead != '0) cmd_ahead <= cmd_ahead - 1'b1;
      if (cmd_wr && !cmd_pend) begin
        cmd_pend  <= 1'b1;
        cmd_reg   <= cmd_data;
        cmd_ahead <= obuf_count - ($bits(obuf_count))'(obuf_rd);
      end
      if (stf_wr && stf_full) st_overflow <= 1'b1;
    end
  end

endmodule
