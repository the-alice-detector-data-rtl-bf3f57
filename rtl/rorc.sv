// rorc: read-out receiver card with two DDL channels (A and B) behind one
// host interface.
//
// The host reaches the card through a simple synchronous slave port standing
// in for the VME64x slave: a request (hb_valid, hb_write, hb_addr, hb_wdata)
// is acknowledged one clock later by hb_ack, with hb_rdata for a read. The card
// answers only to addresses whose bits 31:24 equal base_addr (the programmable
// base address). Bit 8 of the address selects the channel, bits 7:2 the
// register:
//   0x00  write: command to send          read: channel status
//   0x04  write: word to the output buffer read: pop the input buffer
//   0x08  read: pop the status FIFO
//   0x0C  control: bits 1:0 mode (0 normal, 1 RORC self-test, 2 DDL self-test),
//         bit 2 interrupt enable; writing bit 31 clears the channel's buffers
//   0x10  read: input buffer fill level
// Channel status bits: 0 command pending, 1 output buffer full, 2 input
// buffer empty, 3 status FIFO empty, 4 status FIFO overflow, 5 XOFF sent.
// A read of an empty buffer returns 0 and pops nothing. irq is raised while
// an enabled channel's status FIFO is not empty, the card's interrupt event.
// Two channels, the buffer sizes and the interrupt event follow the prototype
// card; VME bus cycles, address modifiers and block transfers are not modelled
// and the register map is this design's.
module rorc
  import ddl_pkg::*;
#(
  parameter int unsigned IN_DEPTH  = 3 * 1024 * 1024,
  parameter int unsigned OUT_DEPTH = 512 * 1024,
  parameter int unsigned ST_DEPTH  = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  // host interface
  input  logic [7:0]  base_addr,
  input  logic        hb_valid,
  input  logic        hb_write,
  input  logic [31:0] hb_addr,
  input  logic [31:0] hb_wdata,
  output logic [31:0] hb_rdata,
  output logic        hb_ack,
  output logic        irq,
  // DIU buses, one per channel
  output logic [1:0]        ob_valid,
  output logic [1:0]        ob_ctrl,
  output logic [1:0][31:0]  ob_d,
  input  logic [1:0]        ob_ready,
  input  logic [1:0]        ib_valid,
  input  logic [1:0]        ib_ctrl,
  input  logic [1:0][31:0]  ib_d,
  output logic [1:0]        ib_xoff
);
  localparam int CW = $clog2(IN_DEPTH + 1);

  logic       sel;
  logic       ch;
  logic [5:0] rsel;
  assign sel  = hb_valid && hb_addr[31:24] == base_addr;
  assign ch   = hb_addr[8];
  assign rsel = hb_addr[7:2];

  mode_e       mode [2];
  logic [1:0]  irq_en, clear;
  logic [1:0]  cmd_wr, od_wr, id_rd, st_rd;
  logic [1:0]  cmd_busy, od_full, id_empty, st_empty, st_ovf, ch_irq;
  logic [31:0] id_data [2];
  logic [31:0] st_data [2];
  logic [CW-1:0] id_count [2];

  for (genvar c = 0; c < 2; c++) begin : g_ch
    logic this_ch;
    assign this_ch  = sel && ch == 1'(c);
    assign cmd_wr[c] = this_ch && hb_write && rsel == 6'd0;
    assign od_wr[c]  = this_ch && hb_write && rsel == 6'd1;
    assign id_rd[c]  = this_ch && !hb_write && rsel == 6'd1;
    assign st_rd[c]  = this_ch && !hb_write && rsel == 6'd2;
    assign clear[c]  = this_ch && hb_write && rsel == 6'd3 && hb_wdata[31];

    rorc_channel #(.IN_DEPTH(IN_DEPTH), .OUT_DEPTH(OUT_DEPTH), .ST_DEPTH(ST_DEPTH)) u_ch (
      .clk, .rst_n, .mode(mode[c]), .clear(clear[c]),
      .cmd_wr(cmd_wr[c]), .cmd_data(hb_wdata), .cmd_busy(cmd_busy[c]),
      .od_wr(od_wr[c]), .od_data(hb_wdata), .od_full(od_full[c]),
      .id_rd(id_rd[c]), .id_data(id_data[c]), .id_empty(id_empty[c]), .id_count(id_count[c]),
      .st_rd(st_rd[c]), .st_data(st_data[c]), .st_empty(st_empty[c]), .st_overflow(st_ovf[c]),
      .irq(ch_irq[c]),
      .ob_valid(ob_valid[c]), .ob_ctrl(ob_ctrl[c]), .ob_d(ob_d[c]), .ob_ready(ob_ready[c]),
      .ib_valid(ib_valid[c]), .ib_ctrl(ib_ctrl[c]), .ib_d(ib_d[c]), .ib_xoff(ib_xoff[c]));
  end

  assign irq = |(ch_irq & irq_en);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode[0] <= MODE_NORMAL; mode[1] <= MODE_NORMAL; irq_en <= '0;
      hb_ack <= 1'b0; hb_rdata <= '0;
    end else begin
      hb_ack   <= sel;
      hb_rdata <= '0;
      if (sel && hb_write && rsel == 6'd3) begin
        mode[ch]   <= mode_e'(hb_wdata[1:0]);
        irq_en[ch] <= hb_wdata[2];
      end
      if (sel && !hb_write) begin
        unique case (rsel)
          6'd0: hb_rdata <= {26'd0, ib_xoff[ch], st_ovf[ch], st_empty[ch], id_empty[ch],
                             od_full[ch], cmd_busy[ch]};
          6'd1: hb_rdata <= id_empty[ch] ? '0 : id_data[ch];
          6'd2: hb_rdata <= st_empty[ch] ? '0 : st_data[ch];
          6'd3: hb_rdata <= {29'd0, irq_en[ch], mode[ch]};
          6'd4: hb_rdata <= 32'(id_count[ch]);
          default: ;
        endcase
      end
    end
  end

endmodule
