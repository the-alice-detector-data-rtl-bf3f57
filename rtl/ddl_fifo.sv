// ddl_fifo: synchronous first-in first-out buffer, used for the RORC's input
// buffer, output buffer and status FIFO and for the small queues of the
// interface units.
//
// A memory of DEPTH words of W bits with a write and a read pointer; DEPTH
// need not be a power of two (the RORC input buffer is 3M words). The head
// word is always visible on rd_data (show-ahead): rd_en pops it. A write to a
// full FIFO and a read of an empty one are ignored and flagged by the
// assertions below. count gives the fill level; almost_full is count >= AF_LEVEL
// and serves flow control, leaving DEPTH - AF_LEVEL words of room for data
// still in flight. Reset empties the FIFO but does not clear the memory.
// rst_n also appears in the assertions' disable condition, which lint may
// report as a reset used both synchronously and asynchronously; the logic
// itself uses it only as an asynchronous reset.
//
// The document gives the RORC buffer sizes (3M, 512k and 64 words of 32 bits)
// and their purpose; the FIFO itself (show-ahead read, almost-full level, no
// power-of-two restriction) is this design's choice.
module ddl_fifo #(
  parameter int unsigned W        = 32,
  parameter int unsigned DEPTH    = 64,
  parameter int unsigned AF_LEVEL = DEPTH - 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,       // synchronous flush
  input  logic                       wr_en,
  input  logic [W-1:0]               wr_data,
  input  logic                       rd_en,
  output logic [W-1:0]               rd_data,
  output logic                       empty,
  output logic                       full,
  output logic                       almost_full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam logic [AW-1:0] LAST = AW'(DEPTH - 1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          do_wr, do_rd;

  assign empty       = (count == '0);
  assign full        = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign almost_full = (count >= ($clog2(DEPTH+1))'(AF_LEVEL));
  assign do_wr       = wr_en && !full;
  assign do_rd       = rd_en && !empty;
  assign rd_data     = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0; rptr <= '0; count <= '0;
    end else if (clear) begin
      wptr <= '0; rptr <= '0; count <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == LAST) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == LAST) ? '0 : rptr + 1'b1;
      count <= count + ($bits(count))'(do_wr) - ($bits(count))'(do_rd);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full && !clear))
    else $error("write to a full FIFO");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty && !clear))
    else $error("read of an empty FIFO");

endmodule
