// tb_rorc: the two-channel card at reduced buffer sizes, through its host
// port. Checks base-address decoding, that channel A and B registers reach
// their own channel, commands and output data reaching the right DIU bus,
// reading input data, status words and fill level, the mode and interrupt
// enable register, the interrupt, and the one-clock acknowledge.
//
// Two channels, programmable base address and the status-FIFO interrupt are the
// document's; the host port and register map are this design's, standing in
// for the VME64x slave.
module tb_rorc;
  import ddl_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] base_addr = 8'hA5;
  logic hb_valid = 0, hb_write = 0, hb_ack, irq;
  logic [31:0] hb_addr = 0, hb_wdata = 0, hb_rdata;
  logic [1:0] ob_valid, ob_ctrl, ob_ready = 2'b11, ib_valid = 0, ib_ctrl = 0, ib_xoff;
  logic [1:0][31:0] ob_d, ib_d = '0;

  rorc #(.IN_DEPTH(128), .OUT_DEPTH(32), .ST_DEPTH(8)) dut (.*);

  typedef struct { int ch; logic ctrl; logic [31:0] w; } ow_t;
  ow_t obq[$];
  always @(posedge clk) if (rst_n) for (int c = 0; c < 2; c++)
    if (ob_valid[c] && ob_ready[c]) begin ow_t o; o.ch = c; o.ctrl = ob_ctrl[c]; o.w = ob_d[c]; obq.push_back(o); end

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    hb_valid = 1; hb_write = 1; hb_addr = a; hb_wdata = d;
    @(negedge clk); hb_valid = 0;
    chk(hb_ack == (a[31:24] == base_addr), "write acknowledge");
    @(negedge clk);
  endtask
  task automatic rd(input logic [31:0] a, output logic [31:0] d);
    hb_valid = 1; hb_write = 0; hb_addr = a;
    @(negedge clk); hb_valid = 0;
    chk(hb_ack == (a[31:24] == base_addr), "read acknowledge");
    d = hb_rdata;
    @(negedge clk);
  endtask
  task automatic diu(input int c, input logic ctrl, input logic [31:0] w);
    ib_valid[c] = 1; ib_ctrl[c] = ctrl; ib_d[c] = w; @(negedge clk); ib_valid[c] = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [31:0] A = 32'hA500_0000, B = 32'hA500_0100;
  initial begin
    logic [31:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // wrong base address: ignored
    wr(32'h1200_0000, 32'h1111_1111);
    // commands and output data to each channel
    wr(A + 0, 32'hC0C0_000A);
    wr(B + 4, 32'hDA7A_000B);
    wr(B + 0, 32'hC0C0_000B);
    repeat (5) @(negedge clk);
    chk(obq.size() == 3, $sformatf("%0d words on the DIU buses", obq.size()));
    if (obq.size() == 3) begin
      chk(obq[0].ch == 0 && obq[0].ctrl && obq[0].w == 32'hC0C0_000A, "command on channel A");
      chk(obq[1].ch == 1 && !obq[1].ctrl && obq[1].w == 32'hDA7A_000B, "data on channel B");
      chk(obq[2].ch == 1 && obq[2].ctrl && obq[2].w == 32'hC0C0_000B, "command on channel B");
    end
    // received words
    diu(1, 0, 32'h0B0B_0001);
    diu(1, 0, 32'h0B0B_0002);
    diu(0, 1, 32'h5A5A_0003);
    rd(B + 16, d); chk(d == 2, "channel B fill level");
    rd(A + 16, d); chk(d == 0, "channel A fill level");
    rd(B + 4, d);  chk(d == 32'h0B0B_0001, "input data 1");
    rd(B + 4, d);  chk(d == 32'h0B0B_0002, "input data 2");
    rd(B + 4, d);  chk(d == 0, "empty input buffer reads 0");
    chk(!irq, "interrupt disabled");
    wr(A + 12, 32'h4);
    @(negedge clk);
    chk(irq, "interrupt enabled, status FIFO A not empty");
    rd(A + 12, d); chk(d == 32'h4, "control register read back");
    rd(A + 0, d);  chk(d[3] == 0 && d[2] == 1, "channel A status: status FIFO not empty, input empty");
    rd(A + 8, d);  chk(d == 32'h5A5A_0003, "status word");
    chk(!irq, "interrupt cleared by reading the status FIFO");
    // mode register: RORC self-test on channel B loops data into its input buffer
    wr(B + 12, 32'h1);
    wr(B + 4, 32'h1234_5678);
    repeat (3) @(negedge clk);
    rd(B + 4, d); chk(d == 32'h1234_5678, "RORC self-test loop-back through the host port");
    // clear
    diu(0, 0, 32'h1);
    wr(A + 12, 32'h8000_0004);
    rd(A + 16, d); chk(d == 0, "clear empties the input buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
