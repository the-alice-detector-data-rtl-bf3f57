// tb_rorc_channel: one RORC channel at reduced buffer sizes (input 256, output
// 64, status 8 words), with the DIU side driven and observed directly.
// Normal mode: a command is sent only after the data written before it;
// received data reach the input buffer and status words the status FIFO,
// raising irq; XOFF rises at the threshold; a ninth status word overflows.
// RORC self-test mode: the outgoing stream is looped back into the input
// buffer and status FIFO and nothing goes to the DIU. DDL self-test mode:
// received data are sent back out through the output buffer.
//
// The three modes and the interrupt condition are the document's; the buffer
// sizes are reduced here, and the multiplexer behaviour is this design's.
module tb_rorc_channel;
  import ddl_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  mode_e mode = MODE_NORMAL;
  logic clear = 0, cmd_wr = 0, od_wr = 0, id_rd = 0, st_rd = 0;
  logic [31:0] cmd_data = 0, od_data = 0, id_data, st_data, ob_d, ib_d = 0;
  logic cmd_busy, od_full, id_empty, st_empty, st_overflow, irq;
  logic [8:0] id_count;
  logic ob_valid, ob_ctrl, ob_ready = 1, ib_valid = 0, ib_ctrl = 0, ib_xoff;

  rorc_channel #(.IN_DEPTH(256), .OUT_DEPTH(64), .ST_DEPTH(8), .XOFF_LEVEL(200)) dut (.*);

  typedef struct { logic ctrl; logic [31:0] w; } bw_t;
  bw_t obq[$];
  always @(posedge clk) if (rst_n && ob_valid && ob_ready) begin
    bw_t b; b.ctrl = ob_ctrl; b.w = ob_d; obq.push_back(b);
  end

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic host_cmd(input logic [31:0] w);
    while (cmd_busy) @(negedge clk);
    cmd_wr = 1; cmd_data = w; @(negedge clk); cmd_wr = 0;
  endtask
  task automatic host_od(input logic [31:0] w);
    od_wr = 1; od_data = w; @(negedge clk); od_wr = 0;
  endtask
  task automatic host_id(output logic [31:0] w);
    w = id_data; id_rd = 1; @(negedge clk); id_rd = 0;
  endtask
  task automatic host_st(output logic [31:0] w);
    w = st_data; st_rd = 1; @(negedge clk); st_rd = 0;
  endtask
  task automatic diu_word(input logic ctrl, input logic [31:0] w);
    ib_valid = 1; ib_ctrl = ctrl; ib_d = w; @(negedge clk); ib_valid = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // --- normal mode, ordering at the output multiplexer (DIU stalls)
    ob_ready = 0;
    host_cmd(32'hC000_0001);
    for (int i = 0; i < 10; i++) host_od(32'hD000_0000 + i);
    fork
      host_cmd(32'hC000_0002);
      begin repeat (3) @(negedge clk); ob_ready = 1; end
    join
    repeat (30) @(negedge clk);
    chk(obq.size() == 12, $sformatf("%0d words to the DIU", obq.size()));
    if (obq.size() == 12) begin
      int bad = 0;
      if (!obq[0].ctrl || obq[0].w != 32'hC000_0001) bad++;
      for (int i = 0; i < 10; i++) if (obq[i+1].ctrl || obq[i+1].w != 32'hD000_0000 + i) bad++;
      if (!obq[11].ctrl || obq[11].w != 32'hC000_0002) bad++;
      chk(bad == 0, "command, data, command in order");
    end
    obq.delete();
    // --- received words
    chk(!irq, "no interrupt while the status FIFO is empty");
    for (int i = 0; i < 5; i++) diu_word(0, 32'h1100_0000 + i);
    diu_word(1, 32'h5757_0004);
    chk(irq && !st_empty, "interrupt on status word");
    chk(id_count == 5, "input buffer fill level");
    for (int i = 0; i < 5; i++) begin host_id(w); chk(w == 32'h1100_0000 + i, "input data"); end
    host_st(w);
    chk(w == 32'h5757_0004 && st_empty && !irq, "status word read, interrupt gone");
    // --- flow control threshold
    for (int i = 0; i < 199; i++) diu_word(0, i);
    chk(!ib_xoff, "no XOFF below the threshold");
    diu_word(0, 199);
    chk(ib_xoff, "XOFF at the threshold");
    for (int i = 0; i < 200; i++) host_id(w);
    chk(!ib_xoff && id_empty, "XOFF released after draining");
    // --- status FIFO overflow
    for (int i = 0; i < 9; i++) diu_word(1, i);
    chk(st_overflow, "ninth status word overflows");
    for (int i = 0; i < 8; i++) begin host_st(w); chk(w == i, "status order"); end
    clear = 1; @(negedge clk); clear = 0;
    chk(!st_overflow, "clear resets overflow");
    // --- RORC self-test mode
    mode = MODE_RORC_TEST;
    for (int i = 0; i < 6; i++) host_od(32'hE000_0000 + i);
    host_cmd(32'hC000_0003);
    repeat (20) @(negedge clk);
    chk(obq.size() == 0, "nothing to the DIU in RORC self-test");
    chk(id_count == 6, $sformatf("looped data in the input buffer: %0d", id_count));
    for (int i = 0; i < 6; i++) begin host_id(w); chk(w == 32'hE000_0000 + i, "looped data"); end
    host_st(w);
    chk(w == 32'hC000_0003, "looped command in the status FIFO");
    // --- DDL self-test mode
    mode = MODE_DDL_TEST;
    for (int i = 0; i < 7; i++) diu_word(0, 32'hF000_0000 + i);
    repeat (20) @(negedge clk);
    chk(obq.size() == 7, $sformatf("%0d words echoed", obq.size()));
    if (obq.size() == 7) begin
      int bad = 0;
      for (int i = 0; i < 7; i++) if (obq[i].ctrl || obq[i].w != 32'hF000_0000 + i) bad++;
      chk(bad == 0, "echoed data");
    end
    chk(id_empty, "input buffer drained by the echo");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
