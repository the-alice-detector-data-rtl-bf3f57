// tb_ddl_fifo: checks the buffer against a queue model with random pushes and
// pops, at the status FIFO's size (64) and at a size that is not a power of
// two (the input buffer's 3M is scaled to 3*64 = 192 here, the same wrap
// logic), including filling to full, the almost-full threshold and the fill
// count.
//
// The reference is a SystemVerilog queue; the FIFO behaviour checked is this
// design's (the document gives only buffer sizes).
module tb_ddl_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        wr_a = 0, rd_a = 0, wr_b = 0, rd_b = 0;
  logic [31:0] wd_a = 0, wd_b = 0, rd_data_a, rd_data_b;
  logic        e_a, f_a, af_a, e_b, f_b, af_b;
  logic [6:0]  c_a;
  logic [7:0]  c_b;

  ddl_fifo #(.W(32), .DEPTH(64), .AF_LEVEL(60)) ua (.clk, .rst_n, .clear(1'b0), .wr_en(wr_a),
    .wr_data(wd_a), .rd_en(rd_a), .rd_data(rd_data_a), .empty(e_a), .full(f_a),
    .almost_full(af_a), .count(c_a));
  ddl_fifo #(.W(32), .DEPTH(192), .AF_LEVEL(180)) ub (.clk, .rst_n, .clear(1'b0), .wr_en(wr_b),
    .wr_data(wd_b), .rd_en(rd_b), .rd_data(rd_data_b), .empty(e_b), .full(f_b),
    .almost_full(af_b), .count(c_b));

  logic [31:0] qa[$], qb[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    int fulls_a = 0, fulls_b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 20000; i++) begin
      // phases: fill-biased, drain-biased
      int bias;
      bias = ((i / 1000) % 2 == 0) ? 80 : 20;
      wr_a = ($urandom_range(99) < bias) && !f_a;
      rd_a = ($urandom_range(99) < 100 - bias) && !e_a;
      wr_b = ($urandom_range(99) < bias) && !f_b;
      rd_b = ($urandom_range(99) < 100 - bias) && !e_b;
      wd_a = $urandom; wd_b = $urandom;
      #1;
      chk(e_a == (qa.size() == 0) && f_a == (qa.size() == 64) && c_a == qa.size() &&
          af_a == (qa.size() >= 60), $sformatf("flags A at size %0d", qa.size()));
      chk(e_b == (qb.size() == 0) && f_b == (qb.size() == 192) && c_b == qb.size() &&
          af_b == (qb.size() >= 180), $sformatf("flags B at size %0d", qb.size()));
      if (rd_a) begin logic [31:0] x; x = qa.pop_front(); chk(rd_data_a == x, "data A"); end
      if (rd_b) begin logic [31:0] x; x = qb.pop_front(); chk(rd_data_b == x, "data B"); end
      if (wr_a) qa.push_back(wd_a);
      if (wr_b) qb.push_back(wd_b);
      if (f_a) fulls_a++;
      if (f_b) fulls_b++;
      @(negedge clk);
    end
    chk(fulls_a > 0 && fulls_b > 0, "both buffers reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
