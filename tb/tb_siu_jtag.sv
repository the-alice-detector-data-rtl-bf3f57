// tb_siu_jtag: the JTAG port shifting into an 8-bit TDI-to-TDO shift register
// standing in for the FEE's TAP. Checks that TCK runs at clk/4, that TMS and
// TDI carry the requested bits (least significant first) at each rising TCK
// edge, that TDO is captured, that done comes after exactly nbits TCK periods,
// and that TRST follows the request.
//
// The document names only a JTAG controller port of the SIU; the timing checked
// (TCK = clock/4, bit 0 first) is this design's.
module tb_siu_jtag;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start = 0, trst_req = 0, busy, done, tck, tms, tdi, trst_n, tdo;
  logic [3:0] nbits = 0;
  logic [7:0] tms_bits = 0, tdi_bits = 0, tdo_bits;
  logic [7:0] sr = 8'h00;
  logic [7:0] tms_seen, tdi_seen;
  int ntck = 0;

  siu_jtag dut (.*);

  assign tdo = sr[0];
  always @(posedge tck or negedge trst_n)
    if (!trst_n) sr <= 8'h00;
    else begin
      tms_seen[ntck % 8] <= tms;
      tdi_seen[ntck % 8] <= tdi;
      sr <= {tdi, sr[7:1]};
      ntck <= ntck + 1;
    end

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic shift(input int n, input logic [7:0] ms, input logic [7:0] di,
                       output logic [7:0] dout, output int cyc);
    int c0;
    nbits = 4'(n); tms_bits = ms; tdi_bits = di; start = 1;
    @(negedge clk); start = 0;
    c0 = 0;
    while (!done && c0 < 100) begin @(negedge clk); c0++; end
    dout = tdo_bits;
    cyc = c0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d;
    int cyc, t0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(trst_n == 1, "TRST released");
    t0 = ntck;
    shift(8, 8'h5A, 8'hC3, d, cyc);
    chk(ntck - t0 == 8, $sformatf("%0d TCK pulses for 8 bits", ntck - t0));
    chk(cyc + 1 == 8 * 4 + 1, $sformatf("8 bits took %0d clocks (start clock + 4 per bit)", cyc + 1));
    chk(tms_seen == 8'h5A && tdi_seen == 8'hC3, $sformatf("TMS %h TDI %h at TCK", tms_seen, tdi_seen));
    chk(d == 8'h00, "TDO of the cleared register");
    shift(8, 8'h00, 8'h96, d, cyc);
    chk(d == 8'hC3, $sformatf("TDO returned %h, expected C3", d));
    t0 = ntck;
    shift(3, 8'h07, 8'h05, d, cyc);
    chk(ntck - t0 == 3, "3 bits, 3 TCK pulses");
    chk(d[2:0] == 3'b110, $sformatf("TDO bits %b", d[2:0]));   // low bits of 96
    trst_req = 1;
    repeat (3) @(negedge clk);
    chk(trst_n == 0, "TRST asserted on request");
    trst_req = 0;
    repeat (3) @(negedge clk);
    chk(trst_n == 1 && sr == 8'h00, "TRST released and TAP reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
