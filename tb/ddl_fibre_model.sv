// ddl_fibre_model: behavioural model of one direction of the DDL media
// interface: serialiser, laser, fibre, receiver and deserialiser with word
// alignment, seen from the protocol engines as a delay line for 10-bit
// characters. DELAY is the latency in character clocks (about 200 m of fibre
// plus the transceivers). flip is XORed into the character entering the line,
// to inject line errors. At start the line holds what a transmitter in reset
// sends, K28.5 of negative disparity repeated, which a receiver sees as
// disparity errors until the transmitter runs.
//
// Not synthesizable and not a design block: the document gives the line only
// as a 1.06 Gbit/s optical link over multi-mode fibre; the delay and the
// error-injection input are test choices.
module ddl_fibre_model #(
  parameter int DELAY = 16
) (
  input  logic       clk,
  input  logic [9:0] din,
  input  logic [9:0] flip,
  output logic [9:0] dout
);
  logic [9:0] line [DELAY];
  initial for (int i = 0; i < DELAY; i++) line[i] = 10'b0011111010;
  always_ff @(posedge clk) begin
    line[0] <= din ^ flip;
    for (int i = 1; i < DELAY; i++) line[i] <= line[i-1];
  end
  assign dout = line[DELAY-1];
endmodule
