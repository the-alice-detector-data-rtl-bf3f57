// siu_jtag: the JTAG (IEEE 1149.1) controller port of the source interface
// unit, through which the front-end electronics is tested remotely via its TAP.
//
// On start it shifts nbits (1..8) bit pairs, least significant first: for each
// bit it drives TMS and TDI while TCK is low, raises TCK (the TAP samples
// TMS/TDI and the port samples TDO on this rising edge) and lowers it again.
// TCK runs at clk/4. done pulses for one clock when the last bit has been
// shifted, with the captured TDO bits in tdo_bits. trst_req drives the TAP
// reset line (active low) for as long as it is held. The port's existence and
// its 4+1 lines follow the DDL; the shifting command format and the TCK rate
// are this design's choices.
module siu_jtag (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [3:0] nbits,
  input  logic [7:0] tms_bits,
  input  logic [7:0] tdi_bits,
  input  logic       trst_req,
  output logic       busy,
  output logic       done,
  output logic [7:0] tdo_bits,
  // JTAG lines to the front-end TAP
  output logic       tck,
  output logic       tms,
  output logic       tdi,
  output logic       trst_n,
  input  logic       tdo
);
  logic [1:0] phase;
  logic [3:0] idx, nb;
  logic [7:0] tms_r, tdi_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; tdo_bits <= '0; tck <= 1'b0; tms <= 1'b1; tdi <= 1'b0;
      trst_n <= 1'b0; phase <= '0; idx <= '0; nb <= '0; tms_r <= '0; tdi_r <= '0;
    end else begin
      done   <= 1'b0;
      trst_n <= !trst_req;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1; phase <= '0; idx <= '0;
          nb <= (nbits == 4'd0) ? 4'd1 : (nbits > 4'd8 ? 4'd8 : nbits);
          tms_r <= tms_bits; tdi_r <= tdi_bits; tdo_bits <= '0;
        end
      end else begin
        phase <= phase + 2'd1;
        unique case (phase)
          2'd0: begin tms <= tms_r[idx[2:0]]; tdi <= tdi_r[idx[2:0]]; end
          2'd1: begin tck <= 1'b1; tdo_bits[idx[2:0]] <= tdo; end
          2'd2: ;
          2'd3: begin
            tck <= 1'b0;
            idx <= idx + 4'd1;
            if (idx + 4'd1 == nb) begin busy <= 1'b0; done <= 1'b1; end
          end
          default: ;
        endcase
      end
    end
  end
endmodule
