// qam16_mapper: 16-QAM multiplexing.
//
// The DMUX splits a 4-bit symbol into the in-phase di-bit sym[3:2] and the
// quadrature di-bit sym[1:0]; two identical level mappers turn each Gray
// coded di-bit into one of the levels of the document's Table 1:
// 00 -> -3, 01 -> -1, 11 -> +1, 10 -> +3, scaled to the fixed-point format
// of ofdm_pkg (1.0 = 2^SAMPLE_FRAC). Which half of the symbol goes to I is
// this design's choice. Output registered: one cycle latency.
module qam16_mapper
  import ofdm_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  qam_sym_t in_sym,
  output logic     out_valid,
  output cplx_t    out_sample
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_sample <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_sample.re <= level_of(in_sym[3:2]);
        out_sample.im <= level_of(in_sym[1:0]);
      end
    end
  end

endmodule
