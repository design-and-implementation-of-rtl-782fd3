// qam16_demapper: 16-QAM demultiplexing.
//
// Each of the in-phase and quadrature parts of a received sample is compared
// with the three thresholds of the document's Table 2 (-2, 0, +2):
// s <= -2 -> 00, -2 < s <= 0 -> 01, 0 < s <= +2 -> 11, s > +2 -> 10.
// The I di-bit and Q di-bit are concatenated into the 4-bit symbol
// {I, Q}, the inverse of qam16_mapper. Output registered: one cycle latency.
module qam16_demapper
  import ofdm_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  cplx_t    in_sample,
  output logic     out_valid,
  output qam_sym_t out_sym
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_sym <= {dibit_of(in_sample.re), dibit_of(in_sample.im)};
    end
  end

endmodule
