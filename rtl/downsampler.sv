// downsampler: cyclic-prefix removal by downsampling.
//
// Counts valid input symbols modulo M and passes on only the one at phase
// M-1, the last of each group, dropping the M-1 before it. Groups start at
// reset, so the receiver stays aligned with the transmitter's L-fold
// repetition as long as no sample is lost. The factor 16 and the position
// (after the I/Q demultiplexer) follow the document; keeping the last copy
// is this design's choice, matching the document's aim of discarding the
// corrupted first symbols. Output registered: one cycle latency.
module downsampler #(
  parameter int W = 4,
  parameter int M = ofdm_pkg::UPSAMPLE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data,
  output logic         dropped     // an input copy was discarded
);

  localparam int CW = (M > 1) ? $clog2(M) : 1;

  logic [CW-1:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      dropped   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      dropped   <= 1'b0;
      if (in_valid) begin
        if (phase == CW'(M-1)) begin
          phase     <= '0;
          out_valid <= 1'b1;
          out_data  <= in_data;
        end else begin
          phase   <= phase + 1'b1;
          dropped <= 1'b1;
        end
      end
    end
  end

endmodule
