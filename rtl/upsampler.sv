// upsampler: cyclic-prefix insertion by upsampling.
//
// Each 16-QAM symbol accepted on the input is presented on the output for
// L consecutive cycles, so that one symbol fills one whole L-sample OFDM
// frame; the receiver's downsampler keeps only the last copy and discards
// the first L-1, which a dispersive channel would corrupt. The factor 16 and
// the placement (after the coder, before the I/Q DMUX) follow the document;
// repeating the symbol (sample and hold) rather than inserting zeros is this
// design's choice. Handshake: in_ready is high when idle or in the last
// repeat, so a symbol taken then follows with no gap; out_first marks the
// first copy of each symbol.
module upsampler #(
  parameter int W = 4,
  parameter int L = ofdm_pkg::UPSAMPLE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         in_ready,
  output logic         out_valid,
  output logic         out_first,
  output logic [W-1:0] out_data
);

  localparam int CW = (L > 1) ? $clog2(L) : 1;

  logic [CW-1:0] rep;

  assign in_ready  = !out_valid || (rep == CW'(L-1));
  assign out_first = out_valid && (rep == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rep       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid) begin
        if (rep == CW'(L-1)) begin
          rep       <= '0;
          out_valid <= 1'b0;
        end else begin
          rep <= rep + 1'b1;
        end
      end
      if (in_valid && in_ready) begin
        out_data  <= in_data;
        out_valid <= 1'b1;
        rep       <= '0;
      end
    end
  end

endmodule
