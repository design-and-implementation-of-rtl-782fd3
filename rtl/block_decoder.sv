// block_decoder: forward error correction decoder of the receiver.
//
// The 16-bit received codeword is split into two 8-bit codewords, each
// decoded by its own (8,4) decoder (hamming84_dec) in parallel, and the two
// 4-bit results are joined into the 8-bit output word: code_in[15:8] ->
// data_out[7:4], code_in[7:0] -> data_out[3:0]. Each half corrects one bit
// error, so up to two errors in the 16 bits are corrected when they fall in
// different halves. `corrected`/`uncorrectable` have one bit per half
// (bit 1 = high half). The structure follows the document; the code is this
// design's choice. The output is registered: out_valid follows in_valid by
// one cycle.
module block_decoder (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [15:0] code_in,
  output logic        out_valid,
  output logic [7:0]  data_out,
  output logic [1:0]  corrected,
  output logic [1:0]  uncorrectable
);

  logic [7:0] data_c;
  logic [1:0] corr_c, unc_c;

  hamming84_dec u_dec_hi (.code(code_in[15:8]), .data(data_c[7:4]),
                          .corrected(corr_c[1]), .uncorrectable(unc_c[1]));
  hamming84_dec u_dec_lo (.code(code_in[7:0]),  .data(data_c[3:0]),
                          .corrected(corr_c[0]), .uncorrectable(unc_c[0]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid     <= 1'b0;
      data_out      <= '0;
      corrected     <= '0;
      uncorrectable <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        data_out      <= data_c;
        corrected     <= corr_c;
        uncorrectable <= unc_c;
      end else begin
        corrected     <= '0;
        uncorrectable <= '0;
      end
    end
  end

endmodule
