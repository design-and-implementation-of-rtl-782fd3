// block_coder: forward error correction coder of the transmitter.
//
// An 8-bit word is split into two 4-bit halves, each coded by its own (8,4)
// coder (hamming84_enc) working in parallel; the two 8-bit codewords are
// joined into one 16-bit codeword: high half -> code_out[15:8], low half ->
// code_out[7:0]. The split into two parallel (8,4) coders follows the
// document; the code is this design's choice (see hamming84_enc). The
// output is registered: code_valid follows in_valid by one cycle.
module block_coder (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [7:0]  in_data,
  output logic        code_valid,
  output logic [15:0] code_out
);

  logic [15:0] code_c;

  hamming84_enc u_enc_hi (.data(in_data[7:4]), .code(code_c[15:8]));
  hamming84_enc u_enc_lo (.data(in_data[3:0]), .code(code_c[7:0]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code_valid <= 1'b0;
      code_out   <= '0;
    end else begin
      code_valid <= in_valid;
      if (in_valid) code_out <= code_c;
    end
  end

endmodule
