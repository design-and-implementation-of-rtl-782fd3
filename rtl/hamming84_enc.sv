// hamming84_enc: one (8,4) block coder, an extended Hamming code.
//
// Combinational. Codeword bit i-1 holds Hamming position i (1..7):
// positions 1, 2, 4 are parity bits p1, p2, p3 and positions 3, 5, 6, 7 are
// data bits d[0..3]; bit 7 is the overall parity over the other seven, which
// makes the minimum distance 4 (one error corrected, two detected). The
// document names an (8,4) block code and its single-error correction per
// codeword but not the code itself; the extended Hamming code is this
// design's choice.
module hamming84_enc (
  input  logic [3:0] data,
  output logic [7:0] code
);

  logic p1, p2, p3;

  always_comb begin
    p1 = data[0] ^ data[1] ^ data[3];   // covers positions 3,5,7
    p2 = data[0] ^ data[2] ^ data[3];   // covers positions 3,6,7
    p3 = data[1] ^ data[2] ^ data[3];   // covers positions 5,6,7
    code[6:0] = {data[3], data[2], data[1], p3, data[0], p2, p1};
    code[7]   = ^code[6:0];
  end

endmodule
