// hamming84_dec: one (8,4) block decoder for the extended Hamming code of
// hamming84_enc.
//
// Combinational. The 3-bit syndrome names the Hamming position (1..7) of a
// single error; the overall parity tells a single error (parity fails) from
// a double error (parity holds, syndrome non-zero). A single error is
// corrected (`corrected`), a double error is flagged (`uncorrectable`) and
// the data bits are passed as received. An error in the overall parity bit
// alone is reported as corrected; the data are unaffected.
module hamming84_dec (
  input  logic [7:0] code,
  output logic [3:0] data,
  output logic       corrected,
  output logic       uncorrectable
);

  logic [2:0] syn;
  logic       par_fail;
  logic [7:1] pos;     // pos[i] = Hamming position i

  always_comb begin
    pos      = code[6:0];
    syn[0]   = pos[1] ^ pos[3] ^ pos[5] ^ pos[7];
    syn[1]   = pos[2] ^ pos[3] ^ pos[6] ^ pos[7];
    syn[2]   = pos[4] ^ pos[5] ^ pos[6] ^ pos[7];
    par_fail = ^code;
    corrected     = par_fail;
    uncorrectable = !par_fail && (syn != 3'd0);
    if (par_fail && syn != 3'd0)
      pos[syn] = !pos[syn];
    data = {pos[7], pos[6], pos[5], pos[3]};
  end

endmodule
