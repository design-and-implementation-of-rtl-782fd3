// pn_gen: pseudo-random bit source for the transmitter.
//
// A 6-stage Fibonacci linear feedback shift register with the primitive
// polynomial z^6 + z + 1 (period 63 bits). The register is loaded with SEED
// on reset; on each cycle with `en` high it shifts once and `bit_out`
// presents the next bit, flagged by `bit_valid` in the following cycle.
// A random binary source feeding the transmitter is the design's; the
// polynomial and seed are the usual defaults of a PN sequence generator
// and are this design's choice.
module pn_gen #(
  parameter int          LEN  = 6,
  parameter logic [LEN-1:0] POLY = 6'b100001, // taps z^6 (bit 5) and z^1 (bit 0)
  parameter logic [LEN-1:0] SEED = 6'b000001
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic bit_out,
  output logic bit_valid
);

  logic [LEN-1:0] state;
  logic           fb;

  // feedback: XOR of the tapped stages
  assign fb = ^(state & POLY);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= SEED;
      bit_out   <= 1'b0;
      bit_valid <= 1'b0;
    end else begin
      bit_valid <= en;
      if (en) begin
        bit_out <= state[LEN-1];
        state   <= {state[LEN-2:0], fb};
      end
    end
  end

  initial assert (SEED != '0) else $error("pn_gen: all-zero seed locks the LFSR");

endmodule
