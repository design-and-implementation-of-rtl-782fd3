// fft16: 16-point FFT / IFFT, radix 2^2, frame-parallel.
//
// The 16-point transform is factored as 4 x 4 (radix 2^2, i.e. two radix-4
// stages), decimation in frequency with n = 4*n1 + n2 and k = k1 + 4*k2:
//   stage 1: for each n2, a 4-point DFT over n1 gives Y[n2][k1], which is
//            multiplied by the twiddle factor W16^(n2*k1);
//   stage 2: for each k1, a 4-point DFT over n2 gives X[k1 + 4*k2].
// Each 4-point DFT is two layers of radix-2 butterflies with a trivial -j
// (or +j) rotation. INVERSE=1 conjugates every rotation and twiddle, giving
// the inverse transform. SCALE=1 divides every radix-2 butterfly output by
// two (rounded), 1/16 in all, so that the transmitter's IFFT followed by the
// receiver's unscaled FFT returns the 16-QAM levels at their own size and
// the demapper's thresholds -2, 0, +2 apply unchanged.
// Complex multiplications use four real multipliers and two adders; twiddles
// are round(2^14*cos(2*pi*k/16)) and round(2^14*sin(2*pi*k/16)).
//
// Interface: a whole frame of 16 complex samples enters on in_frame when
// in_valid is high (the serial-to-parallel converter of order 16 in front of
// it gathers it), and the transformed frame leaves on out_frame two cycles
// later with out_valid. Both sides are in natural order unless BITREV_IN /
// BITREV_OUT select bit-reversed order (element i at index bitrev(i)), the
// two order options of the original transform blocks. A frame can
// be accepted every cycle. Results beyond the SAMPLE_W-bit range saturate
// and raise `saturated` with out_valid.
// Transform length, radix 2^2, the four-multiplier complex product and the
// butterfly scaling option follow the document. Processing a parallel frame
// instead of a single-path streaming pipeline, natural order by default and
// the word lengths are this design's choice.
module fft16
  import ofdm_pkg::*;
#(
  parameter bit INVERSE = 1'b0,
  parameter bit SCALE   = 1'b0,
  parameter bit BITREV_IN  = 1'b0,  // in_frame[bitrev(n)] holds x[n]
  parameter bit BITREV_OUT = 1'b0   // out_frame[bitrev(k)] holds X[k]
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  cplx_t [15:0]    in_frame,
  output logic            out_valid,
  output cplx_t [15:0]    out_frame,
  output logic            saturated
);

  localparam int IW = SAMPLE_W + 6;   // internal width: 4 bits of growth + guard

  typedef logic signed [IW-1:0] acc_t;
  typedef struct packed { acc_t re; acc_t im; } wide_t;

  localparam logic signed [15:0] COS [16] = '{
    16'sd16384,  16'sd15137,  16'sd11585,  16'sd6270,
    16'sd0,     -16'sd6270,  -16'sd11585, -16'sd15137,
   -16'sd16384, -16'sd15137, -16'sd11585, -16'sd6270,
    16'sd0,      16'sd6270,   16'sd11585,  16'sd15137 };
  localparam logic signed [15:0] SIN [16] = '{
    16'sd0,      16'sd6270,   16'sd11585,  16'sd15137,
    16'sd16384,  16'sd15137,  16'sd11585,  16'sd6270,
    16'sd0,     -16'sd6270,  -16'sd11585, -16'sd15137,
   -16'sd16384, -16'sd15137, -16'sd11585, -16'sd6270 };

  // radix-2 butterfly output, halved with rounding when SCALE is set
  function automatic acc_t bscale(acc_t v);
    if (SCALE) return (v + acc_t'(1)) >>> 1;
    else       return v;
  endfunction

  // 4-point DFT (inverse if INVERSE) as two radix-2 layers
  function automatic void dft4(input wide_t a, input wide_t b, input wide_t c,
                               input wide_t d, output wide_t y [4]);
    wide_t s0, s1, s2, s3, rot;
    s0.re = bscale(a.re + c.re);  s0.im = bscale(a.im + c.im);
    s1.re = bscale(a.re - c.re);  s1.im = bscale(a.im - c.im);
    s2.re = bscale(b.re + d.re);  s2.im = bscale(b.im + d.im);
    s3.re = bscale(b.re - d.re);  s3.im = bscale(b.im - d.im);
    // rot = -j*s3 (forward) or +j*s3 (inverse)
    if (INVERSE) begin rot.re = -s3.im; rot.im =  s3.re; end
    else         begin rot.re =  s3.im; rot.im = -s3.re; end
    y[0].re = bscale(s0.re + s2.re);   y[0].im = bscale(s0.im + s2.im);
    y[2].re = bscale(s0.re - s2.re);   y[2].im = bscale(s0.im - s2.im);
    y[1].re = bscale(s1.re + rot.re);  y[1].im = bscale(s1.im + rot.im);
    y[3].re = bscale(s1.re - rot.re);  y[3].im = bscale(s1.im - rot.im);
  endfunction

  // multiply by W16^k (conjugated when INVERSE), Q1.14 twiddle, rounded
  function automatic wide_t twiddle(wide_t v, int k);
    logic signed [IW+16:0] pr, pi;
    logic signed [15:0]    c, s;
    wide_t                 r;
    c = COS[k % 16];
    s = INVERSE ? SIN[k % 16] : -SIN[k % 16];
    pr = (IW+17)'(v.re) * c - (IW+17)'(v.im) * s;
    pi = (IW+17)'(v.re) * s + (IW+17)'(v.im) * c;
    pr = pr + (IW+17)'(1 <<< (TW_FRAC-1));
    pi = pi + (IW+17)'(1 <<< (TW_FRAC-1));
    r.re = acc_t'(pr >>> TW_FRAC);
    r.im = acc_t'(pi >>> TW_FRAC);
    return r;
  endfunction

  function automatic sample_t sat(acc_t v, ref logic flag);
    localparam acc_t MAXV = acc_t'((1 <<< (SAMPLE_W-1)) - 1);
    localparam acc_t MINV = -acc_t'(1 <<< (SAMPLE_W-1));
    if (v > MAXV) begin flag = 1'b1; return sample_t'(MAXV); end
    if (v < MINV) begin flag = 1'b1; return sample_t'(MINV); end
    return sample_t'(v);
  endfunction

  function automatic int bitrev4(int i);
    return ((i & 1) << 3) | ((i & 2) << 1) | ((i & 4) >> 1) | ((i & 8) >> 3);
  endfunction

  // ---------------- input order ----------------
  cplx_t [15:0] x_nat;

  always_comb
    for (int n = 0; n < 16; n++)
      x_nat[n] = in_frame[BITREV_IN ? bitrev4(n) : n];

  // ---------------- stage 1 ----------------
  wide_t s1_c [16];   // index n2*4 + k1
  wide_t s1_q [16];
  logic  s1_valid;

  always_comb begin
    wide_t a, b, c, d;
    wide_t y [4];
    for (int n2 = 0; n2 < 4; n2++) begin
      a.re = acc_t'(x_nat[n2].re);      a.im = acc_t'(x_nat[n2].im);
      b.re = acc_t'(x_nat[4+n2].re);    b.im = acc_t'(x_nat[4+n2].im);
      c.re = acc_t'(x_nat[8+n2].re);    c.im = acc_t'(x_nat[8+n2].im);
      d.re = acc_t'(x_nat[12+n2].re);   d.im = acc_t'(x_nat[12+n2].im);
      dft4(a, b, c, d, y);
      for (int k1 = 0; k1 < 4; k1++)
        s1_c[n2*4 + k1] = twiddle(y[k1], n2 * k1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      for (int i = 0; i < 16; i++) s1_q[i] <= '0;
    end else begin
      s1_valid <= in_valid;
      if (in_valid) s1_q <= s1_c;
    end
  end

  // ---------------- stage 2 ----------------
  cplx_t [15:0] s2_c;
  logic         sat_c;

  always_comb begin
    wide_t y [4];
    sat_c = 1'b0;
    for (int k1 = 0; k1 < 4; k1++) begin
      dft4(s1_q[k1], s1_q[4+k1], s1_q[8+k1], s1_q[12+k1], y);
      for (int k2 = 0; k2 < 4; k2++) begin
        s2_c[BITREV_OUT ? bitrev4(k1 + 4*k2) : k1 + 4*k2].re = sat(y[k2].re, sat_c);
        s2_c[BITREV_OUT ? bitrev4(k1 + 4*k2) : k1 + 4*k2].im = sat(y[k2].im, sat_c);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_frame <= '0;
      saturated <= 1'b0;
    end else begin
      out_valid <= s1_valid;
      saturated <= s1_valid && sat_c;
      if (s1_valid) out_frame <= s2_c;
    end
  end

endmodule
