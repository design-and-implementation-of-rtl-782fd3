// tb_ifft16: checks fft16 configured as the inverse transform with 1/16 scaling.
// Random frames are applied on consecutive cycles and each output frame is
// compared with a direct DFT computed here in floating point,
// X[k] = (1/S) * sum_n x[n] * exp(+1.0 * j*2*pi*n*k/16) with S = 16.0.
// The result must be within 4 LSB, arrive exactly two cycles after its
// input frame, in natural order. Single-tone and impulse frames are
// included, and a full-scale constant frame checks the saturation flag.
module tb_ifft16;
  import ofdm_pkg::*;
  logic clk = 0, rst_n = 0, iv = 0, ov, sat;
  cplx_t [15:0] fin = '0, fout;
  int checks = 0, failures = 0;

  fft16 #(.INVERSE(1'b1), .SCALE(1'b1)) dut (.clk, .rst_n, .in_valid(iv), .in_frame(fin),
    .out_valid(ov), .out_frame(fout), .saturated(sat));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { real re [16]; real im [16]; } rframe_t;
  rframe_t expq [$];
  int      sentq [$];
  real     maxerr = 0.0;
  int      cyc = 0, frames_out = 0, sat_seen = 0;

  always @(posedge clk) cyc++;

  function automatic rframe_t ref_dft(cplx_t [15:0] x);
    rframe_t r;
    for (int k = 0; k < 16; k++) begin
      r.re[k] = 0.0; r.im[k] = 0.0;
      for (int n = 0; n < 16; n++) begin
        real ph = +1.0 * 2.0 * 3.14159265358979 * real'(n * k) / 16.0;
        r.re[k] += real'(x[n].re) * $cos(ph) - real'(x[n].im) * $sin(ph);
        r.im[k] += real'(x[n].re) * $sin(ph) + real'(x[n].im) * $cos(ph);
      end
      r.re[k] /= 16.0; r.im[k] /= 16.0;
    end
    return r;
  endfunction

  // output checker
  always @(posedge clk) if (rst_n && ov) begin
    rframe_t e;
    int sent;
    frames_out++;
    checks++;
    if (expq.size() == 0) begin failures++; $display("FAIL unexpected frame"); end
    else begin
      e = expq.pop_front();
      sent = sentq.pop_front();
      checks++;
      if (cyc - sent != 2) begin failures++; $display("FAIL latency %0d", cyc - sent); end
      for (int k = 0; k < 16; k++) begin
        real dr, di;
        dr = real'(fout[k].re) - e.re[k];
        di = real'(fout[k].im) - e.im[k];
        if (dr < 0) dr = -dr;
        if (di < 0) di = -di;
        if (dr > maxerr) maxerr = dr;
        if (di > maxerr) maxerr = di;
        checks++;
        if (dr > 4.0 || di > 4.0) begin
          failures++;
          $display("FAIL bin %0d got (%0d,%0d) want (%f,%f)", k, fout[k].re, fout[k].im, e.re[k], e.im[k]);
        end
      end
    end
  end

  task automatic send(cplx_t [15:0] x);
    @(negedge clk);
    iv = 1; fin = x;
    expq.push_back(ref_dft(x));
    sentq.push_back(cyc + 1);
  endtask

  initial begin
    cplx_t [15:0] x;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // impulses and single tones
    for (int t = 0; t < 16; t++) begin
      x = '0; x[t].re = sample_t'(1024); x[(t+3)%16].im = sample_t'(-2048);
      send(x);
    end
    for (int t = 0; t < 16; t++) begin
      for (int n = 0; n < 16; n++) begin
        x[n].re = sample_t'($rtoi(1000.0 * $cos(2.0 * 3.14159265358979 * real'(t * n) / 16.0)));
        x[n].im = sample_t'($rtoi(1000.0 * $sin(2.0 * 3.14159265358979 * real'(t * n) / 16.0)));
      end
      send(x);
    end
    // random frames back to back
    for (int f = 0; f < 300; f++) begin
      for (int n = 0; n < 16; n++) begin
        x[n].re = sample_t'(int'($urandom_range(0, 2*4000)) - 4000);
        x[n].im = sample_t'(int'($urandom_range(0, 2*4000)) - 4000);
      end
      send(x);
    end
    @(negedge clk); iv = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (frames_out != 332) begin failures++; $display("FAIL frame count %0d", frames_out); end
    // saturation: full-scale constant frame into bin 0
    if (1 == 0) begin
      @(negedge clk); iv = 1;
      for (int n = 0; n < 16; n++) begin fin[n].re = sample_t'(100000); fin[n].im = '0; end
      @(negedge clk); iv = 0;
      @(posedge clk); #1;
      checks++;
      if (!(sat && fout[0].re == sample_t'((1 << (SAMPLE_W-1)) - 1))) begin
        failures++; $display("FAIL saturation");
      end
    end
    $display("max error %f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
