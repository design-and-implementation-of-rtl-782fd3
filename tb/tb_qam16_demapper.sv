// tb_qam16_demapper: sweeps I and Q over -5.0 .. +5.0 in random order,
// including the exact thresholds -2, 0, +2, and checks the di-bits against
// the decision table s<=-2:00, -2<s<=0:01, 0<s<=2:11, s>2:10.
module tb_qam16_demapper;
  import ofdm_pkg::*;
  logic clk = 0, rst_n = 0, iv = 0, ov;
  cplx_t    x = '0;
  qam_sym_t s;
  int checks = 0, failures = 0;

  qam16_demapper dut (.clk, .rst_n, .in_valid(iv), .in_sample(x), .out_valid(ov), .out_sym(s));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] dec(int v);
    if (v <= -2048) return 2'b00;
    if (v <= 0)     return 2'b01;
    if (v <= 2048)  return 2'b11;
    return 2'b10;
  endfunction

  initial begin
    int edges [6] = '{-2048, -2047, 0, 1, 2048, 2049};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int a, b;
      if (i < 36) begin a = edges[i % 6]; b = edges[i / 6]; end
      else begin a = $urandom_range(0, 10240) - 5120; b = $urandom_range(0, 10240) - 5120; end
      @(negedge clk); iv = 1; x.re = sample_t'(a); x.im = sample_t'(b);
      @(negedge clk); iv = 0;
      checks += 2;
      if (ov !== 1) failures++;
      if (s != {dec(a), dec(b)}) begin failures++; $display("FAIL %0d %0d -> %b", a, b, s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
