// tb_qam16_mapper: maps all 16 symbols and checks the I and Q levels
// against the Gray table 00:-3 01:-1 11:+1 10:+3 (1.0 = 1024), and the
// one-cycle latency.
module tb_qam16_mapper;
  import ofdm_pkg::*;
  logic clk = 0, rst_n = 0, iv = 0, ov;
  qam_sym_t s = '0;
  cplx_t    o;
  int checks = 0, failures = 0;

  qam16_mapper dut (.clk, .rst_n, .in_valid(iv), .in_sym(s), .out_valid(ov), .out_sample(o));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lvl(logic [1:0] d);
    case (d) 2'b00: return -3; 2'b01: return -1; 2'b11: return 1; default: return 3; endcase
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++)
      for (int v = 0; v < 16; v++) begin
        @(negedge clk); iv = 1; s = 4'(v);
        @(negedge clk); iv = 0;
        checks += 3;
        if (ov !== 1) failures++;
        if (int'(o.re) != lvl(s[3:2]) * 1024) begin failures++; $display("FAIL re %0d", v); end
        if (int'(o.im) != lvl(s[1:0]) * 1024) begin failures++; $display("FAIL im %0d", v); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
