// tb_block_decoder: for every 8-bit word, builds its codeword with a
// reference coder written here, then checks the decoder on the clean
// codeword, on every single-bit error (corrected, flag raised for that
// half), on one error in each half at once (both corrected, the document's
// two errors per 8-bit output) and on double errors in one half (flagged
// uncorrectable).
module tb_block_decoder;
  logic clk = 0, rst_n = 0, iv = 0, ov;
  logic [15:0] cin = '0;
  logic [7:0]  dout;
  logic [1:0]  corr, unc;
  int checks = 0, failures = 0;

  block_decoder dut (.clk, .rst_n, .in_valid(iv), .code_in(cin), .out_valid(ov),
                     .data_out(dout), .corrected(corr), .uncorrectable(unc));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [7:0] ref_code(logic [3:0] d);
    logic [7:0] c;
    c[2] = d[0]; c[4] = d[1]; c[5] = d[2]; c[6] = d[3];
    c[0] = c[2] ^ c[4] ^ c[6];
    c[1] = c[2] ^ c[5] ^ c[6];
    c[3] = c[4] ^ c[5] ^ c[6];
    c[7] = ^c[6:0];
    return c;
  endfunction

  task automatic apply(logic [15:0] c);
    @(negedge clk); iv = 1; cin = c;
    @(negedge clk); iv = 0;
    check(ov == 1, "valid after one cycle");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 256; w++) begin
      logic [15:0] good;
      good = {ref_code(4'(w >> 4)), ref_code(4'(w))};
      apply(good);
      check(dout == 8'(w) && corr == 0 && unc == 0, "clean word");
      for (int b = 0; b < 16; b++) begin
        apply(good ^ (16'd1 << b));
        check(dout == 8'(w), $sformatf("single error w=%0d bit=%0d", w, b));
        check(corr == ((b >= 8) ? 2'b10 : 2'b01) && unc == 0, "corrected flag");
      end
      begin
        int b0 = $urandom_range(0, 7), b1 = $urandom_range(8, 15);
        apply(good ^ (16'd1 << b0) ^ (16'd1 << b1));
        check(dout == 8'(w) && corr == 2'b11, "one error per half");
      end
      begin
        int b0 = $urandom_range(0, 7), b1;
        do b1 = $urandom_range(0, 7); while (b1 == b0);
        apply(good ^ (16'd1 << b0) ^ (16'd1 << b1));
        check(unc == 2'b01 && corr == 2'b00, "double error detected");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
