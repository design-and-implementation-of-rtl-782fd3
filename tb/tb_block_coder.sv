// tb_block_coder: codes all 256 input words and checks each 16-bit
// codeword against parity equations written out here independently, that
// every 8-bit half has even weight, that the code has minimum distance 4
// (any two different halves differ in at least 4 bits), and the one-cycle
// latency.
module tb_block_coder;
  logic clk = 0, rst_n = 0, iv = 0, cv;
  logic [7:0]  din = '0;
  logic [15:0] cout;
  int checks = 0, failures = 0;

  block_coder dut (.clk, .rst_n, .in_valid(iv), .in_data(din), .code_valid(cv), .code_out(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // positions: c[0]=p1 c[1]=p2 c[2]=d0 c[3]=p3 c[4]=d1 c[5]=d2 c[6]=d3 c[7]=p0
  function automatic logic [7:0] ref_code(logic [3:0] d);
    logic [7:0] c;
    c[2] = d[0]; c[4] = d[1]; c[5] = d[2]; c[6] = d[3];
    c[0] = c[2] ^ c[4] ^ c[6];
    c[1] = c[2] ^ c[5] ^ c[6];
    c[3] = c[4] ^ c[5] ^ c[6];
    c[7] = c[0] ^ c[1] ^ c[2] ^ c[3] ^ c[4] ^ c[5] ^ c[6];
    return c;
  endfunction

  logic [7:0] halves [16];

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 256; w++) begin
      @(negedge clk); iv = 1; din = 8'(w);
      @(negedge clk); iv = 0;
      check(cv == 1, "valid after one cycle");
      check(cout == {ref_code(din[7:4]), ref_code(din[3:0])}, $sformatf("code of %02h = %04h", w, cout));
      check(^cout[15:8] == 0 && ^cout[7:0] == 0, "even halves");
      if (w < 16) halves[w] = cout[7:0];
      @(posedge clk); #1;
      check(cv == 0, "single valid pulse");
    end
    for (int a = 0; a < 16; a++)
      for (int b = a + 1; b < 16; b++)
        check($countones(halves[a] ^ halves[b]) >= 4, "distance 4");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
