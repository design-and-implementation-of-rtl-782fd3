// tb_sp_conv: feeds random elements with random gaps into two
// serial-to-parallel converters (1-bit x 8 and 36-bit x 16) and checks
// every parallel word against the elements sent, element 0 first, and that
// par_valid rises the cycle after the N-th element.
module tb_sp_conv;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic        v8, pv8;
  logic [0:0]  d8;
  logic [7:0][0:0] p8;
  logic        v16, pv16;
  logic [35:0] d16;
  logic [15:0][35:0] p16;

  sp_conv #(.W(1),  .N(8))  dut8  (.clk, .rst_n, .in_valid(v8),  .in_data(d8),  .par_valid(pv8),  .par_out(p8));
  sp_conv #(.W(36), .N(16)) dut16 (.clk, .rst_n, .in_valid(v16), .in_data(d16), .par_valid(pv16), .par_out(p16));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [0:0]  q8  [$];
  logic [35:0] q16 [$];
  int words8 = 0, words16 = 0;
  bit last8, last16;

  initial begin
    v8 = 0; v16 = 0; d8 = 0; d16 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      v8  = $urandom_range(0, 3) != 0;  d8  = 1'($urandom);
      v16 = $urandom_range(0, 4) != 0;  d16 = {4'($urandom), 32'($urandom)};
      if (v8)  q8.push_back(d8);
      if (v16) q16.push_back(d16);
      last8  = v8  && (q8.size()  == 8);
      last16 = v16 && (q16.size() == 16);
      @(posedge clk); #1;
      checks++;
      if (pv8 != last8) begin failures++; $display("FAIL pv8 timing at %0d", cyc); end
      if (pv8) begin
        words8++;
        for (int i = 0; i < 8; i++) begin
          checks++;
          if (p8[i] != q8[i]) begin failures++; $display("FAIL p8[%0d]", i); end
        end
        q8.delete();
      end else if (last8) q8.delete();
      checks++;
      if (pv16 != last16) begin failures++; $display("FAIL pv16 timing at %0d", cyc); end
      if (pv16) begin
        words16++;
        for (int i = 0; i < 16; i++) begin
          checks++;
          if (p16[i] != q16[i]) begin failures++; $display("FAIL p16[%0d]", i); end
        end
        q16.delete();
      end else if (last16) q16.delete();
    end
    checks++;
    if (words8 < 100 || words16 < 50) begin failures++; $display("FAIL too few words"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
