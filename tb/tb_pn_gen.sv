// tb_pn_gen: checks the PN source against an independent model of the
// sequence (recurrence b[n+6] = b[n+5] ^ b[n] on the output bits, from the
// register seeded 000001), its period of 63 and the one-cycle valid timing.
module tb_pn_gen;
  logic clk = 0, rst_n = 0, en = 0;
  logic bit_out, bit_valid;
  int checks = 0, failures = 0;

  pn_gen dut (.clk, .rst_n, .en, .bit_out, .bit_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    bit ref_bits [200];
    bit got [200];
    int n = 0;
    // model: register s (msb first out), s' = {s[4:0], s[5]^s[0]}
    logic [5:0] s = 6'b000001;
    for (int i = 0; i < 200; i++) begin
      ref_bits[i] = s[5];
      s = {s[4:0], s[5] ^ s[0]};
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(bit_valid == 0, "no valid after reset");
    // enable every other cycle to check that en gates the shift
    while (n < 200) begin
      @(negedge clk);
      en = ($urandom_range(0, 2) != 0);
      @(posedge clk); #1;
      if (en) begin
        check(bit_valid == 1, "valid one cycle after en");
        got[n] = bit_out;
        check(bit_out == ref_bits[n], $sformatf("bit %0d", n));
        n++;
      end else begin
        check(bit_valid == 0, "no valid without en");
      end
    end
    // period 63 and not shorter
    for (int i = 0; i < 200 - 63; i++) check(got[i] == got[i+63], "period 63");
    begin
      int ones = 0;
      for (int i = 0; i < 63; i++) ones += got[i];
      check(ones == 32, "maximal-length sequence has 32 ones per period");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
