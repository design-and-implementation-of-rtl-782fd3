// tb_ps_conv: offers random 8-bit words to a 1-bit x 8 parallel-to-serial
// converter under random serial backpressure and checks that the serial
// stream carries every accepted word, element 0 first; that par_ready
// allows back-to-back words (8 bits in 8 cycles with out_ready held); and
// that a word offered while busy is refused and flagged as overflow.
module tb_ps_conv;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic pv, pr, ov, ordy, od, ovf;
  logic [7:0][0:0] pin;

  ps_conv #(.W(1), .N(8)) dut (.clk, .rst_n, .par_valid(pv), .par_in(pin), .par_ready(pr),
    .out_valid(ov), .out_ready(ordy), .out_data(od), .overflow(ovf));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic exp_q [$];
  int nbits = 0, ovf_seen = 0, ovf_expected = 0;

  initial begin
    pv = 0; pin = '0; ordy = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: random traffic
    for (int cyc = 0; cyc < 3000; cyc++) begin
      bit acc, drop;
      @(negedge clk);
      pv   = $urandom_range(0, 5) == 0;
      pin  = 8'($urandom);
      ordy = $urandom_range(0, 3) != 0;
      #1;
      acc  = pv && pr;
      drop = pv && !pr;
      if (ov && ordy) begin
        check(exp_q.size() > 0, "output with nothing expected");
        if (exp_q.size() > 0) check(od == exp_q.pop_front(), "serial bit");
        nbits++;
      end
      if (acc) for (int i = 0; i < 8; i++) exp_q.push_back(pin[i]);
      @(posedge clk); #1;
      if (drop) begin ovf_expected++; check(ovf == 1, "overflow flagged"); end
      else check(ovf == 0, "no spurious overflow");
      if (ovf) ovf_seen++;
    end
    // phase 2: back to back at full rate
    @(negedge clk); pv = 0; ordy = 1;
    while (ov) begin
      if (exp_q.size() > 0) check(od == exp_q.pop_front(), "drain bit");
      @(negedge clk);
    end
    begin
      int cycles = 0, got = 0;
      logic [7:0] w [4] = '{8'hA5, 8'h3C, 8'hF0, 8'h81};
      int wi = 0;
      while (got < 32 && cycles < 100) begin
        @(negedge clk);
        pv = (wi < 4); pin = (wi < 4) ? w[wi] : '0;
        #1;
        if (ov) begin
          check(od == w[got/8][got%8], "b2b bit");
          got++;
        end
        if (pv && pr) wi++;
        cycles++;
      end
      check(got == 32, "all b2b bits");
      check(cycles == 33, $sformatf("32 bits in 32 cycles after the load (took %0d)", cycles));
    end
    check(nbits > 500, "enough traffic");
    check(ovf_expected > 0 && ovf_seen == ovf_expected, "overflows seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
