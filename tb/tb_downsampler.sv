// tb_downsampler: feeds a symbol stream with random gaps and checks that
// exactly every 16th valid symbol (the last of each group counted from
// reset) is passed on, one cycle later, and the others are reported dropped.
module tb_downsampler;
  logic clk = 0, rst_n = 0;
  logic iv, ov, dr;
  logic [3:0] id, od;
  int checks = 0, failures = 0;

  downsampler #(.W(4), .M(16)) dut (.clk, .rst_n, .in_valid(iv), .in_data(id),
    .out_valid(ov), .out_data(od), .dropped(dr));

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

  int n = 0, kept = 0;

  initial begin
    iv = 0; id = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      bit expect_keep, expect_drop;
      logic [3:0] sent;
      @(negedge clk);
      iv = $urandom_range(0, 3) != 0;
      id = 4'($urandom);
      sent = id;
      expect_keep = iv && (n % 16 == 15);
      expect_drop = iv && !expect_keep;
      if (iv) n++;
      @(posedge clk); #1;
      check(ov == expect_keep, "keep timing");
      check(dr == expect_drop, "drop flag");
      if (expect_keep) begin kept++; check(od == sent, "kept value"); end
    end
    check(kept == n / 16, "one of each 16 kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
