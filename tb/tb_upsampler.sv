// tb_upsampler: offers random symbols with random gaps and checks that each
// accepted symbol comes out exactly 16 times on consecutive cycles, first
// copy flagged, that symbols offered back to back leave no gap in the
// output, and that nothing is taken while the copies of the previous one
// are still running.
module tb_upsampler;
  logic clk = 0, rst_n = 0;
  logic iv, ir, ov, of;
  logic [3:0] id, od;
  int checks = 0, failures = 0;

  upsampler #(.W(4), .L(16)) dut (.clk, .rst_n, .in_valid(iv), .in_data(id), .in_ready(ir),
    .out_valid(ov), .out_first(of), .out_data(od));

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

  logic [3:0] q [$];
  int copies = 0, accepted = 0, outs = 0, gapless = 0;
  logic [3:0] cur;

  initial begin
    iv = 0; id = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      iv = (cyc < 3000) ? ($urandom_range(0, 20) == 0) : 1'b1;
      id = 4'($urandom);
      #1;
      // output side
      if (ov) begin
        outs++;
        if (of) begin
          check(copies == 0 || copies == 16, "previous symbol had 16 copies");
          check(q.size() > 0, "first copy of an accepted symbol");
          if (q.size() > 0) cur = q.pop_front();
          copies = 0;
        end
        check(od == cur, "copy value");
        copies++;
        check(copies <= 16, "no more than 16 copies");
      end else begin
        check(copies == 0 || copies == 16, "gap only after 16 copies");
        copies = 0;
      end
      if (iv && ir) begin
        q.push_back(id);
        accepted++;
        if (ov) gapless++;
      end
    end
    check(accepted > 200, "enough symbols");
    check(gapless > 100, "back-to-back symbols");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
