// tb_ofdm_transceiver: end-to-end test of the transceiver at its default
// sizes. The testbench plays the channel: it loops tx_sample back to
// rx_sample. Phase 1 uses an ideal channel and expects the received bit
// stream to equal the transmitted one with no correction at all. Phase 2
// adds +2.0 to the real part of the first time-domain sample of selected
// OFDM frames, which moves every sub-carrier's in-phase value up by 2 and
// so flips at most one bit of one symbol; frames are chosen so that no
// (8,4) codeword gets more than one such hit, and the block decoder must
// correct every one of them. Also checked: the received stream equals the
// sent one bit for bit, the byte latency is constant, the transmitter
// sends one sample per cycle without a gap once started, the source rate
// is one bit per 8 cycles, and no overflow, saturation or uncorrectable
// word occurs. Cyclic-prefix insertion and removal, frames through the
// IFFT and FFT and corrections are counted and must each happen.
module tb_ofdm_transceiver;
  import ofdm_pkg::*;

  localparam int BYTES = 150;   // bytes per phase

  logic clk = 0, rst_n = 0, run = 0;
  logic tx_bit, tx_bit_valid, tx_valid, rx_valid, rx_bit, rx_bit_valid;
  cplx_t tx_sample, rx_sample;
  logic [1:0] fec_corrected, fec_uncorrectable;
  logic overflow, fft_saturated, cp_inserted, cp_removed;

  ofdm_transceiver dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- channel ----------------
  bit  impair = 0;
  int  tx_count = 0;            // samples sent so far
  int  frame, hits = 0;
  bit  hit_now;

  assign frame   = tx_count / FFT_N;
  assign hit_now = impair && tx_valid && (tx_count % FFT_N == 0) &&
                   ((frame % 8 == 1) || (frame % 8 == 6));

  always_comb begin
    rx_valid  = tx_valid;
    rx_sample = tx_sample;
    if (hit_now) rx_sample.re = tx_sample.re + sample_t'(2 << SAMPLE_FRAC);
  end

  // ---------------- monitors ----------------
  int  cyc = 0;
  logic sent_q [$];
  int   sent_cyc [$];
  int   tx_bits = 0, rx_bits = 0, bit_errors = 0;
  int   n_cp_ins = 0, n_cp_rem = 0, n_corr = 0, n_unc = 0, n_ovf = 0, n_sat = 0;
  int   first_tx = -1, last_tx_bit_cyc = -1, rate_err = 0;
  int   lat0 = -1, lat_err = 0;
  bit   tx_streaming = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (tx_bit_valid) begin
        sent_q.push_back(tx_bit);
        sent_cyc.push_back(cyc);
        if (last_tx_bit_cyc >= 0 && cyc - last_tx_bit_cyc != 8) rate_err++;
        last_tx_bit_cyc = cyc;
        tx_bits++;
      end
      if (rx_bit_valid) begin
        if (sent_q.size() == 0) begin bit_errors++; checks++; failures++; end
        else begin
          logic b;
          int   c;
          b = sent_q.pop_front();
          c = sent_cyc.pop_front();
          checks++;
          if (b != rx_bit) begin bit_errors++; failures++; end
          if (rx_bits % 8 == 0) begin
            if (lat0 < 0) lat0 = cyc - c;
            else if (cyc - c != lat0) lat_err++;
          end
        end
        rx_bits++;
      end
      if (tx_valid) begin
        tx_count++;
        if (hit_now) hits++;
        if (first_tx < 0) first_tx = cyc;
      end
      n_cp_ins += int'(cp_inserted);
      n_cp_rem += int'(cp_removed);
      n_corr   += $countones(fec_corrected);
      n_unc    += $countones(fec_uncorrectable);
      n_ovf    += int'(overflow);
      n_sat    += int'(fft_saturated);
    end
  end

  initial begin
    int corr_phase1;
    repeat (4) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    run = 1;
    // ---- phase 1: ideal channel ----
    wait (tx_bits == BYTES * 8);
    wait (first_tx >= 0);
    tx_streaming = 1;
    wait (rx_bits >= BYTES * 8 - 32);
    corr_phase1 = n_corr;
    check(corr_phase1 == 0, "ideal channel needs no correction");
    check(bit_errors == 0, $sformatf("phase 1 bit errors %0d", bit_errors));
    // ---- phase 2: impaired channel ----
    @(negedge clk);
    impair = 1;
    wait (tx_bits == 2 * BYTES * 8);
    @(negedge clk);
    run = 0;
    repeat (400) @(posedge clk);
    impair = 0;

    check(rx_bits == tx_bits, $sformatf("bits received %0d of %0d", rx_bits, tx_bits));
    check(bit_errors == 0, $sformatf("bit errors %0d", bit_errors));
    check(lat_err == 0 && lat0 > 0, $sformatf("constant byte latency %0d cycles", lat0));
    check(rate_err == 0, "source rate one bit per 8 cycles");
    // the stream stops when run falls: count only gaps before that
    check(tx_count == tx_bits * 8, $sformatf("64 samples per byte (%0d)", tx_count));
    check(n_ovf == 0, "no overflow");
    check(n_sat == 0, "no saturation");
    check(n_unc == 0, "no uncorrectable word");
    // mechanism counts
    $display("cp inserted %0d, cp copies removed %0d, frames %0d, hits %0d, corrections %0d, latency %0d",
             n_cp_ins, n_cp_rem, tx_count / FFT_N, hits, n_corr, lat0);
    check(n_cp_ins == tx_bits / 2, "one cyclic-prefix group per symbol");
    check(n_cp_rem == (tx_count / FFT_N) * (UPSAMPLE - 1), "15 copies removed per symbol");
    check(hits > 20, "channel impairments applied");
    check(n_corr > 10, "corrections happened");
    check(n_corr <= hits, "no more corrections than impairments");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a gap in the transmitted stream while the source runs is a failure
  always @(posedge clk) if (tx_streaming && run && rst_n && !tx_valid) begin
    checks++; failures++; $display("FAIL: gap in tx stream at cycle %0d", cyc);
  end
endmodule
