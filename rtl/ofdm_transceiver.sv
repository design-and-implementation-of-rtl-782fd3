// ofdm_transceiver: 16-QAM OFDM transceiver with (8,4) block coding.
//
// Transmitter: a PN bit source -> serial-to-parallel 8/1 -> block coder
// (two (8,4) coders, 8 -> 16 bits) -> split into four 4-bit 16-QAM symbols
// -> upsampler (each symbol repeated 16 times, the cyclic prefix) -> I/Q
// DMUX and Gray mapping to -3,-1,+1,+3 -> serial-to-parallel of order 16 ->
// 16-point IFFT (scaled by 1/16) -> one time-domain sample per cycle on
// tx_sample.
// Receiver: rx_sample -> serial-to-parallel of order 16 -> 16-point FFT
// (unscaled) -> parallel-to-serial -> threshold demapper (-2, 0, +2) and
// I/Q MUX -> downsampler (keeps the last of each 16 copies) ->
// serial-to-parallel to 16-bit codewords -> block decoder (two (8,4)
// decoders) -> parallel-to-serial 8/1 -> rx_bit.
//
// The channel, ideal in this design, lies outside: connect tx_valid /
// tx_sample to rx_valid / rx_sample for a loopback. Timing: with `run` high
// the source emits one bit every UPSAMPLE/2 = 8 cycles, which is exactly the
// rate the chain carries (8 data bits -> 16 coded bits -> 4 symbols -> 64
// samples), so after the first frame tx_valid is high on every cycle. The
// receive side delivers each decoded byte as a burst of 8 bits on rx_bit,
// first-sent bit first. tx_bit/tx_bit_valid show the source bits for
// comparison with rx_bit. Status pulses: fec_corrected and
// fec_uncorrectable per decoded 8-bit half, overflow if any converter drops
// a word (cannot happen at the built-in rate), fft_saturated if a transform
// result clipped, cp_inserted when a symbol starts its 16 copies and
// cp_removed for each received copy the downsampler discards.
// The chain of blocks and its ratios follow the document; the pacing
// strobe, the bit and symbol orders and the status outputs are this
// design's own.
module ofdm_transceiver
  import ofdm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  // source bits, for comparison
  output logic        tx_bit,
  output logic        tx_bit_valid,
  // time-domain samples to the channel
  output logic        tx_valid,
  output cplx_t       tx_sample,
  // time-domain samples from the channel
  input  logic        rx_valid,
  input  cplx_t       rx_sample,
  // received bits
  output logic        rx_bit,
  output logic        rx_bit_valid,
  // status
  output logic [1:0]  fec_corrected,
  output logic [1:0]  fec_uncorrectable,
  output logic        overflow,
  output logic        fft_saturated,
  output logic        cp_inserted,   // a symbol starts its 16 copies
  output logic        cp_removed     // a received copy is discarded
);

  localparam int BIT_PERIOD = UPSAMPLE / 2;  // cycles per source bit
  localparam int PW = $clog2(BIT_PERIOD);

  // ---------------- source pacing ----------------
  logic [PW-1:0] pace;
  logic          bit_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    pace <= '0;
    else if (run)  pace <= (pace == PW'(BIT_PERIOD-1)) ? '0 : pace + 1'b1;
  end
  assign bit_en = run && (pace == '0);

  // ---------------- transmitter ----------------
  logic             src_bit, src_valid;
  logic             byte_valid;
  logic [7:0][0:0]  byte_bits;
  logic             cw_valid;
  logic [15:0]      cw;
  logic             sym_valid, sym_ready;
  qam_sym_t         sym;
  logic             up_valid, up_first;
  qam_sym_t         up_sym;
  logic             map_valid;
  cplx_t            map_sample;
  logic             txf_valid, ifft_valid;
  cplx_t [15:0]     txf, ifft_out;
  logic             ovf_sym, ovf_tx, ovf_rx, ovf_bit;
  logic             sat_tx, sat_rx;
  logic             txps_ready, rxps_ready, bitps_ready, cw_ready;

  pn_gen u_src (.clk, .rst_n, .en(bit_en), .bit_out(src_bit), .bit_valid(src_valid));

  assign tx_bit       = src_bit;
  assign tx_bit_valid = src_valid;

  sp_conv #(.W(1), .N(8)) u_sp_bits (
    .clk, .rst_n, .in_valid(src_valid), .in_data(src_bit),
    .par_valid(byte_valid), .par_out(byte_bits));

  block_coder u_coder (
    .clk, .rst_n, .in_valid(byte_valid), .in_data(byte_bits),
    .code_valid(cw_valid), .code_out(cw));

  ps_conv #(.W(4), .N(4)) u_ps_sym (
    .clk, .rst_n, .par_valid(cw_valid), .par_in(cw), .par_ready(cw_ready),
    .out_valid(sym_valid), .out_ready(sym_ready), .out_data(sym),
    .overflow(ovf_sym));

  upsampler #(.W(4), .L(UPSAMPLE)) u_up (
    .clk, .rst_n, .in_valid(sym_valid), .in_data(sym), .in_ready(sym_ready),
    .out_valid(up_valid), .out_first(up_first), .out_data(up_sym));

  qam16_mapper u_map (
    .clk, .rst_n, .in_valid(up_valid), .in_sym(up_sym),
    .out_valid(map_valid), .out_sample(map_sample));

  sp_conv #(.W(CPLX_W), .N(FFT_N)) u_sp_tx (
    .clk, .rst_n, .in_valid(map_valid), .in_data(map_sample),
    .par_valid(txf_valid), .par_out(txf));

  fft16 #(.INVERSE(1'b1), .SCALE(1'b1)) u_ifft (
    .clk, .rst_n, .in_valid(txf_valid), .in_frame(txf),
    .out_valid(ifft_valid), .out_frame(ifft_out), .saturated(sat_tx));

  ps_conv #(.W(CPLX_W), .N(FFT_N)) u_ps_tx (
    .clk, .rst_n, .par_valid(ifft_valid), .par_in(ifft_out), .par_ready(txps_ready),
    .out_valid(tx_valid), .out_ready(1'b1), .out_data(tx_sample),
    .overflow(ovf_tx));

  // ---------------- receiver ----------------
  logic             rxf_valid, fft_valid;
  cplx_t [15:0]     rxf, fft_out;
  logic             bin_valid;
  cplx_t            bin;
  logic             dem_valid;
  qam_sym_t         dem_sym;
  logic             ds_valid, ds_dropped;
  qam_sym_t         ds_sym;
  logic             rcw_valid;
  logic [3:0][3:0]  rcw;
  logic             dec_valid;
  logic [7:0]       dec_byte;

  sp_conv #(.W(CPLX_W), .N(FFT_N)) u_sp_rx (
    .clk, .rst_n, .in_valid(rx_valid), .in_data(rx_sample),
    .par_valid(rxf_valid), .par_out(rxf));

  fft16 #(.INVERSE(1'b0), .SCALE(1'b0)) u_fft (
    .clk, .rst_n, .in_valid(rxf_valid), .in_frame(rxf),
    .out_valid(fft_valid), .out_frame(fft_out), .saturated(sat_rx));

  ps_conv #(.W(CPLX_W), .N(FFT_N)) u_ps_rx (
    .clk, .rst_n, .par_valid(fft_valid), .par_in(fft_out), .par_ready(rxps_ready),
    .out_valid(bin_valid), .out_ready(1'b1), .out_data(bin),
    .overflow(ovf_rx));

  qam16_demapper u_demap (
    .clk, .rst_n, .in_valid(bin_valid), .in_sample(bin),
    .out_valid(dem_valid), .out_sym(dem_sym));

  downsampler #(.W(4), .M(UPSAMPLE)) u_down (
    .clk, .rst_n, .in_valid(dem_valid), .in_data(dem_sym),
    .out_valid(ds_valid), .out_data(ds_sym), .dropped(ds_dropped));

  sp_conv #(.W(4), .N(4)) u_sp_cw (
    .clk, .rst_n, .in_valid(ds_valid), .in_data(ds_sym),
    .par_valid(rcw_valid), .par_out(rcw));

  block_decoder u_decoder (
    .clk, .rst_n, .in_valid(rcw_valid), .code_in(rcw),
    .out_valid(dec_valid), .data_out(dec_byte),
    .corrected(fec_corrected), .uncorrectable(fec_uncorrectable));

  ps_conv #(.W(1), .N(8)) u_ps_bits (
    .clk, .rst_n, .par_valid(dec_valid), .par_in(dec_byte), .par_ready(bitps_ready),
    .out_valid(rx_bit_valid), .out_ready(1'b1), .out_data(rx_bit),
    .overflow(ovf_bit));

  assign cp_inserted   = up_first;
  assign cp_removed    = ds_dropped;
  assign overflow      = ovf_sym | ovf_tx | ovf_rx | ovf_bit;
  assign fft_saturated = sat_tx | sat_rx;

  // The serial outputs are always ready, so a frame or byte converter is
  // always free again before the next word arrives at the built-in rate.
  a_cw_overrun:  assert property (@(posedge clk) disable iff (!rst_n) !(cw_valid && !cw_ready))
    else $error("codeword overrun");
  a_tx_overrun:  assert property (@(posedge clk) disable iff (!rst_n) !(ifft_valid && !txps_ready))
    else $error("tx frame overrun");
  a_rx_overrun:  assert property (@(posedge clk) disable iff (!rst_n) !(fft_valid && !rxps_ready))
    else $error("rx frame overrun");
  a_bit_overrun: assert property (@(posedge clk) disable iff (!rst_n) !(dec_valid && !bitps_ready))
    else $error("rx byte overrun");

endmodule
