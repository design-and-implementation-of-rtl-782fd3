// sp_conv: serial-to-parallel converter.
//
// Gathers N consecutive valid input elements of W bits into one parallel
// word. The first element received lands in par_out[0], the last in
// par_out[N-1]. par_valid pulses for one cycle, the cycle after the N-th
// element is taken, and par_out holds that word until the next word is
// complete. No backpressure: one element may arrive every cycle.
// The transceiver uses it three times, as in the document: bits to bytes
// (ratio 8/1), QAM samples to IFFT/FFT frames (order 16), and 4-bit symbols
// to 16-bit codewords. The element order within the word is this design's
// choice.
module sp_conv #(
  parameter int W = 1,
  parameter int N = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [W-1:0]        in_data,
  output logic                par_valid,
  output logic [N-1:0][W-1:0] par_out
);

  localparam int CW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0][W-1:0] shreg;
  logic [CW-1:0]       cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '0;
      cnt       <= '0;
      par_valid <= 1'b0;
      par_out   <= '0;
    end else begin
      par_valid <= 1'b0;
      if (in_valid) begin
        shreg[cnt] <= in_data;
        if (cnt == CW'(N-1)) begin
          cnt       <= '0;
          par_valid <= 1'b1;
          par_out   <= shreg;
          par_out[N-1] <= in_data;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
