// ps_conv: parallel-to-serial converter.
//
// Loads an N-element parallel word when par_valid && par_ready and then
// presents the elements one at a time, par_in[0] first, with a valid/ready
// handshake on the serial side (an element moves on a cycle where out_valid
// and out_ready are both high). par_ready is high when the converter is
// empty or is handing over its last element in this cycle, so words can
// follow back to back with no idle cycle. A word offered while par_ready is
// low is an overflow: it is dropped and `overflow` pulses.
// Used for the 8/1 bit output of the receiver, for the 16-bit codeword to
// 4-bit symbol split and for the serial output of the IFFT and FFT frames.
module ps_conv #(
  parameter int W = 1,
  parameter int N = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                par_valid,
  input  logic [N-1:0][W-1:0] par_in,
  output logic                par_ready,
  output logic                out_valid,
  input  logic                out_ready,
  output logic [W-1:0]        out_data,
  output logic                overflow
);

  localparam int CW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0][W-1:0] buffer;
  logic [CW-1:0]       idx;
  logic                last;

  assign last      = (idx == CW'(N-1));
  assign par_ready = !out_valid || (last && out_ready);
  assign out_data  = buffer[idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buffer    <= '0;
      idx       <= '0;
      out_valid <= 1'b0;
      overflow  <= 1'b0;
    end else begin
      overflow <= par_valid && !par_ready;
      if (out_valid && out_ready) begin
        if (last) begin
          out_valid <= 1'b0;
          idx       <= '0;
        end else begin
          idx <= idx + 1'b1;
        end
      end
      if (par_valid && par_ready) begin
        buffer    <= par_in;
        idx       <= '0;
        out_valid <= 1'b1;
      end
    end
  end

endmodule
