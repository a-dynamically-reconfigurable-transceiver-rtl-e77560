// power_select: the power estimator right after the ADC. It squares every
// received sample and, once a window of N = 2^N_LOG2 samples (64, one
// carrier cycle = one symbol) is complete, outputs the sum divided by N:
//   P = sum_{n=1..64} x(n)^2 / 64
// For x(n) = A cos(wn) + B sin(wn) over a whole carrier cycle this is
// (A^2 + B^2) / 2, the power figure the scheme decision is based on.
//
// Windows start on the sample flagged by first (the receive DDS cycle start,
// so windows line up with symbols); a window is only reported if it was
// started by first. Samples use the sdr_pkg sample format, power has
// 2*SAMPLE_FRAC fractional bits (1.0 = 2^20).
//
// Timing: power and p_valid are registered and appear one cycle after the
// N-th sample of a window; one result per N samples.
module power_select
  import sdr_pkg::*;
#(
  parameter int N_LOG2 = 6
) (
  input  logic               clk,
  input  logic               rst_n,
  input  sample_t            x,
  input  logic               x_valid,
  input  logic               first,
  output logic [POWER_W-1:0] power,
  output logic               p_valid
);

  localparam int SUM_W = POWER_W + N_LOG2;
  localparam int N     = 2 ** N_LOG2;

  logic [POWER_W-1:0] sq;
  logic [SUM_W-1:0]   sum;
  logic [SUM_W-1:0]   total;
  logic [N_LOG2:0]    cnt;     // samples already in the window
  logic               started;

  assign sq    = POWER_W'(x * x);
  assign total = (first ? '0 : sum) + SUM_W'(sq);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum     <= '0;
      cnt     <= '0;
      started <= 1'b0;
      power   <= '0;
      p_valid <= 1'b0;
    end else begin
      p_valid <= 1'b0;
      if (x_valid && (first || started)) begin
        if (first ? (N == 1) : (cnt == (N_LOG2 + 1)'(N - 1))) begin
          power   <= POWER_W'(total >> N_LOG2);
          p_valid <= 1'b1;
          started <= 1'b0;
          cnt     <= '0;
          sum     <= '0;
        end else begin
          sum     <= total;
          cnt     <= first ? (N_LOG2 + 1)'(1) : cnt + 1'b1;
          started <= 1'b1;
        end
      end
    end
  end

endmodule
