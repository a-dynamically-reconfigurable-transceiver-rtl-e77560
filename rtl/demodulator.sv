// demodulator: coherent I/Q demodulator. Over the same N-sample windows as
// the power estimator (one carrier cycle = one symbol) it correlates the
// received samples with the local cosine and sine carriers:
//   A = (2/N) sum x(n) cos(wn),   B = (2/N) sum x(n) sin(wn)
// which for x(n) = A cos(wn) + B sin(wn) returns the transmitted I and Q
// amplitudes. The correlator form, and the assumption that the local
// carriers are in phase with the received ones (the transmit and receive
// carriers come from the same clock and the loop latency is known), are
// this design's choices.
//
// Inputs: the received sample x, the local carriers and first (receive DDS
// cycle start). Outputs amp_i / amp_q in the sdr_pkg sample format.
// Timing: registered, valid one cycle after the N-th sample of a window,
// in step with power_select.
module demodulator
  import sdr_pkg::*;
#(
  parameter int N_LOG2 = 6
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  sample_t                     x,
  input  logic                        x_valid,
  input  logic                        first,
  input  logic signed [CARRIER_W-1:0] cos_in,
  input  logic signed [CARRIER_W-1:0] sin_in,
  output sample_t                     amp_i,
  output sample_t                     amp_q,
  output logic                        a_valid
);

  localparam int PROD_W = SAMPLE_W + CARRIER_W;
  localparam int ACC_W  = PROD_W + N_LOG2;
  localparam int N      = 2 ** N_LOG2;
  // 2/N times the correlation, then carrier full scale back to 1.0
  localparam int SHIFT  = N_LOG2 - 1 + CARRIER_W - 1;

  logic signed [PROD_W-1:0] prod_i, prod_q;
  logic signed [ACC_W-1:0]  acc_i, acc_q, tot_i, tot_q;
  logic [N_LOG2:0]          cnt;
  logic                     started;

  assign prod_i = PROD_W'(x) * PROD_W'(cos_in);
  assign prod_q = PROD_W'(x) * PROD_W'(sin_in);
  assign tot_i  = (first ? '0 : acc_i) + ACC_W'(prod_i);
  assign tot_q  = (first ? '0 : acc_q) + ACC_W'(prod_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_i   <= '0;
      acc_q   <= '0;
      cnt     <= '0;
      started <= 1'b0;
      amp_i   <= '0;
      amp_q   <= '0;
      a_valid <= 1'b0;
    end else begin
      a_valid <= 1'b0;
      if (x_valid && (first || started)) begin
        if (first ? (N == 1) : (cnt == (N_LOG2 + 1)'(N - 1))) begin
          amp_i   <= SAMPLE_W'(tot_i >>> SHIFT);
          amp_q   <= SAMPLE_W'(tot_q >>> SHIFT);
          a_valid <= 1'b1;
          started <= 1'b0;
          cnt     <= '0;
          acc_i   <= '0;
          acc_q   <= '0;
        end else begin
          acc_i   <= tot_i;
          acc_q   <= tot_q;
          cnt     <= first ? (N_LOG2 + 1)'(1) : cnt + 1'b1;
          started <= 1'b1;
        end
      end
    end
  end

endmodule
