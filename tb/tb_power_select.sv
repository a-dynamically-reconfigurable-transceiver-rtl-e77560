// tb_power_select: feeds windows of 64 samples x(n) = A cos + B sin, with A
// and B drawn from every constellation, plus a random-noise window and a
// window whose start flag comes late. Each reported power must equal the
// sum of the squared integer samples divided by 64 (worked out here), be
// within 1% of (A^2 + B^2) / 2, and come exactly one cycle after the 64th
// sample of its window, one result per window.
module tb_power_select;
  import sdr_pkg::*;
  logic clk = 0, rst_n = 0, x_valid = 0, first = 0;
  sample_t x = 0;
  logic [31:0] power;
  logic p_valid;
  int checks = 0, failures = 0;

  power_select dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real amps[] = '{0.125, 0.1875, 0.3125, 0.875, 1.0, 7.0, 15.0, 0.0};
  int results = 0;
  always @(posedge clk) if (p_valid) results++;

  task automatic window(real a, real b, bit noise, int late);
    longint sum;
    sum = 0;
    for (int n = 0; n < 64; n++) begin
      int v;
      @(negedge clk);
      if (noise) v = int'($urandom % 2001) - 1000;
      else v = int'($floor(1024.0 * (a * $cos(2.0 * 3.14159265358979 * n / 64.0)
                                    + b * $sin(2.0 * 3.14159265358979 * n / 64.0)) + 0.5));
      x = sample_t'(v);
      x_valid = 1;
      first = (n == late);
      if (n >= late) sum += longint'(v) * longint'(v);
    end
    @(negedge clk);
    x_valid = 0;
    first = 0;
    checks++;
    if (late == 0) begin
      longint want;
      real pw;
      want = sum >>> 6;
      pw = (a * a + b * b) / 2.0 * 1048576.0;
      if (!p_valid || longint'(power) != want
          || (!noise && (real'(power) > pw * 1.01 + 2.0 || real'(power) < pw * 0.99 - 2.0))) begin
        failures++;
        $display("FAIL A=%f B=%f power=%0d want %0d (%f) valid=%b", a, b, power, want, pw, p_valid);
      end
    end else if (p_valid) begin
      failures++;
      $display("FAIL short window reported");
    end
  endtask

  initial begin
    int n_before;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < amps.size(); i++)
      for (int j = 0; j < amps.size(); j++) begin
        real si, sj;
        si = ($urandom % 2) ? 1.0 : -1.0;
        sj = ($urandom % 2) ? 1.0 : -1.0;
        window(si * amps[i], sj * amps[j], 0, 0);
      end
    window(0, 0, 1, 0);
    n_before = results;
    window(1.0, 1.0, 0, 10);   // started late: runs past the 64 fed samples
    window(3.0, -5.0, 0, 0);
    checks++;
    if (results != n_before + 1) begin
      failures++;
      $display("FAIL result count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
