// tb_dds: runs a sine and a cosine dds at the default settings. The sine
// output must match 32767*sin(2*pi*n/64) within 1 LSB, the cosine one
// 32767*cos(2*pi*n/64), cycle_start must come exactly every 64 samples on
// the sample with phase 0, and clearing en must freeze the phase.
module tb_dds;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [15:0] s_wave, c_wave;
  logic s_valid, c_valid, s_start, c_start;
  int checks = 0, failures = 0;

  dds u_sin (.clk, .rst_n, .en, .wave(s_wave), .out_valid(s_valid), .cycle_start(s_start));
  dds #(.PHASE_OFFSET(32'h4000_0000)) u_cos (.clk, .rst_n, .en, .wave(c_wave), .out_valid(c_valid), .cycle_start(c_start));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(int got, real want);
    real d;
    d = real'(got) - want;
    return d <= 1.01 && d >= -1.01;
  endfunction

  int n = 0, last_start = -1;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) en = 1;
    repeat (64 * 5) begin
      @(posedge clk);
      #1;
      checks += 3;
      if (!s_valid || !near(s_wave, 32767.0 * $sin(2.0 * 3.14159265358979 * n / 64.0))) begin
        failures++;
        $display("FAIL sin n=%0d got %0d", n, s_wave);
      end
      if (!near(c_wave, 32767.0 * $cos(2.0 * 3.14159265358979 * n / 64.0))) begin
        failures++;
        $display("FAIL cos n=%0d got %0d", n, c_wave);
      end
      if (s_start != (n % 64 == 0) || c_start != s_start) begin
        failures++;
        $display("FAIL cycle_start n=%0d", n);
      end
      n++;
    end
    // freeze
    @(negedge clk) en = 0;
    repeat (10) @(posedge clk);
    @(negedge clk) en = 1;
    @(posedge clk);
    #1;
    checks++;
    if (!near(s_wave, 32767.0 * $sin(2.0 * 3.14159265358979 * n / 64.0)) || !s_start) begin
      failures++;
      $display("FAIL phase not held across en=0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
