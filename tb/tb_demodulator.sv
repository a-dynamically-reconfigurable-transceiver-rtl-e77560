// tb_demodulator: feeds 64-sample windows of x(n) = A cos + B sin for
// random constellation points of every scheme, together with local
// carriers 32767*cos and 32767*sin made here. The outputs must equal
// floor(sum(x*carrier) / 2^20) worked out here, be within 0.01 of A and B,
// and come one cycle after the 64th sample of the window.
module tb_demodulator;
  import sdr_pkg::*;
  logic clk = 0, rst_n = 0, x_valid = 0, first = 0;
  sample_t x = 0;
  logic signed [15:0] cos_in = 0, sin_in = 0;
  sample_t amp_i, amp_q;
  logic a_valid;
  int checks = 0, failures = 0;

  demodulator dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real level(int m);
    case (m)
      0: return 0.125;
      1: return 0.1875;
      2: return ($urandom % 2) ? 0.3125 : 0.875;
      default: return real'(2 * int'($urandom % 8) + 1);
    endcase
  endfunction

  function automatic real absr(real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic window(real a, real b);
    longint si, sq;
    si = 0;
    sq = 0;
    for (int n = 0; n < 64; n++) begin
      int v, c, s;
      real ph;
      @(negedge clk);
      ph = 2.0 * 3.14159265358979 * n / 64.0;
      v = int'($floor(1024.0 * (a * $cos(ph) + b * $sin(ph)) + 0.5));
      c = int'($floor(32767.0 * $cos(ph) + 0.5));
      s = int'($floor(32767.0 * $sin(ph) + 0.5));
      x = sample_t'(v);
      cos_in = 16'(c);
      sin_in = 16'(s);
      x_valid = 1;
      first = (n == 0);
      si += longint'(v) * c;
      sq += longint'(v) * s;
    end
    @(negedge clk);
    x_valid = 0;
    first = 0;
    checks++;
    if (!a_valid || longint'(amp_i) != (si >>> 20) || longint'(amp_q) != (sq >>> 20)
        || absr(real'(amp_i) / 1024.0 - a) > 0.01 || absr(real'(amp_q) / 1024.0 - b) > 0.01) begin
      failures++;
      $display("FAIL A=%f B=%f got %0d %0d valid=%b", a, b, amp_i, amp_q, a_valid);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      int m;
      real a, b;
      m = i % 4;
      a = level(m) * (($urandom % 2) ? 1.0 : -1.0);
      b = (m == 0) ? 0.0 : level(m) * (($urandom % 2) ? 1.0 : -1.0);
      window(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
