// tb_interleaver: random 64-bit words through the 8x8 interleaver with random
// back-pressure; output bit c*8+r must equal input bit r*8+c (rows in, columns out), so that any 8 consecutive output bits come from 8 different input bytes. Words must leave in order, one cycle after being
// taken.
module tb_interleaver;
  logic clk = 0, rst_n = 0;
  logic [63:0] in_data = '0, out_data;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  int checks = 0, failures = 0;
  logic [63:0] q[$];
  int sent = 0, got = 0;

  interleaver dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      q.push_back(in_data);
      sent++;
    end
    if (!in_valid || in_ready) begin
      in_valid <= (sent < 300) && ($urandom % 4 != 0);
      in_data  <= {$urandom, $urandom};
    end
    out_ready <= ($urandom % 3 != 0);
  end

  always @(posedge clk) if (rst_n && in_valid && in_ready) begin
    logic [63:0] w;
    w = in_data;
    #1;
    checks++;
    if (!out_valid) begin
      failures++;
      $display("FAIL latency");
    end
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    logic [63:0] w, want;
    w = q.pop_front();
    got++;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++)
        want[c*8 + r] = w[r*8 + c];
    checks++;
    if (out_data !== want) begin
      failures++;
      $display("FAIL in %h out %h want %h", w, out_data, want);
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (got == 300);
    repeat (4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
