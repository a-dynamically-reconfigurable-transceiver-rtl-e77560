// tb_custom_register: writes button patterns into the custom register and
// checks that each is held until the next write, that cycles without a
// write leave it alone, and that reset clears it to 0000.
module tb_custom_register;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [3:0] wr_data = '0, btn_lines;
  int checks = 0, failures = 0;

  custom_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_val(logic [3:0] v, string what);
    checks++;
    if (btn_lines !== v) begin
      failures++;
      $display("FAIL %s: got %b want %b", what, btn_lines, v);
    end
  endtask

  initial begin
    logic [3:0] model;
    repeat (2) @(posedge clk);
    expect_val(4'b0000, "reset");
    rst_n = 1;
    model = 4'b0000;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      wr_en   = ($urandom % 3) == 0;
      wr_data = 4'($urandom);
      @(posedge clk);
      if (wr_en) model = wr_data;
      #1 expect_val(model, "hold/write");
    end
    @(negedge clk) rst_n = 0;
    #1 expect_val(4'b0000, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
