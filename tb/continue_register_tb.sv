// continue_register_tb: random clear/sample/any_deleted sequences against
// a one-bit model (clear wins over a set in the same clock).
module continue_register_tb;
  logic clk = 0, rst_n = 0;
  logic clear, sample, any_deleted, cont;
  int checks = 0, failures = 0;
  bit model;

  continue_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {clear, sample, any_deleted} = '0;
    model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      clear       = ($urandom_range(0, 9) == 0);
      sample      = $urandom_range(0, 1);
      any_deleted = ($urandom_range(0, 5) == 0);
      @(posedge clk);
      if (clear) model = 0;
      else if (sample && any_deleted) model = 1;
      #1;
      checks++;
      if (cont !== model) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
