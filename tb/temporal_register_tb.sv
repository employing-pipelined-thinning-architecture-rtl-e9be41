// temporal_register_tb: random load/stored sequences against a model of
// the data byte and its valid bit.
module temporal_register_tb;
  logic clk = 0, rst_n = 0;
  logic load, valid_in, stored, valid;
  logic [7:0] d, q;
  int checks = 0, failures = 0;
  bit mv;
  logic [7:0] mq;

  temporal_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {load, valid_in, stored} = '0;
    d = 0; mv = 0; mq = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      load     = ($urandom_range(0, 2) == 0);
      valid_in = $urandom_range(0, 1);
      stored   = $urandom_range(0, 1);
      d        = 8'($urandom);
      @(posedge clk);
      if (load) begin mq = d; mv = valid_in; end
      else if (stored) mv = 0;
      #1;
      checks++;
      if (q !== mq || valid !== mv) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
