// systolic_counter_tb: the default 15-bit counter is incremented with
// random gaps of at least four clocks through more than one full wrap,
// with a clear early on, and compared with an integer model after every
// clock. A second instance (7 bits in segments of 2, so a carry crosses
// four segments) is run the same way.
module systolic_counter_tb;
  logic clk = 0, rst_n = 0;
  logic clear, inc, clear2, inc2;
  logic [14:0] count;
  logic [6:0]  count2;
  int checks = 0, failures = 0, wraps = 0;

  systolic_counter dut (.clk, .rst_n, .clear, .inc, .count);
  systolic_counter #(.WIDTH(7), .SEG(2)) dut2 (.clk, .rst_n, .clear(clear2), .inc(inc2), .count(count2));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int model, model2;
    clear = 0; inc = 0; clear2 = 0; inc2 = 0;
    model = 0; model2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 34000; t++) begin
      @(negedge clk);
      clear  = (t == 150);
      inc    = 1;
      clear2 = ($urandom_range(0, 500) == 0);
      inc2   = 1;
      @(posedge clk);
      if (clear) model = 0;
      else begin
        model = (model + 1) % 32768;
        if (model == 0) wraps++;
      end
      model2 = clear2 ? 0 : (model2 + 1) % 128;
      @(negedge clk);
      inc = 0; inc2 = 0; clear = 0; clear2 = 0;
      repeat ($urandom_range(3, 5)) begin
        @(posedge clk); #1;
        checks++;
        if (count !== 15'(model) || count2 !== 7'(model2)) begin
          failures++;
          if (failures < 10) $display("t=%0d count=%0d exp=%0d count2=%0d exp2=%0d",
                                      t, count, model, count2, model2);
        end
      end
    end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("counter never wrapped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
