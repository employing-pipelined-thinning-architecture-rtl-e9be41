// ram_module_tb: random reads and writes against an array model; checks
// the one-clock read latency and that dout holds between reads.
module ram_module_tb;
  logic clk = 0;
  logic [5:0] addr;
  logic rd, wr;
  logic [7:0] din, dout;
  logic [7:0] model [64];
  logic [7:0] exp_dout;
  int checks = 0, failures = 0;

  ram_module dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd = 0; wr = 0; addr = 0; din = 0;
    // Fill every word first.
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      addr = 6'(a); din = 8'($urandom); wr = 1;
      model[a] = din;
    end
    @(negedge clk);
    wr = 0; rd = 1; addr = 0;
    @(posedge clk); #1;
    exp_dout = model[0];
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      addr = 6'($urandom);
      rd   = $urandom_range(0, 1);
      wr   = $urandom_range(0, 1);
      din  = 8'($urandom);
      @(posedge clk);
      if (rd) exp_dout = model[addr];   // read sees the old word
      if (wr) model[addr] = din;
      #1;
      checks++;
      if (dout !== exp_dout) begin
        failures++;
        if (failures < 10) $display("mismatch at %0d: dout=%02h exp=%02h", t, dout, exp_dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
