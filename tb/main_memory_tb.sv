// main_memory_tb: writes the whole default 32768-byte memory with a
// pattern derived from the address, reads it back in a scrambled order
// with the one-clock latency, then mixes random reads and writes.
module main_memory_tb;
  logic clk = 0;
  logic [14:0] addr;
  logic rd, wr;
  logic [7:0] din, dout;
  int checks = 0, failures = 0;
  logic [7:0] model [32768];

  main_memory dut (.*);

  always #5 clk = ~clk;

  function automatic logic [7:0] pat(input int a);
    return 8'((a * 37) ^ (a >> 7));
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd = 0; wr = 0; addr = 0; din = 0;
    for (int a = 0; a < 32768; a++) begin
      @(negedge clk);
      addr = 15'(a); din = pat(a); wr = 1;
      model[a] = din;
    end
    @(negedge clk); wr = 0;
    for (int i = 0; i < 32768; i++) begin
      int a;
      a = (i * 12345) % 32768;
      @(negedge clk);
      addr = 15'(a); rd = 1;
      @(posedge clk); #1;
      checks++;
      if (dout !== model[a]) begin
        failures++;
        if (failures < 10) $display("addr %0d: %02h exp %02h", a, dout, model[a]);
      end
    end
    for (int t = 0; t < 3000; t++) begin
      logic [7:0] exp;
      @(negedge clk);
      addr = 15'($urandom); wr = $urandom_range(0, 1); rd = 1; din = 8'($urandom);
      exp = model[addr];
      @(posedge clk);
      if (wr) model[addr] = din;
      #1;
      checks++;
      if (dout !== exp) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
