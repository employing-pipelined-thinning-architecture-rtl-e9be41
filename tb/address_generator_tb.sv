// address_generator_tb: a 4-column, 4-line generator is stepped through
// the strobe pattern of the execution cycle (fetch, RAM load, store) for
// several passes; the RAM address, fetch address and store address are
// compared with pointers kept by the testbench, including their wraps.
module address_generator_tb;
  localparam int COLS = 4, LINES = 4, WORDS = COLS * LINES;
  logic clk = 0, rst_n = 0;
  logic init, ram_addr_inc, fetch_inc, store_inc, sel_store;
  logic [1:0] ram_addr;
  logic [3:0] mem_addr;
  int checks = 0, failures = 0;

  address_generator #(.COLS(COLS), .LINES(LINES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int exp_ram, input int exp_mem, input string what);
    checks++;
    if (ram_addr !== 2'(exp_ram) || mem_addr !== 4'(exp_mem)) begin
      failures++;
      if (failures < 10) $display("%s: ram=%0d exp %0d mem=%0d exp %0d", what, ram_addr, exp_ram, mem_addr, exp_mem);
    end
  endtask

  initial begin
    int k, f, s;
    {init, ram_addr_inc, fetch_inc, store_inc, sel_store} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Dirty the pointers, then init must clear them.
    @(negedge clk); fetch_inc = 1; store_inc = 1; ram_addr_inc = 1;
    @(negedge clk); {fetch_inc, store_inc, ram_addr_inc} = '0;
    repeat (4) @(negedge clk);
    init = 1;
    @(negedge clk); init = 0;
    k = 0; f = 0; s = 0;
    for (int cyc = 0; cyc < 5 * WORDS; cyc++) begin
      // Steps 1-2: fetch address, then advance fetch pointer.
      sel_store = 0; #1 check(k, f, "fetch");
      @(negedge clk); fetch_inc = 1; #1 check(k, f, "fetch2");
      @(negedge clk); fetch_inc = 0; f = (f + 1) % WORDS;
      // Step 3: RAM load at k, then advance RAM address.
      ram_addr_inc = 1; #1 check(k, f, "ramld");
      @(negedge clk); ram_addr_inc = 0; k = (k + 1) % COLS;
      // Steps 4-5: store address (only after the first cycle).
      sel_store = 1; #1 check(k, s, "store");
      @(negedge clk); store_inc = (cyc > 0); #1 check(k, s, "store2");
      @(negedge clk); if (store_inc) s = (s + 1) % WORDS; store_inc = 0; sel_store = 0;
      // Step 6.
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
