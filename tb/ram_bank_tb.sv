// ram_bank_tb: drives the bank the way the controller does (fetch column,
// then load it with a new main memory byte) for many image lines of a
// COLS = 8 bank, and checks that every fetch returns the three lines
// above the newest one: RAM1 = line n-3, RAM2 = line n-2, RAM3 = line n-1
// when line n is being loaded.
module ram_bank_tb;
  localparam int COLS  = 8;
  localparam int LINES = 12;
  logic clk = 0;
  logic [2:0] ram_addr;
  logic ram_read, ram_write;
  logic [7:0] mem_data;
  logic [2:0][7:0] ram_data;
  logic [7:0] img [LINES][COLS];
  int checks = 0, failures = 0;

  ram_bank #(.COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ram_read = 0; ram_write = 0; ram_addr = 0; mem_data = 0;
    foreach (img[y, x]) img[y][x] = 8'($urandom);
    for (int y = 0; y < LINES; y++) begin
      for (int k = 0; k < COLS; k++) begin
        @(negedge clk);
        ram_addr = 3'(k); ram_read = 1;
        @(negedge clk);
        ram_read = 0;
        if (y >= 3) begin
          checks++;
          if (ram_data !== {img[y-1][k], img[y-2][k], img[y-3][k]}) begin
            failures++;
            if (failures < 10) $display("line %0d col %0d: got %h", y, k, ram_data);
          end
        end
        // Idle clock, then the chained load with the main memory byte.
        @(negedge clk);
        mem_data = img[y][k]; ram_write = 1;
        @(negedge clk);
        ram_write = 0;
        // Output must still hold the fetched column after the load.
        if (y >= 3) begin
          checks++;
          if (ram_data !== {img[y-1][k], img[y-2][k], img[y-3][k]}) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
