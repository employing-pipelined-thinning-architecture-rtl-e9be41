// register_sets_tb: random load strobes and RAM data, including the border
// controls, checked every clock against a bit-level model of the three
// {l, m, r} registers.
module register_sets_tb;
  logic clk = 0, rst_n = 0;
  logic [2:0][7:0] ram_data;
  logic lr_load, mr_load, rr_load, first_col, last_col, top_line, bottom_line;
  logic [9:0] row_h, row_m, row_l;
  int checks = 0, failures = 0;

  register_sets dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic       ml [3];
  logic [7:0] mm [3];
  logic       mr [3];

  initial begin
    {lr_load, mr_load, rr_load, first_col, last_col, top_line, bottom_line} = '0;
    ram_data = '0;
    for (int s = 0; s < 3; s++) begin ml[s] = 0; mm[s] = 0; mr[s] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      ram_data    = {8'($urandom), 8'($urandom), 8'($urandom)};
      lr_load     = $urandom_range(0, 1);
      mr_load     = $urandom_range(0, 1);
      rr_load     = $urandom_range(0, 1);
      first_col   = ($urandom_range(0, 3) == 0);
      last_col    = ($urandom_range(0, 3) == 0);
      top_line    = ($urandom_range(0, 3) == 0);
      bottom_line = ($urandom_range(0, 3) == 0);
      @(posedge clk);
      for (int s = 0; s < 3; s++) begin
        bit zrow;
        zrow = (s == 0 && top_line) || (s == 2 && bottom_line);
        if (lr_load) ml[s] = first_col ? 1'b0 : mm[s][0];
        if (rr_load) mr[s] = (last_col || zrow) ? 1'b0 : ram_data[s][7];
        if (mr_load) mm[s] = zrow ? 8'h00 : ram_data[s];
      end
      #1;
      checks++;
      if (row_h !== {ml[0], mm[0], mr[0]} || row_m !== {ml[1], mm[1], mr[1]} ||
          row_l !== {ml[2], mm[2], mr[2]}) begin
        failures++;
        if (failures < 10) $display("mismatch at %0d: h=%010b exp=%010b", t, row_h, {ml[0], mm[0], mr[0]});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
