// controller_tb: runs a 2-column, 3-line controller twice. The testbench
// models the continue flag and the temporal register's valid bit from the
// controller's own strobes and injects deletions: in run 1 only during the
// first iteration (so two iterations, four passes), in run 2 never (one
// iteration, two passes). Every clock the strobes are compared with the
// six-step schedule; Step, the border flags, the number of valid execute
// steps and stores, and the busy length 6*COLS*(2+P*LINES)+6 are checked.
module controller_tb;
  import thinning_pkg::*;
  localparam int COLS = 2, LINES = 3;
  logic clk = 0, rst_n = 0;
  logic start, cont, any_deleted, tmp_valid;
  ctl_t ctl;
  logic busy, done;
  int checks = 0, failures = 0;

  controller #(.COLS(COLS), .LINES(LINES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Models of the continue flag and temporal valid bit.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cont <= 0; tmp_valid <= 0;
    end else begin
      if (ctl.cont_clear) cont <= 0;
      else if (ctl.tmp_load && ctl.exec_valid && any_deleted) cont <= 1;
      if (ctl.tmp_load) tmp_valid <= ctl.exec_valid;
      else if (ctl.store_inc) tmp_valid <= 0;
    end
  end

  task automatic expect_bit(input logic got, input logic exp, input string what, input int cyc);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 15) $display("cycle %0d: %s = %0d, expected %0d", cyc, what, got, exp);
    end
  endtask

  task automatic run(input int del_passes, input int exp_passes);
    int cyc, busy_len, n_exec, n_store, n_done, expected_len;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 0; busy_len = 0; n_exec = 0; n_store = 0; n_done = 0;
    while (busy) begin
      int ph, col, line, pass, prime_cycles, exec_idx;
      logic is_run, valid;
      busy_len++;
      ph = cyc % 6;
      prime_cycles = 6 * COLS * 2;
      is_run = (cyc < 6 * COLS * (2 + exp_passes * LINES));
      valid = is_run && (cyc >= prime_cycles);
      exec_idx = (cyc - prime_cycles) / 6;
      pass = valid ? exec_idx / (COLS * LINES) : 0;
      line = valid ? (exec_idx / COLS) % LINES : 0;
      col = (cyc / 6) % COLS;
      // Deletions are reported during the first del_passes passes.
      any_deleted = valid && (pass < del_passes) && (col == 1);
      #1;
      expect_bit(ctl.lr_load, is_run && ph == 0, "lr_load", cyc);
      expect_bit(ctl.mr_load, is_run && ph == 1, "mr_load", cyc);
      expect_bit(ctl.ram_write, is_run && ph == 2, "ram_write", cyc);
      expect_bit(ctl.rr_load, is_run && ph == 4, "rr_load", cyc);
      expect_bit(ctl.ram_read, is_run && (ph == 0 || ph == 3), "ram_read", cyc);
      expect_bit(ctl.mem_read, is_run && (ph == 0 || ph == 1), "mem_read", cyc);
      expect_bit(ctl.sel_store, ph == 3 || ph == 4, "sel_store", cyc);
      expect_bit(ctl.tmp_load, is_run && ph == 5, "tmp_load", cyc);
      expect_bit(ctl.mem_write, (ph == 3 || ph == 4) && cyc >= prime_cycles + 6, "mem_write", cyc);
      if (valid && ph == 5) begin
        expect_bit(ctl.step, (pass % 2) == 0, "step", cyc);
        expect_bit(ctl.first_col, col == 0, "first_col", cyc);
        expect_bit(ctl.last_col, col == COLS - 1, "last_col", cyc);
        expect_bit(ctl.top_line, line == 0, "top_line", cyc);
        expect_bit(ctl.bottom_line, line == LINES - 1, "bottom_line", cyc);
        expect_bit(ctl.exec_valid, 1'b1, "exec_valid", cyc);
      end
      if (ctl.tmp_load && ctl.exec_valid) n_exec++;
      if (ctl.store_inc) n_store++;
      if (done) n_done++;
      @(posedge clk);
      @(negedge clk);
      cyc++;
    end
    any_deleted = 0;
    expected_len = 6 * COLS * (2 + exp_passes * LINES) + 6;
    checks++;
    if (busy_len != expected_len) begin
      failures++;
      $display("busy for %0d clocks, expected %0d", busy_len, expected_len);
    end
    checks++;
    if (n_exec != exp_passes * LINES * COLS || n_store != n_exec || n_done != 1) begin
      failures++;
      $display("exec=%0d stores=%0d done=%0d", n_exec, n_store, n_done);
    end
    $display("run: %0d passes, %0d clocks", exp_passes, busy_len);
  endtask

  initial begin
    start = 0; any_deleted = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    run(2, 4);
    repeat (3) @(posedge clk);
    run(0, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
