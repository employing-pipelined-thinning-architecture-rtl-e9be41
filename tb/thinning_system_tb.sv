// thinning_system_tb: end-to-end test of the top level on 64 x 32 images.
// For each image the host loads the packed image through the host port,
// pulses start, waits for done and reads the result back; the result must
// equal the reference thinning and busy must last 6*COLS*(2+P*H)+6
// clocks. While the processor is busy the host also tries to write
// garbage, which must be ignored. The testbench counts how often each
// mechanism of the design happened and fails if one never did: priming,
// Step=1 and Step=0 passes, iterations continued and stopped by the
// continue flag, fetch pointer wrap (prefetch for the next pass), final
// flush store, deletions on each image border, and ignored host writes.
module thinning_system_tb;
  import zs_ref_pkg::*;
  localparam int W = 64, H = 32, COLS = W / 8, WORDS = COLS * H;
  logic clk = 0, rst_n = 0, start;
  logic busy, done, host_wr, host_rd;
  logic [7:0] host_addr;
  logic [7:0] host_wdata, host_rdata;
  int checks = 0, failures = 0;

  thinning_system #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, from the controller's and address generator's strobes.
  int n_prime, n_pass_step1, n_pass_step0, n_iter_continue, n_iter_stop, n_fetch_wrap, n_flush;
  int n_host_ignored, n_border_left, n_border_right, n_border_top, n_border_bottom;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_proc.ctl.init) n_prime++;
    if (dut.u_proc.u_ctrl.end_of_pass && dut.u_proc.ctl.tmp_load) begin
      if (dut.u_proc.ctl.step) n_pass_step1++;
      else begin
        n_pass_step0++;
        if (dut.u_proc.u_ctrl.iterate) n_iter_continue++;
        else n_iter_stop++;
      end
    end
    if (dut.u_proc.u_agen.fetch_wrap) n_fetch_wrap++;
    if (int'(dut.u_proc.u_ctrl.state_q) == 2 && dut.u_proc.ctl.mem_write) n_flush++;
    if (busy && host_wr) n_host_ignored++;
  end

  task automatic host_write(input int a, input logic [7:0] v);
    @(negedge clk);
    host_addr = 8'(a); host_wdata = v; host_wr = 1;
    @(negedge clk);
    host_wr = 0;
  endtask

  task automatic host_read(input int a, output logic [7:0] v);
    @(negedge clk);
    host_addr = 8'(a); host_rd = 1;
    @(negedge clk);
    host_rd = 0;
    v = host_rdata;
  endtask

  task automatic run_image(ref bit img[], input string name);
    bit ref_img[];
    int passes, dels, clocks, bad;
    logic [7:0] v;
    ref_img = img;
    zs_thin(W, H, ref_img, passes, dels);
    for (int y = 0; y < H; y++) begin
      if (img[y * W] && !ref_img[y * W]) n_border_left++;
      if (img[y * W + W - 1] && !ref_img[y * W + W - 1]) n_border_right++;
    end
    for (int x = 0; x < W; x++) begin
      if (img[x] && !ref_img[x]) n_border_top++;
      if (img[(H - 1) * W + x] && !ref_img[(H - 1) * W + x]) n_border_bottom++;
    end
    for (int y = 0; y < H; y++)
      for (int c = 0; c < COLS; c++) host_write(y * COLS + c, pack_byte(W, img, y, c));
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    clocks = 0;
    while (busy) begin
      @(negedge clk);
      clocks++;
      // Garbage host writes while busy.
      if (clocks % 97 == 0) begin host_addr = 8'($urandom); host_wdata = 8'hA5; host_wr = 1; end
      else host_wr = 0;
    end
    host_wr = 0;
    checks++;
    if (clocks != 6 * COLS * (2 + passes * H) + 6) begin
      failures++;
      $display("%s: busy %0d clocks, expected %0d", name, clocks, 6 * COLS * (2 + passes * H) + 6);
    end
    bad = 0;
    for (int y = 0; y < H; y++)
      for (int c = 0; c < COLS; c++) begin
        host_read(y * COLS + c, v);
        checks++;
        if (v !== pack_byte(W, ref_img, y, c)) begin
          failures++; bad++;
          if (bad < 5) $display("%s: line %0d col %0d = %02h, expected %02h", name, y, c, v,
                                pack_byte(W, ref_img, y, c));
        end
      end
    $display("%s: %0d passes, %0d deletions, %0d clocks, %0d bad bytes", name, passes, dels, clocks, bad);
  endtask

  task automatic need(input int count, input string what);
    checks++;
    $display("  %-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("  mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    bit img[];
    start = 0; host_wr = 0; host_rd = 0; host_addr = 0; host_wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    img = new[W * H];
    foreach (img[i]) img[i] = 1;       // solid: every border erodes
    run_image(img, "solid");
    gen_ridges(W, H, img);
    run_image(img, "ridges");
    for (int n = 0; n < 4; n++) begin
      gen_blobs(W, H, 4 + 2 * n, img);
      run_image(img, $sformatf("blobs%0d", n));
    end
    $display("mechanisms:");
    need(n_prime, "priming (run start)");
    need(n_pass_step1, "Step=1 passes");
    need(n_pass_step0, "Step=0 passes");
    need(n_iter_continue, "iterations continued");
    need(n_iter_stop, "iterations stopped");
    need(n_fetch_wrap, "fetch pointer wraps");
    need(n_flush, "flush stores");
    need(n_border_left, "left border deletions");
    need(n_border_right, "right border deletions");
    need(n_border_top, "top border deletions");
    need(n_border_bottom, "bottom border deletions");
    need(n_host_ignored, "host writes ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
