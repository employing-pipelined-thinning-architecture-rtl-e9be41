// thinning_workload_tb: back-to-back thinning of five full-size (512 x 512)
// fingerprint-like images, the smallest batch of repeated executions for
// which the design's speed is usually quoted; larger batches only repeat
// this. Ridge width varies from 4 to 8 pixels so the pass count varies.
// Each result is compared with the reference thinning, each run must take
// 6*64*(2+P*512)+6 clocks, and the total time at a 40 MHz clock is
// reported.
module thinning_workload_tb;
  import zs_ref_pkg::*;
  localparam int W = 512, H = 512, COLS = W / 8, WORDS = COLS * H;
  localparam int IMAGES = 5;
  logic clk = 0, rst_n = 0, start;
  logic busy, done, host_wr, host_rd;
  logic [14:0] host_addr;
  logic [7:0] host_wdata, host_rdata;
  int checks = 0, failures = 0;

  thinning_system dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (60000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit img[], ref_img[];
    int passes, dels, clocks, bad;
    longint total;
    logic [7:0] v;
    start = 0; host_wr = 0; host_rd = 0; host_addr = 0; host_wdata = 0;
    total = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < IMAGES; n++) begin
      gen_ridges(W, H, img, 4 + n, 10 + n, 13 * n);
      ref_img = img;
      zs_thin(W, H, ref_img, passes, dels);
      for (int a = 0; a < WORDS; a++) begin
        @(negedge clk);
        host_addr = 15'(a); host_wdata = pack_byte(W, img, a / COLS, a % COLS); host_wr = 1;
      end
      @(negedge clk); host_wr = 0; start = 1;
      @(negedge clk); start = 0;
      clocks = 0;
      while (busy) begin @(negedge clk); clocks++; end
      total += clocks;
      checks++;
      if (clocks != 6 * COLS * (2 + passes * H) + 6) begin
        failures++;
        $display("image %0d: busy %0d clocks, expected %0d", n, clocks, 6 * COLS * (2 + passes * H) + 6);
      end
      bad = 0;
      for (int a = 0; a < WORDS; a++) begin
        @(negedge clk);
        host_addr = 15'(a); host_rd = 1;
        @(negedge clk);
        host_rd = 0;
        v = host_rdata;
        checks++;
        if (v !== pack_byte(W, ref_img, a / COLS, a % COLS)) begin
          failures++; bad++;
        end
      end
      $display("image %0d (ridges %0d px): %0d passes, %0d deletions, %0d clocks = %0.1f ms at 40 MHz, %0d bad bytes",
               n, 4 + n, passes, dels, clocks, clocks / 40000.0, bad);
    end
    $display("%0d images: %0d clocks = %0.3f s at 40 MHz", IMAGES, total, total / 40.0e6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
