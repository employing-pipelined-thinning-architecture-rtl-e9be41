// thinning_system_full_tb: one complete thinning operation of the top
// level at its default size, a 512 x 512 image (32768 bytes). The image
// is a synthetic fingerprint (curved ridges about four pixels wide). The
// host loads it, starts the processor, waits for done and reads the
// skeleton back; every byte is compared with the reference thinning and
// the run must take 6*64*(2+P*512)+6 clocks, 196,608 clocks per pass.
module thinning_system_full_tb;
  import zs_ref_pkg::*;
  localparam int W = 512, H = 512, COLS = W / 8, WORDS = COLS * H;
  logic clk = 0, rst_n = 0, start;
  logic busy, done, host_wr, host_rd;
  logic [14:0] host_addr;
  logic [7:0] host_wdata, host_rdata;
  int checks = 0, failures = 0;

  thinning_system dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit img[], ref_img[];
    int passes, dels, clocks, bad;
    logic [7:0] v;
    start = 0; host_wr = 0; host_rd = 0; host_addr = 0; host_wdata = 0;
    gen_ridges(W, H, img);
    ref_img = img;
    zs_thin(W, H, ref_img, passes, dels);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      host_addr = 15'(a); host_wdata = pack_byte(W, img, a / COLS, a % COLS); host_wr = 1;
    end
    @(negedge clk); host_wr = 0; start = 1;
    @(negedge clk); start = 0;
    clocks = 0;
    while (busy) begin @(negedge clk); clocks++; end
    checks++;
    if (clocks != 6 * COLS * (2 + passes * H) + 6) begin
      failures++;
      $display("busy %0d clocks, expected %0d", clocks, 6 * COLS * (2 + passes * H) + 6);
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
        if (bad < 5) $display("line %0d col %0d = %02h, expected %02h", a / COLS, a % COLS, v,
                              pack_byte(W, ref_img, a / COLS, a % COLS));
      end
    end
    $display("512x512: %0d passes, %0d deletions, %0d clocks (%0.2f ms at 40 MHz), %0d bad bytes",
             passes, dels, clocks, clocks / 40000.0, bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
