// thinning_processor_tb: the processor on a 32 x 16 image with a
// behavioural main memory in the testbench (one-clock read latency). Runs
// an empty image, a solid image, and several random blob images; after
// each run the memory is compared byte for byte with the reference
// thinning, and busy must last 6*COLS*(2+P*H)+6 clocks, P being the
// number of passes the reference needed. A second processor, on a 40 x 7
// image (5 columns, 35 words: neither a power of two), runs random images
// the same way to exercise the address wrap-around at odd sizes.
module thinning_processor_tb;
  import zs_ref_pkg::*;
  localparam int W = 32, H = 16, COLS = W / 8, WORDS = COLS * H;
  logic clk = 0, rst_n = 0, start;
  logic busy, done, mem_read, mem_write;
  logic [5:0] mem_addr;
  logic [7:0] mem_wdata, mem_rdata;
  logic [7:0] mem [WORDS];
  int checks = 0, failures = 0;

  thinning_processor #(.IMG_W(W), .IMG_H(H)) dut (.*);

  localparam int W2 = 40, H2 = 7, COLS2 = W2 / 8, WORDS2 = COLS2 * H2;
  logic start2, busy2, done2, mem_read2, mem_write2;
  logic [5:0] mem_addr2;
  logic [7:0] mem_wdata2, mem_rdata2;
  logic [7:0] mem2 [64];

  thinning_processor #(.IMG_W(W2), .IMG_H(H2)) dut2 (
    .clk, .rst_n, .start(start2), .busy(busy2), .done(done2),
    .mem_addr(mem_addr2), .mem_read(mem_read2), .mem_write(mem_write2),
    .mem_wdata(mem_wdata2), .mem_rdata(mem_rdata2)
  );

  always_ff @(posedge clk) begin
    if (mem_write2) mem2[mem_addr2] <= mem_wdata2;
    if (mem_read2)  mem_rdata2 <= mem2[mem_addr2];
  end

  // Words beyond the image must never be touched.
  always @(posedge clk) if (rst_n && (mem_read2 || mem_write2) && mem_addr2 >= 6'(WORDS2)) begin
    failures++;
    $display("second processor accessed word %0d outside the image", mem_addr2);
  end

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (mem_write) mem[mem_addr] <= mem_wdata;
    if (mem_read)  mem_rdata <= mem[mem_addr];
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_image(ref bit img[], input string name);
    bit ref_img[];
    int passes, dels, clocks, bad;
    ref_img = img;
    zs_thin(W, H, ref_img, passes, dels);
    for (int y = 0; y < H; y++)
      for (int c = 0; c < COLS; c++) mem[y * COLS + c] = pack_byte(W, img, y, c);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    clocks = 0;
    while (busy) begin @(negedge clk); clocks++; end
    checks++;
    if (clocks != 6 * COLS * (2 + passes * H) + 6) begin
      failures++;
      $display("%s: busy %0d clocks, expected %0d", name, clocks, 6 * COLS * (2 + passes * H) + 6);
    end
    bad = 0;
    for (int y = 0; y < H; y++)
      for (int c = 0; c < COLS; c++) begin
        checks++;
        if (mem[y * COLS + c] !== pack_byte(W, ref_img, y, c)) begin
          failures++; bad++;
          if (bad < 5) $display("%s: line %0d col %0d = %02h, expected %02h", name, y, c,
                                mem[y * COLS + c], pack_byte(W, ref_img, y, c));
        end
      end
    $display("%s: %0d passes, %0d deletions, %0d clocks, %0d bad bytes", name, passes, dels, clocks, bad);
  endtask

  task automatic run_image2(ref bit img[], input string name);
    bit ref_img[];
    int passes, dels, clocks, bad;
    ref_img = img;
    zs_thin(W2, H2, ref_img, passes, dels);
    for (int y = 0; y < H2; y++)
      for (int c = 0; c < COLS2; c++) mem2[y * COLS2 + c] = pack_byte(W2, img, y, c);
    @(negedge clk); start2 = 1;
    @(negedge clk); start2 = 0;
    clocks = 0;
    while (busy2) begin @(negedge clk); clocks++; end
    checks++;
    if (clocks != 6 * COLS2 * (2 + passes * H2) + 6) begin
      failures++;
      $display("%s: busy %0d clocks, expected %0d", name, clocks, 6 * COLS2 * (2 + passes * H2) + 6);
    end
    bad = 0;
    for (int y = 0; y < H2; y++)
      for (int c = 0; c < COLS2; c++) begin
        checks++;
        if (mem2[y * COLS2 + c] !== pack_byte(W2, ref_img, y, c)) begin
          failures++; bad++;
          if (bad < 5) $display("%s: line %0d col %0d = %02h, expected %02h", name, y, c,
                                mem2[y * COLS2 + c], pack_byte(W2, ref_img, y, c));
        end
      end
    $display("%s: %0d passes, %0d deletions, %0d clocks, %0d bad bytes", name, passes, dels, clocks, bad);
  endtask

  initial begin
    bit img[];
    start = 0; start2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    img = new[W * H];
    foreach (img[i]) img[i] = 0;
    run_image(img, "empty");
    foreach (img[i]) img[i] = 1;
    run_image(img, "solid");
    for (int n = 0; n < 6; n++) begin
      gen_blobs(W, H, 3 + n, img);
      run_image(img, $sformatf("blobs%0d", n));
    end
    for (int n = 0; n < 6; n++) begin
      gen_blobs(W2, H2, 2 + n, img);
      run_image2(img, $sformatf("odd-size blobs%0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
