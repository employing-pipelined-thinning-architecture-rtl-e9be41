// modification_unit_array_tb: random 3 x 10 pixel blocks are fed to the
// array and each of the eight outputs is compared with the reference rule
// applied to that pixel's own 3x3 window; any_deleted must be the OR.
module modification_unit_array_tb;
  import zs_ref_pkg::*;

  logic       step;
  logic [9:0] row_h, row_m, row_l;
  logic [7:0] pix_out;
  logic       any_deleted;
  int         checks = 0, failures = 0;

  modification_unit_array dut (.step, .row_h, .row_m, .row_l, .pix_out, .any_deleted);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit img[];
    bit nb[8];
    bit exp_any, del;
    logic [7:0] exp_out;
    img = new[30];
    for (int t = 0; t < 4000; t++) begin
      step = $urandom_range(0, 1);
      // Dense and sparse patterns alike.
      row_h = 10'($urandom) | ((t % 3 == 0) ? 10'h3ff : 10'h0);
      row_m = 10'($urandom) | 10'($urandom);
      row_l = 10'($urandom) & ((t % 2 == 0) ? 10'($urandom) : 10'h3ff);
      #1;
      // Image x = 0..9 from left (word bit 9) to right (word bit 0).
      for (int x = 0; x < 10; x++) begin
        img[x]      = row_h[9 - x];
        img[10 + x] = row_m[9 - x];
        img[20 + x] = row_l[9 - x];
      end
      exp_any = 0;
      for (int x = 1; x <= 8; x++) begin
        nb[0] = img[x];      nb[1] = img[x + 1];  nb[2] = img[10 + x + 1];
        nb[3] = img[20 + x + 1]; nb[4] = img[20 + x]; nb[5] = img[20 + x - 1];
        nb[6] = img[10 + x - 1]; nb[7] = img[x - 1];
        del = zs_delete(step, img[10 + x], nb);
        exp_out[8 - x] = img[10 + x] && !del;
        exp_any |= del;
      end
      checks++;
      if (pix_out !== exp_out || any_deleted !== exp_any) begin
        failures++;
        if (failures < 10)
          $display("mismatch step=%0d h=%010b m=%010b l=%010b: out=%08b exp=%08b any=%0d exp=%0d",
                   step, row_h, row_m, row_l, pix_out, exp_out, any_deleted, exp_any);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
