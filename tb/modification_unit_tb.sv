// modification_unit_tb: exhaustive check of the single modification unit.
// Every 3x3 window (512) under both Step values is compared with the
// reference deletion rule; pix_out must equal the centre pixel unless the
// pixel is deleted.
module modification_unit_tb;
  import zs_ref_pkg::*;

  logic       step;
  logic [8:0] p;
  logic       pix_out, deleted;
  int         checks = 0, failures = 0, n_deleted = 0;

  modification_unit dut (.step, .p, .pix_out, .deleted);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit nb[8];
    bit exp_del;
    for (int s = 0; s < 2; s++) begin
      for (int v = 0; v < 512; v++) begin
        step = s[0];
        p    = v[8:0];
        #1;
        for (int i = 0; i < 8; i++) nb[i] = v[i + 1];
        exp_del = zs_delete(s[0], v[0], nb);
        checks++;
        if (deleted !== exp_del || pix_out !== (v[0] && !exp_del)) begin
          failures++;
          if (failures < 10)
            $display("mismatch step=%0d p=%09b: deleted=%0d exp=%0d pix_out=%0d",
                     s, v[8:0], deleted, exp_del, pix_out);
        end
        if (exp_del) n_deleted++;
      end
    end
    // Both outcomes must have been exercised.
    checks++;
    if (n_deleted == 0 || n_deleted == 1024) failures++;
    $display("deletable windows: %0d of 1024", n_deleted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
