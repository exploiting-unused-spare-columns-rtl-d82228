// tb_masking_info: exhaustive check of the mask for every mode, row flag, and combination
// of used and defective spares (4 spares), against the rule: a bit is valid when its cell
// works in this row, and the flag column carries no check bit.
module tb_masking_info;
  import ecc_pkg::*;
  int checks = 0, failures = 0;
  mask_mode_e mode; logic flag; logic [3:0] used, bad, mask;

  masking_info #(.NSPARE(4)) dut (.mode_i(mode), .row_flag_i(flag), .spare_used_i(used),
                                  .spare_bad_i(bad), .mask_o(mask));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp_m;
    bit spare_ok;
    for (int md = 0; md < 3; md++)
      for (int f = 0; f < 2; f++)
        for (int u = 0; u < 16; u++)
          for (int bd = 0; bd < 16; bd++) begin
            mode = mask_mode_e'(md); flag = f[0]; used = 4'(u); bad = 4'(bd); #1;
            for (int j = 0; j < 4; j++) begin
              spare_ok = !used[j] && !bad[j];
              if (md == 1) exp_m[j] = (j == 3) ? 1'b0 : (flag ? spare_ok : 1'b1);
              else         exp_m[j] = spare_ok;
            end
            check(mask == exp_m, $sformatf("mode %0d flag %0d used %b bad %b", md, f, used, bad));
          end
    // the paper's example: two spares replace columns, one spare unused, flag in the last:
    // defective rows keep only the unused spare's bit
    mode = MASK_INFO_COL; used = 4'b0110; bad = '0; flag = 1'b1; #1;
    check(mask == 4'b0001, "defective row keeps one bit");
    flag = 1'b0; #1;
    check(mask == 4'b0111, "clean row keeps three bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
