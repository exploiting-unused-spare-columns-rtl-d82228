// tb_error_detect: random and corner syndromes and masks; the masked additional syndrome must
// be the bitwise AND and the detect flag the OR of base and masked bits.
module tb_error_detect;
  localparam int R = 7, S = 4;
  int checks = 0, failures = 0;
  logic [R-1:0] sb; logic [S-1:0] sx, m, sxm; logic det;

  error_detect #(.R0(R), .NSPARE(S)) dut (.s_base_i(sb), .s_extra_i(sx), .mask_i(m),
                                          .s_extra_masked_o(sxm), .detected_o(det));

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
    // every extra/mask combination with a zero base syndrome
    for (int a = 0; a < 16; a++)
      for (int c = 0; c < 16; c++) begin
        sb = '0; sx = 4'(a); m = 4'(c); #1;
        check(sxm == 4'(a & c), "masked syndrome");
        check(det == ((a & c) != 0), "detect with zero base syndrome");
      end
    for (int t = 0; t < 500; t++) begin
      sb = 7'($urandom); sx = 4'($urandom); m = 4'($urandom); #1;
      check(det == ((sb != 0) || ((sx & m) != 0)), "detect random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
