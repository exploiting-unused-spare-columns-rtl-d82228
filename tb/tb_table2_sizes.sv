// tb_table2_sizes: the memory sizes of the reliability comparison beyond the default
// 1K x 32: 8K x 32, 1K x 64 and 8K x 64, each with 4 spare columns, run one after the other
// through the full repair-scenario test (tb_mem_scenarios).
module tb_table2_sizes;
  int checks = 0, failures = 0;
  logic go0 = 0, go1 = 0, go2 = 0, d0, d1, d2;
  int c0, f0, c1, f1, c2, f2;

  tb_mem_scenarios #(.K(32), .WORDS(8192)) u_8kx32 (.start(go0), .done(d0), .checks(c0), .failures(f0));
  tb_mem_scenarios #(.K(64), .WORDS(1024)) u_1kx64 (.start(go1), .done(d1), .checks(c1), .failures(f1));
  tb_mem_scenarios #(.K(64), .WORDS(8192)) u_8kx64 (.start(go2), .done(d2), .checks(c2), .failures(f2));

  initial begin
    #400ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 go0 = 1;
    wait (d0);
    go1 = 1;
    wait (d1);
    go2 = 1;
    wait (d2);
    checks = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
