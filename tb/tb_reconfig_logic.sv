// tb_reconfig_logic: random repair configurations (distinct replaced columns) and codewords.
// Checks where each bit lands in the physical row (replaced columns carry the extra bit of
// their spare, used spares carry the replaced codeword bit, unused spares their own extra bit),
// the write masks of data and flag writes in each mode, and that reading the row back returns
// the codeword, the extra bits and the flag.
module tb_reconfig_logic;
  import ecc_pkg::*;
  localparam int N = 39, S = 4, PW = N + S;
  int checks = 0, failures = 0;
  mask_mode_e mode; logic [S-1:0] used; logic [S-1:0][5:0] col;
  logic [N-1:0] cw, cw_o; logic [S-1:0] x, x_o; logic flag, info, flag_o;
  logic [PW-1:0] pwd, pwm, prd;

  reconfig_logic #(.N(N), .NSPARE(S)) dut (.mode_i(mode), .spare_used_i(used), .spare_col_i(col),
      .cw_i(cw), .extra_i(x), .flag_i(flag), .info_wr_i(info), .phys_wdata_o(pwd),
      .phys_wmask_o(pwm), .phys_rdata_i(prd), .cw_o(cw_o), .extra_o(x_o), .flag_o(flag_o));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [PW-1:0] exp_w;
    bit dup;
    for (int t = 0; t < 3000; t++) begin
      mode = (t % 2 == 0) ? MASK_CAM : MASK_INFO_COL;
      used = 4'($urandom);
      if (mode == MASK_INFO_COL) used[3] = 1'b0;
      for (int j = 0; j < S; j++) begin
        do begin
          col[j] = 6'($urandom_range(N - 1));
          dup = 0;
          for (int i = 0; i < j; i++) if (col[i] == col[j]) dup = 1;
        end while (dup);
      end
      cw = {7'($urandom), $urandom}; x = 4'($urandom); flag = $urandom_range(1); info = 0;
      #1;
      exp_w[N-1:0] = cw;
      for (int j = 0; j < S; j++) begin
        if (used[j]) begin
          exp_w[col[j]] = x[j];
          exp_w[N+j]    = cw[col[j]];
        end else exp_w[N+j] = x[j];
      end
      if (mode == MASK_INFO_COL) exp_w[PW-1] = flag;
      check(pwd == exp_w, "physical placement");
      check(pwm == ((mode == MASK_INFO_COL) ? {1'b0, {(PW-1){1'b1}}} : '1), "data write mask");
      prd = pwd; #1;
      check(cw_o == cw, "codeword round trip");
      for (int j = 0; j < S; j++)
        if (!(mode == MASK_INFO_COL && j == 3)) check(x_o[j] == x[j], "extra bit round trip");
      if (mode == MASK_INFO_COL) check(flag_o == flag, "flag round trip");
      info = 1; #1;
      check(pwm == ((mode == MASK_INFO_COL) ? {1'b1, {(PW-1){1'b0}}} : '0), "flag write mask");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
