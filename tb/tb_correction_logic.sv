// tb_correction_logic: drives the syndrome generator and the correction logic together with
// codewords carrying zero to three bit errors under random masks. The expected result comes
// from an exhaustive search of the valid H columns for one equal to the masked syndrome:
// a hit must be corrected (data bit flipped, or a check-bit error reported as corrected),
// a miss with a non-zero syndrome must be reported uncorrectable. Double errors must never be
// corrected.
module tb_correction_logic;
  import tb_ref_pkg::*;
  localparam int K = 32, S = 4, R = 7, NT = K + R + S;
  int checks = 0, failures = 0;

  logic [K-1:0] d, dout; logic [R-1:0] b, sb; logic [S-1:0] x, sx, m, sxm;
  logic det, cor, unc;

  syndrome_gen #(.DATA_W(K), .NSPARE(S)) u_syn (.data_i(d), .base_i(b), .extra_i(x),
                                               .s_base_o(sb), .s_extra_o(sx));
  error_detect #(.R0(R), .NSPARE(S)) u_det (.s_base_i(sb), .s_extra_i(sx), .mask_i(m),
                                            .s_extra_masked_o(sxm), .detected_o(det));
  correction_logic #(.DATA_W(K), .NSPARE(S)) dut (.data_i(d), .s_base_i(sb), .s_extra_i(sx),
      .mask_i(m), .detected_i(det), .data_o(dout), .corrected_o(cor), .uncorrectable_o(unc));

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
    logic [NT-1:0] cw, v;
    logic [31:0] chk, syn, keep, col;
    int nerr, pos[3], hit;
    for (int t = 0; t < 6000; t++) begin
      cw = '0;
      cw[K-1:0] = $urandom;
      chk = '0;
      for (int i = 0; i < K; i++) if (cw[i]) chk ^= ref_hcol(K, S, i);
      cw[NT-1:K] = chk[R+S-1:0];
      m = 4'($urandom);
      keep = {21'b0, m, 7'h7f};
      nerr = t % 4;
      v = cw;
      for (int e = 0; e < nerr; e++) begin
        // pick distinct positions among the bits that are valid under the mask
        do pos[e] = $urandom_range(NT - 1);
        while ((pos[e] >= K + R && !m[pos[e] - K - R]) || (e > 0 && pos[e] == pos[0]) ||
               (e > 1 && pos[e] == pos[1]));
        v[pos[e]] = ~v[pos[e]];
      end
      {x, b, d} = v; #1;
      syn = '0;
      for (int p = 0; p < NT; p++) if (v[p] != cw[p]) syn ^= ref_hcol(K, S, p);
      syn &= keep;
      hit = -1;
      for (int p = 0; p < NT; p++) begin
        col = ref_hcol(K, S, p) & keep;
        if ((p < K + R || m[p - K - R]) && col == syn) hit = p;
      end
      check(det == (syn != 0), "detect");
      if (syn == 0) check(!cor && !unc && dout == d, "clean word untouched");
      else if (hit >= 0) begin
        check(cor && !unc, "single-column syndrome corrected");
        check(dout == (hit < K ? d ^ (K'(1) << hit) : d), "corrected data");
      end else
        check(unc && !cor && dout == d, "no-match syndrome uncorrectable");
      if (nerr == 1) check(dout == cw[K-1:0], "single error restores data");
      if (nerr == 2) check(!cor && unc, "double error detected, not corrected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
