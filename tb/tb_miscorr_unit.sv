// tb_miscorr_unit: helper of tb_miscorrection. For one data width it runs the read-side
// decoder (syndrome generator, masking, correction logic) over every 3-bit error pattern of
// the codeword with 0..4 additional check bits active, and over random 4- and 5-bit patterns,
// and counts how many are miscorrected (reported as a corrected single error) or pass
// undetected. Exact 3-bit counts are compared with the expected fractions given as
// parameters, and with the published table within 0.03; the sampled 5-bit rate must fall
// with the number of extra bits (the 4-bit rate is only reported).
module tb_miscorr_unit #(
  parameter int K = 32,
  parameter int R = 7,
  parameter real EXP3 [5] = '{0.0, 0.0, 0.0, 0.0, 0.0},
  parameter real PUB3 [5] = '{0.0, 0.0, 0.0, 0.0, 0.0}
) (
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int S = 4, NT = K + R + S;
  logic [K-1:0] d, dout; logic [R-1:0] b, sb; logic [S-1:0] x, sx, m, sxm;
  logic det, cor, unc;

  syndrome_gen #(.DATA_W(K), .NSPARE(S)) u_syn (.data_i(d), .base_i(b), .extra_i(x),
                                               .s_base_o(sb), .s_extra_o(sx));
  error_detect #(.R0(R), .NSPARE(S)) u_det (.s_base_i(sb), .s_extra_i(sx), .mask_i(m),
                                            .s_extra_masked_o(sxm), .detected_o(det));
  correction_logic #(.DATA_W(K), .NSPARE(S)) u_cor (.data_i(d), .s_base_i(sb), .s_extra_i(sx),
      .mask_i(m), .detected_i(det), .data_o(dout), .corrected_o(cor), .uncorrectable_o(unc));

  initial begin
    int n, tot, bad, e, pos [5], hits;
    real f;
    real r4 [5], r5 [5];
    logic [NT-1:0] v;
    done = 0; checks = 0; failures = 0;
    d = '0; b = '0; x = '0; m = '0;
    wait (start);
    for (int j = 0; j <= S; j++) begin
      m = 4'((1 << j) - 1);   // the first j extra bits are valid
      n = K + R + j;          // positions of the shortened codeword
      tot = 0; bad = 0;
      // the all-zero word is a codeword, so the error pattern is the received word
      for (int p0 = 0; p0 < n; p0++)
        for (int p1 = p0 + 1; p1 < n; p1++)
          for (int p2 = p1 + 1; p2 < n; p2++) begin
            v = '0; v[p0] = 1; v[p1] = 1; v[p2] = 1;
            {x, b, d} = v; #1;
            tot++;
            if (cor || !det) bad++;
          end
      f = real'(bad) / real'(tot);
      $display("K=%0d extra=%0d 3-bit miscorrection %0d/%0d = %.5f (published %.5f)",
               K, j, bad, tot, f, PUB3[j]);
      checks++;
      if (f - EXP3[j] > 1e-6 || EXP3[j] - f > 1e-6) begin
        failures++; $display("FAIL 3-bit fraction, expected %.6f", EXP3[j]);
      end
      checks++;
      if (f - PUB3[j] > 0.03 || PUB3[j] - f > 0.03) begin
        failures++; $display("FAIL 3-bit fraction far from the published value");
      end
      for (int w = 4; w <= 5; w++) begin
        hits = 0;
        for (int t = 0; t < 20000; t++) begin
          v = '0;
          for (e = 0; e < w; e++) begin
            do pos[e] = $urandom_range(n - 1); while (v[pos[e]]);
            v[pos[e]] = 1'b1;
          end
          {x, b, d} = v; #1;
          if (cor || !det) hits++;
        end
        if (w == 4) r4[j] = real'(hits) / 20000.0; else r5[j] = real'(hits) / 20000.0;
      end
      $display("K=%0d extra=%0d sampled 4-bit %.5f, 5-bit %.5f", K, j, r4[j], r5[j]);
    end
    checks++;
    if (!(r5[4] < r5[0] / 4.0 && r5[2] < r5[0])) begin
      failures++; $display("FAIL 5-bit rate does not fall with extra bits");
    end
    done = 1;
  end
endmodule
