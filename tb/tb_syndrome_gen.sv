// tb_syndrome_gen: encodes random words with the reference code, flips zero, one or two bits
// of the 43-bit extended codeword and checks that the syndrome is zero, the H column of the
// flipped bit, or the XOR of the two columns.
module tb_syndrome_gen;
  import tb_ref_pkg::*;
  localparam int K = 32, S = 4, R = 7, NT = K + R + S;
  int checks = 0, failures = 0;

  logic [K-1:0] d; logic [R-1:0] b; logic [S-1:0] x;
  logic [R-1:0] sb; logic [S-1:0] sx;

  syndrome_gen #(.DATA_W(K), .NSPARE(S)) dut (.data_i(d), .base_i(b), .extra_i(x),
                                             .s_base_o(sb), .s_extra_o(sx));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NT-1:0] cw, v;
    logic [31:0] chk, exp_s;
    int p, q;
    for (int t = 0; t < 2000; t++) begin
      cw = '0;
      cw[K-1:0] = $urandom;
      chk = '0;
      for (int i = 0; i < K; i++) if (cw[i]) chk ^= ref_hcol(K, S, i);
      cw[NT-1:K] = chk[R+S-1:0];
      p = $urandom_range(NT - 1);
      q = $urandom_range(NT - 1);
      for (int n = 0; n < 3; n++) begin
        v = cw;
        exp_s = '0;
        if (n >= 1) begin v[p] = ~v[p]; exp_s ^= ref_hcol(K, S, p); end
        if (n == 2 && q != p) begin v[q] = ~v[q]; exp_s ^= ref_hcol(K, S, q); end
        {x, b, d} = v; #1;
        check({sx, sb} == exp_s[R+S-1:0], $sformatf("syndrome n=%0d p=%0d q=%0d", n, p, q));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
