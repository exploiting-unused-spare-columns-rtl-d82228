// tb_ref_pkg: reference model of the extended SEC-DED code, written independently of the RTL
// package, for the self-checking testbenches.
//
// The base H columns are rebuilt by counting set bits of every candidate column value; the
// extra rows are the fixed values chosen by the greedy row search for 32 and 64 data bits.
// ref_encode packs a full logical codeword {extra, base, data}; ref_decode finds the single
// valid H column equal to a masked syndrome by exhaustive search.
package tb_ref_pkg;

  function automatic int ref_r(input int k);
    int r;
    int n;
    for (r = 3; r < 16; r++) begin
      n = 0;
      for (int v = 0; v < (1 << r); v++)
        if ($countones(v) >= 3 && $countones(v) % 2 == 1) n++;
      if (n >= k) return r;
    end
    return 16;
  endfunction

  // Column i of the base part, as an integer.
  function automatic int ref_col(input int k, input int i);
    int r = ref_r(k);
    int n = 0;
    for (int w = 3; w <= r; w += 2)
      for (int v = 0; v < (1 << r); v++)
        if ($countones(v) == w) begin
          if (n == i) return v;
          n++;
        end
    return 0;
  endfunction

  function automatic logic [63:0] ref_xrow(input int k, input int j);
    logic [63:0] t32 [4] = '{64'h91b7584a, 64'ha46d6753, 64'h5dfbd3d1, 64'ha2a7ae1f};
    logic [63:0] t64 [4] = '{64'hf8130c4237730edf, 64'h3099fdf5ab99254a,
                             64'h33138131c541013d, 64'hf0e642f43328ad08};
    logic [1:0] jj = j[1:0];
    if (k == 32) return t32[jj];
    return t64[jj];
  endfunction

  // Full extended H column of logical codeword position p (data, then base checks, then
  // extras), packed as {extra bits, base bits} with the base part in the low r bits.
  function automatic logic [31:0] ref_hcol(input int k, input int s, input int p);
    int r = ref_r(k);
    logic [31:0] c = '0;
    if (p < k) begin
      c = 32'(ref_col(k, p));
      for (int j = 0; j < s; j++) c[r+j] = ref_xrow(k, j)[p];
    end else begin
      c[p-k] = 1'b1;
    end
    return c;
  endfunction

endpackage
