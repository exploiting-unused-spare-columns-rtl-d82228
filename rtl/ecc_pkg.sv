// ecc_pkg: shared constants, types and H-matrix functions of the spare-column ECC memory.
//
// The code is a systematic odd-weight-column (Hsiao style) SEC-DED code extended by one
// extra parity row per spare column. The H-matrix is H = [P : I]: data bits come first in the
// logical codeword, then the base check bits, then the extra check bits (one per spare column),
// so every check bit owns a unit column.
//
// Base columns: the K data columns are the first K odd-weight values of weight 3, 5, ... in
// increasing numeric order, with the smallest number of check bits R0 for which enough such
// columns exist (7 for 32 data bits, 8 for 64). This keeps every column distinct and odd, which
// is what makes the code SEC-DED; it does not balance the row weights as a full Hsiao code would.
//
// Extra rows: each extra row covers only data bits (its check-bit part is the identity). The rows
// for 32 and 64 data bits were chosen one at a time, greedily, each time picking among random
// candidate rows the one that gives the fewest 3-bit errors whose syndrome equals some column of
// the extended H. With 0..4 extra rows this gives a 3-bit miscorrection fraction of
// 0.602/0.265/0.113/0.048/0.018 (32 data bits) and 0.573/0.270/0.126/0.058/0.027 (64 data bits).
// For other widths, or more than four spares, rows come from a fixed LFSR sequence instead (not
// optimised). Data widths up to MAX_K are supported.
package ecc_pkg;

  localparam int unsigned MAX_K   = 64;  // widest data word the H functions cover
  localparam int unsigned MAX_R   = 16;  // widest base syndrome the H functions return
  localparam int unsigned MAX_S   = 16;  // most spare columns (extra rows) the H functions cover

  // How the per-row validity of the extra check bits is known.
  typedef enum logic [1:0] {
    MASK_SPARE_ONLY = 2'd0,  // only unused, defect-free spare columns carry extra bits
    MASK_INFO_COL   = 2'd1,  // last spare column holds a per-row "row has a defect" flag
    MASK_CAM        = 2'd2   // a CAM lists defective rows and how many extra bits each loses
  } mask_mode_e;

  // Read status of one access.
  typedef struct packed {
    logic detected;       // masked syndrome is non-zero
    logic corrected;      // syndrome equals one valid column: single error fixed
    logic uncorrectable;  // non-zero syndrome that matches no valid column
  } ecc_status_t;

  function automatic int unsigned popcount16(input logic [15:0] v);
    int unsigned c = 0;
    for (int b = 0; b < 16; b++) c += int'(v[b]);
    return c;
  endfunction

  // Number of base check bits for k data bits.
  function automatic int unsigned base_r(input int unsigned k);
    int unsigned r = 3;
    int unsigned cnt;
    forever begin
      cnt = 0;
      for (int unsigned v = 0; v < (1 << r); v++)
        if (popcount16(16'(v)) >= 3 && popcount16(16'(v)) % 2 == 1) cnt++;
      if (cnt >= k) return r;
      r++;
    end
  endfunction

  // Base H column of data bit i (lowest R0 bits used).
  function automatic logic [MAX_R-1:0] base_col(input int unsigned k, input int unsigned i);
    int unsigned r = base_r(k);
    int unsigned n = 0;
    for (int unsigned w = 3; w <= r; w += 2)
      for (int unsigned v = 0; v < (1 << r); v++)
        if (popcount16(16'(v)) == w) begin
          if (n == i) return MAX_R'(v);
          n++;
        end
    return '0;
  endfunction

  // Extra H row j over the data bits (bit i set: data bit i enters extra check bit j).
  function automatic logic [MAX_K-1:0] extra_row(input int unsigned k, input int unsigned j);
    logic [MAX_K-1:0] row;
    logic [31:0] lfsr;
    if (k == 32 && j < 4) begin
      case (j)
        0: row = 64'h0000_0000_91b7_584a;
        1: row = 64'h0000_0000_a46d_6753;
        2: row = 64'h0000_0000_5dfb_d3d1;
        default: row = 64'h0000_0000_a2a7_ae1f;
      endcase
    end else if (k == 64 && j < 4) begin
      case (j)
        0: row = 64'hf813_0c42_3773_0edf;
        1: row = 64'h3099_fdf5_ab99_254a;
        2: row = 64'h3313_8131_c541_013d;
        default: row = 64'hf0e6_42f4_3328_ad08;
      endcase
    end else begin
      // Galois LFSR, x^32 + x^22 + x^2 + x + 1, seeded by the row number.
      lfsr = 32'h1234_5679 ^ (32'(j) * 32'h9e37_79b9);
      for (int unsigned b = 0; b < MAX_K; b++) begin
        row[b] = lfsr[0];
        lfsr = lfsr[0] ? ((lfsr >> 1) ^ 32'h8020_0003) : (lfsr >> 1);
      end
    end
    return row;
  endfunction

  // All base rows at once: bit [r][i] is row r of the base H over data bit i.
  function automatic logic [MAX_R-1:0][MAX_K-1:0] base_rows(input int unsigned k);
    logic [MAX_R-1:0][MAX_K-1:0] h = '0;
    logic [MAX_R-1:0] col;
    for (int unsigned i = 0; i < k; i++) begin
      col = base_col(k, i);
      for (int unsigned r = 0; r < MAX_R; r++) h[r][i] = col[r];
    end
    return h;
  endfunction

  // All extra rows at once, restricted to the k data bits.
  function automatic logic [MAX_S-1:0][MAX_K-1:0] extra_rows(input int unsigned k,
                                                             input int unsigned s);
    logic [MAX_S-1:0][MAX_K-1:0] h = '0;
    logic [MAX_K-1:0] keep = (k >= MAX_K) ? '1 : ((MAX_K'(1) << k) - MAX_K'(1));
    for (int unsigned j = 0; j < s; j++) h[j] = extra_row(k, j) & keep;
    return h;
  endfunction

  // Thermometer discard map: a p-bit discard (partition p, p = 0 meaning one bit) masks the
  // p+1 highest-numbered extra check bits.
  function automatic logic [MAX_S-1:0][MAX_S-1:0] thermo_map(input int unsigned s);
    logic [MAX_S-1:0][MAX_S-1:0] m = '0;
    for (int unsigned p = 0; p < s; p++)
      for (int unsigned j = 0; j < s; j++)
        m[p][j] = (j + p + 1 >= s);
    return m;
  endfunction

endpackage
