// check_bit_gen: check bit generator of the extended SEC-DED code.
//
// Computes, for one data word, the R0 base check bits of the odd-weight-column SEC-DED code and
// one additional check bit per spare column. Each check bit is the XOR of the data bits selected
// by its row of the H-matrix (see ecc_pkg); the check-bit part of H is the identity, so the
// additional rows can be added to a plain SEC-DED code without changing it. Which additional
// bits are actually kept is decided later, when they are placed in the array and when the
// syndrome is masked; the generator always produces all of them.
//
// Interface: data_i in, base_o (R0 bits) and extra_o (NSPARE bits) out.
// Timing: purely combinational, one XOR tree per check bit.
// The extension by one identity-column row per spare follows the published scheme; the
// particular base columns and extra rows are this design's own (see ecc_pkg).
module check_bit_gen
  import ecc_pkg::*;
#(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned NSPARE = 4,
  localparam int unsigned R0    = base_r(DATA_W)
) (
  input  logic [DATA_W-1:0] data_i,
  output logic [R0-1:0]     base_o,
  output logic [NSPARE-1:0] extra_o
);
  localparam logic [MAX_R-1:0][MAX_K-1:0] HB = base_rows(DATA_W);
  localparam logic [MAX_S-1:0][MAX_K-1:0] HE = extra_rows(DATA_W, NSPARE);

  always_comb begin
    for (int unsigned r = 0; r < R0; r++) base_o[r] = ^(data_i & HB[r][DATA_W-1:0]);
    for (int unsigned j = 0; j < NSPARE; j++) extra_o[j] = ^(data_i & HE[j][DATA_W-1:0]);
  end

  initial begin
    assert (DATA_W <= MAX_K && NSPARE <= MAX_S && R0 <= MAX_R)
      else $error("check_bit_gen: size outside the range the H functions cover");
  end
endmodule
