// correction_logic: single-error correction with maskable additional syndrome bits.
//
// Each data bit i has one wide AND gate that fires when the syndrome equals its H column. For
// every additional syndrome bit the AND input is the bit comparison ORed with "this bit is not
// valid" (mask bit 0), so a masked bit is disregarded and the decoder falls back to the smaller
// code of that row. A firing AND flips its data bit. The same comparison against the unit
// columns of the check bits tells a single check-bit error apart from an uncorrectable one.
//
// Interface: data_i, s_base_i, s_extra_i, mask_i, detected_i in; data_o (corrected data),
//            corrected_o (exactly one valid column matched), uncorrectable_o out.
// Timing: combinational. The bit slice (AND tree with an OR-disable per additional bit)
// follows the published scheme; the corrected/uncorrectable status is this design's addition.
module correction_logic
  import ecc_pkg::*;
#(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned NSPARE = 4,
  localparam int unsigned R0    = base_r(DATA_W)
) (
  input  logic [DATA_W-1:0] data_i,
  input  logic [R0-1:0]     s_base_i,
  input  logic [NSPARE-1:0] s_extra_i,
  input  logic [NSPARE-1:0] mask_i,
  input  logic              detected_i,
  output logic [DATA_W-1:0] data_o,
  output logic              corrected_o,
  output logic              uncorrectable_o
);
  localparam logic [MAX_R-1:0][MAX_K-1:0] HB = base_rows(DATA_W);
  localparam logic [MAX_S-1:0][MAX_K-1:0] HE = extra_rows(DATA_W, NSPARE);

  logic [DATA_W-1:0] hit;
  logic              chk_hit;
  logic [NSPARE-1:0] sx_m;

  always_comb begin
    for (int unsigned i = 0; i < DATA_W; i++) begin
      hit[i] = 1'b1;
      for (int unsigned r = 0; r < R0; r++)
        hit[i] &= (s_base_i[r] == HB[r][i]);
      for (int unsigned j = 0; j < NSPARE; j++)
        hit[i] &= (s_extra_i[j] == HE[j][i]) | ~mask_i[j];
    end
    // Single error in a check bit: the masked syndrome is a unit vector.
    sx_m    = s_extra_i & mask_i;
    chk_hit = 1'b0;
    for (int unsigned c = 0; c < R0; c++)
      chk_hit |= (s_base_i == R0'(1) << c) && (sx_m == '0);
    for (int unsigned j = 0; j < NSPARE; j++)
      chk_hit |= (s_base_i == '0) && (sx_m == NSPARE'(1) << j);
  end

  assign data_o          = data_i ^ (detected_i ? hit : '0);
  assign corrected_o     = detected_i & ((|hit) | chk_hit);
  assign uncorrectable_o = detected_i & ~((|hit) | chk_hit);
endmodule
