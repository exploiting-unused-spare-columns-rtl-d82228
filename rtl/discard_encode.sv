// discard_encode: encoder from CAM discard signals to syndrome mask bits.
//
// A configurable OR network: additional check bit j is discarded when any active discard
// signal p has map_i[p][j] set, and the mask output is the complement (1 = bit valid), ready for
// the AND gates in front of the error-detection OR. The natural map is a thermometer, where a
// (p+1)-bit discard drops the p+1 highest-numbered extra bits (ecc_pkg::thermo_map); other maps
// let a partition drop an arbitrary set of bits, e.g. a defective spare column together with a
// replaced column. The map is set from the defect map at repair time.
//
// Interface: discard_i (from defect_cam), map_i (configuration) in; mask_o out.
// Timing: combinational. An OR-gate encoder configured from the defect map is what the scheme
// calls for; the full programmable map is this design's way of providing it.
module discard_encode #(
  parameter int unsigned NSPARE = 4
) (
  input  logic [NSPARE-1:0]             discard_i,
  input  logic [NSPARE-1:0][NSPARE-1:0] map_i,
  output logic [NSPARE-1:0]             mask_o
);
  always_comb begin
    for (int unsigned j = 0; j < NSPARE; j++) begin
      mask_o[j] = 1'b1;
      for (int unsigned p = 0; p < NSPARE; p++)
        if (discard_i[p] && map_i[p][j]) mask_o[j] = 1'b0;
    end
  end
endmodule
