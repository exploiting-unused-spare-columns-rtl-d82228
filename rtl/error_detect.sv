// error_detect: syndrome masking and the Error Detected output.
//
// One 2-input AND gate per additional syndrome bit clears the bits whose check bit is not
// stored in a working cell of this row (mask bit 0); the OR of the base syndrome and the masked
// additional syndrome is the error-detected flag. With every mask bit 0 the flag is exactly that
// of the plain SEC-DED code.
//
// Interface: s_base_i, s_extra_i, mask_i in; s_extra_masked_o, detected_o out.
// Timing: combinational. The AND gate per additional bit and the detect OR follow the
// published scheme; driving the AND with a general per-row mask (1 = valid) instead of a
// 'spare used' line is what lets the same gates serve the flag-column and CAM modes.
module error_detect #(
  parameter int unsigned R0     = 7,
  parameter int unsigned NSPARE = 4
) (
  input  logic [R0-1:0]     s_base_i,
  input  logic [NSPARE-1:0] s_extra_i,
  input  logic [NSPARE-1:0] mask_i,
  output logic [NSPARE-1:0] s_extra_masked_o,
  output logic              detected_o
);
  assign s_extra_masked_o = s_extra_i & mask_i;
  assign detected_o       = (|s_base_i) | (|s_extra_masked_o);
endmodule
