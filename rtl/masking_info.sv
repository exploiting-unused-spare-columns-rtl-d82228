// masking_info: syndrome mask bits when the defect information is kept in the memory itself.
//
// The repair result (which spare columns replace a regular column, which spare columns are
// themselves defective) is fixed during the repair phase and enters as configuration. A spare
// that is unused and defect-free stores its additional check bit in its own column for every
// row. A spare that replaces a column stores its check bit in the replaced column, whose cells
// work in every row except the row(s) with the defect; a defective unused spare stores it in
// its own column, good except in its defect rows. Whether the current row is such a row is read
// from the last spare column, which in MASK_INFO_COL mode holds a 1 for rows with a defective
// cell and therefore carries no check bit itself.
//
//   MASK_SPARE_ONLY : mask = spares that are unused and defect-free (no use of replaced cells).
//   MASK_INFO_COL   : flag 0 -> all NSPARE-1 bits valid; flag 1 -> only the unused,
//                     defect-free spares; the last bit (the flag column) is always masked.
//   other modes     : same as MASK_SPARE_ONLY (the CAM path supplies the mask instead).
//
// Interface: mode_i, row_flag_i (flag read with the word), spare_used_i, spare_bad_i in;
//            mask_o (1 = this additional syndrome bit is valid for the row) out.
// Timing: combinational; the flag arrives with the read data.
// The flag column and the masking of flagged rows follow the published scheme; deriving the
// flagged-row pattern from the repair configuration instead of storing it is this design's choice.
module masking_info
  import ecc_pkg::*;
#(
  parameter int unsigned NSPARE = 4
) (
  input  mask_mode_e        mode_i,
  input  logic              row_flag_i,
  input  logic [NSPARE-1:0] spare_used_i,
  input  logic [NSPARE-1:0] spare_bad_i,
  output logic [NSPARE-1:0] mask_o
);
  logic [NSPARE-1:0] avail;

  assign avail = ~spare_used_i & ~spare_bad_i;

  always_comb begin
    unique case (mode_i)
      MASK_INFO_COL: begin
        mask_o             = row_flag_i ? avail : '1;
        mask_o[NSPARE-1]   = 1'b0;
      end
      default: mask_o = avail;
    endcase
  end
endmodule
