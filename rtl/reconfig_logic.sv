// reconfig_logic: column repair multiplexers that also place the additional check bits.
//
// A physical row has N regular columns (data + base check bits) followed by NSPARE spare
// columns. Spare j either replaces one regular column (spare_used[j], column spare_col[j]) or is
// left unused. Additional check bit j always follows spare j:
//   - spare j unused  -> extra bit j is stored in spare column j itself;
//   - spare j used    -> the codeword bit of the replaced column goes to spare column j, and
//                        extra bit j is stored in the replaced column, whose cells still work in
//                        every row but the defective one(s).
// In MASK_INFO_COL mode the last spare column holds the per-row defect flag instead of an extra
// bit: ordinary writes do not touch it and a flag write (info_wr_i) writes only that cell.
// The read direction applies the inverse mapping. Repair uses one multiplexer per column
// (direct replacement), not a shifting chain; which one a memory uses does not change the idea.
//
// Interface: write side cw_i, extra_i, flag_i, info_wr_i -> phys_wdata_o, phys_wmask_o;
//            read side phys_rdata_i -> cw_o, extra_o, flag_o; repair configuration
//            spare_used_i, spare_col_i and mode_i. flag_o is the last spare column's cell
//            as read, with no logic in between, because the flag column never moves.
// Timing: combinational. If two spares name the same column, the lower-numbered one wins.
module reconfig_logic
  import ecc_pkg::*;
#(
  parameter int unsigned N      = 39,
  parameter int unsigned NSPARE = 4,
  localparam int unsigned COLW  = $clog2(N),
  localparam int unsigned PW    = N + NSPARE,
  localparam int unsigned SW    = (NSPARE > 1) ? $clog2(NSPARE) : 1
) (
  input  mask_mode_e                   mode_i,
  input  logic [NSPARE-1:0]            spare_used_i,
  input  logic [NSPARE-1:0][COLW-1:0]  spare_col_i,
  // write direction
  input  logic [N-1:0]                 cw_i,
  input  logic [NSPARE-1:0]            extra_i,
  input  logic                         flag_i,
  input  logic                         info_wr_i,
  output logic [PW-1:0]                phys_wdata_o,
  output logic [PW-1:0]                phys_wmask_o,
  // read direction
  input  logic [PW-1:0]                phys_rdata_i,
  output logic [N-1:0]                 cw_o,
  output logic [NSPARE-1:0]            extra_o,
  output logic                         flag_o
);
  localparam int unsigned FLAG_COL = PW - 1;

  // repl_hit[c]: column c is replaced; repl_by[c]: by which spare.
  logic [N-1:0]        repl_hit;
  logic [SW-1:0]       repl_by [N];

  always_comb begin
    for (int unsigned c = 0; c < N; c++) begin
      repl_hit[c] = 1'b0;
      repl_by[c]  = '0;
      for (int j = int'(NSPARE) - 1; j >= 0; j--)
        if (spare_used_i[j] && spare_col_i[j] == COLW'(c)) begin
          repl_hit[c] = 1'b1;
          repl_by[c]  = SW'(j);
        end
    end
  end

  // Write direction.
  always_comb begin
    for (int unsigned c = 0; c < N; c++)
      phys_wdata_o[c] = repl_hit[c] ? extra_i[repl_by[c]] : cw_i[c];
    for (int unsigned j = 0; j < NSPARE; j++)
      phys_wdata_o[N+j] = spare_used_i[j] ? cw_i[spare_col_i[j]] : extra_i[j];
    if (mode_i == MASK_INFO_COL) begin
      phys_wdata_o[FLAG_COL] = flag_i;
      phys_wmask_o           = info_wr_i ? PW'(1) << FLAG_COL : ~(PW'(1) << FLAG_COL);
    end else begin
      phys_wmask_o           = info_wr_i ? '0 : '1;
    end
  end

  // Read direction.
  always_comb begin
    for (int unsigned c = 0; c < N; c++)
      cw_o[c] = repl_hit[c] ? phys_rdata_i[N + 32'(repl_by[c])] : phys_rdata_i[c];
    for (int unsigned j = 0; j < NSPARE; j++)
      extra_o[j] = spare_used_i[j] ? phys_rdata_i[spare_col_i[j]] : phys_rdata_i[N+j];
  end

  assign flag_o = phys_rdata_i[FLAG_COL];
endmodule
