// ecc_spare_mem: SEC-DED protected memory that turns leftover repair resources into extra
// check bits.
//
// A word of DATA_W bits is encoded into a SEC-DED codeword (R0 base check bits) plus NSPARE
// additional check bits, one per spare column. After repair, additional bit j lives in spare
// column j if that spare is unused, or in the regular column that spare j replaced (reconfig_logic).
// On a read, the syndrome of the whole extended codeword is formed and the additional syndrome
// bits whose cells do not hold a valid check bit in this row are masked; detection and
// correction then act on the longer code where it exists and fall back to plain SEC-DED where
// it does not. The row-dependent mask comes from one of three sources, chosen by cfg_mode_i:
//   MASK_SPARE_ONLY : only unused, defect-free spares (same mask for every row);
//   MASK_INFO_COL   : the last spare column stores a "row has a defect" flag, written by boot
//                     firmware with flag writes; masking_info turns the flag into the mask;
//   MASK_CAM        : defect_cam holds the addresses of defective rows in partitions, searched
//                     in parallel with the array access; discard_encode turns the partition hits
//                     into the mask. Rows not in the CAM use all NSPARE bits.
// The mode, the repair configuration and the CAM contents are static after boot.
//
// Interface: a single request port (req_valid_i, req_write_i, req_info_i for a flag-only write,
//            req_addr_i, req_wdata_i, req_flag_i), one response port for reads (rsp_valid_o,
//            corrected rsp_data_o, rsp_status_o, rsp_mask_o (the additional check bits that
//            were in force) and rsp_cam_hit_o (the address is listed in the CAM)). The tst_* inputs are test hooks of this design, not part of the
//            scheme: they flip (soft errors) or pin (stuck-at cell defects) bits of the physical
//            row read out of the array; tie them to zero in use.
// Timing: one request per cycle, no stalls. Read data and status appear one cycle after the
//         request; the CAM search runs in the same cycle as the array read and adds no latency.
// The block structure follows the published scheme; building all three mask sources in one
// design, the request interface and the test hooks are this design's own. Verilator notes
// that rst_n is used both as an asynchronous reset and in the assertions' disable condition;
// this is intended.
module ecc_spare_mem
  import ecc_pkg::*;
#(
  parameter int unsigned DATA_W      = 32,
  parameter int unsigned NSPARE      = 4,
  parameter int unsigned WORDS       = 1024,
  parameter int unsigned CAM_ENTRIES = 128,
  localparam int unsigned R0    = base_r(DATA_W),
  localparam int unsigned N     = DATA_W + R0,
  localparam int unsigned PW    = N + NSPARE,
  localparam int unsigned AW    = $clog2(WORDS),
  localparam int unsigned COLW  = $clog2(N),
  localparam int unsigned IDX_W = $clog2(CAM_ENTRIES),
  localparam int unsigned END_W = $clog2(CAM_ENTRIES + 1)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // repair and masking configuration
  input  mask_mode_e                        cfg_mode_i,
  input  logic [NSPARE-1:0]                 cfg_spare_used_i,
  input  logic [NSPARE-1:0]                 cfg_spare_bad_i,
  input  logic [NSPARE-1:0][COLW-1:0]       cfg_spare_col_i,
  input  logic [NSPARE-1:0][END_W-1:0]      cfg_part_end_i,
  input  logic [NSPARE-1:0][NSPARE-1:0]     cfg_enc_map_i,
  // CAM programming
  input  logic                              cam_wr_en_i,
  input  logic [IDX_W-1:0]                  cam_wr_idx_i,
  input  logic                              cam_wr_valid_i,
  input  logic [AW-1:0]                     cam_wr_addr_i,
  // access
  input  logic                              req_valid_i,
  input  logic                              req_write_i,
  input  logic                              req_info_i,
  input  logic [AW-1:0]                     req_addr_i,
  input  logic [DATA_W-1:0]                 req_wdata_i,
  input  logic                              req_flag_i,
  output logic                              rsp_valid_o,
  output logic [DATA_W-1:0]                 rsp_data_o,
  output ecc_status_t                       rsp_status_o,
  output logic [NSPARE-1:0]                 rsp_mask_o,
  output logic                              rsp_cam_hit_o,
  // fault-injection test hooks on the physical read word
  input  logic [PW-1:0]                     tst_flip_i,
  input  logic [PW-1:0]                     tst_stuck_mask_i,
  input  logic [PW-1:0]                     tst_stuck_val_i
);
  // ---------------- write path ----------------
  logic [R0-1:0]     wr_base;
  logic [NSPARE-1:0] wr_extra;
  logic [PW-1:0]     phys_wdata, phys_wmask, phys_rdata_raw, phys_rdata;

  check_bit_gen #(.DATA_W(DATA_W), .NSPARE(NSPARE)) u_cbg (
    .data_i (req_wdata_i),
    .base_o (wr_base),
    .extra_o(wr_extra)
  );

  logic [N-1:0]      rd_cw;
  logic [NSPARE-1:0] rd_extra;
  logic              rd_flag;

  reconfig_logic #(.N(N), .NSPARE(NSPARE)) u_reconfig (
    .mode_i      (cfg_mode_i),
    .spare_used_i(cfg_spare_used_i),
    .spare_col_i (cfg_spare_col_i),
    .cw_i        ({wr_base, req_wdata_i}),
    .extra_i     (wr_extra),
    .flag_i      (req_flag_i),
    .info_wr_i   (req_info_i),
    .phys_wdata_o(phys_wdata),
    .phys_wmask_o(phys_wmask),
    .phys_rdata_i(phys_rdata),
    .cw_o        (rd_cw),
    .extra_o     (rd_extra),
    .flag_o      (rd_flag)
  );

  spare_col_array #(.WORDS(WORDS), .WIDTH(PW)) u_array (
    .clk    (clk),
    .en_i   (req_valid_i),
    .we_i   (req_write_i | req_info_i),
    .addr_i (req_addr_i),
    .wdata_i(phys_wdata),
    .wmask_i(phys_wmask),
    .rdata_o(phys_rdata_raw)
  );

  assign phys_rdata = ((phys_rdata_raw ^ tst_flip_i) & ~tst_stuck_mask_i)
                    | (tst_stuck_val_i & tst_stuck_mask_i);

  // ---------------- defect information ----------------
  logic [NSPARE-1:0] cam_discard, cam_mask, info_mask, mask;
  logic              cam_hit;

  defect_cam #(.ENTRIES(CAM_ENTRIES), .ADDR_W(AW), .NSPARE(NSPARE)) u_cam (
    .clk          (clk),
    .rst_n        (rst_n),
    .wr_en_i      (cam_wr_en_i),
    .wr_idx_i     (cam_wr_idx_i),
    .wr_valid_i   (cam_wr_valid_i),
    .wr_addr_i    (cam_wr_addr_i),
    .search_en_i  (req_valid_i),
    .search_addr_i(req_addr_i),
    .part_end_i   (cfg_part_end_i),
    .discard_o    (cam_discard),
    .hit_o        (cam_hit)
  );

  discard_encode #(.NSPARE(NSPARE)) u_encode (
    .discard_i(cam_discard),
    .map_i    (cfg_enc_map_i),
    .mask_o   (cam_mask)
  );

  masking_info #(.NSPARE(NSPARE)) u_mask_info (
    .mode_i      (cfg_mode_i),
    .row_flag_i  (rd_flag),
    .spare_used_i(cfg_spare_used_i),
    .spare_bad_i (cfg_spare_bad_i),
    .mask_o      (info_mask)
  );

  assign mask = (cfg_mode_i == MASK_CAM) ? cam_mask : info_mask;

  // ---------------- read path ----------------
  logic [R0-1:0]     s_base;
  logic [NSPARE-1:0] s_extra, s_extra_m;
  logic              detected;

  syndrome_gen #(.DATA_W(DATA_W), .NSPARE(NSPARE)) u_syn (
    .data_i   (rd_cw[DATA_W-1:0]),
    .base_i   (rd_cw[N-1:DATA_W]),
    .extra_i  (rd_extra),
    .s_base_o (s_base),
    .s_extra_o(s_extra)
  );

  error_detect #(.R0(R0), .NSPARE(NSPARE)) u_det (
    .s_base_i        (s_base),
    .s_extra_i       (s_extra),
    .mask_i          (mask),
    .s_extra_masked_o(s_extra_m),
    .detected_o      (detected)
  );

  correction_logic #(.DATA_W(DATA_W), .NSPARE(NSPARE)) u_corr (
    .data_i         (rd_cw[DATA_W-1:0]),
    .s_base_i       (s_base),
    .s_extra_i      (s_extra),
    .mask_i         (mask),
    .detected_i     (detected),
    .data_o         (rsp_data_o),
    .corrected_o    (rsp_status_o.corrected),
    .uncorrectable_o(rsp_status_o.uncorrectable)
  );

  assign rsp_status_o.detected = detected;
  assign rsp_mask_o            = mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rsp_valid_o <= 1'b0;
    else        rsp_valid_o <= req_valid_i & ~req_write_i & ~req_info_i;
  end

  // ---------------- configuration rules ----------------
  // The flag column must be a working, unused spare.
  a_flag_col_free: assert property (@(posedge clk) disable iff (!rst_n)
      cfg_mode_i == MASK_INFO_COL |-> !cfg_spare_used_i[NSPARE-1] && !cfg_spare_bad_i[NSPARE-1])
    else $error("ecc_spare_mem: flag column (last spare) must be unused and defect-free");
  a_one_kind_of_write: assert property (@(posedge clk) disable iff (!rst_n)
      req_valid_i |-> !(req_write_i && req_info_i))
    else $error("ecc_spare_mem: a request is either a data write or a flag write");

  assign rsp_cam_hit_o = cam_hit;

  // The masked additional syndrome only feeds detection inside error_detect.
  logic unused_s_extra_m;
  assign unused_s_extra_m = ^s_extra_m;
endmodule
