// tb_ecc_spare_mem: end-to-end test of the memory at its default size (1K words x 32 bits,
// 4 spare columns, 128-word CAM).
//
// Four repair scenarios are run, each in every mask mode that applies:
//   S1  two row defects in regular columns, repaired by spares 1 and 2; spare 0 unused;
//       spare 3 free for the defect flags (thermometer CAM map);
//   S2  two row defects repaired by spares 0 and 1, spare 2 itself defective in one row
//       (custom CAM map that drops exactly the bad cell of each row);
//   S3  no defects at all;
//   S4  defects only in the spare columns, no repair.
// For each run the memory is filled, boot-time defect information is written (flag column or
// CAM), and every word is read back. Then single, double and triple bit errors are injected
// into the physical row on reads. Defects are modelled as stuck-at cells on the physical read
// word. The checks are: the mask in force, correction and detection, read latency of one cycle,
// and fewer triple-error miscorrections with more valid extra bits. A count is kept of each
// mechanism (repair remap, check bit in a replaced column, check bit in a defective spare,
// flag-masked row, CAM hit per partition, corrected, detected, masked cell ignored, mode
// switch). One that never happens is a failure.
module tb_ecc_spare_mem;
  import ecc_pkg::*;
  localparam int K = 32, S = 4, R = 7, N = K + R, PW = N + S, WORDS = 1024, AW = 10;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  mask_mode_e mode;
  logic [S-1:0] used, bad;
  logic [S-1:0][$clog2(N)-1:0] col;
  logic [S-1:0][7:0] pend;
  logic [S-1:0][S-1:0] emap;
  logic cam_we = 0, cam_v = 0; logic [6:0] cam_idx = '0; logic [AW-1:0] cam_a = '0;
  logic req_v = 0, req_w = 0, req_i = 0, req_f = 0; logic [AW-1:0] req_a = '0;
  logic [K-1:0] req_d = '0;
  logic rsp_v, rsp_hit; logic [K-1:0] rsp_d; ecc_status_t rsp_st; logic [S-1:0] rsp_m;
  logic [PW-1:0] flip = '0, smask, sval;

  ecc_spare_mem dut (
    .clk(clk), .rst_n(rst_n),
    .cfg_mode_i(mode), .cfg_spare_used_i(used), .cfg_spare_bad_i(bad), .cfg_spare_col_i(col),
    .cfg_part_end_i(pend), .cfg_enc_map_i(emap),
    .cam_wr_en_i(cam_we), .cam_wr_idx_i(cam_idx), .cam_wr_valid_i(cam_v), .cam_wr_addr_i(cam_a),
    .req_valid_i(req_v), .req_write_i(req_w), .req_info_i(req_i), .req_addr_i(req_a),
    .req_wdata_i(req_d), .req_flag_i(req_f),
    .rsp_valid_o(rsp_v), .rsp_data_o(rsp_d), .rsp_status_o(rsp_st), .rsp_mask_o(rsp_m),
    .rsp_cam_hit_o(rsp_hit),
    .tst_flip_i(flip), .tst_stuck_mask_i(smask), .tst_stuck_val_i(sval));

  always #5 clk = ~clk;

  // ---------------- scenario state ----------------
  int nd; int drow [8]; int dcol [8]; bit dval [8];          // stuck-at cells
  int nc; int crow [8]; int cpart [8];                       // CAM contents (row, partition)
  logic [K-1:0] model [WORDS];

  // stuck-at overlay for the row being read (registered like the array)
  logic [AW-1:0] rd_row_q = '0;
  always_ff @(posedge clk) if (req_v) rd_row_q <= req_a;
  always_comb begin
    smask = '0; sval = '0;
    for (int i = 0; i < nd; i++)
      if (drow[i] == int'(rd_row_q)) begin smask[dcol[i]] = 1'b1; sval[dcol[i]] = dval[i]; end
  end

  // ---------------- mechanism counters ----------------
  int n_remap, n_wear, n_badspare, n_flagrow, n_camhit, n_part[S], n_corr, n_det, n_ign, n_sw;
  int misc [3];   // triple-error miscorrections in S1, per mode
  mask_mode_e last_mode = MASK_SPARE_ONLY;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference ----------------
  function automatic bit row_defective(int r);
    for (int i = 0; i < nd; i++) if (drow[i] == r) return 1;
    return 0;
  endfunction

  function automatic int cam_part_of(int r);
    for (int i = 0; i < nc; i++) if (crow[i] == r) return cpart[i];
    return -1;
  endfunction

  function automatic logic [S-1:0] exp_mask(int r);
    logic [S-1:0] m, avail;
    int p;
    avail = ~used & ~bad;
    case (mode)
      MASK_INFO_COL: begin m = row_defective(r) ? avail : '1; m[S-1] = 1'b0; end
      MASK_CAM: begin p = cam_part_of(r); m = (p < 0) ? '1 : ~emap[p]; end
      default: m = avail;
    endcase
    return m;
  endfunction

  function automatic bit is_stuck(int r, int p);
    for (int i = 0; i < nd; i++) if (drow[i] == r && dcol[i] == p) return 1;
    return 0;
  endfunction

  // 2: cell holds a valid bit of this row's code; 1: holds a masked bit; 0: defective or flag
  function automatic int cell_kind(int r, int p, logic [S-1:0] m);
    int j;
    if (is_stuck(r, p)) return 0;
    if (mode == MASK_INFO_COL && p == PW - 1) return 0;
    if (p >= N) begin
      j = p - N;
      if (used[j]) return 2;
      return m[j] ? 2 : 1;
    end
    for (j = 0; j < S; j++) if (used[j] && int'(col[j]) == p) return m[j] ? 2 : 1;
    return 2;
  endfunction

  // ---------------- bus tasks ----------------
  task automatic write_word(int a, logic [K-1:0] d);
    @(negedge clk); req_v = 1; req_w = 1; req_i = 0; req_a = AW'(a); req_d = d;
    @(negedge clk); req_v = 0; req_w = 0;
    model[a] = d;
  endtask

  task automatic write_flag(int a, bit f);
    @(negedge clk); req_v = 1; req_w = 0; req_i = 1; req_a = AW'(a); req_f = f;
    @(negedge clk); req_v = 0; req_i = 0;
  endtask

  task automatic read_word(int a, logic [PW-1:0] fl);
    @(negedge clk); req_v = 1; req_w = 0; req_i = 0; req_a = AW'(a); flip = fl;
    check(!rsp_v, "no response before the read");
    @(posedge clk); #1;
    check(rsp_v, "response one cycle after the read");
    @(negedge clk); req_v = 0;
  endtask

  task automatic cam_program();
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    for (int i = 0; i < nc; i++) begin
      @(negedge clk); cam_we = 1; cam_idx = 7'(i); cam_v = 1; cam_a = AW'(crow[i]);
    end
    @(negedge clk); cam_we = 0;
  endtask

  // one full run of the current scenario in the current mode
  task automatic run(int scen);
    logic [S-1:0] m;
    logic [PW-1:0] fl;
    int valid [$], masked [$];
    int r, p, q, u;
    if (mode != last_mode) n_sw++;
    last_mode = mode;
    if (mode == MASK_CAM) cam_program();
    else begin @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1; end
    for (int a = 0; a < WORDS; a++) write_word(a, $urandom);
    if (mode == MASK_INFO_COL)
      for (int a = 0; a < WORDS; a++) write_flag(a, row_defective(a));
    // clean read of every word
    for (int a = 0; a < WORDS; a++) begin
      m = exp_mask(a);
      read_word(a, '0);
      check(rsp_m == m, $sformatf("S%0d mode %0d row %0d mask %b exp %b", scen, mode, a, rsp_m, m));
      check(rsp_d == model[a] && !rsp_st.detected, $sformatf("S%0d mode %0d row %0d clean", scen, mode, a));
      if (used != 0) n_remap++;
      for (int j = 0; j < S; j++) begin
        if (rsp_m[j] && used[j]) n_wear++;
        if (rsp_m[j] && bad[j]) n_badspare++;
      end
      if (mode == MASK_INFO_COL && row_defective(a)) n_flagrow++;
      if (mode == MASK_CAM) begin
        check(rsp_hit == (cam_part_of(a) >= 0), "CAM hit");
        if (rsp_hit) begin n_camhit++; n_part[cam_part_of(a)]++; end
      end
    end
    // single and double errors on the defect rows and on random rows
    for (int t = 0; t < 48; t++) begin
      r = (t < 8) ? t : $urandom_range(WORDS - 1);
      m = exp_mask(r);
      valid.delete(); masked.delete();
      for (p = 0; p < PW; p++) begin
        u = cell_kind(r, p, m);
        if (u == 2) valid.push_back(p);
        if (u == 1) masked.push_back(p);
      end
      foreach (valid[i]) begin
        fl = '0; fl[valid[i]] = 1'b1;
        read_word(r, fl);
        check(rsp_st.detected && rsp_st.corrected && rsp_d == model[r],
              $sformatf("S%0d mode %0d row %0d single error at %0d", scen, mode, r, valid[i]));
        n_corr++;
      end
      foreach (masked[i]) begin
        fl = '0; fl[masked[i]] = 1'b1;
        read_word(r, fl);
        check(!rsp_st.detected && rsp_d == model[r], "flip in masked cell ignored");
        n_ign++;
      end
      for (int k = 0; k < 6; k++) begin
        p = valid[$urandom_range(valid.size() - 1)];
        do q = valid[$urandom_range(valid.size() - 1)]; while (q == p);
        fl = '0; fl[p] = 1'b1; fl[q] = 1'b1;
        read_word(r, fl);
        check(rsp_st.detected && rsp_st.uncorrectable && !rsp_st.corrected,
              $sformatf("S%0d mode %0d row %0d double error %0d,%0d", scen, mode, r, p, q));
        n_det++;
      end
    end
    // triple errors on defect-free rows: count miscorrections
    if (scen == 1) begin
      for (int t = 0; t < 1500; t++) begin
        r = 8 + $urandom_range(WORDS - 9);
        m = exp_mask(r);
        valid.delete();
        for (p = 0; p < PW; p++) if (cell_kind(r, p, m) == 2) valid.push_back(p);
        fl = '0;
        while ($countones(fl) < 3) fl[valid[$urandom_range(valid.size() - 1)]] = 1'b1;
        read_word(r, fl);
        check(rsp_st.detected, "triple error never looks clean here");
        if (rsp_st.corrected) misc[int'(mode)]++;
      end
    end
  endtask

  task automatic set_thermo();
    logic [MAX_S-1:0][MAX_S-1:0] tm = thermo_map(S);
    for (int p = 0; p < S; p++) emap[p] = tm[p][S-1:0];
  endtask

  initial begin
    mode = MASK_SPARE_ONLY; used = '0; bad = '0; col = '0; pend = '0; emap = '0;
    nd = 0; nc = 0;
    n_remap = 0; n_wear = 0; n_badspare = 0; n_flagrow = 0; n_camhit = 0; n_corr = 0;
    n_det = 0; n_ign = 0; n_sw = 0;
    for (int p = 0; p < S; p++) n_part[p] = 0;
    for (int i = 0; i < 3; i++) misc[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // S1: rows 1 and 5 have defects in columns 3 and 9, replaced by spares 1 and 2
    used = 4'b0110; bad = 4'b0000; col[1] = 6'd3; col[2] = 6'd9;
    nd = 2; drow[0] = 1; dcol[0] = 3; dval[0] = 1; drow[1] = 5; dcol[1] = 9; dval[1] = 0;
    nc = 2; crow[0] = 5; cpart[0] = 1; crow[1] = 1; cpart[1] = 2;  // 2-bit and 3-bit discard
    pend[0] = 0; pend[1] = 1; pend[2] = 2; pend[3] = 2;
    set_thermo();
    for (int md = 0; md < 3; md++) begin mode = mask_mode_e'(md); run(1); end

    // S2: defects in columns 20 (row 1) and 30 (row 6) replaced by spares 0 and 1; spare 2
    // has a bad cell in row 3 and stays unused
    used = 4'b0011; bad = 4'b0100; col = '0; col[0] = 6'd20; col[1] = 6'd30;
    nd = 3; drow[0] = 1; dcol[0] = 20; dval[0] = 0; drow[1] = 6; dcol[1] = 30; dval[1] = 1;
    drow[2] = 3; dcol[2] = N + 2; dval[2] = 1;
    nc = 3; crow[0] = 1; cpart[0] = 0; crow[1] = 6; cpart[1] = 1; crow[2] = 3; cpart[2] = 2;
    pend[0] = 1; pend[1] = 2; pend[2] = 3; pend[3] = 3;
    emap[0] = 4'b0001; emap[1] = 4'b0010; emap[2] = 4'b0100; emap[3] = 4'b1111;
    for (int md = 2; md >= 0; md--) begin mode = mask_mode_e'(md); run(2); end

    // S3: no defects
    used = '0; bad = '0; col = '0; nd = 0; nc = 0; pend = '0; set_thermo();
    for (int md = 0; md < 3; md++) begin mode = mask_mode_e'(md); run(3); end

    // S4: defects only in spare columns; no repair, no free spare for the flag column
    used = '0; bad = 4'b1111;
    nd = 5; drow[0] = 0; dcol[0] = N; dval[0] = 1; drow[1] = 1; dcol[1] = N + 1; dval[1] = 0;
    drow[2] = 2; dcol[2] = N + 2; dval[2] = 1; drow[3] = 3; dcol[3] = N + 3; dval[3] = 0;
    drow[4] = 5; dcol[4] = N; dval[4] = 0;
    nc = 5; crow[0] = 0; cpart[0] = 0; crow[1] = 5; cpart[1] = 0; crow[2] = 1; cpart[2] = 1;
    crow[3] = 2; cpart[3] = 2; crow[4] = 3; cpart[4] = 3;
    pend[0] = 2; pend[1] = 3; pend[2] = 4; pend[3] = 5;
    emap[0] = 4'b0001; emap[1] = 4'b0010; emap[2] = 4'b0100; emap[3] = 4'b1000;
    mode = MASK_CAM; run(4);
    mode = MASK_SPARE_ONLY; run(4);

    // more valid extra bits -> fewer triple-error miscorrections (S1: 2, 3 and 4 bits)
    $display("S1 triple-error miscorrections out of 1500: spare-only %0d, flag column %0d, CAM %0d",
             misc[0], misc[1], misc[2]);
    check(misc[2] < misc[1] && misc[1] < misc[0], "miscorrections fall as extra bits are added");
    $display("mechanisms: remap %0d, check bit in replaced column %0d, in defective spare %0d,",
             n_remap, n_wear, n_badspare);
    $display("  flag-masked rows %0d, CAM hits %0d (per partition %0d %0d %0d %0d),",
             n_flagrow, n_camhit, n_part[0], n_part[1], n_part[2], n_part[3]);
    $display("  corrected %0d, double detected %0d, masked flips ignored %0d, mode switches %0d",
             n_corr, n_det, n_ign, n_sw);
    check(n_remap > 0, "repair remap happened");
    check(n_wear > 0, "check bit stored in a replaced column");
    check(n_badspare > 0, "check bit stored in a defective spare");
    check(n_flagrow > 0, "flag-masked row read");
    check(n_camhit > 0, "CAM hit");
    for (int p = 0; p < S; p++) check(n_part[p] > 0, $sformatf("CAM partition %0d hit", p));
    check(n_corr > 0 && n_det > 0 && n_ign > 0, "correction, detection and masking exercised");
    check(n_sw > 0, "mode switch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
