// defect_cam: partitioned content-addressable memory of defective-row addresses.
//
// ENTRIES words each hold a valid bit and a word address. The read or write address is loaded
// into the search data register when an access starts; in the next cycle every stored word is
// compared with it on its own matchline. The words are split into NSPARE contiguous partitions:
// partition p covers words part_end[p-1] .. part_end[p]-1 (part_end[-1] = 0), and one OR gate per
// partition turns its matchlines into a "(p+1)-bit discard" signal. Unlike an ordinary CAM there
// is no address encoder: the OR gates are the output. Partition sizes are programmable, so the
// split can follow the defect map found at repair time.
//
// Interface: write port (wr_en_i, wr_idx_i, wr_valid_i, wr_addr_i) to program a word, used at
//            boot; search_en_i/search_addr_i to start a search; part_end_i configuration;
//            discard_o (bit p = the address is listed in partition p) and hit_o out.
// Timing: search_addr_i is registered on a clock edge with search_en_i; discard_o is valid
//         from that edge until the next search, i.e. in the same cycle as the memory read data.
//         Reset clears every valid bit.
// The partitions with OR gates in place of the address encoder follow the published scheme;
// register-based storage, contiguous programmable partitions and the one-cycle search are
// this design's choices.
module defect_cam #(
  parameter int unsigned ENTRIES = 128,
  parameter int unsigned ADDR_W  = 10,
  parameter int unsigned NSPARE  = 4,
  localparam int unsigned IDX_W  = $clog2(ENTRIES),
  localparam int unsigned END_W  = $clog2(ENTRIES + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          wr_en_i,
  input  logic [IDX_W-1:0]              wr_idx_i,
  input  logic                          wr_valid_i,
  input  logic [ADDR_W-1:0]             wr_addr_i,
  input  logic                          search_en_i,
  input  logic [ADDR_W-1:0]             search_addr_i,
  input  logic [NSPARE-1:0][END_W-1:0]  part_end_i,
  output logic [NSPARE-1:0]             discard_o,
  output logic                          hit_o
);
  logic [ENTRIES-1:0]  valid_q;
  logic [ADDR_W-1:0]   word_q [ENTRIES];
  logic [ADDR_W-1:0]   sdr_q;          // search data register
  logic [ENTRIES-1:0]  matchline;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      sdr_q   <= '0;
    end else begin
      if (wr_en_i) valid_q[wr_idx_i] <= wr_valid_i;
      if (search_en_i) sdr_q <= search_addr_i;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en_i) word_q[wr_idx_i] <= wr_addr_i;
  end

  always_comb begin
    for (int unsigned w = 0; w < ENTRIES; w++)
      matchline[w] = valid_q[w] && (word_q[w] == sdr_q);
  end

  // One OR gate per partition.
  always_comb begin
    logic [END_W-1:0] lo;
    lo = '0;
    for (int unsigned p = 0; p < NSPARE; p++) begin
      discard_o[p] = 1'b0;
      for (int unsigned w = 0; w < ENTRIES; w++)
        if (END_W'(w) >= lo && END_W'(w) < part_end_i[p]) discard_o[p] |= matchline[w];
      lo = part_end_i[p];
    end
  end

  assign hit_o = |matchline;

  // A stored word is only valid once its address has been written.
  initial begin
    assert (ENTRIES > 1) else $error("defect_cam: ENTRIES must be at least 2");
  end
endmodule
