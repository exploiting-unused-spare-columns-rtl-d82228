// tb_defect_cam: programs a 16-word CAM with random addresses and partition boundaries,
// searches random addresses (half of them stored ones) and checks the discard and hit outputs
// one cycle after each search against a software list. Also checks reset clears all words and
// that invalidating a word removes its match.
module tb_defect_cam;
  localparam int E = 16, AW = 10, S = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_valid = 0, se = 0, hit;
  logic [3:0] wr_idx = '0; logic [AW-1:0] wr_addr = '0, sa = '0;
  logic [S-1:0][4:0] pend; logic [S-1:0] disc;

  defect_cam #(.ENTRIES(E), .ADDR_W(AW), .NSPARE(S)) dut (.clk(clk), .rst_n(rst_n),
      .wr_en_i(wr_en), .wr_idx_i(wr_idx), .wr_valid_i(wr_valid), .wr_addr_i(wr_addr),
      .search_en_i(se), .search_addr_i(sa), .part_end_i(pend), .discard_o(disc), .hit_o(hit));

  always #5 clk = ~clk;

  logic [AW-1:0] m_addr [E];
  bit            m_val  [E];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic search_check(input logic [AW-1:0] a);
    logic [S-1:0] ed; bit eh; int lo;
    @(negedge clk); se = 1; sa = a;
    @(negedge clk); se = 0; sa = ~a;   // the registered search data must hold
    ed = '0; eh = 0; lo = 0;
    for (int p = 0; p < S; p++) begin
      for (int w = lo; w < int'(pend[p]); w++) if (m_val[w] && m_addr[w] == a) ed[p] = 1;
      lo = int'(pend[p]);
    end
    for (int w = 0; w < E; w++) if (m_val[w] && m_addr[w] == a) eh = 1;
    check(disc == ed && hit == eh, $sformatf("search %0d: disc %b exp %b", a, disc, ed));
  endtask

  initial begin
    int b0, b1, b2;
    pend = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < E; w++) m_val[w] = 0;
    search_check(10'd0);
    for (int round = 0; round < 20; round++) begin
      b0 = $urandom_range(E); b1 = $urandom_range(E, b0); b2 = $urandom_range(E, b1);
      pend[0] = 5'(b0); pend[1] = 5'(b1); pend[2] = 5'(b2); pend[3] = 5'(E);
      for (int w = 0; w < E; w++) begin
        @(negedge clk);
        wr_en = 1; wr_idx = 4'(w); wr_valid = ($urandom_range(3) != 0);
        wr_addr = 10'($urandom_range(63));
        m_addr[w] = wr_addr; m_val[w] = wr_valid;
      end
      @(negedge clk); wr_en = 0;
      for (int t = 0; t < 40; t++) search_check(10'($urandom_range(63)));
    end
    // reset clears all words
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    for (int w = 0; w < E; w++) m_val[w] = 0;
    search_check(m_addr[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
