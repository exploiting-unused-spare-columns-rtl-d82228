// tb_spare_col_array: random masked writes and reads of a 64 x 43 array against a software
// copy; read data must appear exactly one clock after the request and partial writes must
// leave the unselected bits alone.
module tb_spare_col_array;
  localparam int W = 64, B = 43;
  int checks = 0, failures = 0;
  logic clk = 0, en = 0, we = 0;
  logic [5:0] addr = '0; logic [B-1:0] wd = '0, wm = '0, rd;
  logic [B-1:0] model [W];

  spare_col_array #(.WORDS(W), .WIDTH(B)) dut (.clk(clk), .en_i(en), .we_i(we), .addr_i(addr),
      .wdata_i(wd), .wmask_i(wm), .rdata_o(rd));

  always #5 clk = ~clk;

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

  initial begin
    // fill every row with a full write
    for (int a = 0; a < W; a++) begin
      @(negedge clk); en = 1; we = 1; addr = 6'(a); wm = '1;
      wd = {11'($urandom), $urandom}; model[a] = wd;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      en = 1; addr = 6'($urandom);
      we = $urandom_range(1);
      wd = {11'($urandom), $urandom}; wm = {11'($urandom), $urandom};
      @(posedge clk); #1;
      check(rd == model[addr], "read-before-write data one cycle after request");
      if (we) model[addr] = (model[addr] & ~wm) | (wd & wm);
    end
    @(negedge clk); en = 0; we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
