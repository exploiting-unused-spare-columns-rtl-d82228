// tb_check_bit_gen: checks the check bit generator at 32 and 64 data bits against the
// reference H-matrix, and checks the structure of the base code (odd, distinct columns of
// weight 3 or more, i.e. SEC-DED) through the responses to single data bits.
module tb_check_bit_gen;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [31:0] d32;  logic [6:0] b32;  logic [3:0] x32;
  logic [63:0] d64;  logic [7:0] b64;  logic [3:0] x64;

  check_bit_gen #(.DATA_W(32), .NSPARE(4)) u32 (.data_i(d32), .base_o(b32), .extra_o(x32));
  check_bit_gen #(.DATA_W(64), .NSPARE(4)) u64 (.data_i(d64), .base_o(b64), .extra_o(x64));

  function automatic logic [31:0] ref_chk(input int k, input logic [63:0] d);
    logic [31:0] acc = '0;
    for (int i = 0; i < k; i++) if (d[i]) acc ^= ref_hcol(k, 4, i);
    return acc;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e;
    int seen32 [int];
    check(u32.R0 == 7 && u64.R0 == 8, "number of base check bits");
    // single data bits: response is the H column
    for (int i = 0; i < 32; i++) begin
      d32 = 32'(1) << i; #1;
      check($countones(b32) % 2 == 1 && $countones(b32) >= 3, "32-bit column odd weight");
      check(!seen32.exists(int'(b32)), "32-bit column distinct");
      seen32[int'(b32)] = 1;
    end
    for (int t = 0; t < 3000; t++) begin
      d32 = $urandom; d64 = {$urandom, $urandom}; #1;
      e = ref_chk(32, {32'b0, d32});
      check({x32, b32} == e[10:0], $sformatf("32-bit encode %h", d32));
      e = ref_chk(64, d64);
      check({x64, b64} == e[11:0], $sformatf("64-bit encode %h", d64));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
