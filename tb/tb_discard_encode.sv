// tb_discard_encode: thermometer map for every discard pattern, then random maps and discard
// vectors against the OR-network rule.
module tb_discard_encode;
  import ecc_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] disc, mask; logic [3:0][3:0] map;

  discard_encode #(.NSPARE(4)) dut (.discard_i(disc), .map_i(map), .mask_o(mask));

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
    logic [MAX_S-1:0][MAX_S-1:0] tm;
    logic [3:0] drop;
    tm = thermo_map(4);
    for (int p = 0; p < 4; p++) map[p] = tm[p][3:0];
    // one-hot discards: (p+1)-bit discard keeps the 3-p lowest bits
    for (int p = 0; p < 4; p++) begin
      disc = 4'(1 << p); #1;
      check(mask == 4'((1 << (3 - p)) - 1), $sformatf("%0d-bit discard", p + 1));
    end
    disc = '0; #1;
    check(mask == 4'hf, "no discard keeps all bits");
    for (int t = 0; t < 1000; t++) begin
      disc = 4'($urandom);
      for (int p = 0; p < 4; p++) map[p] = 4'($urandom);
      #1;
      drop = '0;
      for (int p = 0; p < 4; p++) if (disc[p]) drop |= map[p];
      check(mask == ~drop, "random map");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
