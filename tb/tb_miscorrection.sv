// tb_miscorrection: the miscorrection-probability evaluation for 32- and 64-bit words with
// 0..4 additional check bits: every 3-bit error exhaustively, 4- and 5-bit errors sampled.
module tb_miscorrection;
  int checks = 0, failures = 0;
  logic go32 = 0, go64 = 0, done32, done64;
  int c32, f32, c64, f64;

  tb_miscorr_unit #(.K(32), .R(7),
    .EXP3('{0.6018163912900755, 0.2651821862348178, 0.1125703564727955,
            0.04773519163763066, 0.018150879183210438}),
    .PUB3('{0.59663, 0.27571, 0.12812, 0.05925, 0.02766}))
    u32 (.start(go32), .done(done32), .checks(c32), .failures(f32));

  tb_miscorr_unit #(.K(64), .R(8),
    .EXP3('{0.5728370221327967, 0.26959933114669754, 0.12550907071455017,
            0.057934098482043686, 0.026685633001422474}),
    .PUB3('{0.55594, 0.26662, 0.12781, 0.06148, 0.02947}))
    u64 (.start(go64), .done(done64), .checks(c64), .failures(f64));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 go32 = 1;
    wait (done32);
    go64 = 1;
    wait (done64);
    checks = c32 + c64;
    failures = f32 + f64;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
