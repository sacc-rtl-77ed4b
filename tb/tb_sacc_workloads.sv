// tb_sacc_workloads: the two-layer models of the evaluation, run through
// lstm2_run with B = 32. LM: 128 units per layer, a sequence of 4 steps
// and 64 input symbols (zero-padded character vocabulary, an assumed
// size). TIMIT-512: 512 units per layer, 2 steps, 64 inputs (acoustic
// features padded to a multiple of 32, an assumed size). The full-size
// TIMIT-1024 layer is covered by tb_sacc_full.
module tb_sacc_workloads;
  logic fin_lm, fin_ti;
  int ck_lm, ck_ti, fl_lm, fl_ti;

  lstm2_run #(.N(128), .L1(64), .STEPS(4), .AMP(40), .NAME("LM")) u_lm (
    .finished(fin_lm), .checks(ck_lm), .failures(fl_lm));
  lstm2_run #(.N(512), .L1(64), .STEPS(2), .AMP(20), .NAME("TIMIT-512")) u_ti (
    .finished(fin_ti), .checks(ck_ti), .failures(fl_ti));

  initial begin
    #1 wait (fin_lm && fin_ti);
    $display("TB_RESULT checks=%0d failures=%0d", ck_lm + ck_ti, fl_lm + fl_ti);
    $finish;
  end

  initial begin
    #50ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", ck_lm + ck_ti, fl_lm + fl_ti + 1);
    $finish;
  end
endmodule
