// tb_sacc_partial: a two-layer model whose sizes are not multiples of the
// block size (N = 72 units, layer-1 input 36, B = 32), so the last row and
// column slice of R and W are partial blocks (ceil(N/B) = 3 slices). Runs
// 4 steps through lstm2_run and checks every h word of both layers.
module tb_sacc_partial;
  logic fin;
  int ck, fl;

  lstm2_run #(.N(72), .L1(36), .STEPS(4), .AMP(48), .NAME("partial")) u_run (
    .finished(fin), .checks(ck), .failures(fl));

  initial begin
    #1 wait (fin);
    $display("TB_RESULT checks=%0d failures=%0d", ck, fl);
    $finish;
  end

  initial begin
    #20ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", ck, fl + 1);
    $finish;
  end
endmodule
