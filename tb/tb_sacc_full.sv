// tb_sacc_full: the SACC accelerator at its default size (N = 1024 hidden
// units, L = 1024 inputs, B = 32) through one complete reuse cycle: init,
// then an upper-sweep step and a lower-sweep step, so that every block of R
// is read exactly once and used for both steps. After each step all 1024
// words of h are compared with the golden model, and the off-chip traffic
// is checked block by block (x, bias, all of W, and half of R per step).
// The memory model runs without stalls to keep the run short.
module tb_sacc_full;
  import sacc_pkg::*;
  import sacc_ref_pkg::*;

  localparam int N = 1024, L = 1024, B = 32, AMP = 24;
  localparam int NB = N / B, NBX = L / B;
  localparam longint unsigned WB = 64'h0000_0000, RB = 64'h0100_0000,
                              BB = 64'h0200_0000, XB = 64'h0300_0fe8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid = 0, cmd_ready, cmd_op = 0, done, stage_odd;
  addr_t x_addr;
  logic [$clog2(N/B+1)-1:0] h_slice = '0;
  data_t h_out [B];
  logic arvalid, arready, rvalid, rready, rlast;
  axi_ar_t ar;
  beat_t rdata;
  logic [1:0] rresp;

  sacc_top u_dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_op,
    .w_base(addr_t'(WB)), .r_base(addr_t'(RB)), .b_base(addr_t'(BB)), .x_addr,
    .done, .stage_odd, .h_slice, .h_out,
    .m_axi_arvalid(arvalid), .m_axi_arready(arready), .m_axi_ar(ar),
    .m_axi_rvalid(rvalid), .m_axi_rready(rready), .m_axi_rdata(rdata),
    .m_axi_rresp(rresp), .m_axi_rlast(rlast)
  );

  axi_ddr_model #(.AMP(AMP), .STALL(0)) u_mem (
    .clk, .rst_n, .arvalid, .arready, .ar, .rvalid, .rready, .rdata, .rresp, .rlast
  );

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc++;
  longint unsigned r_beats = 0, all_beats = 0;
  int n_up = 0, n_low = 0, n_diag_lstm = 0, n_bottom_lstm = 0, n_reuse = 0, n_init = 0;

  // traffic and mechanism monitors
  always @(posedge clk) begin
    if (arvalid && arready) begin
      all_beats += longint'(ar.len) + 1;
      if (longint'(ar.addr) >= RB && longint'(ar.addr) < BB) r_beats += longint'(ar.len) + 1;
    end
    if (u_dut.u_ctrl.le_in_valid && u_dut.u_ctrl.le_in_idx == 0) begin
      if (u_dut.u_ctrl.low && u_dut.u_ctrl.m == u_dut.u_ctrl.r) n_diag_lstm++;
      if (!u_dut.u_ctrl.low && u_dut.u_ctrl.r == NB - 1) n_bottom_lstm++;
    end
    if (u_dut.u_ctrl.mx_in_valid && u_dut.u_ctrl.mx_in_tag == 0 && u_dut.u_ctrl.mx_to_acc2)
      n_reuse++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_cmd(bit op);
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    cmd_op <= op;
    cmd_valid <= 1'b1;
    @(posedge clk);
    cmd_valid <= 1'b0;
    while (!done) @(posedge clk);
  endtask

  int h_ref [];
  int c_ref [];

  task automatic compare_h(int step);
    int bad = 0;
    for (int sl = 0; sl < NB; sl++) begin
      h_slice = ($bits(h_slice))'(sl);
      #1;
      for (int k = 0; k < B; k++)
        if (int'(h_out[k]) != h_ref[sl * B + k]) begin
          if (bad < 5) $display("  step %0d h[%0d] = %0d, expected %0d", step, sl * B + k,
                                int'(h_out[k]), h_ref[sl * B + k]);
          bad++;
        end
    end
    check(bad == 0, $sformatf("h after step %0d (%0d words differ)", step, bad));
  endtask

  task automatic do_init();
    run_cmd(1'b0);
    n_init++;
    h_ref = new[N];
    c_ref = new[N];
    foreach (h_ref[i]) begin
      h_ref[i] = 0;
      c_ref[i] = 0;
    end
    check(stage_odd == 1'b0, "init selects the upper sweep next");
  endtask

  task automatic do_step(int step);
    longint unsigned r0, a0, exp_r, exp_all;
    bit was_odd;
    int nz = 0;
    was_odd = stage_odd;
    x_addr  = addr_t'(XB + 64'h2000 * step);
    r0 = r_beats;
    a0 = all_beats;
    run_cmd(1'b1);
    if (was_odd) n_low++; else n_up++;
    lstm_ref_step(N, L, B, WB, RB, BB, longint'(x_addr), AMP, h_ref, c_ref);
    compare_h(step);
    foreach (h_ref[i]) if (h_ref[i] != 0) nz++;
    check(nz > N / 2, "reference h is mostly non-zero");
    exp_r   = longint'(was_odd ? NB * (NB + 1) / 2 : NB * (NB - 1) / 2) * B * B;
    exp_all = exp_r + L / 4 + NB * B + longint'(NB * NBX) * B * B;
    check(r_beats - r0 == exp_r, $sformatf("R beats %0d, expected %0d", r_beats - r0, exp_r));
    check(all_beats - a0 == exp_all,
          $sformatf("total beats %0d, expected %0d", all_beats - a0, exp_all));
    check(stage_odd == !was_odd, "sweep direction alternates");
  endtask

  initial begin
    longint unsigned rp;
    repeat (3) @(posedge clk);
    rst_n = 1;
    do_init();
    rp = r_beats;
    for (int s = 0; s < 2; s++) do_step(s);
    check(r_beats - rp == longint'(NB * NB) * B * B, "the pair of steps reads R once");
    check(n_up == 1 && n_low == 1, "one upper and one lower sweep");
    check(n_diag_lstm == NB, "LSTM on each diagonal block of the lower sweep");
    check(n_bottom_lstm > 0, "bottom row of upper sweep with no blocks");
    check(n_reuse == NB * NB, "every R block used a second time");
    check(u_mem.errors == 0, "AXI burst rules kept");
    $display("cycles for two steps: %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
