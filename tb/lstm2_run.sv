// lstm2_run: runs a two-layer LSTM model on two SACC accelerators (one per
// layer) for STEPS time steps and checks it against the golden model.
//
// Layer 1 has N units and L1 inputs taken from pseudo-random memory; layer
// 2 has N units and takes the h of layer 1 as its input, which the test
// copies into layer 2's memory after every step. After every step both h
// vectors are compared word for word with the reference. The AXI beats of
// each layer are counted and compared with what a conventional schedule
// (all of R every step) would read: R traffic must be exactly half over an
// even number of steps. The overall reduction is reported. N and L1 need
// not be multiples of B: the last slice is then a partial one.
module lstm2_run
  import sacc_pkg::*;
  import sacc_ref_pkg::*;
#(
  parameter int    N     = 128,
  parameter int    L1    = 64,
  parameter int    STEPS = 4,
  parameter int    AMP   = 32,
  parameter string NAME  = "model"
) (
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int B = 32, NB = (N + B - 1) / B;
  localparam longint unsigned WB = 64'h0000_0000, RB = 64'h0100_0000,
                              BB = 64'h0200_0000, XB = 64'h0300_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid [2], cmd_ready [2], cmd_op [2], done [2], stage_odd [2];
  addr_t x_addr [2];
  logic [$clog2(N/B+1)-1:0] h_slice [2];
  data_t h_out [2][B];
  logic arvalid [2], arready [2], rvalid [2], rready [2], rlast [2];
  axi_ar_t ar [2];
  beat_t rdata [2];
  logic [1:0] rresp [2];

  sacc_top #(.N(N), .L(L1), .B(B)) u_l1 (
    .clk, .rst_n, .cmd_valid(cmd_valid[0]), .cmd_ready(cmd_ready[0]), .cmd_op(cmd_op[0]),
    .w_base(addr_t'(WB)), .r_base(addr_t'(RB)), .b_base(addr_t'(BB)), .x_addr(x_addr[0]),
    .done(done[0]), .stage_odd(stage_odd[0]), .h_slice(h_slice[0]), .h_out(h_out[0]),
    .m_axi_arvalid(arvalid[0]), .m_axi_arready(arready[0]), .m_axi_ar(ar[0]),
    .m_axi_rvalid(rvalid[0]), .m_axi_rready(rready[0]), .m_axi_rdata(rdata[0]),
    .m_axi_rresp(rresp[0]), .m_axi_rlast(rlast[0])
  );
  sacc_top #(.N(N), .L(N), .B(B)) u_l2 (
    .clk, .rst_n, .cmd_valid(cmd_valid[1]), .cmd_ready(cmd_ready[1]), .cmd_op(cmd_op[1]),
    .w_base(addr_t'(WB)), .r_base(addr_t'(RB)), .b_base(addr_t'(BB)), .x_addr(x_addr[1]),
    .done(done[1]), .stage_odd(stage_odd[1]), .h_slice(h_slice[1]), .h_out(h_out[1]),
    .m_axi_arvalid(arvalid[1]), .m_axi_arready(arready[1]), .m_axi_ar(ar[1]),
    .m_axi_rvalid(rvalid[1]), .m_axi_rready(rready[1]), .m_axi_rdata(rdata[1]),
    .m_axi_rresp(rresp[1]), .m_axi_rlast(rlast[1])
  );
  // layer 2 gets its own weights: its memory holds the same addresses with a
  // different amplitude, hence different contents
  axi_ddr_model #(.AMP(AMP), .STALL(0)) u_m1 (
    .clk, .rst_n, .arvalid(arvalid[0]), .arready(arready[0]), .ar(ar[0]), .rvalid(rvalid[0]),
    .rready(rready[0]), .rdata(rdata[0]), .rresp(rresp[0]), .rlast(rlast[0]));
  axi_ddr_model #(.AMP(AMP + 7), .STALL(0)) u_m2 (
    .clk, .rst_n, .arvalid(arvalid[1]), .arready(arready[1]), .ar(ar[1]), .rvalid(rvalid[1]),
    .rready(rready[1]), .rdata(rdata[1]), .rresp(rresp[1]), .rlast(rlast[1]));

  longint unsigned beats [2], r_beats [2];
  initial begin
    beats = '{0, 0}; r_beats = '{0, 0};
    cmd_valid = '{0, 0}; cmd_op = '{0, 0}; h_slice = '{0, 0};
    x_addr = '{addr_t'(XB), addr_t'(XB)};
  end
  always @(posedge clk)
    for (int k = 0; k < 2; k++)
      if (arvalid[k] && arready[k]) begin
        beats[k] += longint'(ar[k].len) + 1;
        if (longint'(ar[k].addr) >= RB && longint'(ar[k].addr) < BB) r_beats[k] += longint'(ar[k].len) + 1;
      end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s: %s", NAME, what);
    end
  endtask

  task automatic run_cmd(int k, bit op);
    @(posedge clk);
    while (!cmd_ready[k]) @(posedge clk);
    cmd_op[k] <= op;
    cmd_valid[k] <= 1'b1;
    @(posedge clk);
    cmd_valid[k] <= 1'b0;
    while (!done[k]) @(posedge clk);
  endtask

  task automatic read_h(int k, ref int hv []);
    for (int sl = 0; sl < NB; sl++) begin
      h_slice[k] = ($bits(h_slice[k]))'(sl);
      #1;
      for (int j = 0; j < B; j++) if (sl * B + j < N) hv[sl * B + j] = int'(h_out[k][j]);
    end
  endtask

  int h1 [], c1 [], h2 [], c2 [], hw [], x1 [];

  initial begin
    int bad;
    longint unsigned conv [2];
    longint unsigned wx [2];
    finished = 0; checks = 0; failures = 0;
    h1 = new[N]; c1 = new[N]; h2 = new[N]; c2 = new[N]; hw = new[N]; x1 = new[L1];
    foreach (h1[i]) begin h1[i] = 0; c1[i] = 0; h2[i] = 0; c2[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_cmd(0, 0);
    run_cmd(1, 0);
    for (int t = 0; t < STEPS; t++) begin
      x_addr[0] = addr_t'(XB + 64'h1000 * t);
      run_cmd(0, 1);
      for (int l = 0; l < L1; l++) x1[l] = val_at(longint'(x_addr[0]) + 2 * l, AMP);
      lstm_ref_step_x(N, L1, B, WB, RB, BB, AMP, x1, h1, c1);
      read_h(0, hw);
      bad = 0;
      foreach (hw[i]) if (hw[i] != h1[i]) bad++;
      check(bad == 0, $sformatf("layer 1 h after step %0d: %0d words differ", t, bad));
      // h of layer 1 becomes x of layer 2
      foreach (hw[i]) u_m2.ovr[XB + 2 * i] = 16'(hw[i]);
      run_cmd(1, 1);
      lstm_ref_step_x(N, N, B, WB, RB, BB, AMP + 7, h1, h2, c2);
      read_h(1, hw);
      bad = 0;
      foreach (hw[i]) if (hw[i] != h2[i]) bad++;
      check(bad == 0, $sformatf("layer 2 h after step %0d: %0d words differ", t, bad));
    end
    for (int k = 0; k < 2; k++) begin
      longint unsigned full_r;
      full_r = longint'(NB * NB) * B * B;   // all blocks, padding included
      check(r_beats[k] * 2 == full_r * STEPS, $sformatf("layer %0d reads R %0d beats, half of %0d", k + 1,
            r_beats[k], full_r * STEPS));
      wx[k] = beats[k] - r_beats[k];
      conv[k] = wx[k] + full_r * STEPS;
    end
    $display("%s: N=%0d L1=%0d steps=%0d: off-chip beats SACC %0d, conventional %0d, reduction %0.1f%% (R alone 50%%)",
             NAME, N, L1, STEPS, beats[0] + beats[1], conv[0] + conv[1],
             100.0 * (1.0 - real'(beats[0] + beats[1]) / real'(conv[0] + conv[1])));
    check(beats[0] + beats[1] < conv[0] + conv[1], "SACC reads less than the conventional schedule");
    finished = 1;
  end
endmodule
