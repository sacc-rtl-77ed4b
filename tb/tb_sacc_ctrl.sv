// tb_sacc_ctrl: checks the SACC sequencer on its own (N = 64, L = 32,
// B = 16) with simple models around it: a read stream that returns the
// requested number of beats with random gaps, a two-cycle MXV model that
// returns a dot product of 1 for every row, and a one-cycle LSTM model.
//
// For three steps (upper, lower, upper sweep) the test builds the expected
// sequence of events straight from the split-and-combine algorithm (loads of
// x, bias and W blocks, R block order, pass A / pass B per R block, LSTM
// slice position) and compares it with what the sequencer does. With every
// dot product equal to 1 it also checks the values the accumulators carry:
// q = bias * 256 + L/B, the partial sum seen by the LSTM unit, and the
// partial sum written back for the next step (number of blocks per row).
module tb_sacc_ctrl;
  import sacc_pkg::*;

  localparam int N = 64, L = 32, B = 16, NB = N / B, NBX = L / B;
  localparam addr_t WB = 32'h0000_0000, RB = 32'h0100_0000, BB = 32'h0200_0000,
                    XA = 32'h0300_0000;
  localparam int BLK = 8 * B * B;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid = 0, cmd_ready, cmd_op = 0, done, stage_odd;
  logic [$clog2(N/B+1)-1:0] host_slice = '0;
  data_t host_h [B];
  logic rd_req_valid, rd_req_ready, rd_valid, rd_done;
  addr_t rd_req_addr;
  logic [31:0] rd_req_beats;
  beat_t rd_data;
  logic wb_wr_en, wb_rd_en;
  logic [$clog2(4*B)-1:0] wb_wr_row, wb_rd_row;
  logic [$clog2(B/WPB+1)-1:0] wb_wr_bank;
  beat_t wb_wr_data;
  data_t wb_rd_data [B];
  logic mx_in_valid, mx_out_valid;
  logic [$clog2(4*B)-1:0] mx_in_tag, mx_out_tag;
  data_t mx_w_row [B];
  data_t mx_vec [B];
  acc_t mx_dot;
  logic le_in_valid, le_out_valid;
  logic [$clog2(B)-1:0] le_in_idx, le_out_idx;
  acc_t le_s [NGATE];
  acc_t le_q [NGATE];
  data_t le_c, le_h, le_c_new;
  logic h_wr_en [2];
  logic c_wr_en, x_wr_en;
  logic [$clog2(N/WPB)-1:0] hc_wr_grp;
  logic [$clog2(L/WPB)-1:0] x_wr_grp;
  logic [WPB-1:0] v_wr_mask;
  beat_t v_wr_data, c_wr_data;
  logic [$clog2(N/B+1)-1:0] h_rd_slice [2];
  data_t h_rd_data [2][B];
  logic [$clog2(N/B+1)-1:0] c_rd_slice;
  data_t c_rd_data [B];
  logic [$clog2(L/B+1)-1:0] x_rd_slice;
  data_t x_rd_data [B];
  logic s_wr_en, q_wr_en, s_rd_en, q_rd_en;
  logic [$clog2(N)-1:0] sq_wr_addr, sq_rd_addr;
  acc_t sq_wr_data [NGATE];
  acc_t s_rd_data [NGATE];
  acc_t q_rd_data [NGATE];

  sacc_ctrl #(.N(N), .L(L), .B(B)) dut (
    .*, .w_base(WB), .r_base(RB), .b_base(BB), .x_addr(XA)
  );

  // ---- models -------------------------------------------------------
  assign rd_data = {4{16'h0001}};
  int beats_left = 0;
  logic busy = 0;
  assign rd_req_ready = !busy;
  always @(posedge clk) begin
    rd_valid <= 0;
    rd_done  <= 0;
    if (!busy && rd_req_valid) begin
      busy <= 1;
      beats_left <= rd_req_beats;
    end else if (busy) begin
      if (beats_left == 0) begin
        rd_done <= 1;
        busy <= 0;
      end else if ($urandom_range(0, 3) != 0) begin
        rd_valid <= 1;
        beats_left <= beats_left - 1;
      end
    end
  end
  logic [1:0] mv;
  logic [$clog2(4*B)-1:0] mt [2];
  always @(posedge clk) begin
    mv <= {mv[0], mx_in_valid};
    mt[0] <= mx_in_tag;
    mt[1] <= mt[0];
    le_out_valid <= le_in_valid;
    le_out_idx <= le_in_idx;
  end
  assign mx_out_valid = mv[1];
  assign mx_out_tag = mt[1];
  assign mx_dot = 1;
  assign le_h = 16'sd7;
  assign le_c_new = 16'sd3;
  always_comb begin
    for (int k = 0; k < B; k++) begin
      wb_rd_data[k] = '0; h_rd_data[0][k] = '0; h_rd_data[1][k] = '0;
      c_rd_data[k] = '0; x_rd_data[k] = '0;
    end
    for (int j = 0; j < NGATE; j++) begin s_rd_data[j] = '0; q_rd_data[j] = '0; end
  end

  // ---- event log ----------------------------------------------------
  string got [$];
  string exp [$];
  int checks = 0, failures = 0;

  function automatic string blk_name(addr_t a);
    if (a == XA) return "X";
    if (a >= BB) return $sformatf("b%0d", (a - BB) / (8 * B));
    if (a >= RB) return $sformatf("R%0d,%0d", ((a - RB) / BLK) / NB, ((a - RB) / BLK) % NB);
    return $sformatf("W%0d,%0d", (a / BLK) / NBX, (a / BLK) % NBX);
  endfunction

  bit in_step = 0;
  always @(posedge clk) begin
    if (rd_req_valid && rd_req_ready) got.push_back(blk_name(rd_req_addr));
    if (mx_in_valid && mx_in_tag == 0) got.push_back(dut.mx_to_acc2 ? "B" : "A");
    if (le_in_valid && le_in_idx == 0) got.push_back($sformatf("E%0d", dut.r));
    if (le_in_valid) begin
      int expv;
      checks++;
      expv = stage_odd ? (dut.r + 1) : (NB - 1 - dut.r);
      if (int'(le_s[1]) != expv) begin
        failures++;
        $display("FAIL: LSTM sees partial sum %0d in row %0d, expected %0d", le_s[1], dut.r, expv);
      end
    end
    if (s_wr_en && in_step) begin
      int expv;
      checks++;
      expv = stage_odd ? (dut.r + 1) : (NB - 1 - dut.r);
      if (int'(sq_wr_data[2]) != expv) begin
        failures++;
        $display("FAIL: next partial sum %0d in row %0d, expected %0d", sq_wr_data[2], dut.r, expv);
      end
    end
    if (q_wr_en) begin
      checks++;
      if (int'(sq_wr_data[3]) != 256 + NBX) begin
        failures++;
        $display("FAIL: q = %0d, expected %0d", sq_wr_data[3], 256 + NBX);
      end
    end
  end

  task automatic expect_step(bit low);
    exp.push_back("X");
    for (int r = 0; r < NB; r++) begin
      exp.push_back($sformatf("b%0d", r));
      for (int mx = 0; mx < NBX; mx++) begin
        exp.push_back($sformatf("W%0d,%0d", r, mx));
        exp.push_back("A");
      end
    end
    if (low) begin
      for (int r = 0; r < NB; r++)
        for (int m = 0; m <= r; m++) begin
          exp.push_back($sformatf("R%0d,%0d", r, m));
          exp.push_back("A");
          if (m == r) exp.push_back($sformatf("E%0d", r));
          exp.push_back("B");
        end
    end else begin
      for (int r = NB - 1; r >= 0; r--) begin
        for (int m = NB - 1; m > r; m--) begin
          exp.push_back($sformatf("R%0d,%0d", r, m));
          exp.push_back("A");
          exp.push_back("B");
        end
        exp.push_back($sformatf("E%0d", r));
      end
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

  initial begin
    int hw;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_cmd(0);
    checks++;
    if (stage_odd) begin failures++; $display("FAIL: init must select upper sweep"); end
    for (int s = 0; s < 3; s++) begin
      bit low;
      low = stage_odd;
      got.delete();
      exp.delete();
      expect_step(low);
      in_step = 1;
      run_cmd(1);
      in_step = 0;
      checks++;
      if (got.size() != exp.size()) begin
        failures++;
        $display("FAIL: step %0d: %0d events, expected %0d", s, got.size(), exp.size());
      end
      for (int i = 0; i < exp.size() && i < got.size(); i++)
        if (got[i] != exp[i]) begin
          failures++;
          $display("FAIL: step %0d event %0d is %s, expected %s", s, i, got[i], exp[i]);
          break;
        end
      checks++;
      if (stage_odd == low) begin failures++; $display("FAIL: sweep did not alternate"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
