// tb_lstm_eqn: checks the LSTM gate unit against the reference fixed-point
// equations (PLAN sigmoid, tanh(x) = 2 sigm(2x) - 1, Q8.8 products with
// saturation) for random and saturating inputs, and its one-cycle latency.
module tb_lstm_eqn;
  import sacc_pkg::*;
  import sacc_ref_pkg::*;

  localparam int IW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, out_valid;
  logic [IW-1:0] in_idx = '0, out_idx;
  acc_t s [NGATE];
  acc_t q [NGATE];
  data_t c_in = '0, h_out, c_out;

  lstm_eqn #(.IW(IW)) dut (.*);

  int checks = 0, failures = 0;

  function automatic int rand_acc(int mode);
    case (mode)
      0: return $urandom_range(0, 4096) - 2048;            // around +-8 in Q16.16 >> 8
      1: return int'($urandom_range(0, 1 << 21)) - (1 << 20);
      default: return int'($urandom);                       // saturating
    endcase
  endfunction

  initial begin
    for (int j = 0; j < NGATE; j++) begin s[j] = '0; q[j] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int pre [4];
      int ei, ef, eg, eo, ec, eh;
      @(negedge clk);
      for (int j = 0; j < NGATE; j++) begin
        s[j] = rand_acc(n % 3) <<< 8;
        q[j] = rand_acc(n % 2) <<< 4;
        pre[j] = sat16((int'(s[j]) + int'(q[j])) >>> 8);
      end
      c_in = (n % 5 == 0) ? data_t'($urandom) : data_t'($urandom_range(0, 1024) - 512);
      in_idx = IW'(n);
      in_valid = 1;
      ei = ref_sigm(pre[0]); ef = ref_sigm(pre[1]); eg = ref_tanh(pre[2]); eo = ref_sigm(pre[3]);
      ec = sat16(mulq(ef, int'(c_in)) + mulq(ei, eg));
      eh = mulq(eo, ref_tanh(ec));
      @(posedge clk); #1;
      checks++;
      if (!out_valid || int'(h_out) != eh || int'(c_out) != ec || int'(out_idx) != n % 64) begin
        failures++;
        if (failures < 10)
          $display("FAIL: n=%0d h %0d/%0d c %0d/%0d valid %0d", n, h_out, eh, c_out, ec, out_valid);
      end
    end
    @(negedge clk) in_valid = 0;
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL: valid stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
