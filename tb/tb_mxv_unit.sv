// tb_mxv_unit: checks the B-lane dot-product unit (B = 8) against products
// summed in the testbench, with random data, random idle cycles, extreme
// values, and the two-cycle latency from in_valid to out_valid.
module tb_mxv_unit;
  import sacc_pkg::*;

  localparam int B = 8, TW = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, out_valid;
  logic [TW-1:0] in_tag = '0, out_tag;
  data_t w_row [B];
  data_t vec [B];
  acc_t dot;

  mxv_unit #(.B(B), .TW(TW)) dut (.*);

  int checks = 0, failures = 0;
  int exp_dot [$];
  int exp_tag [$];
  int exp_cyc [$];
  int cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (out_valid && rst_n) begin
      checks++;
      if (exp_dot.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output");
      end else begin
        int d, t, c;
        d = exp_dot.pop_front(); t = exp_tag.pop_front(); c = exp_cyc.pop_front();
        if (int'(dot) != d || int'(out_tag) != t || cyc - c != 3) begin
          failures++;
          $display("FAIL: dot %0d tag %0d lat %0d, expected %0d %0d 3", dot, out_tag, cyc - c, d, t);
        end
      end
    end
  end

  initial begin
    for (int k = 0; k < B; k++) begin w_row[k] = '0; vec[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin
        in_valid = 0;
      end else begin
        int s;
        s = 0;
        for (int k = 0; k < B; k++) begin
          if (n < 4) begin
            w_row[k] = (n % 2) ? 16'sh8000 : 16'sh7fff;
            vec[k]   = (n < 2) ? 16'sh8000 : 16'sh7fff;
          end else begin
            w_row[k] = data_t'($urandom);
            vec[k]   = data_t'($urandom);
          end
          s += int'(w_row[k]) * int'(vec[k]);
        end
        in_valid = 1;
        in_tag   = TW'(n);
        exp_dot.push_back(s);
        exp_tag.push_back(n % 32);
        exp_cyc.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_dot.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", exp_dot.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
