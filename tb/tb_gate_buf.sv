// tb_gate_buf: checks the four-bank accumulator buffer (LEN = 16): all
// four gate words written and read together, one-cycle read latency, and
// read-before-write behaviour when both ports hit the same address.
module tb_gate_buf;
  import sacc_pkg::*;

  localparam int LEN = 16;
  logic clk = 0;
  always #5 clk = ~clk;

  logic wr_en = 0, rd_en = 0;
  logic [$clog2(LEN)-1:0] wr_addr = '0, rd_addr = '0;
  acc_t wr_data [NGATE];
  acc_t rd_data [NGATE];

  gate_buf #(.LEN(LEN)) dut (.*);

  int checks = 0, failures = 0;
  acc_t model [LEN][NGATE];

  task automatic rd_check(int a);
    @(negedge clk);
    rd_en = 1; rd_addr = $bits(rd_addr)'(a);
    @(posedge clk); #1;
    rd_en = 0;
    checks++;
    for (int j = 0; j < NGATE; j++)
      if (rd_data[j] !== model[a][j]) begin
        failures++;
        $display("FAIL: addr %0d gate %0d = %0d, expected %0d", a, j, rd_data[j], model[a][j]);
        break;
      end
  endtask

  initial begin
    for (int j = 0; j < NGATE; j++) wr_data[j] = '0;
    for (int a = 0; a < LEN; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = $bits(wr_addr)'(a);
      for (int j = 0; j < NGATE; j++) begin
        wr_data[j] = acc_t'($urandom);
        model[a][j] = wr_data[j];
      end
      @(posedge clk); #1 wr_en = 0;
    end
    for (int a = LEN - 1; a >= 0; a--) rd_check(a);
    // same-address read and write: old data is returned
    @(negedge clk);
    wr_en = 1; wr_addr = 3; rd_en = 1; rd_addr = 3;
    for (int j = 0; j < NGATE; j++) wr_data[j] = ~model[3][j];
    @(posedge clk); #1;
    wr_en = 0; rd_en = 0;
    checks++;
    if (rd_data[0] !== model[3][0]) begin failures++; $display("FAIL: read-during-write"); end
    for (int j = 0; j < NGATE; j++) model[3][j] = ~model[3][j];
    rd_check(3);
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
