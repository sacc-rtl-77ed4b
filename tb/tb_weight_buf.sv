// tb_weight_buf: fills the 4B x B weight block buffer (B = 8) beat by beat
// in bus order and reads every row back, checking the row-wide read data
// and its one-cycle latency; then overwrites a few beats and rereads.
module tb_weight_buf;
  import sacc_pkg::*;

  localparam int B = 8, ROWS = 4 * B, BANKS = B / WPB;
  logic clk = 0;
  always #5 clk = ~clk;

  logic wr_en = 0, rd_en = 0;
  logic [$clog2(4*B)-1:0] wr_row = '0, rd_row = '0;
  logic [$clog2(B/WPB+1)-1:0] wr_bank = '0;
  beat_t wr_data = '0;
  data_t rd_data [B];

  weight_buf #(.B(B)) dut (.*);

  int checks = 0, failures = 0;
  data_t model [ROWS][B];

  task automatic write_beat(int row, int bank, beat_t d);
    @(negedge clk);
    wr_en = 1; wr_row = $bits(wr_row)'(row); wr_bank = $bits(wr_bank)'(bank); wr_data = d;
    for (int w = 0; w < WPB; w++) model[row][bank * WPB + w] = data_t'(d[w*DW +: DW]);
    @(posedge clk);
    #1 wr_en = 0;
  endtask

  task automatic check_all();
    for (int row = 0; row < ROWS; row++) begin
      @(negedge clk);
      rd_en = 1; rd_row = $bits(rd_row)'(row);
      @(posedge clk); #1;
      rd_en = 0;
      checks++;
      for (int k = 0; k < B; k++)
        if (rd_data[k] !== model[row][k]) begin
          failures++;
          $display("FAIL: row %0d word %0d = %h, expected %h", row, k, rd_data[k], model[row][k]);
          break;
        end
    end
  endtask

  initial begin
    for (int p = 0; p < ROWS * BANKS; p++)
      write_beat(p / BANKS, p % BANKS, {$urandom, $urandom});
    check_all();
    for (int n = 0; n < 10; n++)
      write_beat($urandom_range(0, ROWS - 1), $urandom_range(0, BANKS - 1), {$urandom, $urandom});
    check_all();
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
