// tb_slice_buf: checks the vector buffer (LEN = 32, B = 8): full-beat
// writes, single-word masked writes, and whole-slice reads.
module tb_slice_buf;
  import sacc_pkg::*;

  localparam int LEN = 32, B = 8;
  logic clk = 0;
  always #5 clk = ~clk;

  logic wr_en = 0;
  logic [$clog2(LEN/WPB)-1:0] wr_grp = '0;
  logic [WPB-1:0] wr_mask = '0;
  beat_t wr_data = '0;
  logic [$clog2(LEN/B+1)-1:0] rd_slice = '0;
  data_t rd_data [B];

  slice_buf #(.LEN(LEN), .B(B)) dut (.*);

  int checks = 0, failures = 0;
  data_t model [LEN];

  task automatic wr(int grp, logic [WPB-1:0] mask, beat_t d);
    @(negedge clk);
    wr_en = 1; wr_grp = $bits(wr_grp)'(grp); wr_mask = mask; wr_data = d;
    for (int w = 0; w < WPB; w++) if (mask[w]) model[grp * WPB + w] = data_t'(d[w*DW +: DW]);
    @(posedge clk);
    #1 wr_en = 0;
  endtask

  task automatic check_all();
    for (int sl = 0; sl < LEN / B; sl++) begin
      rd_slice = $bits(rd_slice)'(sl);
      #1;
      checks++;
      for (int k = 0; k < B; k++)
        if (rd_data[k] !== model[sl * B + k]) begin
          failures++;
          $display("FAIL: slice %0d word %0d = %h, expected %h", sl, k, rd_data[k], model[sl * B + k]);
          break;
        end
    end
  endtask

  initial begin
    for (int g = 0; g < LEN / WPB; g++) wr(g, '1, {$urandom, $urandom});
    check_all();
    for (int n = 0; n < 40; n++)
      wr($urandom_range(0, LEN / WPB - 1), WPB'(1) << $urandom_range(0, WPB - 1), {$urandom, $urandom});
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
