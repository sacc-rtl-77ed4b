// weight_buf: on-chip buffer for one 4B x B weight block of W or R.
//
// The buffer holds 4 x B^2 words, the weight storage the SACC scheme sizes for
// the accelerator. It is filled from the 64-bit off-chip bus, one beat of
// four words per cycle, and read one full row of B words per cycle by the
// MXV unit. To allow the row-wide read it is split into B/4 banks, each one
// beat wide and 4B rows deep: beat p of a row goes to bank p. Reads are
// registered (one cycle latency), as in a block RAM. Splitting into banks
// is this design's choice.
module weight_buf
  import sacc_pkg::*;
#(
  parameter int B = 32
) (
  input  logic                        clk,
  input  logic                        wr_en,
  input  logic [$clog2(4*B)-1:0]      wr_row,
  input  logic [$clog2(B/WPB+1)-1:0]  wr_bank,
  input  beat_t                       wr_data,
  input  logic                        rd_en,
  input  logic [$clog2(4*B)-1:0]      rd_row,
  output data_t                       rd_data [B]
);

  localparam int ROWS  = 4 * B;
  localparam int BANKS = B / WPB;

  for (genvar bk = 0; bk < BANKS; bk++) begin : g_bank
    beat_t mem [ROWS];
    beat_t q;
    always_ff @(posedge clk) begin
      if (wr_en && wr_bank == bk) mem[wr_row] <= wr_data;
      if (rd_en) q <= mem[rd_row];
    end
    for (genvar w = 0; w < WPB; w++) begin : g_word
      assign rd_data[bk*WPB + w] = data_t'(q[w*DW +: DW]);
    end
  end

  initial begin
    assert (B % WPB == 0) else $error("B must be a multiple of %0d", WPB);
  end

endmodule
