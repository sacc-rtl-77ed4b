// slice_buf: on-chip vector buffer (used for h_t, h_t+1, c_t and x_t).
//
// LEN words of Q8.8 data. Writes go in groups of four words (one bus beat)
// with a per-word mask, so a vector can be filled from the 64-bit bus one
// beat per cycle and the LSTM unit can update a single element. The read
// port returns a whole slice of B consecutive words, the vector slice an
// MXV pass needs, combinationally from the slice number. The SACC scheme states
// only that these vectors live on chip; the organisation is this design's.
module slice_buf
  import sacc_pkg::*;
#(
  parameter int LEN = 1024,
  parameter int B   = 32
) (
  input  logic                          clk,
  input  logic                          wr_en,
  input  logic [$clog2(LEN/WPB)-1:0]    wr_grp,
  input  logic [WPB-1:0]                wr_mask,
  input  beat_t                         wr_data,
  input  logic [$clog2(LEN/B+1)-1:0]    rd_slice,
  output data_t                         rd_data [B]
);

  data_t mem [LEN];

  always_ff @(posedge clk) begin
    if (wr_en)
      for (int w = 0; w < WPB; w++)
        if (wr_mask[w]) mem[int'(wr_grp)*WPB + w] <= data_t'(wr_data[w*DW +: DW]);
  end

  always_comb begin
    for (int k = 0; k < B; k++) rd_data[k] = mem[(int'(rd_slice)*B + k) % LEN];
  end

  initial begin
    assert (LEN % B == 0 && LEN % WPB == 0) else $error("LEN must be a multiple of B and %0d", WPB);
  end

endmodule
