// gate_buf: four-gate accumulator vector buffer (partial sums s, projection q).
//
// Holds a 4N-word vector of 32-bit Q16.16 values as four banks of LEN words,
// one bank per gate (i, f, g, o), so that the four gate values of one hidden
// unit are read or written together in a cycle. The read is registered (one
// cycle latency). The SACC scheme sizes the partial-sum storage as 4N words; the
// banking by gate is this design's choice.
module gate_buf
  import sacc_pkg::*;
#(
  parameter int LEN = 1024
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(LEN)-1:0]   wr_addr,
  input  acc_t                     wr_data [NGATE],
  input  logic                     rd_en,
  input  logic [$clog2(LEN)-1:0]   rd_addr,
  output acc_t                     rd_data [NGATE]
);

  for (genvar j = 0; j < NGATE; j++) begin : g_gate
    acc_t mem [LEN];
    always_ff @(posedge clk) begin
      if (wr_en) mem[wr_addr] <= wr_data[j];
      if (rd_en) rd_data[j] <= mem[rd_addr];
    end
  end

endmodule
