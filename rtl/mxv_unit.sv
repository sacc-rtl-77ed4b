// mxv_unit: one row of a weight block times a vector slice (the MXV step).
//
// Each cycle the unit accepts one row of B weights together with the B-long
// vector slice it multiplies and returns their dot product two cycles later:
// stage 1 registers the B Q8.8 x Q8.8 products, stage 2 registers their sum
// as a 32-bit Q16.16 word. A 4B x B block therefore takes 4B cycles plus two
// cycles of latency. A tag (the row number) travels with the data so the
// caller knows which accumulator the result belongs to.
// The SACC scheme names this step MXV and fixes only its function; the one-row-per-cycle
// organisation with B multipliers is this design's choice.
module mxv_unit
  import sacc_pkg::*;
#(
  parameter int B  = 32,   // vector slice length (block width)
  parameter int TW = 8     // tag width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [TW-1:0] in_tag,
  input  data_t         w_row [B],
  input  data_t         vec   [B],
  output logic          out_valid,
  output logic [TW-1:0] out_tag,
  output acc_t          dot
);

  acc_t          prod [B];
  logic          p_valid;
  logic [TW-1:0] p_tag;
  acc_t          sum;

  always_ff @(posedge clk) begin
    for (int k = 0; k < B; k++) prod[k] <= acc_t'(w_row[k]) * acc_t'(vec[k]);
    p_tag <= in_tag;
  end

  always_comb begin
    sum = '0;
    for (int k = 0; k < B; k++) sum += prod[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      p_valid   <= in_valid;
      out_valid <= p_valid;
    end
  end

  always_ff @(posedge clk) begin
    dot     <= sum;
    out_tag <= p_tag;
  end

endmodule
