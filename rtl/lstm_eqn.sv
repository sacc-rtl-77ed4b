// lstm_eqn: the LSTM gate equations for one hidden unit per cycle.
//
// Inputs are the four recurrent sums s_j = (R.h)_j and the four input
// projections q_j = (W.x + b)_j for gates j = i, f, g, o (32-bit Q16.16),
// plus the old cell state c (Q8.8). The unit forms the pre-activations
// s_j + q_j, converts them to Q8.8 with saturation, applies
//   i = sigm(.), f = sigm(.), g = tanh(.), o = sigm(.)
//   c' = f*c + i*g,  h' = o*tanh(c')
// and registers h' and c' with the element index: latency one cycle, one
// element per cycle. The equations are the standard LSTM cell used by the SACC scheme; the activation
// functions are this design's choice: sigmoid is the four-segment
// piecewise-linear PLAN approximation (slopes 1/4, 1/8, 1/32, breakpoints
// 1, 2.375, 5) and tanh(x) = 2*sigm(2x) - 1.
module lstm_eqn
  import sacc_pkg::*;
#(
  parameter int IW = 10    // element index width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [IW-1:0] in_idx,
  input  acc_t          s   [NGATE],
  input  acc_t          q   [NGATE],
  input  data_t         c_in,
  output logic          out_valid,
  output logic [IW-1:0] out_idx,
  output data_t         h_out,
  output data_t         c_out
);

  // PLAN sigmoid in Q8.8 (1.0 = 256)
  function automatic data_t sigm(input data_t x);
    logic [DW:0] ax;
    logic [DW:0] y;
    ax = x[DW-1] ? (17'(0) - {x[DW-1], x}) : {1'b0, x};
    if (ax >= 17'd1280)     y = 17'd256;
    else if (ax >= 17'd608) y = (ax >> 5) + 17'd216;
    else if (ax >= 17'd256) y = (ax >> 3) + 17'd160;
    else                    y = (ax >> 2) + 17'd128;
    if (x[DW-1]) y = 17'd256 - y;
    return data_t'(y[DW-1:0]);
  endfunction

  function automatic data_t tanh_q(input data_t x);
    data_t x2;
    data_t y;
    x2 = add_q(x, x);
    y  = sigm(x2);
    return data_t'((y <<< 1) - 16'sd256);
  endfunction

  data_t pre [NGATE];
  data_t gi, gf, gg, go, c_new, h_new;

  always_comb begin
    for (int j = 0; j < NGATE; j++) pre[j] = acc_to_data(s[j] + q[j]);
    gi    = sigm(pre[0]);
    gf    = sigm(pre[1]);
    gg    = tanh_q(pre[2]);
    go    = sigm(pre[3]);
    c_new = add_q(mul_q(gf, c_in), mul_q(gi, gg));
    h_new = mul_q(go, tanh_q(c_new));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    out_idx <= in_idx;
    h_out   <= h_new;
    c_out   <= c_new;
  end

endmodule
