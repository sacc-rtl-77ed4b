// sacc_top: LSTM layer accelerator with split-and-combine (SACC) reuse of
// the recurrent weights.
//
// The accelerator keeps h, c, the input projection q and one partial-sum
// vector s on chip and reads the weights W (4N x L), R (4N x N) and bias b
// from off-chip memory over a 64-bit AXI read port, one 4B x B block at a
// time into a 4 x B^2 word weight buffer. Each step command computes one
// time step: q = W.x + b, then a sweep over either the lower-diagonal or the
// upper-diagonal blocks of R, alternating from step to step. Every R block
// fetched serves two time steps (it finishes s_t+1 with h_t and starts
// s_t+2 with h_t+1), so R crosses the bus once per two steps instead of
// once per step. N and L need not be multiples of B (the last slice is then
// a partial block). See sacc_ctrl for the schedule and the memory layout.
//
// Blocks: sacc_ctrl (sequencer), axi_rd_master (AXI reads), weight_buf
// (block buffer), mxv_unit (B-lane dot product), lstm_eqn (gate equations),
// two slice_buf for h_t / h_t+1 (ping-pong), slice_buf for c and for x,
// gate_buf for s and for q.
//
// Interface: cmd_valid/cmd_ready/cmd_op (0 = init, 1 = step) with the four
// base addresses held stable during a command; done pulses at the end.
// When idle, h_slice selects a B-word slice of the newest h on h_out.
// stage_odd is 1 when the next step runs the lower-diagonal sweep.
module sacc_top
  import sacc_pkg::*;
#(
  parameter int N = 1024,   // hidden units (TIMIT-1024 model)
  parameter int L = 1024,   // input length (second layer: L = N)
  parameter int B = 32,     // block size
  // derived sizes: slices are rounded up to whole blocks
  localparam int NB  = (N + B - 1) / B,   // row / column slices of R
  localparam int NP  = NB * B,            // N rounded up to a multiple of B
  localparam int NBX = (L + B - 1) / B,   // column slices of W
  localparam int LP  = NBX * B            // L rounded up to a multiple of B
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  logic        cmd_op,
  input  addr_t       w_base,
  input  addr_t       r_base,
  input  addr_t       b_base,
  input  addr_t       x_addr,
  output logic        done,
  output logic        stage_odd,
  input  logic [$clog2(NB+1)-1:0] h_slice,
  output data_t       h_out [B],
  // AXI read port to off-chip memory
  output logic        m_axi_arvalid,
  input  logic        m_axi_arready,
  output axi_ar_t     m_axi_ar,
  input  logic        m_axi_rvalid,
  output logic        m_axi_rready,
  input  beat_t       m_axi_rdata,
  input  logic [1:0]  m_axi_rresp,
  input  logic        m_axi_rlast
);

  // read stream
  logic        rd_req_valid, rd_req_ready, rd_valid, rd_done;
  addr_t       rd_req_addr;
  logic [31:0] rd_req_beats;
  beat_t       rd_data;
  // weight buffer
  logic        wb_wr_en, wb_rd_en;
  logic [$clog2(4*B)-1:0]     wb_wr_row, wb_rd_row;
  logic [$clog2(B/WPB+1)-1:0] wb_wr_bank;
  beat_t       wb_wr_data;
  data_t       wb_rd_data [B];
  // MXV
  logic        mx_in_valid, mx_out_valid;
  logic [$clog2(4*B)-1:0] mx_in_tag, mx_out_tag;
  data_t       mx_w_row [B];
  data_t       mx_vec [B];
  acc_t        mx_dot;
  // LSTM equations
  logic        le_in_valid, le_out_valid;
  logic [$clog2(B)-1:0] le_in_idx, le_out_idx;
  acc_t        le_s [NGATE];
  acc_t        le_q [NGATE];
  data_t       le_c, le_h, le_c_new;
  // vector buffers
  logic        h_wr_en [2];
  logic        c_wr_en, x_wr_en;
  logic [$clog2(NP/WPB)-1:0] hc_wr_grp;
  logic [$clog2(LP/WPB)-1:0] x_wr_grp;
  logic [WPB-1:0] v_wr_mask;
  beat_t       v_wr_data, c_wr_data;
  logic [$clog2(NB+1)-1:0] h_rd_slice [2];
  data_t       h_rd_data [2][B];
  logic [$clog2(NB+1)-1:0] c_rd_slice;
  data_t       c_rd_data [B];
  logic [$clog2(NBX+1)-1:0] x_rd_slice;
  data_t       x_rd_data [B];
  // s and q
  logic        s_wr_en, q_wr_en, s_rd_en, q_rd_en;
  logic [$clog2(NP)-1:0] sq_wr_addr, sq_rd_addr;
  acc_t        sq_wr_data [NGATE];
  acc_t        s_rd_data [NGATE];
  acc_t        q_rd_data [NGATE];

  sacc_ctrl #(.N(N), .L(L), .B(B)) u_ctrl (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd_op, .w_base, .r_base, .b_base, .x_addr,
    .done, .stage_odd, .host_slice(h_slice), .host_h(h_out),
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_req_beats,
    .rd_valid, .rd_data, .rd_done,
    .wb_wr_en, .wb_wr_row, .wb_wr_bank, .wb_wr_data, .wb_rd_en, .wb_rd_row, .wb_rd_data,
    .mx_in_valid, .mx_in_tag, .mx_w_row, .mx_vec, .mx_out_valid, .mx_out_tag, .mx_dot,
    .le_in_valid, .le_in_idx, .le_s, .le_q, .le_c,
    .le_out_valid, .le_out_idx, .le_h, .le_c_new,
    .h_wr_en, .c_wr_en, .x_wr_en, .hc_wr_grp, .x_wr_grp, .v_wr_mask, .v_wr_data, .c_wr_data,
    .h_rd_slice, .h_rd_data, .c_rd_slice, .c_rd_data, .x_rd_slice, .x_rd_data,
    .s_wr_en, .q_wr_en, .sq_wr_addr, .sq_wr_data, .s_rd_en, .q_rd_en, .sq_rd_addr,
    .s_rd_data, .q_rd_data
  );

  axi_rd_master u_axi (
    .clk, .rst_n,
    .req_valid(rd_req_valid), .req_ready(rd_req_ready),
    .req_addr(rd_req_addr), .req_beats(rd_req_beats),
    .out_valid(rd_valid), .out_data(rd_data), .done(rd_done),
    .ar_valid(m_axi_arvalid), .ar_ready(m_axi_arready), .ar(m_axi_ar),
    .r_valid(m_axi_rvalid), .r_ready(m_axi_rready), .r_data(m_axi_rdata),
    .r_resp(m_axi_rresp), .r_last(m_axi_rlast)
  );

  weight_buf #(.B(B)) u_wbuf (
    .clk, .wr_en(wb_wr_en), .wr_row(wb_wr_row), .wr_bank(wb_wr_bank), .wr_data(wb_wr_data),
    .rd_en(wb_rd_en), .rd_row(wb_rd_row), .rd_data(wb_rd_data)
  );

  mxv_unit #(.B(B), .TW($clog2(4*B))) u_mxv (
    .clk, .rst_n, .in_valid(mx_in_valid), .in_tag(mx_in_tag), .w_row(mx_w_row), .vec(mx_vec),
    .out_valid(mx_out_valid), .out_tag(mx_out_tag), .dot(mx_dot)
  );

  lstm_eqn #(.IW($clog2(B))) u_lstm (
    .clk, .rst_n, .in_valid(le_in_valid), .in_idx(le_in_idx), .s(le_s), .q(le_q), .c_in(le_c),
    .out_valid(le_out_valid), .out_idx(le_out_idx), .h_out(le_h), .c_out(le_c_new)
  );

  for (genvar k = 0; k < 2; k++) begin : g_h
    slice_buf #(.LEN(NP), .B(B)) u_h (
      .clk, .wr_en(h_wr_en[k]), .wr_grp(hc_wr_grp), .wr_mask(v_wr_mask), .wr_data(v_wr_data),
      .rd_slice(h_rd_slice[k]), .rd_data(h_rd_data[k])
    );
  end

  slice_buf #(.LEN(NP), .B(B)) u_c (
    .clk, .wr_en(c_wr_en), .wr_grp(hc_wr_grp), .wr_mask(v_wr_mask), .wr_data(c_wr_data),
    .rd_slice(c_rd_slice), .rd_data(c_rd_data)
  );

  slice_buf #(.LEN(LP), .B(B)) u_x (
    .clk, .wr_en(x_wr_en), .wr_grp(x_wr_grp), .wr_mask(v_wr_mask), .wr_data(v_wr_data),
    .rd_slice(x_rd_slice), .rd_data(x_rd_data)
  );

  gate_buf #(.LEN(NP)) u_s (
    .clk, .wr_en(s_wr_en), .wr_addr(sq_wr_addr), .wr_data(sq_wr_data),
    .rd_en(s_rd_en), .rd_addr(sq_rd_addr), .rd_data(s_rd_data)
  );

  gate_buf #(.LEN(NP)) u_q (
    .clk, .wr_en(q_wr_en), .wr_addr(sq_wr_addr), .wr_data(sq_wr_data),
    .rd_en(q_rd_en), .rd_addr(sq_rd_addr), .rd_data(q_rd_data)
  );

endmodule
