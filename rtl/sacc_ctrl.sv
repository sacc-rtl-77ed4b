// sacc_ctrl: sequencer of the split-and-combine (SACC) LSTM time step.
//
// One step command computes the next hidden state h_t+1 of an N-unit LSTM
// layer from input x_t+1 (L words). First the input projection
// q = W.x + b is built block by block (4B x B blocks of W) and stored in the
// q buffer. Then R, the 4N x N recurrent matrix cut into B x B blocks per
// gate (block (r,m) = rows of slice r of all four gates, columns of slice m),
// is swept over only half of its blocks:
//   * odd steps (lower sweep): r = 0 .. NB-1, m = 0 .. r
//   * even steps (upper sweep): r = NB-1 .. 0, m = NB-1 .. r+1
// where NB = ceil(N/B)
// Every fetched block is used twice: once against slice m of h_t to finish
// the partial sum s_t+1 of row slice r (pass A), and once against slice m of
// h_t+1 to start the partial sum s_t+2 (pass B). In the lower sweep the LSTM
// equations for slice r run right after pass A of the diagonal block, so
// that pass B of that block can already use the new h_t+1 slice; in the
// upper sweep they run after the last block of the row (or at once for the
// bottom row, which has no upper blocks). The partial sum of the next step
// replaces that of the current one in the s buffer, slice by slice. Two 4B
// accumulators (acc1: s_t+1 slice or q slice, acc2: s_t+2 slice) are the
// temporary vectors. The first step after init runs the upper sweep on
// h = 0, s = 0. This schedule is the SACC algorithm; the state machine,
// pipelining and memory layout are this design's.
//
// Off-chip layout (byte addresses, 16-bit words):
//   W block (r,mx), mx < NBX  : w_base + (r*NBX + mx) * 8*B*B, NBX = ceil(L/B)
//   R block (r,m)             : r_base + (r*NB + m)  * 8*B*B
//   a block is 4B rows of B words, row i = gate (i / B), unit r*B + i%B
//   bias of slice r           : b_base + r * 8*B, 4B words in the same order
//   x                         : x_addr, L words
// When N or L is not a multiple of B the last slice is a partial one: the
// blocks in memory keep their full 4B x B size with the missing rows and
// columns present as padding (their contents do not matter), the on-chip
// vectors are rounded up to whole slices, padded units of h and c are
// forced to zero and the padded part of x is zero from init on. L must be a
// multiple of 4 (whole bus beats).
//
// Interface: cmd_valid/cmd_ready with cmd_op (0 = init: clear h, c, s, x and
// make the next step an upper sweep; 1 = step). done pulses for one cycle at
// the end of a command. While idle, host_slice selects a B-word slice of the
// latest h, returned combinationally on host_h.
module sacc_ctrl
  import sacc_pkg::*;
#(
  parameter int N = 1024,   // hidden units
  parameter int L = 1024,   // input length
  parameter int B = 32,     // block size
  // derived sizes: slices are rounded up to whole blocks
  localparam int NB  = (N + B - 1) / B,   // row / column slices of R
  localparam int NP  = NB * B,            // N rounded up to a multiple of B
  localparam int NBX = (L + B - 1) / B,   // column slices of W
  localparam int LP  = NBX * B            // L rounded up to a multiple of B
) (
  input  logic        clk,
  input  logic        rst_n,
  // command
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  logic        cmd_op,
  input  addr_t       w_base,
  input  addr_t       r_base,
  input  addr_t       b_base,
  input  addr_t       x_addr,
  output logic        done,
  output logic        stage_odd,
  input  logic [$clog2(NB+1)-1:0] host_slice,
  output data_t       host_h [B],
  // off-chip read stream
  output logic        rd_req_valid,
  input  logic        rd_req_ready,
  output addr_t       rd_req_addr,
  output logic [31:0] rd_req_beats,
  input  logic        rd_valid,
  input  beat_t       rd_data,
  input  logic        rd_done,
  // weight buffer
  output logic        wb_wr_en,
  output logic [$clog2(4*B)-1:0]     wb_wr_row,
  output logic [$clog2(B/WPB+1)-1:0] wb_wr_bank,
  output beat_t       wb_wr_data,
  output logic        wb_rd_en,
  output logic [$clog2(4*B)-1:0]     wb_rd_row,
  input  data_t       wb_rd_data [B],
  // MXV unit
  output logic        mx_in_valid,
  output logic [$clog2(4*B)-1:0]     mx_in_tag,
  output data_t       mx_w_row [B],
  output data_t       mx_vec [B],
  input  logic        mx_out_valid,
  input  logic [$clog2(4*B)-1:0]     mx_out_tag,
  input  acc_t        mx_dot,
  // LSTM equation unit
  output logic        le_in_valid,
  output logic [$clog2(B)-1:0]       le_in_idx,
  output acc_t        le_s [NGATE],
  output acc_t        le_q [NGATE],
  output data_t       le_c,
  input  logic        le_out_valid,
  input  logic [$clog2(B)-1:0]       le_out_idx,
  input  data_t       le_h,
  input  data_t       le_c_new,
  // vector buffers: h (two, ping-pong), c and x
  output logic        h_wr_en [2],
  output logic        c_wr_en,
  output logic        x_wr_en,
  output logic [$clog2(NP/WPB)-1:0]   hc_wr_grp,
  output logic [$clog2(LP/WPB)-1:0]   x_wr_grp,
  output logic [WPB-1:0]             v_wr_mask,
  output beat_t       v_wr_data,
  output beat_t       c_wr_data,
  output logic [$clog2(NB+1)-1:0]   h_rd_slice [2],
  input  data_t       h_rd_data [2][B],
  output logic [$clog2(NB+1)-1:0]   c_rd_slice,
  input  data_t       c_rd_data [B],
  output logic [$clog2(NBX+1)-1:0]   x_rd_slice,
  input  data_t       x_rd_data [B],
  // partial-sum (s) and projection (q) buffers
  output logic        s_wr_en,
  output logic        q_wr_en,
  output logic [$clog2(NP)-1:0]       sq_wr_addr,
  output acc_t        sq_wr_data [NGATE],
  output logic        s_rd_en,
  output logic        q_rd_en,
  output logic [$clog2(NP)-1:0]       sq_rd_addr,
  input  acc_t        s_rd_data [NGATE],
  input  acc_t        q_rd_data [NGATE]
);

  localparam int ROWS  = 4 * B;
  localparam int BANKS = B / WPB;
  localparam int BLK_BEATS  = B * B;      // 4B*B words / 4 per beat
  localparam int BIAS_BEATS = B;          // 4B words / 4 per beat
  localparam int X_BEATS    = L / WPB;
  localparam int BLK_BYTES  = 8 * B * B;
  localparam int CLR_LEN    = (NP > LP) ? NP : LP;

  typedef enum logic [3:0] {
    S_IDLE, S_CLR, S_LREQ, S_LOAD, S_QMX, S_QWR, S_SRD, S_MXA, S_LSTM,
    S_MXB, S_SWR, S_NEXTM, S_FIN
  } state_t;

  typedef enum logic [1:0] { LD_X, LD_BIAS, LD_BLK } ld_kind_t;

  state_t   st;
  ld_kind_t ld_kind;
  logic     qphase;           // building q (W blocks) rather than sweeping R
  logic     h_sel;            // which h buffer holds h_t
  logic     low;              // this step runs the lower sweep
  logic     mx_to_acc2;       // MXV results go to acc2
  int unsigned r, m, mx;      // row slice, column slice (R), column slice (W)
  int unsigned cnt, ret;      // issue and return counters
  int unsigned bk_row, bk_bank;
  logic     rd_pend;          // a registered buffer read is in flight
  int unsigned rd_idx;

  acc_t acc1 [ROWS];
  acc_t acc2 [ROWS];

  assign cmd_ready = (st == S_IDLE);
  assign stage_odd = low;

  // ---- request generation --------------------------------------------
  always_comb begin
    rd_req_valid = (st == S_LREQ);
    rd_req_addr  = '0;
    rd_req_beats = '0;
    unique case (ld_kind)
      LD_X: begin
        rd_req_addr  = x_addr;
        rd_req_beats = 32'(X_BEATS);
      end
      LD_BIAS: begin
        rd_req_addr  = b_base + addr_t'(r * 8 * B);
        rd_req_beats = 32'(BIAS_BEATS);
      end
      default: begin
        rd_req_addr  = qphase ? w_base + addr_t'((r * NBX + mx) * BLK_BYTES)
                              : r_base + addr_t'((r * NB + m) * BLK_BYTES);
        rd_req_beats = 32'(BLK_BEATS);
      end
    endcase
  end

  // ---- data path steering ---------------------------------------------
  always_comb begin
    wb_wr_en   = (st == S_LOAD) && (ld_kind == LD_BLK) && rd_valid;
    wb_wr_row  = $bits(wb_wr_row)'(bk_row);
    wb_wr_bank = $bits(wb_wr_bank)'(bk_bank);
    wb_wr_data = rd_data;

    wb_rd_en   = (st == S_QMX || st == S_MXA || st == S_MXB) && cnt < ROWS;
    wb_rd_row  = $bits(wb_rd_row)'(cnt);

    mx_in_valid = rd_pend && (st == S_QMX || st == S_MXA || st == S_MXB);
    mx_in_tag   = $bits(mx_in_tag)'(rd_idx);
    mx_w_row    = wb_rd_data;

    // vector slice for the MXV pass
    h_rd_slice[0] = $bits(h_rd_slice[0])'(m);
    h_rd_slice[1] = $bits(h_rd_slice[1])'(m);
    if (st == S_IDLE) begin
      h_rd_slice[h_sel] = host_slice;
    end
    x_rd_slice = $bits(x_rd_slice)'(mx);
    c_rd_slice = $bits(c_rd_slice)'(r);
    if (st == S_QMX)      mx_vec = x_rd_data;
    else if (st == S_MXA) mx_vec = h_rd_data[h_sel];
    else                  mx_vec = h_rd_data[~h_sel];
    host_h = h_rd_data[h_sel];

    // LSTM unit feed
    le_in_valid = rd_pend && (st == S_LSTM);
    le_in_idx   = $bits(le_in_idx)'(rd_idx);
    for (int j = 0; j < NGATE; j++) begin
      le_s[j] = acc1[j * B + (rd_idx % B)];
      le_q[j] = q_rd_data[j];
    end
    le_c = c_rd_data[rd_idx % B];

    // vector buffer writes
    h_wr_en[0] = 1'b0;
    h_wr_en[1] = 1'b0;
    c_wr_en    = 1'b0;
    x_wr_en    = 1'b0;
    hc_wr_grp  = '0;
    x_wr_grp   = $bits(x_wr_grp)'(cnt);
    v_wr_mask  = '1;
    v_wr_data  = rd_data;
    c_wr_data  = '0;
    if (st == S_CLR) begin
      h_wr_en[0] = 1'b1;
      h_wr_en[1] = 1'b1;
      c_wr_en    = 1'b1;
      x_wr_en    = 1'b1;
      hc_wr_grp  = $bits(hc_wr_grp)'(cnt % (NP / WPB));
      x_wr_grp   = $bits(x_wr_grp)'(cnt % (LP / WPB));
      v_wr_data  = '0;
    end else if (st == S_LOAD && ld_kind == LD_X) begin
      x_wr_en = rd_valid;
    end else if (le_out_valid) begin
      h_wr_en[~h_sel] = 1'b1;
      c_wr_en         = 1'b1;
      hc_wr_grp  = $bits(hc_wr_grp)'((r * B + int'(le_out_idx)) / WPB);
      v_wr_mask  = WPB'(1) << ((r * B + int'(le_out_idx)) % WPB);
      // units past N (padding of the last slice) are held at zero
      for (int w = 0; w < WPB; w++) begin
        v_wr_data[w*DW +: DW] = (r * B + int'(le_out_idx) < N) ? le_h : '0;
        c_wr_data[w*DW +: DW] = (r * B + int'(le_out_idx) < N) ? le_c_new : '0;
      end
    end

    // s / q buffers
    s_wr_en    = (st == S_CLR) || (st == S_SWR);
    q_wr_en    = (st == S_QWR);
    sq_wr_addr = (st == S_CLR) ? $bits(sq_wr_addr)'(cnt % NP) : $bits(sq_wr_addr)'(r * B + cnt);
    for (int j = 0; j < NGATE; j++) begin
      sq_wr_data[j] = (st == S_CLR) ? '0 :
                      (st == S_SWR) ? acc2[j * B + (cnt % B)] : acc1[j * B + (cnt % B)];
    end
    s_rd_en    = (st == S_SRD) && cnt < B;
    q_rd_en    = (st == S_LSTM) && cnt < B;
    sq_rd_addr = $bits(sq_rd_addr)'(r * B + cnt);
  end

  // ---- sequencer ------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      ld_kind    <= LD_X;
      qphase     <= 1'b0;
      h_sel      <= 1'b0;
      low        <= 1'b0;
      mx_to_acc2 <= 1'b0;
      r <= 0; m <= 0; mx <= 0; cnt <= 0; ret <= 0;
      bk_row <= 0; bk_bank <= 0;
      rd_pend <= 1'b0; rd_idx <= 0;
      done <= 1'b0;
    end else begin
      done    <= 1'b0;
      rd_pend <= 1'b0;
      unique case (st)
        S_IDLE: if (cmd_valid) begin
          cnt <= 0;
          if (!cmd_op) st <= S_CLR;
          else begin
            qphase  <= 1'b1;
            ld_kind <= LD_X;
            r <= 0; mx <= 0;
            st <= S_LREQ;
          end
        end
        S_CLR: begin
          cnt <= cnt + 1;
          if (cnt == CLR_LEN - 1) begin
            low <= 1'b0;
            st  <= S_FIN;
          end
        end
        S_LREQ: if (rd_req_ready) begin
          cnt <= 0; bk_row <= 0; bk_bank <= 0;
          st  <= S_LOAD;
        end
        S_LOAD: begin
          if (rd_valid) begin
            cnt <= cnt + 1;
            if (bk_bank == BANKS - 1) begin
              bk_bank <= 0;
              bk_row  <= bk_row + 1;
            end else bk_bank <= bk_bank + 1;
          end
          if (rd_done) begin
            cnt <= 0; ret <= 0;
            unique case (ld_kind)
              LD_X: begin
                ld_kind <= LD_BIAS;
                st      <= S_LREQ;
              end
              LD_BIAS: begin
                ld_kind <= LD_BLK;
                st      <= S_LREQ;
              end
              default: begin
                mx_to_acc2 <= 1'b0;
                st <= qphase ? S_QMX : S_MXA;
              end
            endcase
          end
        end
        S_QMX, S_MXA, S_MXB: begin
          if (cnt < ROWS) begin
            rd_pend <= 1'b1;
            rd_idx  <= cnt;
            cnt     <= cnt + 1;
          end
          if (mx_out_valid) ret <= ret + 1;
          if (mx_out_valid && ret == ROWS - 1) begin
            cnt <= 0; ret <= 0;
            if (st == S_QMX) begin
              if (mx == NBX - 1) st <= S_QWR;
              else begin
                mx <= mx + 1;
                st <= S_LREQ;
              end
            end else if (st == S_MXA) begin
              mx_to_acc2 <= 1'b1;
              st <= (low && m == r) ? S_LSTM : S_MXB;
            end else begin
              st <= S_NEXTM;
            end
          end
        end
        S_QWR: begin
          cnt <= cnt + 1;
          if (cnt == B - 1) begin
            cnt <= 0;
            if (r == NB - 1) begin
              // q complete: start the recurrent sweep
              qphase <= 1'b0;
              r      <= low ? 0 : NB - 1;
              st     <= S_SRD;
            end else begin
              r  <= r + 1;
              mx <= 0;
              ld_kind <= LD_BIAS;
              st <= S_LREQ;
            end
          end
        end
        S_SRD: begin
          if (cnt < B) begin
            rd_pend <= 1'b1;
            rd_idx  <= cnt;
            cnt     <= cnt + 1;
          end
          if (rd_pend) begin
            ret <= ret + 1;
            if (ret == B - 1) begin
              cnt <= 0; ret <= 0;
              if (low) begin
                m <= 0;
                ld_kind <= LD_BLK;
                st <= S_LREQ;
              end else if (r == NB - 1) begin
                st <= S_LSTM;     // bottom row has no upper blocks
              end else begin
                m <= NB - 1;
                ld_kind <= LD_BLK;
                st <= S_LREQ;
              end
            end
          end
        end
        S_LSTM: begin
          if (cnt < B) begin
            rd_pend <= 1'b1;
            rd_idx  <= cnt;
            cnt     <= cnt + 1;
          end
          if (le_out_valid) begin
            ret <= ret + 1;
            if (ret == B - 1) begin
              cnt <= 0; ret <= 0;
              st <= low ? S_MXB : S_SWR;
            end
          end
        end
        S_NEXTM: begin
          if (low) begin
            if (m == r) st <= S_SWR;
            else begin
              m  <= m + 1;
              st <= S_LREQ;
            end
          end else begin
            if (m == r + 1) st <= S_LSTM;
            else begin
              m  <= m - 1;
              st <= S_LREQ;
            end
          end
          mx_to_acc2 <= 1'b0;
        end
        S_SWR: begin
          cnt <= cnt + 1;
          if (cnt == B - 1) begin
            cnt <= 0;
            if (low ? (r == NB - 1) : (r == 0)) begin
              h_sel <= ~h_sel;
              low   <= ~low;
              st    <= S_FIN;
            end else begin
              r  <= low ? r + 1 : r - 1;
              st <= S_SRD;
            end
          end
        end
        S_FIN: begin
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  initial begin
    assert (B % WPB == 0 && L % WPB == 0)
      else $error("B and L must be multiples of %0d", WPB);
  end

  // ---- accumulators (the 4B temporary vectors) ------------------------
  always_ff @(posedge clk) begin
    if (st == S_LOAD && ld_kind == LD_BIAS && rd_valid) begin
      for (int w = 0; w < WPB; w++)
        acc1[(cnt * WPB + w) % ROWS] <= acc_t'(data_t'(rd_data[w*DW +: DW])) <<< FRAC;
    end
    if (st == S_SRD) begin
      if (cnt == 0) for (int i = 0; i < ROWS; i++) acc2[i] <= '0;
      if (rd_pend)
        for (int j = 0; j < NGATE; j++) acc1[j * B + (rd_idx % B)] <= s_rd_data[j];
    end
    if (mx_out_valid) begin
      if (mx_to_acc2) acc2[mx_out_tag] <= acc2[mx_out_tag] + mx_dot;
      else            acc1[mx_out_tag] <= acc1[mx_out_tag] + mx_dot;
    end
  end

endmodule
