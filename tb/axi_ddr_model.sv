// axi_ddr_model: behavioural AXI read slave standing in for the off-chip
// DDR3 memory and its controller (not part of the design).
//
// Read data come from sacc_ref_pkg::val_at, so no storage is needed. The
// model queues read bursts, optionally stalls AR acceptance and inserts
// gaps in the read data at random (STALL = 1), lets the testbench
// overwrite single words (ovr), and counts beats, bursts,
// stalls and protocol errors (INCR bursts crossing 4 KiB, wrong size or type).
module axi_ddr_model
  import sacc_pkg::*;
  import sacc_ref_pkg::*;
#(
  parameter int AMP   = 32,
  parameter bit STALL = 1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     arvalid,
  output logic     arready,
  input  axi_ar_t  ar,
  output logic     rvalid,
  input  logic     rready,
  output beat_t    rdata,
  output logic [1:0] rresp,
  output logic     rlast
);

  axi_ar_t q[$];
  // words written by the testbench (e.g. the h of a previous layer) take
  // precedence over the pseudo-random contents
  logic [DW-1:0] ovr [longint unsigned];
  int unsigned beat_in_burst;
  longint unsigned beats, bursts, ar_stalls, r_gaps, errors, short_bursts;

  function automatic beat_t beat_at(addr_t a);
    beat_t d;
    for (int w = 0; w < WPB; w++) begin
      longint unsigned wa;
      wa = longint'(a) + 2 * w;
      d[w*DW +: DW] = ovr.exists(wa) ? ovr[wa] : DW'(val_at(wa, AMP));
    end
    return d;
  endfunction

  assign rresp = 2'b00;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arready <= 1'b0;
      rvalid <= 1'b0;
      rlast <= 1'b0;
      rdata <= '0;
      beat_in_burst <= 0;
      beats <= 0; bursts <= 0; ar_stalls <= 0; r_gaps <= 0; errors <= 0; short_bursts <= 0;
      q.delete();
    end else begin
      // address channel
      if (arvalid && arready) begin
        q.push_back(ar);
        bursts <= bursts + 1;
        if (ar.len != 8'd15) short_bursts <= short_bursts + 1;
        if ((ar.addr & 32'hfff) + (32'(ar.len) + 1) * 8 > 32'h1000) errors <= errors + 1;
        if (ar.size != 3'd3 || ar.burst != 2'b01) errors <= errors + 1;
      end
      if (arvalid && !arready) ar_stalls <= ar_stalls + 1;
      arready <= (q.size() < 6) && (!STALL || ($urandom_range(0, 7) != 0));
      // data channel
      if (rvalid && rready) begin
        beats <= beats + 1;
        if (rlast) begin
          void'(q.pop_front());
          beat_in_burst <= 0;
        end else beat_in_burst <= beat_in_burst + 1;
      end
      if (!rvalid || rready) begin
        int unsigned nb;
        nb = (rvalid && rready) ? (rlast ? 0 : beat_in_burst + 1) : beat_in_burst;
        if (q.size() > 0 && (!STALL || $urandom_range(0, 9) != 0)) begin
          rvalid <= 1'b1;
          rdata  <= beat_at(q[0].addr + addr_t'(nb * 8));
          rlast  <= (nb == int'(q[0].len));
        end else begin
          if (q.size() > 0) r_gaps <= r_gaps + 1;
          rvalid <= 1'b0;
          rlast  <= 1'b0;
        end
      end
    end
  end

endmodule
