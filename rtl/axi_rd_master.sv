// axi_rd_master: read-only AXI master that streams a run of beats from
// off-chip memory.
//
// A request gives a byte address (8-byte aligned) and a number of 64-bit
// beats. The master splits it into INCR bursts of at most MAX_BURST beats
// that never cross a 4 KiB boundary, issues up to MAX_OUTST bursts ahead of
// the data, and passes each returned beat on as out_valid/out_data; it always
// accepts read data while a request is active (the consumer must take one
// beat per cycle). done pulses in the cycle after the last beat. req_ready is
// high only when idle. The published SACC design states only that the accelerator reaches
// DDR3 over a 64-bit AXI bus; the burst length of 16 (the limit of an AXI3
// port) and the outstanding-burst limit are this design's choices. The
// bus-rule assertions use rst_n as their disable condition, which lint
// reports as a synchronous use of the asynchronous reset; it builds no logic.
module axi_rd_master
  import sacc_pkg::*;
#(
  parameter int MAX_BURST = 16,
  parameter int MAX_OUTST = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // request
  input  logic        req_valid,
  output logic        req_ready,
  input  addr_t       req_addr,
  input  logic [31:0] req_beats,
  // streamed data
  output logic        out_valid,
  output beat_t       out_data,
  output logic        done,
  // AXI read address channel
  output logic        ar_valid,
  input  logic        ar_ready,
  output axi_ar_t     ar,
  // AXI read data channel
  input  logic        r_valid,
  output logic        r_ready,
  input  beat_t       r_data,
  input  logic [1:0]  r_resp,
  input  logic        r_last
);

  logic        active;
  addr_t       cur_addr;
  logic [31:0] to_issue;     // beats not yet requested
  logic [31:0] to_recv;      // beats not yet received
  logic [$clog2(MAX_OUTST+1)-1:0] outst;
  logic [31:0] burst;
  logic [31:0] to_4k;

  always_comb begin
    to_4k = (32'd4096 - {20'd0, cur_addr[11:0]}) >> 3;
    burst = to_issue;
    if (burst > 32'(MAX_BURST)) burst = 32'(MAX_BURST);
    if (burst > to_4k)          burst = to_4k;
  end

  assign req_ready = !active;
  assign r_ready   = active;
  assign out_valid = r_valid && r_ready;
  assign out_data  = r_data;
  assign ar.addr   = cur_addr;
  assign ar.len    = 8'(burst - 1);
  assign ar.size   = 3'($clog2(AXI_DW / 8));
  assign ar.burst  = 2'b01;
  assign ar_valid  = active && (to_issue != 0) && (int'(outst) < MAX_OUTST);

  logic ar_hs, rl_hs;
  assign ar_hs = ar_valid && ar_ready;
  assign rl_hs = r_valid && r_ready && r_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      cur_addr <= '0;
      to_issue <= '0;
      to_recv  <= '0;
      outst    <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!active) begin
        if (req_valid && req_beats != 0) begin
          active   <= 1'b1;
          cur_addr <= req_addr;
          to_issue <= req_beats;
          to_recv  <= req_beats;
        end
      end else begin
        if (ar_hs) begin
          cur_addr <= cur_addr + addr_t'(burst << 3);
          to_issue <= to_issue - burst;
        end
        outst <= outst + $bits(outst)'(ar_hs) - $bits(outst)'(rl_hs);
        if (out_valid) begin
          to_recv <= to_recv - 1;
          if (to_recv == 1) begin
            active <= 1'b0;
            done   <= 1'b1;
          end
        end
      end
    end
  end

  // Bus rules
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
      ar_valid && !ar_ready |=> ar_valid && $stable(ar));
  a_no_unasked_data: assert property (@(posedge clk) disable iff (!rst_n)
      r_valid && r_ready |-> outst != 0 || ar_hs);
  a_okay: assert property (@(posedge clk) disable iff (!rst_n)
      r_valid && r_ready |-> r_resp == 2'b00);
  a_aligned: assert property (@(posedge clk) disable iff (!rst_n)
      req_valid && req_ready |-> req_addr[2:0] == 3'b000);

endmodule
