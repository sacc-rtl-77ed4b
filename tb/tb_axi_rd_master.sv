// tb_axi_rd_master: runs requests of many lengths and alignments through the
// AXI read master into the behavioural memory (with random stalls) and
// checks every streamed beat against the memory contents, the beat count,
// the done pulse, the 16-beat burst limit and the 4 KiB rule, that no more
// than MAX_OUTST bursts are outstanding, and that a burst of 16 beats
// starts when the request allows it.
module tb_axi_rd_master;
  import sacc_pkg::*;
  import sacc_ref_pkg::*;

  localparam int AMP = 30000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid = 0, req_ready, out_valid, done;
  addr_t req_addr = '0;
  logic [31:0] req_beats = '0;
  beat_t out_data;
  logic ar_valid, ar_ready, r_valid, r_ready, r_last;
  axi_ar_t ar;
  beat_t r_data;
  logic [1:0] r_resp;

  axi_rd_master #(.MAX_BURST(16), .MAX_OUTST(4)) dut (.*);

  axi_ddr_model #(.AMP(AMP), .STALL(1)) u_mem (
    .clk, .rst_n, .arvalid(ar_valid), .arready(ar_ready), .ar, .rvalid(r_valid),
    .rready(r_ready), .rdata(r_data), .rresp(r_resp), .rlast(r_last)
  );

  int checks = 0, failures = 0;
  int outst = 0, max_outst = 0, long_bursts = 0;

  always @(posedge clk) begin
    if (ar_valid && ar_ready) begin
      outst++;
      if (ar.len == 8'd15) long_bursts++;
      if (ar.len > 8'd15) begin failures++; $display("FAIL: burst too long"); end
    end
    if (r_valid && r_ready && r_last) outst--;
    if (outst > max_outst) max_outst = outst;
  end

  task automatic run_req(addr_t a, int beats);
    int got = 0, bad = 0, cyc = 0;
    @(negedge clk);
    req_valid = 1; req_addr = a; req_beats = beats;
    @(posedge clk); #1;
    req_valid = 0;
    while (!done && cyc < 20000) begin
      @(posedge clk); cyc++;
      if (out_valid) begin
        if (out_data !== u_mem.beat_at(a + addr_t'(got * 8))) bad++;
        got++;
      end
    end
    checks++;
    if (got != beats || bad != 0) begin
      failures++;
      $display("FAIL: addr %h beats %0d: got %0d, %0d wrong", a, beats, got, bad);
    end
    checks++;
    if (!req_ready) begin failures++; $display("FAIL: not ready after done"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_req(32'h0000_0000, 1);
    run_req(32'h0000_0100, 16);
    run_req(32'h0000_0ff8, 2);       // crosses 4 KiB after one beat
    run_req(32'h0001_0f80, 300);     // many bursts, crosses 4 KiB
    for (int n = 0; n < 20; n++)
      run_req(addr_t'($urandom_range(0, 1 << 20)) & ~addr_t'(7), $urandom_range(1, 200));
    checks++;
    if (u_mem.errors != 0) begin failures++; $display("FAIL: AXI rule errors %0d", u_mem.errors); end
    checks++;
    if (max_outst > 4 || max_outst < 2) begin failures++; $display("FAIL: outstanding %0d", max_outst); end
    checks++;
    if (long_bursts == 0) begin failures++; $display("FAIL: no full-length burst"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
