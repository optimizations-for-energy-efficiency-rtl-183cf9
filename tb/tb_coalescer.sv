// tb_coalescer: 32 lanes issue line requests at once. Reads of the same
// line must be merged into one downstream request whose response reaches
// every merged lane; writes go one by one. Read data are checked against
// the memory model's initial pattern, writes by reading memory afterwards.
module tb_coalescer;
  import gpgpu_pkg::*;
  localparam int L = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [L-1:0] ureq_valid, ureq_ready, ursp_valid;
  mem_req_t ureq [L];
  mem_rsp_t ursp;
  logic dreq_valid, dreq_ready, drsp_valid;
  mem_req_t dreq;
  mem_rsp_t drsp;
  logic [$clog2(L+1)-1:0] merged_count;
  int n_rd, n_wr, n_amo;

  coalescer dut (.*);
  line_mem_model #(.LINES(256), .LAT(3)) u_mem (
    .clk, .rst_n, .req_valid(dreq_valid), .req_ready(dreq_ready), .req(dreq),
    .rsp_valid(drsp_valid), .rsp(drsp), .n_rd, .n_wr, .n_amo);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic line_t init_line(int l);
    line_t v;
    for (int b = 0; b < LINE_BYTES; b++) begin
      int a;
      a = l * LINE_BYTES + b;
      v[b*8 +: 8] = 8'((a * 7) + (a / 256));
    end
    return v;
  endfunction

  // per-lane driver: issue, wait for acceptance, wait for response
  int lane_done [L];
  int merged_max = 0, merged_total = 0;
  always @(negedge clk) if (merged_count > 0) begin
    merged_total += int'(merged_count);
    if (int'(merged_count) > merged_max) merged_max = int'(merged_count);
  end

  task automatic lane_run(int l, int n);
    for (int k = 0; k < n; k++) begin
      int line;
      bit wr;
      wr   = (k % 4 == 3);
      line = wr ? 100 + l : (k / 4 + l) % 4;              // shared read lines 0..3
      ureq[l] = '{op: wr ? MEM_WR : MEM_RD, space: SP_GLOBAL, kid: '0,
                  addr: addr_t'(line * LINE_BYTES), wdata: {16{32'(l * 1000 + k)}}, wmask: '1};
      ureq_valid[l] = 1;
      #1;
      while (!ureq_ready[l]) begin @(negedge clk); #1; end   // sampled after every lane has driven
      @(posedge clk);
      #1 ureq_valid[l] = 0;
      @(negedge clk);
      while (!ursp_valid[l]) @(negedge clk);
      if (!wr) check(ursp.rdata == init_line(line), $sformatf("lane %0d read of line %0d", l, line));
      @(negedge clk);
    end
    lane_done[l] = 1;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ureq_valid = '0;
    for (int l = 0; l < L; l++) begin ureq[l] = '0; lane_done[l] = 0; end
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    for (int l = 0; l < L; l++) begin
      automatic int ll = l;
      fork lane_run(ll, 16); join_none
    end
    wait (lane_done.sum() == L);
    repeat (5) @(posedge clk);
    check(n_wr == L * 4, $sformatf("every write passed on alone (%0d)", n_wr));
    check(n_rd < L * 12, $sformatf("reads were merged: %0d downstream for %0d lane reads", n_rd, L * 12));
    check(merged_max > 1, $sformatf("largest merge %0d lanes", merged_max));
    check(merged_total == L * 16, $sformatf("merged_count accounts for every lane request (%0d, rd %0d)", merged_total, n_rd));
    for (int l = 0; l < L; l++)
      check(u_mem.mem[100 + l] == {16{32'(l * 1000 + 15)}}, $sformatf("lane %0d last write in memory", l));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
