// tb_sm_l2: shared SM-L2. Four SM ports issue random traffic at once: each
// SM reads and writes its own region, all of them read a common read-only
// region (where same-line requests can merge) and atomically add to common
// counters, which the L2 performs in place. Results are checked against a
// reference; after a kernel-id flush the memory must equal the reference.
module tb_sm_l2;
  import gpgpu_pkg::*;
  localparam int NS = 4;
  localparam int GLINES = 4096;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NS-1:0] ureq_valid, ureq_ready, ursp_valid;
  mem_req_t ureq [NS]; mem_rsp_t ursp;
  logic dreq_valid, dreq_ready, drsp_valid;
  mem_req_t dreq; mem_rsp_t drsp;
  logic flush_valid, flush_ready, flush_done;
  flush_mode_e flush_mode; kid_t flush_kid; vpn_t flush_vpn;
  logic [$clog2(NS+1)-1:0] merged_count;
  int n_rd, n_wr, n_amo;

  sm_l2 dut (.*);
  line_mem_model #(.LINES(GLINES), .LAT(6)) u_mem (
    .clk, .rst_n, .req_valid(dreq_valid), .req_ready(dreq_ready), .req(dreq),
    .rsp_valid(drsp_valid), .rsp(drsp), .n_rd, .n_wr, .n_amo);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  line_t gref [GLINES];
  int    amo_sum [4];
  int    n_merge = 0;
  always @(negedge clk) if (merged_count > 1) n_merge++;

  task automatic access(int s, mem_req_t q, output line_t r);
    ureq[s] = q; ureq_valid[s] = 1;
    #1; while (!ureq_ready[s]) begin @(negedge clk); #1; end
    @(posedge clk); #1 ureq_valid[s] = 0;
    @(negedge clk); while (!ursp_valid[s]) @(negedge clk);
    r = ursp.rdata;
  endtask

  int done = 0;
  task automatic sm_run(int s, int n);
    for (int k = 0; k < n; k++) begin
      mem_req_t q;
      line_t r;
      int pick, l;
      q = '0; q.kid = 2'd2;
      pick = $urandom % 10;
      if (pick < 4) begin                         // own region
        l = 1024 + s * 512 + int'($urandom % 600);
        l = (l >= 1024 + s * 512 + 512) ? l - 512 : l;
        q.addr = addr_t'(l * LINE_BYTES);
        if ($urandom % 2) begin
          q.op = MEM_WR;
          q.wdata = {16{$urandom}}; q.wmask = {$urandom, $urandom};
          access(s, q, r);
          gref[l] = merge_line(gref[l], q.wdata, q.wmask);
        end else begin
          q.op = MEM_RD;
          access(s, q, r);
          check(r == gref[l], $sformatf("SM %0d read of its line %0d", s, l));
        end
      end else if (pick < 9) begin                // common read-only lines
        l = int'($urandom % 8);
        q.op = MEM_RD; q.addr = addr_t'(l * LINE_BYTES);
        access(s, q, r);
        check(r == gref[l], $sformatf("SM %0d read of common line %0d", s, l));
      end else begin                              // common counters
        int c;
        c = int'($urandom % 4);
        q.op = MEM_AMO; q.addr = addr_t'(16 * LINE_BYTES + c * 4); q.wdata = LINE_BITS'(s + 1);
        access(s, q, r);
        amo_sum[c] += s + 1;
      end
    end
    done++;
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++; $display("FAIL: watchdog, done=%0d valid=%b ready=%b dreq_valid=%b fsm=%0d", done, ureq_valid, ureq_ready, dreq_valid, dut.u_l2.fsm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ureq_valid = '0;
    for (int s = 0; s < NS; s++) ureq[s] = '0;
    flush_valid = 0; flush_mode = FL_KID; flush_kid = 2'd2; flush_vpn = '0;
    for (int l = 0; l < GLINES; l++) gref[l] = u_mem.init_line(l);
    for (int c = 0; c < 4; c++) amo_sum[c] = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    for (int s = 0; s < NS; s++) begin
      automatic int ss = s;
      fork sm_run(ss, 1500); join_none
    end
    wait (done == NS);
    @(negedge clk);
    flush_valid = 1;
    #1; while (!flush_ready) @(negedge clk);
    @(posedge clk); #1 flush_valid = 0;
    @(negedge clk); while (!flush_done) @(negedge clk);
    for (int c = 0; c < 4; c++) begin
      addr_t a;
      a = addr_t'(16 * LINE_BYTES + c * 4);
      gref[16] = merge_line(gref[16], place_word(a, pick_word(a, gref[16]) + 32'(amo_sum[c])),
                            access_bmask(a, SZ_W));
    end
    for (int l = 0; l < GLINES; l++) check(u_mem.mem[l] == gref[l], $sformatf("memory line %0d after flush", l));
    $display("memory reads %0d writes %0d atomics %0d, merged issues %0d", n_rd, n_wr, n_amo, n_merge);
    check(n_amo == 0, "atomics were performed in the L2");
    check(n_merge > 0, "requests of several SMs were merged");
    check(n_rd < 4 * 1500 / 2, "the L2 filtered the traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
