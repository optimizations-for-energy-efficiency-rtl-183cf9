// tb_sm: one SM at full size (32 lanes, 24 warps) with behavioural execute
// stages and a behavioural memory in place of the SM-L2. The kernel (see
// lane_exec_model) loads X and Y, writes Y = 3X + Y, passes values between
// threads through the scratchpad across a barrier, executes a memory fence
// in every thread, adds to a counter with an atomic, diverges on a branch and does byte stores. It runs several
// times with different scheduling policies, triggers, warp counts and
// caching modes; after each kernel the memory must equal a reference
// computation, and barrier, fences, warp switches, coalescing and the EESI-T / EESI-M
// behaviour are checked.
module tb_sm;
  import gpgpu_pkg::*;
  localparam int L = 32, W = 24;
  localparam addr_t XB = 32'h4000, YB = 32'h8000, ZB = 32'hC000, WB = 32'h1_0000, CNT = 32'h1_2000;
  localparam int LINES = 2048;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic launch, policy_m, cache_global, cache_shared, code_inval, busy, kernel_done;
  logic [$clog2(W+1)-1:0] num_warps;
  addr_t start_pc;
  kid_t launch_kid, kid;
  trigger_e trigger;
  logic [L-1:0] ib_valid, ib_pop, retire_valid, lreq_valid, lreq_ready, lrsp_valid, switch_evt;
  logic [31:0] ib_instr [L], lrsp_data [L];
  addr_t ib_pc [L], retire_next_pc [L];
  logic [$clog2(W)-1:0] ib_warp [L];
  iclass_e retire_class [L];
  lane_req_t lreq [L];
  logic pflush_valid, pflush_ready, pflush_done;
  vpn_t pflush_vpn;
  logic dreq_valid, dreq_ready, drsp_valid;
  mem_req_t dreq; mem_rsp_t drsp;
  logic barrier_evt;
  logic [$clog2(L+1)-1:0] coalesced;
  int n_rd, n_wr, n_amo, nthreads, n_mem, n_lamo, n_hit, n_retired, n_fence;
  logic [L-1:0] fence_req, fence_done;
  int tot_thr = 0;

  sm dut (.*);
  lane_exec_model #(.LANES(L), .WARPS(W), .SM_ID(0), .XB(XB), .YB(YB), .ZB(ZB), .WB(WB), .CNT(CNT)) u_ex (
    .clk, .ib_valid, .ib_instr, .ib_pc, .ib_warp, .ib_pop, .retire_valid, .retire_class,
    .retire_next_pc, .lreq_valid, .lreq_ready, .lreq, .lrsp_valid, .lrsp_data,
    .fence_req, .fence_done, .nthreads, .n_mem, .n_amo(n_lamo), .n_hit, .n_retired, .n_fence);
  line_mem_model #(.LINES(LINES), .LAT(6)) u_mem (
    .clk, .rst_n, .req_valid(dreq_valid), .req_ready(dreq_ready), .req(dreq),
    .rsp_valid(drsp_valid), .rsp(drsp), .n_rd, .n_wr, .n_amo);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  line_t ref_mem [LINES];
  function automatic logic [31:0] rd32(addr_t a);
    return ref_mem[a[ADDR_W-1:OFF_W] % LINES][a[OFF_W-1:2]*32 +: 32];
  endfunction
  task automatic wr32(addr_t a, logic [31:0] v);
    ref_mem[a[ADDR_W-1:OFF_W] % LINES][a[OFF_W-1:2]*32 +: 32] = v;
  endtask
  task automatic wr8(addr_t a, logic [7:0] v);
    ref_mem[a[ADDR_W-1:OFF_W] % LINES][a[OFF_W-1:0]*8 +: 8] = v;
  endtask

  // event counters
  int n_bar = 0, n_sw = 0, n_merge = 0, n_mixed = 0;
  always @(negedge clk) if (rst_n) begin
    int w0;
    bit mixed;
    if (barrier_evt) n_bar++;
    n_sw += $countones(switch_evt);
    if (coalesced > 1) n_merge++;
    w0 = -1; mixed = 0;
    for (int l = 0; l < L; l++) if (ib_valid[l]) begin
      if (w0 < 0) w0 = int'(ib_warp[l]); else if (int'(ib_warp[l]) != w0) mixed = 1;
    end
    if (mixed) n_mixed++;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_kernel(bit m, trigger_e t, int nw, bit cg, bit cs, kid_t k);
    int b0, s0, g0, x0, cyc;
    policy_m = m; trigger = t; num_warps = ($clog2(W+1))'(nw); cache_global = cg; cache_shared = cs;
    launch_kid = k; nthreads = nw * L; start_pc = '0; tot_thr += nw * L;
    b0 = n_bar; s0 = n_sw; g0 = n_merge; x0 = n_mixed;
    @(negedge clk); launch = 1; @(negedge clk); launch = 0;
    cyc = 0;
    while (!kernel_done) begin @(negedge clk); cyc++; end
    // reference
    for (int s = 0; s < nw * L; s++)
      wr32(YB + addr_t'(4 * s), 3 * rd32(XB + addr_t'(4 * s)) + rd32(YB + addr_t'(4 * s)));
    for (int s = 0; s < nw * L; s++) begin
      wr32(ZB + addr_t'(4 * s), rd32(YB + addr_t'(4 * ((s + 1) % (nw * L)))));
      if ((s % L) % 2 == 0) wr8(WB + addr_t'(s), 8'(s));
    end
    wr32(CNT, rd32(CNT) + 32'(nw));
    for (int l = 0; l < LINES; l++)
      check(u_mem.mem[l] == ref_mem[l], $sformatf("%s %s line %0d after the kernel",
                                                  m ? "EESI-M" : "EESI-T", t.name(), l));
    check(n_bar == b0 + 1, "one barrier per kernel");
    check(n_sw > s0, "warp switches happened");
    if (cg) check(n_merge > g0, "lane requests were coalesced");
    if (m) check(n_mixed > x0, "EESI-M lanes ran different warps");
    else   check(n_mixed == x0, "EESI-T lanes ran one warp at a time");
    $display("%s %-8s warps %0d caching %0d%0d: %0d cycles, %0d switches, %0d merged requests",
             m ? "EESI-M" : "EESI-T", t.name(), nw, cg, cs, cyc, n_sw - s0, n_merge - g0);
  endtask

  initial begin
    logic [31:0] prog [13];
    prog = '{32'h1000_0000, 32'h2000_0000, 32'h0000_0000, 32'h3000_0000, 32'h4000_0000, 32'h5000_0000,
             32'h6000_0000, 32'h7000_0000, 32'hC000_0000, 32'h8000_0000, 32'h9000_0008, 32'hA000_0000,
             32'hB000_0000};
    launch = 0; policy_m = 0; trigger = TRIG_NON; num_warps = '0; start_pc = '0; launch_kid = '0;
    cache_global = 1; cache_shared = 1; code_inval = 0; nthreads = 1;
    pflush_valid = 0; pflush_vpn = '0;
    #1;
    for (int i = 0; i < 16; i++) u_mem.mem[0][i*32 +: 32] = (i < 13) ? prog[i] : 32'hB000_0000;
    for (int l = 0; l < LINES; l++) ref_mem[l] = u_mem.mem[l];
    repeat (3) @(posedge clk); rst_n = 1;
    run_kernel(0, TRIG_MEM, 24, 1, 1, 2'd1);
    run_kernel(1, TRIG_MEM, 24, 1, 1, 2'd2);
    run_kernel(1, TRIG_MBR, 9, 0, 1, 2'd3);
    run_kernel(0, TRIG_BRA, 5, 1, 0, 2'd0);
    // a page flush from the TLB side writes back and invalidates the page
    pflush_vpn = vpn_t'(YB >> PAGE_OFF_W); pflush_valid = 1;
    #1; while (!pflush_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1 pflush_valid = 0;
    @(negedge clk); while (!pflush_done) @(negedge clk);
    check(1, "page flush completed");
    check(n_fence == tot_thr, $sformatf("memory fences completed (%0d of %0d)", n_fence, tot_thr));
    check(n_hit > 0, $sformatf("tinyCache hits (%0d of %0d lane requests)", n_hit, n_mem));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
