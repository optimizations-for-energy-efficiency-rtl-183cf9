// tb_gpgpu_top: the whole GPU at full size (4 SMs of 32 lanes and 24 warps,
// 16-entry tinyCaches, 64 KB SM-L1s, 48 KB scratchpads, 32 KB IL1s, 256 KB
// SM-L2, 512-entry shared TLB). Behavioural models stand in for the lanes'
// execute stages, the operating system's TLB miss handler (mapping virtual
// page v to physical page v ^ 1) and the last-level cache.
// All SMs run the kernel of lane_exec_model together, first under EESI-T,
// then under EESI-M. After each kernel the SM-L2 is flushed for the
// kernel's id and memory must equal a reference computed in virtual space.
// Then a CPU lookup touches a GPU page and a GPU page is deallocated; both
// must flush the page from every cache, after which memory is checked again.
// Each mechanism of the design is counted and must have happened at least
// once: tinyCache hits, lane coalescing, SM-L2 merging, barriers, warp
// switches, EESI-T lock-step and EESI-M drift, TLB misses, atomics, memory
// fences (one per thread), page flushes and kernel-id flushes.
module tb_gpgpu_top;
  import gpgpu_pkg::*;
  localparam int NS = 4, L = 32, W = 24;
  localparam addr_t XB = 32'h4000, YB = 32'h8000, ZB = 32'hC000, WB = 32'h1_0000, CNT = 32'h1_2000;
  localparam int LINES = 2048;                   // 128 KB behind the TLB
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic policy_m, cache_global, cache_shared, code_inval;
  trigger_e trigger;
  logic [NS-1:0] launch, sm_busy, kernel_done, barrier_evt;
  logic [$clog2(W+1)-1:0] num_warps [NS];
  addr_t start_pc [NS];
  kid_t launch_kid [NS];
  logic kflush_valid, kflush_ready, kflush_done;
  kid_t kflush_kid;
  logic [L-1:0] ib_valid [NS], ib_pop [NS], retire_valid [NS], lreq_valid [NS], lreq_ready [NS],
                lrsp_valid [NS], switch_evt [NS], fence_req [NS], fence_done [NS];
  logic [31:0] ib_instr [NS][L], lrsp_data [NS][L];
  addr_t ib_pc [NS][L], retire_next_pc [NS][L];
  logic [$clog2(W)-1:0] ib_warp [NS][L];
  iclass_e retire_class [NS][L];
  lane_req_t lreq [NS][L];
  logic creq_valid, creq_ready, crsp_valid;
  vpn_t creq_vpn, crsp_ppn;
  logic miss_valid, fill_valid, fill_ready, inv_valid, inv_ready;
  vpn_t miss_vpn, fill_vpn, fill_ppn, inv_vpn;
  logic llc_req_valid, llc_req_ready, llc_rsp_valid;
  mem_req_t llc_req; mem_rsp_t llc_rsp;
  logic [$clog2(L+1)-1:0] coalesced [NS];
  logic [$clog2(NS+1)-1:0] l2_merged;
  logic page_flush_evt;
  int n_rd, n_wr, n_amo, nthreads;
  int n_mem [NS], n_lamo [NS], n_hit [NS], n_retired [NS], n_fence [NS];

  gpgpu_top dut (.*);

  for (genvar s = 0; s < NS; s++) begin : g_ex
    lane_exec_model #(.LANES(L), .WARPS(W), .SM_ID(s), .XB(XB), .YB(YB), .ZB(ZB), .WB(WB), .CNT(CNT)) u_ex (
      .clk, .ib_valid(ib_valid[s]), .ib_instr(ib_instr[s]), .ib_pc(ib_pc[s]), .ib_warp(ib_warp[s]),
      .ib_pop(ib_pop[s]), .retire_valid(retire_valid[s]), .retire_class(retire_class[s]),
      .retire_next_pc(retire_next_pc[s]), .lreq_valid(lreq_valid[s]), .lreq_ready(lreq_ready[s]),
      .lreq(lreq[s]), .lrsp_valid(lrsp_valid[s]), .lrsp_data(lrsp_data[s]),
      .fence_req(fence_req[s]), .fence_done(fence_done[s]),
      .nthreads, .n_mem(n_mem[s]), .n_amo(n_lamo[s]), .n_hit(n_hit[s]), .n_retired(n_retired[s]),
      .n_fence(n_fence[s]));
  end

  line_mem_model #(.LINES(LINES), .LAT(10)) u_llc (
    .clk, .rst_n, .req_valid(llc_req_valid), .req_ready(llc_req_ready), .req(llc_req),
    .rsp_valid(llc_rsp_valid), .rsp(llc_rsp), .n_rd, .n_wr, .n_amo);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic vpn_t map(vpn_t v); return v ^ 20'h1; endfunction
  function automatic int pline(addr_t va);     // physical line of a virtual address
    return int'({map(va[ADDR_W-1:PAGE_OFF_W]), va[PAGE_OFF_W-1:OFF_W]}) % LINES;
  endfunction

  // reference, indexed by virtual line
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
  task automatic compare(string what);
    int bad;
    bad = 0;
    for (int v = 0; v < LINES; v++)
      if (u_llc.mem[pline(addr_t'(v * LINE_BYTES))] != ref_mem[v]) begin
        bad++;
        if (bad < 4) $display("  virtual line %0d differs", v);
      end
    check(bad == 0, $sformatf("memory equals the reference %s (%0d lines differ)", what, bad));
  endtask

  // ---- OS: TLB miss handler ----
  int n_tlb_miss = 0;
  initial begin
    fill_valid = 0; fill_vpn = '0; fill_ppn = '0;
    forever begin
      @(negedge clk);
      if (miss_valid) begin
        n_tlb_miss++;
        repeat (20) @(negedge clk);
        fill_vpn = miss_vpn; fill_ppn = map(miss_vpn); fill_valid = 1;
        #1; while (!fill_ready) begin @(negedge clk); #1; end
        @(posedge clk); #1 fill_valid = 0;
        @(negedge clk);
      end
    end
  end

  // ---- mechanism counters ----
  int n_bar = 0, n_sw = 0, n_coal = 0, n_l2m = 0, n_pf = 0, n_mixed = 0;
  int c_lane [NS], c_tc [NS];
  always @(negedge clk) if (rst_n) begin
    if (l2_merged > 1) n_l2m++;
    if (page_flush_evt) n_pf++;
    for (int s = 0; s < NS; s++) begin
      int w0;
      bit mixed;
      n_bar += int'(barrier_evt[s]);
      n_sw  += $countones(switch_evt[s]);
      if (coalesced[s] > 1) n_coal++;
      w0 = -1; mixed = 0;
      for (int l = 0; l < L; l++) if (ib_valid[s][l]) begin
        if (w0 < 0) w0 = int'(ib_warp[s][l]); else if (int'(ib_warp[s][l]) != w0) mixed = 1;
      end
      if (mixed) n_mixed++;
    end
  end
  // lane requests versus the tinyCaches' requests to the SM-L1
  for (genvar s = 0; s < NS; s++) begin : g_cnt
    initial begin c_lane[s] = 0; c_tc[s] = 0; end
    always @(posedge clk) if (rst_n) begin
      c_lane[s] <= c_lane[s] + $countones(lreq_valid[s] & lreq_ready[s]);
      c_tc[s]   <= c_tc[s] + $countones(dut.g_sm[s].u_sm.tc_mreq_valid & dut.g_sm[s].u_sm.tc_mreq_ready);
    end
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_kernel(bit m, trigger_e t, int nw, kid_t k);
    int cyc, x0, done;
    policy_m = m; trigger = t; nthreads = nw * L;
    for (int s = 0; s < NS; s++) begin num_warps[s] = ($clog2(W+1))'(nw); start_pc[s] = '0; launch_kid[s] = k; end
    x0 = n_mixed;
    @(negedge clk); launch = '1; @(negedge clk); launch = '0;
    cyc = 0; done = 0;
    while (done != NS) begin
      @(negedge clk); cyc++;
      done += $countones(kernel_done);
    end
    // SM-L2 write-back for this kernel
    kflush_kid = k; kflush_valid = 1;
    #1; while (!kflush_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1 kflush_valid = 0;
    @(negedge clk); while (!kflush_done) @(negedge clk);
    // reference
    for (int s = 0; s < NS * nw * L; s++)
      wr32(YB + addr_t'(4 * s), 3 * rd32(XB + addr_t'(4 * s)) + rd32(YB + addr_t'(4 * s)));
    for (int sm = 0; sm < NS; sm++)
      for (int s = 0; s < nw * L; s++) begin
        int t;
        t = sm * W * L + s;
        wr32(ZB + addr_t'(4 * t), rd32(YB + addr_t'(4 * (sm * W * L + (s + 1) % (nw * L)))));
        if ((s % L) % 2 == 0) wr8(WB + addr_t'(t), 8'(t));
      end
    wr32(CNT, rd32(CNT) + 32'(NS * nw));
    compare($sformatf("after the %s kernel", m ? "EESI-M" : "EESI-T"));
    if (m) check(n_mixed > x0, "EESI-M lanes ran different warps");
    else   check(n_mixed == x0, "EESI-T lanes of an SM ran one warp at a time");
    $display("%s %-8s: %0d cycles", m ? "EESI-M" : "EESI-T", t.name(), cyc);
  endtask

  initial begin
    logic [31:0] prog [13];
    int pf0, n_lane, n_tc_down;
    // the code sits in virtual page 0
    prog = '{32'h1000_0000, 32'h2000_0000, 32'h0000_0000, 32'h3000_0000, 32'h4000_0000, 32'h5000_0000,
             32'h6000_0000, 32'h7000_0000, 32'hC000_0000, 32'h8000_0000, 32'h9000_0008, 32'hA000_0000,
             32'hB000_0000};
    launch = '0; policy_m = 0; trigger = TRIG_NON; cache_global = 1; cache_shared = 1; code_inval = 0;
    kflush_valid = 0; kflush_kid = '0; creq_valid = 0; creq_vpn = '0; inv_valid = 0; inv_vpn = '0;
    nthreads = 1;
    for (int s = 0; s < NS; s++) begin num_warps[s] = '0; start_pc[s] = '0; launch_kid[s] = '0; end
    #1;
    for (int i = 0; i < 16; i++) u_llc.mem[pline(0)][i*32 +: 32] = (i < 13) ? prog[i] : 32'hB000_0000;
    for (int v = 0; v < LINES; v++) ref_mem[v] = u_llc.mem[pline(addr_t'(v * LINE_BYTES))];
    repeat (3) @(posedge clk); rst_n = 1;

    run_kernel(0, TRIG_MEM, W, 2'd1);
    run_kernel(1, TRIG_MBR, W, 2'd2);

    // a CPU core touches a page of Y: the page is flushed before the answer
    pf0 = n_pf;
    creq_vpn = vpn_t'(YB >> PAGE_OFF_W); creq_valid = 1;
    #1; while (!creq_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1 creq_valid = 0;
    @(negedge clk); while (!crsp_valid) @(negedge clk);
    check(crsp_ppn == map(vpn_t'(YB >> PAGE_OFF_W)), "CPU translation of a GPU page");
    check(n_pf == pf0 + 1, "CPU access to a GPU page flushed the page");
    // deallocation of a page of Z
    inv_vpn = vpn_t'(ZB >> PAGE_OFF_W); inv_valid = 1;
    #1; while (!inv_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1 inv_valid = 0;
    for (int k = 0; k < 20000 && n_pf < pf0 + 2; k++) @(negedge clk);
    check(n_pf == pf0 + 2, "deallocation of a GPU page flushed the page");
    compare("after the page flushes");

    n_lane = c_lane.sum(); n_tc_down = c_tc.sum();
    $display("mechanism counts: tinyCache hits %0d (lane requests %0d, tinyCache requests to the SM-L1 %0d), coalesced %0d, L2 merged %0d,",
             n_hit.sum(), n_lane, n_tc_down, n_coal, n_l2m);
    $display("  barriers %0d, warp switches %0d, EESI-M mixed cycles %0d, TLB misses %0d, atomics %0d, page flushes %0d",
             n_bar, n_sw, n_mixed, n_tlb_miss, n_lamo.sum(), n_pf);
    $display("  memory fences %0d", n_fence.sum());
    check(n_hit.sum() > 0, "tinyCache hits");
    check(n_coal > 0, "coalesced lane requests");
    check(n_l2m > 0, "merged SM-L2 requests");
    check(n_bar == 2 * NS, "barriers");
    check(n_sw > 0, "warp switches");
    check(n_mixed > 0, "EESI-M drift");
    check(n_tlb_miss > 0, "TLB misses");
    check(n_lamo.sum() == 2 * NS * W, "atomics");
    check(n_pf == 2, "page flushes");
    check(n_fence.sum() == 2 * NS * W * L, "memory fences");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
