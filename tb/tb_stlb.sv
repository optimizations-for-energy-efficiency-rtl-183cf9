// tb_stlb: shared TLB. A behavioural handler answers every miss with the
// mapping ppn = vpn ^ 20'h5A5A5 after a few cycles; a behavioural LLC
// returns the physical address it received, so every GPU translation can be
// checked. Directed cases cover the CPU hit, the CPU touch of a GPU page
// (page flush before the answer), the deallocation of a GPU page (page
// flush, then a miss on the next use) and a CPU miss; random GPU traffic
// then exercises replacement in full sets.
module tb_stlb;
  import gpgpu_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic greq_valid, greq_ready, grsp_valid;
  mem_req_t greq; mem_rsp_t grsp;
  logic llc_req_valid, llc_req_ready, llc_rsp_valid;
  mem_req_t llc_req; mem_rsp_t llc_rsp;
  logic creq_valid, creq_ready, crsp_valid;
  vpn_t creq_vpn, crsp_ppn;
  logic miss_valid; vpn_t miss_vpn;
  logic fill_valid, fill_ready; vpn_t fill_vpn, fill_ppn;
  logic inv_valid, inv_ready; vpn_t inv_vpn;
  logic pf_req, pf_done; vpn_t pf_vpn;

  stlb dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic vpn_t map(vpn_t v); return v ^ 20'h5A5A5; endfunction

  // ---- OS miss handler ----
  int n_miss = 0;
  initial begin
    fill_valid = 0; fill_vpn = '0; fill_ppn = '0;
    forever begin
      @(negedge clk);
      if (miss_valid) begin
        n_miss++;
        repeat (3) @(negedge clk);
        fill_vpn = miss_vpn; fill_ppn = map(miss_vpn); fill_valid = 1;
        #1; while (!fill_ready) @(negedge clk);
        @(posedge clk); #1 fill_valid = 0;
        @(negedge clk);
      end
    end
  end

  // ---- LLC: one request at a time, answers the physical address ----
  initial begin
    llc_req_ready = 0; llc_rsp_valid = 0; llc_rsp = '0;
    forever begin
      @(negedge clk);
      if (llc_req_valid) begin
        llc_req_ready = 1;
        @(posedge clk); #1 llc_req_ready = 0;
        llc_rsp.rdata = LINE_BITS'(llc_req.addr);
        repeat (2) @(negedge clk);
        llc_rsp_valid = 1;
        @(posedge clk); #1 llc_rsp_valid = 0;
      end
    end
  end

  // ---- page flush agent ----
  int n_pf = 0; vpn_t last_pf;
  initial begin
    pf_done = 0;
    forever begin
      @(negedge clk);
      if (pf_req) begin
        n_pf++; last_pf = pf_vpn;
        repeat (5) @(negedge clk);
        pf_done = 1; @(posedge clk); #1 pf_done = 0;
        @(negedge clk);
      end
    end
  end

  task automatic gpu_access(addr_t a);
    greq = '{op: MEM_RD, space: SP_GLOBAL, kid: '0, addr: a, wdata: '0, wmask: '0};
    greq_valid = 1;
    #1; while (!greq_ready) @(negedge clk);
    @(posedge clk); #1 greq_valid = 0;
    @(negedge clk); while (!grsp_valid) @(negedge clk);
    check(grsp.rdata[ADDR_W-1:0] == {map(a[ADDR_W-1:PAGE_OFF_W]), a[PAGE_OFF_W-1:0]},
          $sformatf("GPU translation of %h gave %h", a, grsp.rdata[ADDR_W-1:0]));
  endtask

  // returns the number of cycles from acceptance to the answer
  task automatic cpu_lookup(vpn_t v, output int lat);
    creq_vpn = v; creq_valid = 1;
    #1; while (!creq_ready) @(negedge clk);
    @(posedge clk); #1 creq_valid = 0;
    lat = 0;
    @(negedge clk); lat = 1;
    while (!crsp_valid) begin @(negedge clk); lat++; end
    check(crsp_ppn == map(v), $sformatf("CPU lookup of %h", v));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, m0, p0;
    greq_valid = 0; greq = '0; creq_valid = 0; creq_vpn = '0; inv_valid = 0; inv_vpn = '0;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);

    // GPU miss, refill, translation; second access hits
    gpu_access(32'h1234_5678);
    check(n_miss == 1, "first GPU access missed");
    gpu_access(32'h1234_5ABC);
    check(n_miss == 1, "second GPU access to the page hit");

    // CPU miss on a page the GPU never touched, then a one-cycle hit
    cpu_lookup(20'h00777, lat);
    check(n_miss == 2, "CPU lookup missed");
    cpu_lookup(20'h00777, lat);
    check(lat == 1, $sformatf("CPU hit answered in one cycle (%0d)", lat));
    check(n_pf == 0, "no flush for a CPU-only page");

    // CPU touches the GPU's page: flush first
    cpu_lookup(20'h12345, lat);
    check(n_pf == 1 && last_pf == 20'h12345, "page flush before the CPU answer");
    check(lat > 5, "CPU answer waited for the flush");
    cpu_lookup(20'h12345, lat);
    check(n_pf == 1 && lat == 1, "page no longer marked as GPU page");

    // deallocation of a GPU page: flush, then the entry is gone
    gpu_access(32'h0ABC_D000);
    m0 = n_miss; p0 = n_pf;
    inv_vpn = 20'h0ABCD; inv_valid = 1;
    #1; while (!inv_ready) @(negedge clk);
    @(posedge clk); #1 inv_valid = 0;
    repeat (12) @(negedge clk);
    check(n_pf == p0 + 1 && last_pf == 20'h0ABCD, "deallocation flushed the page");
    gpu_access(32'h0ABC_D040);
    check(n_miss == m0 + 1, "deallocated page misses again");

    // random GPU traffic over pages that crowd a few sets
    for (int k = 0; k < 600; k++) begin
      vpn_t v;
      v = vpn_t'(($urandom % 8) * 128 * 7 + ($urandom % 3));   // 8 tags x 3 sets
      gpu_access({v, 12'($urandom)});
    end
    check(n_miss > 40, $sformatf("replacement caused misses (%0d)", n_miss));

    // CPU lookups racing with GPU traffic and flushes
    fork
      for (int k = 0; k < 200; k++) gpu_access({vpn_t'($urandom % 64), 12'($urandom)});
      for (int k = 0; k < 60; k++) begin cpu_lookup(vpn_t'($urandom % 64), lat); repeat ($urandom % 4) @(negedge clk); end
    join
    $display("misses %0d page flushes %0d", n_miss, n_pf);
    check(n_pf > p0 + 1, "GPU pages touched by the CPU were flushed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
