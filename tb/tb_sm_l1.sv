// tb_sm_l1: SM-L1 data cache plus scratchpad. Random global and shared reads,
// partial writes and atomic adds are checked against a reference model
// (global: the memory behind the cache; shared: words with valid bits).
// Random flushes of all lines, of one page and of one kernel id are mixed
// in, the kernel's end clears the scratchpad, and after a final flush the
// memory must equal the reference.
module tb_sm_l1;
  import gpgpu_pkg::*;
  localparam int GLINES = 2048;                 // 128 KB of global memory
  localparam int SPW    = 48 * 1024 / 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  kid_t kid;
  logic kernel_end, ureq_valid, ureq_ready, ursp_valid;
  mem_req_t ureq; mem_rsp_t ursp;
  logic dreq_valid, dreq_ready, drsp_valid;
  mem_req_t dreq; mem_rsp_t drsp;
  logic flush_valid, flush_ready, flush_done;
  flush_mode_e flush_mode; kid_t flush_kid; vpn_t flush_vpn;
  int n_rd, n_wr, n_amo;

  sm_l1 dut (.*);
  line_mem_model #(.LINES(GLINES), .LAT(4)) u_mem (
    .clk, .rst_n, .req_valid(dreq_valid), .req_ready(dreq_ready), .req(dreq),
    .rsp_valid(drsp_valid), .rsp(drsp), .n_rd, .n_wr, .n_amo);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  line_t       gref [GLINES];
  logic [31:0] sref [SPW];
  logic        sval [SPW];

  task automatic access(mem_req_t q, output line_t r);
    ureq = q; ureq_valid = 1;
    #1; while (!ureq_ready) @(negedge clk);
    @(posedge clk); #1 ureq_valid = 0;
    @(negedge clk); while (!ursp_valid) @(negedge clk);
    r = ursp.rdata;
  endtask

  task automatic do_flush(flush_mode_e m, kid_t k, vpn_t v);
    flush_mode = m; flush_kid = k; flush_vpn = v; flush_valid = 1;
    #1; while (!flush_ready) @(negedge clk);
    @(posedge clk); #1 flush_valid = 0;
    @(negedge clk); while (!flush_done) @(negedge clk);
  endtask

  int n_glob = 0, n_shared = 0, n_fl = 0;
  task automatic random_op();
    mem_req_t q;
    line_t r, e;
    int pick;
    q = '0;
    q.wdata = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
               $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    q.wmask = {$urandom, $urandom};
    pick = $urandom % 50;
    q.op = (pick < 25) ? MEM_RD : (pick < 49) ? MEM_WR : MEM_AMO;
    if ($urandom % 3 != 0) begin
      int l;
      l = ($urandom % 4 != 0) ? int'($urandom % 32) : int'($urandom % GLINES);
      q.space = SP_GLOBAL;
      q.addr  = addr_t'(l * LINE_BYTES + int'($urandom % 16) * 4);
      q.kid   = kid_t'($urandom);                 // replaced by the SM's kid
      access(q, r);
      n_glob++;
      unique case (q.op)
        MEM_RD: check(r == gref[l], $sformatf("global read line %0d", l));
        MEM_WR: gref[l] = merge_line(gref[l], q.wdata, q.wmask);
        default: begin
          logic [31:0] old;
          old = pick_word(q.addr, gref[l]);
          check(r[31:0] == old, $sformatf("global atomic at %h", q.addr));
          gref[l] = merge_line(gref[l], place_word(q.addr, old + q.wdata[31:0]), access_bmask(q.addr, SZ_W));
        end
      endcase
    end else begin
      int l;
      l = int'($urandom % 800);                    // 768 lines in range, some beyond
      q.space = SP_SHARED;
      q.addr  = addr_t'(l * LINE_BYTES + int'($urandom % 16) * 4);
      access(q, r);
      n_shared++;
      e = '0;
      for (int i = 0; i < 16; i++) begin
        int w;
        w = l * 16 + i;
        if (w < SPW) begin
          unique case (q.op)
            MEM_RD: e[i*32 +: 32] = sval[w] ? sref[w] : 32'h0;
            MEM_WR: if (q.wmask[i*4 +: 4] != 0) begin
              logic [31:0] cur;
              cur = sval[w] ? sref[w] : 32'h0;
              for (int y = 0; y < 4; y++) if (q.wmask[i*4 + y]) cur[y*8 +: 8] = q.wdata[i*32 + y*8 +: 8];
              sref[w] = cur; sval[w] = 1;
            end
            default: if (i == int'(q.addr[5:2])) begin
              e[31:0] = sval[w] ? sref[w] : 32'h0;
              sref[w] = e[31:0] + q.wdata[31:0]; sval[w] = 1;
            end
          endcase
        end else if (q.op == MEM_AMO && i == int'(q.addr[5:2])) e[31:0] = 32'h0;
      end
      if (q.op != MEM_WR) check(r == e, $sformatf("shared %s line %0d", q.op.name(), l));
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    kid = 2'd1; kernel_end = 0; ureq_valid = 0; ureq = '0;
    flush_valid = 0; flush_mode = FL_ALL; flush_kid = '0; flush_vpn = '0;
    for (int l = 0; l < GLINES; l++) gref[l] = u_mem.init_line(l);
    for (int w = 0; w < SPW; w++) begin sref[w] = '0; sval[w] = 0; end
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    // directed: one miss, then hits; the kernel's end empties the scratchpad
    begin
      line_t r;
      int r0;
      r0 = n_rd;
      for (int i = 0; i < 20; i++) begin
        access('{op: MEM_RD, space: SP_GLOBAL, kid: '0, addr: 32'h1040, wdata: '0, wmask: '0}, r);
        check(r == gref[65], "repeated global read");
      end
      check(n_rd == r0 + 1, "one miss, then hits");
      access('{op: MEM_WR, space: SP_SHARED, kid: '0, addr: 32'h80, wdata: '1, wmask: '1}, r);
      access('{op: MEM_RD, space: SP_SHARED, kid: '0, addr: 32'h80, wdata: '0, wmask: '0}, r);
      check(r == '1 && n_rd == r0 + 1, "shared write read back without the memory");
      kernel_end = 1; @(posedge clk); #1 kernel_end = 0; @(negedge clk);
      access('{op: MEM_RD, space: SP_SHARED, kid: '0, addr: 32'h80, wdata: '0, wmask: '0}, r);
      check(r == '0, "kernel end discarded the scratchpad");
    end
    for (int k = 0; k < 6000; k++) begin
      random_op();
      if ($urandom % 300 == 0) begin
        int m;
        m = $urandom % 3;
        n_fl++;
        if (m == 0) do_flush(FL_ALL, '0, '0);
        else if (m == 1) do_flush(FL_PAGE, '0, vpn_t'($urandom % 32));
        else do_flush(FL_KID, kid, '0);
      end
      if (k % 2000 == 1999) begin
        kernel_end = 1; @(posedge clk); #1 kernel_end = 0; @(negedge clk);
        for (int w = 0; w < SPW; w++) sval[w] = 0;
      end
    end
    do_flush(FL_KID, kid, '0);
    for (int l = 0; l < GLINES; l++) check(u_mem.mem[l] == gref[l], $sformatf("memory line %0d after flush", l));
    $display("global %0d shared %0d flushes %0d, memory reads %0d writes %0d atomics %0d",
             n_glob, n_shared, n_fl, n_rd, n_wr, n_amo);
    check(n_rd < n_glob, "global accesses hit in the cache");
    check(n_amo > 0, "atomics were passed on");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
