// tb_tinycache: self-checking test of the per-lane tinyCache.
// A behavioural line memory sits below the cache; a byte-array reference
// model holds what a single lane must observe. Directed steps check each
// state transition of the write-validate protocol (write miss without fetch,
// read of an invalid half-word with fetch-and-merge, byte-store eviction,
// atomic bypass, disabled caching, 1-cycle hits), then a random sequence
// with flushes checks loads against the reference and finally the memory
// contents after a flush.
module tb_tinycache;
  import gpgpu_pkg::*;

  localparam int LINES = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cache_global, cache_shared, flush_req, flush_done;
  logic lreq_valid, lreq_ready, lrsp_valid;
  lane_req_t lreq;
  logic [31:0] lrsp_data;
  logic mreq_valid, mreq_ready, mrsp_valid;
  mem_req_t mreq;
  mem_rsp_t mrsp;
  int n_rd, n_wr, n_amo;

  tinycache dut (.*);
  line_mem_model #(.LINES(LINES), .LAT(2)) u_mem (
    .clk, .rst_n, .req_valid(mreq_valid), .req_ready(mreq_ready), .req(mreq),
    .rsp_valid(mrsp_valid), .rsp(mrsp), .n_rd, .n_wr, .n_amo);

  int checks = 0, failures = 0;
  logic [7:0] gold [LINES*LINE_BYTES];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // issue one lane request, return the response data and latency in cycles
  task automatic access(lane_op_e op, space_e sp, size_e sz, addr_t a, logic [31:0] wd,
                        output logic [31:0] rd, output int lat);
    lreq_valid <= 1; lreq <= '{op: op, space: sp, size: sz, addr: a, wdata: wd};
    @(posedge clk);
    while (!lreq_ready) @(posedge clk);
    lreq_valid <= 0;
    lat = 1;
    @(posedge clk);
    while (!lrsp_valid) begin lat++; @(posedge clk); end
    rd = lrsp_data;
  endtask

  function automatic logic [31:0] gold_word(addr_t a);
    int b;
    b = int'({a[31:2], 2'b00});
    return {gold[b+3], gold[b+2], gold[b+1], gold[b]};
  endfunction

  // bytes of a word covered by an access of size sz at a
  function automatic logic [31:0] size_mask(addr_t a, size_e sz);
    logic [31:0] m;
    m = '0;
    for (int i = 0; i < 4; i++)
      if ((sz == SZ_W) || (sz == SZ_H && a[1] == i[1]) || (sz == SZ_B && a[1:0] == 2'(i))) m[i*8 +: 8] = 8'hFF;
    return m;
  endfunction

  task automatic gold_store(addr_t a, size_e sz, logic [31:0] wd);
    bmask_t m;
    m = access_bmask(a, sz);
    for (int i = 0; i < 4; i++)
      if (m[{a[5:2], 2'(i)}]) gold[int'({a[31:2], 2'(i)})] = wd[i*8 +: 8];
  endtask

  task automatic do_flush();
    flush_req <= 1; @(posedge clk); flush_req <= 0;
    while (!flush_done) @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd, wd;
    int lat, r0, w0, a0;
    addr_t a;
    for (int i = 0; i < LINES*LINE_BYTES; i++) gold[i] = 8'((i * 7) + (i / 256));
    cache_global = 1; cache_shared = 1; flush_req = 0; lreq_valid = 0; lreq = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // write miss: allocate in DPV without fetching
    r0 = n_rd;
    a = 32'h0000_0104;
    access(LN_ST, SP_GLOBAL, SZ_W, a, 32'hCAFE_F00D, rd, lat); gold_store(a, SZ_W, 32'hCAFE_F00D);
    check(n_rd == r0, "write miss must not fetch");
    check(lat == 1, $sformatf("write miss into free way answers in 1 cycle (%0d)", lat));
    // read of a valid (dirty) half-word: hit, no fetch, 1 cycle
    access(LN_LD, SP_GLOBAL, SZ_W, a, 0, rd, lat);
    check(rd == 32'hCAFE_F00D && lat == 1 && n_rd == r0, "rh(v) returns dirty word in 1 cycle");
    // read of an invalid half-word: fetch and merge, line becomes DV
    access(LN_LD, SP_GLOBAL, SZ_W, 32'h0000_0108, 0, rd, lat);
    check(n_rd == r0 + 1, "rh(i) fetches the line");
    check(rd == gold_word(32'h0000_0108), "rh(i) returns memory data");
    access(LN_LD, SP_GLOBAL, SZ_W, a, 0, rd, lat);
    check(rd == 32'hCAFE_F00D, "merge keeps dirty half-words");
    access(LN_LD, SP_GLOBAL, SZ_H, 32'h0000_013E, 0, rd, lat);
    check(lat == 1 && n_rd == r0 + 1 && rd == gold_word(32'h0000_013C), "DV line hits everywhere");
    // half-word store hit on DV
    access(LN_ST, SP_GLOBAL, SZ_H, 32'h0000_0112, 32'h5A5A_0000, rd, lat); gold_store(32'h112, SZ_H, 32'h5A5A_0000);
    check(lat == 1, "write hit in 1 cycle");
    // byte store on a cached dirty line: evict (write back) and bypass
    w0 = n_wr;
    access(LN_ST, SP_GLOBAL, SZ_B, 32'h0000_0101, 32'h0000_EE00, rd, lat); gold_store(32'h101, SZ_B, 32'h0000_EE00);
    check(n_wr == w0 + 2, $sformatf("byte store evicts then bypasses (%0d writes)", n_wr - w0));
    r0 = n_rd;
    access(LN_LD, SP_GLOBAL, SZ_W, 32'h0000_0100, 0, rd, lat);
    check(n_rd == r0 + 1 && rd == gold_word(32'h100), "line refetched after byte-store eviction");
    // clean line read hit
    access(LN_LD, SP_GLOBAL, SZ_W, 32'h0000_0110, 0, rd, lat);
    check(lat == 1 && rd == gold_word(32'h110), "clean read hit");
    // atomic bypasses the cache
    a0 = n_amo;
    wd = gold_word(32'h0000_0204);
    access(LN_AMO, SP_GLOBAL, SZ_W, 32'h0000_0204, 32'd5, rd, lat);
    check(n_amo == a0 + 1 && rd == wd, "atomic goes to memory and returns old value");
    gold_store(32'h204, SZ_W, wd + 32'd5);
    // caching of scratchpad references disabled: every load goes below
    cache_shared = 0;
    r0 = n_rd;
    access(LN_LD, SP_SHARED, SZ_W, 32'h0000_0300, 0, rd, lat);
    access(LN_LD, SP_SHARED, SZ_W, 32'h0000_0300, 0, rd, lat);
    check(n_rd == r0 + 2 && rd == gold_word(32'h300), "bypass_shared sends every scratchpad load below");
    cache_shared = 1;
    do_flush();

    // random sequence over 32 lines of global space
    for (int it = 0; it < 4000; it++) begin
      int k;
      size_e sz;
      k = int'($urandom_range(0, 99));
      sz = size_e'($urandom_range(0, 2));
      a = addr_t'($urandom_range(0, 32*LINE_BYTES - 1));
      if (sz == SZ_H) a[0] = 0;
      if (sz == SZ_W) a[1:0] = 0;
      wd = $urandom;
      if (k < 45) begin
        access(LN_LD, SP_GLOBAL, sz, a, 0, rd, lat);
        check(((rd ^ gold_word(a)) & size_mask(a, sz)) == 0, $sformatf("random load %h size %0d got %h expected %h", a, sz, rd, gold_word(a)));
      end else if (k < 90) begin
        access(LN_ST, SP_GLOBAL, sz, a, wd, rd, lat);
        gold_store(a, sz, wd);
      end else if (k < 95) begin
        a[1:0] = 0;
        wd = gold_word(a);
        access(LN_AMO, SP_GLOBAL, SZ_W, a, 32'd3, rd, lat);
        check(rd == wd, "random atomic old value");
        gold_store(a, SZ_W, wd + 32'd3);
      end else begin
        do_flush();
      end
    end
    do_flush();
    for (int l = 0; l < LINES; l++) begin
      logic ok;
      ok = 1;
      for (int b = 0; b < LINE_BYTES; b++)
        if (u_mem.mem[l][b*8 +: 8] != gold[l*LINE_BYTES + b]) ok = 0;
      check(ok, $sformatf("memory line %0d after flush", l));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
