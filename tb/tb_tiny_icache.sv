// tb_tiny_icache: per-lane instruction cache. Random fetches within working
// sets smaller and larger than the cache are checked against the memory
// model's pattern; the test also checks the one-cycle hit, that a loop that
// fits causes no refetch, and that invalidation forces refetching.
module tb_tiny_icache;
  import gpgpu_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic inval, freq_valid, freq_ready, frsp_valid;
  addr_t freq_pc;
  logic [31:0] frsp_instr;
  logic mreq_valid, mreq_ready, mrsp_valid;
  mem_req_t mreq; mem_rsp_t mrsp;
  int n_rd, n_wr, n_amo;

  tiny_icache dut (.*);
  line_mem_model #(.LINES(64), .LAT(4)) u_mem (
    .clk, .rst_n, .req_valid(mreq_valid), .req_ready(mreq_ready), .req(mreq),
    .rsp_valid(mrsp_valid), .rsp(mrsp), .n_rd, .n_wr, .n_amo);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic logic [31:0] exp_word(addr_t a);
    logic [31:0] v;
    for (int y = 0; y < 4; y++) begin
      int x;
      x = int'(a & ~32'h3) + y;
      v[y*8 +: 8] = 8'((x * 7) + (x / 256));
    end
    return v;
  endfunction

  task automatic fetch(addr_t pc, output int lat);
    freq_pc = pc; freq_valid = 1;
    #1; while (!freq_ready) @(negedge clk);
    @(posedge clk); #1 freq_valid = 0;
    @(negedge clk); lat = 1;
    while (!frsp_valid) begin @(negedge clk); lat++; end
    check(frsp_instr == exp_word(pc), $sformatf("fetch %h", pc));
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, r0;
    inval = 0; freq_valid = 0; freq_pc = '0;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    fetch(32'h100, lat);
    check(lat > 4 && n_rd == 1, "cold miss fetched the line");
    fetch(32'h104, lat);
    check(lat == 1 && n_rd == 1, $sformatf("hit in one cycle (%0d)", lat));
    // a loop of 8 lines fits: after the first pass there is no refetch
    for (int i = 0; i < 8 * 16; i++) fetch(32'h400 + 32'(i * 4), lat);
    r0 = n_rd;
    for (int p = 0; p < 3; p++)
      for (int i = 0; i < 8 * 16; i += 3) fetch(32'h400 + 32'(i * 4), lat);
    check(n_rd == r0, "loop of 8 lines stays resident");
    // invalidation
    inval = 1; @(posedge clk); #1 inval = 0; @(negedge clk);
    fetch(32'h400, lat);
    check(n_rd == r0 + 1, "invalidation forced a refetch");
    // random fetches over 16 lines
    for (int k = 0; k < 2000; k++) fetch(addr_t'(($urandom % (16 * 16)) * 4), lat);
    check(n_rd > r0 + 100, "a working set of 16 lines thrashes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
