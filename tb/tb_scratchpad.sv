// tb_scratchpad: checks the banked scratchpad against a word-array model:
// zero for never-written words, byte-masked writes, atomic add, clearing at
// kernel end, out-of-range addresses, and the two bank passes a 64-byte line
// needs with 8 banks.
module tb_scratchpad;
  import gpgpu_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic kernel_end, req_valid, req_ready, rsp_valid;
  mem_req_t req;
  mem_rsp_t rsp;
  scratchpad dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model [12288];
  logic        mval  [12288];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic xfer(mem_op_e op, addr_t a, line_t wd, bmask_t m, output line_t rd, output int lat);
    req_valid <= 1; req <= '{op: op, space: SP_SHARED, kid: '0, addr: a, wdata: wd, wmask: m};
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    req_valid <= 0;
    lat = 1;
    @(posedge clk);
    while (!rsp_valid) begin lat++; @(posedge clk); end
    rd = rsp.rdata;
  endtask

  function automatic line_t model_line(addr_t a);
    line_t l;
    for (int i = 0; i < 16; i++) begin
      int w;
      w = int'(a[31:6]) * 16 + i;
      l[i*32 +: 32] = (w < 12288 && mval[w]) ? model[w] : 32'h0;
    end
    return l;
  endfunction

  task automatic model_write(addr_t a, line_t wd, bmask_t m);
    for (int i = 0; i < 16; i++) begin
      int w;
      w = int'(a[31:6]) * 16 + i;
      if (w < 12288 && m[i*4 +: 4] != 0) begin
        logic [31:0] c;
        c = mval[w] ? model[w] : 32'h0;
        for (int y = 0; y < 4; y++) if (m[i*4+y]) c[y*8 +: 8] = wd[i*32 + y*8 +: 8];
        model[w] = c; mval[w] = 1;
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    line_t rd, wd;
    int lat;
    logic [31:0] old;
    for (int i = 0; i < 12288; i++) begin mval[i] = 0; model[i] = 0; end
    kernel_end = 0; req_valid = 0; req = '0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);

    xfer(MEM_RD, 32'h140, '0, '0, rd, lat);
    check(rd == '0, "unwritten words read as zero");
    check(lat == 3, $sformatf("a 16-word line: accept cycle plus 2 bank passes on 8 banks (%0d)", lat));
    for (int i = 0; i < 16; i++) wd[i*32 +: 32] = $urandom;
    xfer(MEM_WR, 32'h140, wd, '1, rd, lat); model_write(32'h140, wd, '1);
    xfer(MEM_RD, 32'h140, '0, '0, rd, lat);
    check(rd == wd, "full line write and read back");
    // byte write into a never-written word: other bytes are zero
    xfer(MEM_WR, 32'h200, {16{32'hAABBCCDD}}, 64'h2, rd, lat); model_write(32'h200, {16{32'hAABBCCDD}}, 64'h2);
    xfer(MEM_RD, 32'h200, '0, '0, rd, lat);
    check(rd[31:0] == 32'h0000CC00, $sformatf("byte write to invalid word %h", rd[31:0]));
    // atomic add
    xfer(MEM_AMO, 32'h148, 32'd9, '0, rd, lat);
    old = model_line(32'h140)[2*32 +: 32];
    check(rd[31:0] == old, "atomic returns old value");
    model_write(32'h140, place_word(32'h148, old + 32'd9), access_bmask(32'h148, SZ_W));
    xfer(MEM_RD, 32'h140, '0, '0, rd, lat);
    check(rd == model_line(32'h140), "atomic updated the word");
    // beyond the 48 KB
    xfer(MEM_WR, 32'hC000, wd, '1, rd, lat);
    xfer(MEM_RD, 32'hC000, '0, '0, rd, lat);
    check(rd == '0, "out-of-range address reads zero");
    // random traffic
    for (int it = 0; it < 600; it++) begin
      addr_t a;
      bmask_t m;
      a = addr_t'($urandom_range(0, 767)) << 6;
      if ($urandom_range(0, 1) == 0) begin
        for (int i = 0; i < 16; i++) wd[i*32 +: 32] = $urandom;
        m = {$urandom, $urandom};
        xfer(MEM_WR, a, wd, m, rd, lat); model_write(a, wd, m);
      end else begin
        xfer(MEM_RD, a, '0, '0, rd, lat);
        check(rd == model_line(a), $sformatf("random read %h", a));
      end
    end
    // kernel end discards everything
    kernel_end <= 1; @(posedge clk); kernel_end <= 0; @(posedge clk);
    xfer(MEM_RD, 32'h140, '0, '0, rd, lat);
    check(rd == '0, "contents discarded at kernel end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
