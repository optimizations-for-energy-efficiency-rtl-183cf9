// tb_il1: instruction L1 of an SM. All 32 lanes fetch lines of a small code
// region at once; every response is checked against the memory pattern, the
// test expects same-line fetches to be merged and the region to stay
// resident, and invalidation to force the lines to be fetched again.
module tb_il1;
  import gpgpu_pkg::*;
  localparam int L = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  kid_t kid;
  logic inval, inval_done;
  logic [L-1:0] ureq_valid, ureq_ready, ursp_valid;
  mem_req_t ureq [L]; mem_rsp_t ursp;
  logic dreq_valid, dreq_ready, drsp_valid;
  mem_req_t dreq; mem_rsp_t drsp;
  int n_rd, n_wr, n_amo;

  il1 dut (.*);
  line_mem_model #(.LINES(1024), .LAT(8)) u_mem (
    .clk, .rst_n, .req_valid(dreq_valid), .req_ready(dreq_ready), .req(dreq),
    .rsp_valid(drsp_valid), .rsp(drsp), .n_rd, .n_wr, .n_amo);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int done = 0;
  task automatic lane_run(int l, int n, int lines);
    for (int k = 0; k < n; k++) begin
      int line;
      line = 64 + (k + l / 8) % lines;
      ureq[l] = '{op: MEM_RD, space: SP_GLOBAL, kid: '0, addr: addr_t'(line * LINE_BYTES),
                  wdata: '0, wmask: '0};
      ureq_valid[l] = 1;
      #1; while (!ureq_ready[l]) begin @(negedge clk); #1; end
      @(posedge clk); #1 ureq_valid[l] = 0;
      @(negedge clk); while (!ursp_valid[l]) @(negedge clk);
      check(ursp.rdata == u_mem.init_line(line), $sformatf("lane %0d line %0d", l, line));
    end
    done++;
  endtask

  task automatic all_lanes(int n, int lines);
    done = 0;
    for (int l = 0; l < L; l++) begin
      automatic int ll = l;
      fork lane_run(ll, n, lines); join_none
    end
    wait (done == L);
    @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r0;
    kid = 2'd3; inval = 0; ureq_valid = '0;
    for (int l = 0; l < L; l++) ureq[l] = '0;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    all_lanes(40, 20);
    check(n_rd == 20, $sformatf("each code line fetched once (%0d)", n_rd));
    r0 = n_rd;
    all_lanes(40, 20);
    check(n_rd == r0, "code stays resident");
    inval = 1;
    @(posedge clk); #1 inval = 0;
    @(negedge clk); while (!inval_done) @(negedge clk);
    all_lanes(10, 20);
    check(n_rd == r0 + 13, $sformatf("invalidation forced refetching of the 13 lines used (%0d)", n_rd - r0));
    check(n_wr == 0 && n_amo == 0, "the instruction cache only reads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
