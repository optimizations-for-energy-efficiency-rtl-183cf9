// sm_l2: the small virtual second-level cache shared by all SMs (SM-L2),
// with the interconnect that connects the SMs to it.
//
// Requests from the SMs' SM-L1 and IL1 miss paths meet at a merging
// round-robin arbiter (the same coalescer used inside an SM), so that the
// clustered misses of several SMs to one line become a single lookup. The
// cache is virtually indexed and tagged; each tag also holds the kernel id,
// which tells the lines of the kernels that run at the same time on
// different SMs apart. When a kernel ends, a FL_KID flush writes back and
// invalidates just that kernel's lines; FL_PAGE flushes one virtual page
// for the shared TLB. Atomics are performed here. Misses and write-backs
// leave through the downstream port towards the shared TLB and the LLC,
// still carrying virtual addresses.
//
// Interface: per-SM request ports with a broadcast response bus, one
// downstream port, the flush port of vcache; one request outstanding.
//
// From the document: shared by the SMs, non-inclusive, virtual, kernel-id
// tags of log2(number of SMs) bits, writeback-invalidate of a finished
// kernel's lines, 256 KB / 16-way / 64 B lines (Table 4.2). This design's
// own choices: the arbiter, atomics performed at this level, one-cycle hits.
module sm_l2
  import gpgpu_pkg::*;
#(
  parameter int unsigned NUM_SM = 4,
  parameter int unsigned SETS   = 256,   // 256 KB / (16 ways * 64 B)
  parameter int unsigned WAYS   = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_SM-1:0] ureq_valid,
  output logic [NUM_SM-1:0] ureq_ready,
  input  mem_req_t          ureq [NUM_SM],
  output logic [NUM_SM-1:0] ursp_valid,
  output mem_rsp_t          ursp,
  output logic              dreq_valid,
  input  logic              dreq_ready,
  output mem_req_t          dreq,
  input  logic              drsp_valid,
  input  mem_rsp_t          drsp,
  input  logic              flush_valid,
  output logic              flush_ready,
  input  flush_mode_e       flush_mode,
  input  kid_t              flush_kid,
  input  vpn_t              flush_vpn,
  output logic              flush_done,
  output logic [$clog2(NUM_SM+1)-1:0] merged_count
);
  logic     a_valid, a_ready, a_rsp_valid;
  mem_req_t a_req;
  mem_rsp_t a_rsp;

  coalescer #(.LANES(NUM_SM)) u_xbar (
    .clk, .rst_n, .ureq_valid, .ureq_ready, .ureq, .ursp_valid, .ursp,
    .dreq_valid(a_valid), .dreq_ready(a_ready), .dreq(a_req),
    .drsp_valid(a_rsp_valid), .drsp(a_rsp), .merged_count);

  vcache #(.SETS(SETS), .WAYS(WAYS), .AMO_LOCAL(1'b1)) u_l2 (
    .clk, .rst_n,
    .ureq_valid(a_valid), .ureq_ready(a_ready), .ureq(a_req),
    .ursp_valid(a_rsp_valid), .ursp(a_rsp),
    .dreq_valid, .dreq_ready, .dreq, .drsp_valid, .drsp,
    .flush_valid, .flush_ready, .flush_mode, .flush_kid, .flush_vpn, .flush_done);

endmodule
