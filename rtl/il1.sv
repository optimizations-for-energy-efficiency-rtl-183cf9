// il1: instruction L1 cache of an SM, shared by the lanes' tiny instruction
// caches.
//
// The line requests of the lanes' tiny_icache misses meet at a merging
// round-robin arbiter, so lanes that miss on the same instruction line in
// the same cycle share one lookup (the common case when the lanes of a warp
// run the same code). Behind it is a read-only, virtually tagged
// set-associative cache; its misses go to the SM-L2, which holds both data
// and instructions. Requests are tagged with the SM's kernel id. inval
// (code modification) drops every line.
//
// Interface: per-lane line ports with a broadcast response bus, one
// downstream port; a hit answers one cycle after the arbiter issues it.
//
// From the document: an IL1 per SM shared by the lanes, 32 KB / 8-way /
// 64 B lines (Table 6.2). This design's own choices: the arbiter, kernel-id
// tags, one-cycle hits instead of the table's 4 cycles.
module il1
  import gpgpu_pkg::*;
#(
  parameter int unsigned LANES = 32,
  parameter int unsigned SETS  = 64,    // 32 KB / (8 ways * 64 B)
  parameter int unsigned WAYS  = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  kid_t             kid,
  input  logic             inval,
  output logic             inval_done,
  input  logic [LANES-1:0] ureq_valid,
  output logic [LANES-1:0] ureq_ready,
  input  mem_req_t         ureq [LANES],
  output logic [LANES-1:0] ursp_valid,
  output mem_rsp_t         ursp,
  output logic             dreq_valid,
  input  logic             dreq_ready,
  output mem_req_t         dreq,
  input  logic             drsp_valid,
  input  mem_rsp_t         drsp
);
  logic     a_valid, a_ready, a_rsp_valid, fl_ready;
  mem_req_t a_req, k_req;
  mem_rsp_t a_rsp;
  logic [$clog2(LANES+1)-1:0] merged;

  coalescer #(.LANES(LANES)) u_arb (
    .clk, .rst_n, .ureq_valid, .ureq_ready, .ureq, .ursp_valid, .ursp,
    .dreq_valid(a_valid), .dreq_ready(a_ready), .dreq(a_req),
    .drsp_valid(a_rsp_valid), .drsp(a_rsp), .merged_count(merged));

  always_comb begin
    k_req     = a_req;
    k_req.kid = kid;
    k_req.op  = MEM_RD;          // instruction fetches only read
  end

  vcache #(.SETS(SETS), .WAYS(WAYS), .AMO_LOCAL(1'b1)) u_ic (
    .clk, .rst_n,
    .ureq_valid(a_valid), .ureq_ready(a_ready), .ureq(k_req),
    .ursp_valid(a_rsp_valid), .ursp(a_rsp),
    .dreq_valid, .dreq_ready, .dreq, .drsp_valid, .drsp,
    .flush_valid(inval), .flush_ready(fl_ready), .flush_mode(FL_ALL), .flush_kid(kid),
    .flush_vpn('0), .flush_done(inval_done));

endmodule
