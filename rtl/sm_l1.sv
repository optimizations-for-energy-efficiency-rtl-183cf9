// sm_l1: the SM's first-level data memory (SM-L1 / DL1). It is split into a
// banked scratchpad, for references to the scratchpad address space, and a
// single-ported virtually indexed, virtually tagged write-back cache for
// global references, which is fed by the coalescer.
//
// Every global request is stamped with the kernel id of the kernel running
// on this SM before it enters the cache, so the id travels with the line to
// the shared SM-L2. An atomic makes the cache write back and invalidate all
// its lines before the atomic is passed to the SM-L2, where it is performed.
// At the end of a kernel the controller flushes the cache (flush_* port,
// usually FL_ALL) and pulses kernel_end, which discards the scratchpad's
// contents. A per-page flush (FL_PAGE) serves the shared TLB's requests.
//
// Interface: one upstream request/response port (from the coalescer, one
// request outstanding), one downstream port to the SM-L2, the flush port of
// vcache. Cache hits answer one cycle after acceptance; scratchpad lines
// take one cycle per bank pass plus one.
//
// From the document: the split into scratchpad and coalesced cache, virtual
// tags, write-back-invalidate at kernel end and on atomics, scratchpad
// clearing, 64 KB / 8-way / 64 B lines and 48 KB / 8 banks (Table 4.2).
// This design's own choices: see vcache and scratchpad.
module sm_l1
  import gpgpu_pkg::*;
#(
  parameter int unsigned SETS     = 128,   // 64 KB / (8 ways * 64 B)
  parameter int unsigned WAYS     = 8,
  parameter int unsigned SP_BYTES = 48 * 1024,
  parameter int unsigned SP_BANKS = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  kid_t        kid,
  input  logic        kernel_end,
  input  logic        ureq_valid,
  output logic        ureq_ready,
  input  mem_req_t    ureq,
  output logic        ursp_valid,
  output mem_rsp_t    ursp,
  output logic        dreq_valid,
  input  logic        dreq_ready,
  output mem_req_t    dreq,
  input  logic        drsp_valid,
  input  mem_rsp_t    drsp,
  input  logic        flush_valid,
  output logic        flush_ready,
  input  flush_mode_e flush_mode,
  input  kid_t        flush_kid,
  input  vpn_t        flush_vpn,
  output logic        flush_done
);
  logic     to_sp;
  mem_req_t greq;
  logic     sp_ready, sp_rsp_valid, c_ready, c_rsp_valid;
  mem_rsp_t sp_rsp, c_rsp;

  assign to_sp = (ureq.space == SP_SHARED);
  always_comb begin
    greq     = ureq;
    greq.kid = kid;
  end

  assign ureq_ready = to_sp ? sp_ready : c_ready;

  scratchpad #(.SIZE_BYTES(SP_BYTES), .BANKS(SP_BANKS)) u_sp (
    .clk, .rst_n, .kernel_end,
    .req_valid(ureq_valid && to_sp), .req_ready(sp_ready), .req(ureq),
    .rsp_valid(sp_rsp_valid), .rsp(sp_rsp));

  vcache #(.SETS(SETS), .WAYS(WAYS), .AMO_LOCAL(1'b0)) u_dl1 (
    .clk, .rst_n,
    .ureq_valid(ureq_valid && !to_sp), .ureq_ready(c_ready), .ureq(greq),
    .ursp_valid(c_rsp_valid), .ursp(c_rsp),
    .dreq_valid, .dreq_ready, .dreq, .drsp_valid, .drsp,
    .flush_valid, .flush_ready, .flush_mode, .flush_kid, .flush_vpn, .flush_done);

  assign ursp_valid = sp_rsp_valid | c_rsp_valid;
  assign ursp       = sp_rsp_valid ? sp_rsp : c_rsp;

endmodule
