// vcache: virtually indexed, virtually tagged, set-associative write-back
// cache with kernel-id tags and a filtered flush engine. It is the storage
// part of the SM-L1 data cache, the IL1 and the shared SM-L2.
//
// Each line is tagged with its virtual tag and the kernel id (kid) of the
// request that brought it in, so lines of concurrent kernels never hit each
// other. Write policy is write-back, write-allocate: a write miss fetches the
// line and merges the written bytes, except a full-line write, which needs no
// fetch. A flush walks every line once, one line per cycle, and writes back
// and invalidates the lines that match its filter: all lines (FL_ALL), the
// lines of one kernel (FL_KID) or the lines of one virtual page (FL_PAGE).
// Atomic adds (MEM_AMO) are done in place when AMO_LOCAL is set (the level
// where atomics are performed); otherwise an atomic first writes back and
// invalidates the whole cache and is then passed to the next level, as the
// SM-L1 must do for atomics.
//
// Interface: upstream port ureq/ursp and downstream port dreq/drsp follow
// the one-request-one-response rule of gpgpu_pkg; one miss is outstanding at
// a time (blocking cache). A hit is answered in the cycle after it is
// accepted. flush_valid is taken when flush_ready is high; flush_done pulses
// when the walk has ended. Flushes wait for the current request to finish.
//
// From the document: virtual indexing and tagging, kernel-id tags, write-back
// with writeback-invalidate at kernel end and on atomics, per-page flush. This
// design's own choices: blocking operation, round-robin replacement,
// write-allocate, one-cycle hits (the document's 7 to 18 cycle latencies are
// those of full-size SRAM macros).
module vcache
  import gpgpu_pkg::*;
#(
  parameter int unsigned SETS      = 128,
  parameter int unsigned WAYS      = 8,
  parameter bit          AMO_LOCAL = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
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
  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned TAG_W = ADDR_W - OFF_W - SET_W;
  localparam int unsigned LN_W  = SET_W + WAY_W;

  typedef enum logic [3:0] {
    S_IDLE, S_WB_REQ, S_WB_RSP, S_FILL_REQ, S_FILL_RSP, S_FWD_REQ, S_FWD_RSP, S_FLUSH
  } fsm_e;

  logic             vld  [SETS][WAYS];
  logic             dty  [SETS][WAYS];
  logic [TAG_W-1:0] tag  [SETS][WAYS];
  kid_t             kid  [SETS][WAYS];
  line_t            data [SETS][WAYS];
  logic [WAY_W-1:0] rr   [SETS];

  fsm_e             fsm;
  mem_req_t         r_req;
  logic [SET_W-1:0] r_set;
  logic [WAY_W-1:0] r_way;
  logic             r_flush;      // a flush walk is in progress
  logic             r_amo_fwd;    // the walk was started by a forwarded atomic
  flush_mode_e      r_fmode;
  kid_t             r_fkid;
  vpn_t             r_fvpn;
  logic [LN_W-1:0]  fl_idx;

  // ---- lookup ----
  logic [SET_W-1:0] in_set;
  logic [TAG_W-1:0] in_tag;
  logic             in_hit, in_has_inv;
  logic [WAY_W-1:0] in_hway, in_iway, in_victim;

  assign in_set = ureq.addr[OFF_W +: SET_W];
  assign in_tag = ureq.addr[ADDR_W-1 -: TAG_W];

  always_comb begin
    in_hit = 1'b0; in_hway = '0; in_has_inv = 1'b0; in_iway = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (vld[in_set][w] && tag[in_set][w] == in_tag && kid[in_set][w] == ureq.kid) begin
        in_hit = 1'b1; in_hway = WAY_W'(w);
      end
      if (!vld[in_set][w]) begin in_has_inv = 1'b1; in_iway = WAY_W'(w); end
    end
    in_victim = in_has_inv ? in_iway : rr[in_set];
  end

  // ---- flush walk position and filter ----
  logic [SET_W-1:0] fl_set;
  logic [WAY_W-1:0] fl_way;
  addr_t            fl_addr;
  logic             fl_match;
  assign fl_set  = fl_idx[LN_W-1 -: SET_W];
  assign fl_way  = fl_idx[WAY_W-1:0];
  assign fl_addr = {tag[fl_set][fl_way], fl_set, {OFF_W{1'b0}}};
  always_comb begin
    unique case (r_fmode)
      FL_KID:  fl_match = kid[fl_set][fl_way] == r_fkid;
      FL_PAGE: fl_match = fl_addr[ADDR_W-1:PAGE_OFF_W] == r_fvpn;
      default: fl_match = 1'b1;
    endcase
  end

  assign ureq_ready  = (fsm == S_IDLE) && !flush_valid;
  assign flush_ready = (fsm == S_IDLE);

  // ---- downstream request ----
  always_comb begin
    dreq_valid = 1'b0;
    dreq       = '0;
    unique case (fsm)
      S_WB_REQ: begin
        dreq_valid = 1'b1;
        dreq.op    = MEM_WR;
        dreq.kid   = kid[r_set][r_way];
        dreq.addr  = {tag[r_set][r_way], r_set, {OFF_W{1'b0}}};
        dreq.wdata = data[r_set][r_way];
        dreq.wmask = '1;
      end
      S_FILL_REQ: begin
        dreq_valid = 1'b1;
        dreq.op    = MEM_RD;
        dreq.kid   = r_req.kid;
        dreq.addr  = line_base(r_req.addr);
      end
      S_FWD_REQ: begin
        dreq_valid = 1'b1;
        dreq       = r_req;
      end
      default: ;
    endcase
  end

  // complete a read, write or local atomic on a resident line
  function automatic line_t apply_op(mem_req_t q, line_t cur);
    unique case (q.op)
      MEM_WR:  return merge_line(cur, q.wdata, q.wmask);
      MEM_AMO: return merge_line(cur, place_word(q.addr, pick_word(q.addr, cur) + q.wdata[31:0]),
                                 access_bmask(q.addr, SZ_W));
      default: return cur;
    endcase
  endfunction

  function automatic line_t rsp_of(mem_req_t q, line_t cur);
    unique case (q.op)
      MEM_RD:  return cur;
      MEM_AMO: return LINE_BITS'(pick_word(q.addr, cur));
      default: return '0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm        <= S_IDLE;
      r_req      <= '0;
      r_set      <= '0;
      r_way      <= '0;
      r_flush    <= 1'b0;
      r_amo_fwd  <= 1'b0;
      r_fmode    <= FL_ALL;
      r_fkid     <= '0;
      r_fvpn     <= '0;
      fl_idx     <= '0;
      ursp_valid <= 1'b0;
      ursp       <= '0;
      flush_done <= 1'b0;
      for (int s = 0; s < SETS; s++) begin
        rr[s] <= '0;
        for (int w = 0; w < WAYS; w++) begin
          vld[s][w] <= 1'b0; dty[s][w] <= 1'b0; tag[s][w] <= '0; kid[s][w] <= '0;
        end
      end
    end else begin
      ursp_valid <= 1'b0;
      flush_done <= 1'b0;
      unique case (fsm)
        S_IDLE: begin
          if (flush_valid) begin
            r_flush <= 1'b1; r_amo_fwd <= 1'b0;
            r_fmode <= flush_mode; r_fkid <= flush_kid; r_fvpn <= flush_vpn;
            fl_idx  <= '0;
            fsm     <= S_FLUSH;
          end else if (ureq_valid) begin
            r_req <= ureq;
            r_set <= in_set;
            if (ureq.op == MEM_AMO && !AMO_LOCAL) begin
              r_flush <= 1'b1; r_amo_fwd <= 1'b1; r_fmode <= FL_ALL;
              fl_idx  <= '0;
              fsm     <= S_FLUSH;
            end else if (in_hit) begin
              data[in_set][in_hway] <= apply_op(ureq, data[in_set][in_hway]);
              if (ureq.op != MEM_RD) dty[in_set][in_hway] <= 1'b1;
              ursp_valid <= 1'b1;
              ursp.rdata <= rsp_of(ureq, data[in_set][in_hway]);
            end else begin
              r_way <= in_victim;
              if (!in_has_inv) rr[in_set] <= rr[in_set] + 1'b1;
              if (!in_has_inv && dty[in_set][in_victim]) fsm <= S_WB_REQ;
              else if (ureq.op == MEM_WR && ureq.wmask == '1) begin
                vld[in_set][in_victim]  <= 1'b1;
                dty[in_set][in_victim]  <= 1'b1;
                tag[in_set][in_victim]  <= in_tag;
                kid[in_set][in_victim]  <= ureq.kid;
                data[in_set][in_victim] <= ureq.wdata;
                ursp_valid <= 1'b1;
                ursp.rdata <= '0;
              end else fsm <= S_FILL_REQ;
            end
          end
        end

        S_FLUSH: begin
          if (vld[fl_set][fl_way] && fl_match && dty[fl_set][fl_way]) begin
            r_set <= fl_set; r_way <= fl_way;
            fsm   <= S_WB_REQ;
          end else begin
            if (fl_match) vld[fl_set][fl_way] <= 1'b0;
            if (fl_idx == LN_W'(SETS * WAYS - 1)) begin
              r_flush <= 1'b0;
              if (r_amo_fwd) fsm <= S_FWD_REQ;
              else begin flush_done <= 1'b1; fsm <= S_IDLE; end
            end else fl_idx <= fl_idx + 1'b1;
          end
        end

        S_WB_REQ: if (dreq_ready) fsm <= S_WB_RSP;

        S_WB_RSP: if (drsp_valid) begin
          dty[r_set][r_way] <= 1'b0;
          if (r_flush) begin
            vld[r_set][r_way] <= 1'b0;
            fsm <= S_FLUSH;
          end else if (r_req.op == MEM_WR && r_req.wmask == '1) begin
            vld[r_set][r_way]  <= 1'b1;
            dty[r_set][r_way]  <= 1'b1;
            tag[r_set][r_way]  <= r_req.addr[ADDR_W-1 -: TAG_W];
            kid[r_set][r_way]  <= r_req.kid;
            data[r_set][r_way] <= r_req.wdata;
            ursp_valid <= 1'b1;
            ursp.rdata <= '0;
            fsm <= S_IDLE;
          end else begin
            vld[r_set][r_way] <= 1'b0;
            fsm <= S_FILL_REQ;
          end
        end

        S_FILL_REQ: if (dreq_ready) fsm <= S_FILL_RSP;

        S_FILL_RSP: if (drsp_valid) begin
          vld[r_set][r_way]  <= 1'b1;
          dty[r_set][r_way]  <= (r_req.op != MEM_RD);
          tag[r_set][r_way]  <= r_req.addr[ADDR_W-1 -: TAG_W];
          kid[r_set][r_way]  <= r_req.kid;
          data[r_set][r_way] <= apply_op(r_req, drsp.rdata);
          ursp_valid <= 1'b1;
          ursp.rdata <= rsp_of(r_req, drsp.rdata);
          fsm <= S_IDLE;
        end

        S_FWD_REQ: if (dreq_ready) fsm <= S_FWD_RSP;

        S_FWD_RSP: if (drsp_valid) begin
          ursp_valid <= 1'b1;
          ursp       <= drsp;
          fsm        <= S_IDLE;
        end

        default: fsm <= S_IDLE;
      endcase
    end
  end

  property p_dreq_stable;
    @(posedge clk) disable iff (!rst_n) dreq_valid && !dreq_ready |=> dreq_valid && $stable(dreq);
  endproperty
  assert property (p_dreq_stable);

endmodule
