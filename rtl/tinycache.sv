// tinycache: per-lane incoherent data cache (TC-D) with a write-validate,
// write-on-miss, write-back policy.
//
// Each line holds one control bit per half-word plus a two-bit state:
//   I   invalid
//   C   clean; the whole line was fetched, control bits are don't-care
//   DV  dirty, all half-words valid; a set control bit marks a dirty half-word
//   DPV dirty, partially valid; only half-words with a set control bit are
//       valid, and they are all dirty
// A read miss fetches the line (-> C). A write miss allocates without a fetch
// (-> DPV, control bits = written half-words). A write hit on C goes to DV; on
// DV/DPV it sets the written control bits, and DPV becomes DV when the last
// invalid half-word is written. A read of an invalid half-word of a DPV line
// fetches the line, merges it under the dirty half-words and goes to DV.
// Evicting a DV or DPV line writes back only the half-words whose control
// bit is set (a byte-masked line write), so lanes that share a line never
// need invalidations or updates between them.
// Atomics and single-byte stores are not cached: a cached copy of the line
// is evicted first, then the access goes to the next level. References to
// an address space whose caching is disabled (cache_global / cache_shared)
// bypass the cache without allocating. flush_req (barrier, end of a thread
// block, memory fence) writes back every dirty line and invalidates all.
//
// Interface: one lane request at a time (lreq_valid/lreq_ready); every
// request, load or store, gets exactly one lrsp_valid pulse, loads returning
// the aligned 32-bit word that holds the address. A hit answers in the next
// cycle (the document's 1-cycle tinyCache). Misses use the mreq/mrsp line
// port, one outstanding request. Store data arrive in their byte lanes of
// the 32-bit word.
//
// From the document: the four states and their transitions, half-word
// control bits, write-back of valid dirty half-words, no caching of atomics
// and byte stores, eviction of all lines on a barrier, 16 entries of 64 B,
// 8-way (Table 5.1). This design's own choices: round-robin victim choice,
// eviction of a cached line before an atomic, one outstanding miss.
module tinycache
  import gpgpu_pkg::*;
#(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned WAYS    = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      cache_global,   // cache global references
  input  logic      cache_shared,   // cache scratchpad references
  input  logic      flush_req,      // write back and invalidate all lines
  output logic      flush_done,     // pulse when the flush has completed
  input  logic      lreq_valid,
  output logic      lreq_ready,
  input  lane_req_t lreq,
  output logic      lrsp_valid,
  output logic [31:0] lrsp_data,
  output logic      mreq_valid,
  input  logic      mreq_ready,
  output mem_req_t  mreq,
  input  logic      mrsp_valid,
  input  mem_rsp_t  mrsp
);
  localparam int unsigned SETS  = ENTRIES / WAYS;
  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned IDX_W = $clog2(ENTRIES);
  localparam int unsigned TAG_W = ADDR_W - OFF_W - SET_W;

  typedef enum logic [1:0] {L_I = 2'd0, L_C = 2'd1, L_DV = 2'd2, L_DPV = 2'd3} lstate_e;
  typedef enum logic [3:0] {
    S_IDLE, S_WB_REQ, S_WB_RSP, S_FILL_REQ, S_FILL_RSP, S_BYP_REQ, S_BYP_RSP, S_FLUSH
  } fsm_e;
  typedef enum logic [1:0] {NX_FILL, NX_ALLOC, NX_BYP} next_e;

  lstate_e            st   [SETS][WAYS];
  logic [LINE_HW-1:0] ctrl [SETS][WAYS];
  logic [TAG_W-1:0]   tag  [SETS][WAYS];
  space_e             tsp  [SETS][WAYS];
  line_t              data [SETS][WAYS];
  logic [WAY_W-1:0]   rr   [SETS];

  fsm_e              fsm;
  next_e             nxt;
  lane_req_t         r_req;
  logic [SET_W-1:0]  r_set;
  logic [WAY_W-1:0]  r_way;
  logic              r_flush;
  logic [IDX_W-1:0]  fl_idx;

  // ---- lookup of the incoming request ----
  logic [SET_W-1:0] in_set;
  logic [TAG_W-1:0] in_tag;
  logic             in_hit, in_has_inv;
  logic [WAY_W-1:0] in_hway, in_iway;
  bmask_t           in_bm;
  logic [LINE_HW-1:0] in_hwm;
  logic             in_cacheable;

  assign in_set = lreq.addr[OFF_W +: SET_W];
  assign in_tag = lreq.addr[ADDR_W-1 -: TAG_W];
  assign in_bm  = access_bmask(lreq.addr, lreq.size);
  assign in_cacheable = (lreq.space == SP_GLOBAL) ? cache_global : cache_shared;

  always_comb begin
    for (int i = 0; i < LINE_HW; i++) in_hwm[i] = in_bm[2*i] | in_bm[2*i+1];
    in_hit = 1'b0; in_hway = '0; in_has_inv = 1'b0; in_iway = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (st[in_set][w] != L_I && tag[in_set][w] == in_tag && tsp[in_set][w] == lreq.space) begin
        in_hit = 1'b1; in_hway = WAY_W'(w);
      end
      if (st[in_set][w] == L_I) begin in_has_inv = 1'b1; in_iway = WAY_W'(w); end
    end
  end

  logic [WAY_W-1:0] in_victim;
  assign in_victim = in_has_inv ? in_iway : rr[in_set];

  lstate_e            h_st;
  logic [LINE_HW-1:0] h_ctrl;
  line_t              h_data;
  assign h_st   = st[in_set][in_hway];
  assign h_ctrl = ctrl[in_set][in_hway];
  assign h_data = data[in_set][in_hway];

  // flush scan position
  logic [SET_W-1:0] fl_set;
  logic [WAY_W-1:0] fl_way;
  assign fl_set = SET_W'(fl_idx / IDX_W'(WAYS));
  assign fl_way = WAY_W'(fl_idx % IDX_W'(WAYS));

  assign lreq_ready = (fsm == S_IDLE) && !flush_req;

  // ---- memory-side request ----
  always_comb begin
    mreq_valid = 1'b0;
    mreq       = '0;
    mreq.space = r_req.space;
    unique case (fsm)
      S_WB_REQ: begin
        mreq_valid = 1'b1;
        mreq.op    = MEM_WR;
        mreq.space = tsp[r_set][r_way];
        mreq.addr  = {tag[r_set][r_way], r_set, {OFF_W{1'b0}}};
        mreq.wdata = data[r_set][r_way];
        mreq.wmask = hw_to_bmask(ctrl[r_set][r_way]);
      end
      S_FILL_REQ: begin
        mreq_valid = 1'b1;
        mreq.op    = MEM_RD;
        mreq.addr  = line_base(r_req.addr);
      end
      S_BYP_REQ: begin
        mreq_valid = 1'b1;
        unique case (r_req.op)
          LN_LD:   begin mreq.op = MEM_RD; mreq.addr = line_base(r_req.addr); end
          LN_ST:   begin
            mreq.op    = MEM_WR;
            mreq.addr  = line_base(r_req.addr);
            mreq.wdata = place_word(r_req.addr, r_req.wdata);
            mreq.wmask = access_bmask(r_req.addr, r_req.size);
          end
          default: begin
            mreq.op    = MEM_AMO;
            mreq.addr  = {r_req.addr[ADDR_W-1:2], 2'b00};
            mreq.wdata = LINE_BITS'(r_req.wdata);
          end
        endcase
      end
      default: ;
    endcase
  end

  // ---- state machine and arrays ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm        <= S_IDLE;
      nxt        <= NX_FILL;
      r_req      <= '0;
      r_set      <= '0;
      r_way      <= '0;
      r_flush    <= 1'b0;
      fl_idx     <= '0;
      lrsp_valid <= 1'b0;
      lrsp_data  <= '0;
      flush_done <= 1'b0;
      for (int s = 0; s < SETS; s++) begin
        rr[s] <= '0;
        for (int w = 0; w < WAYS; w++) begin
          st[s][w]   <= L_I;
          ctrl[s][w] <= '0;
          tag[s][w]  <= '0;
          tsp[s][w]  <= SP_GLOBAL;
          data[s][w] <= '0;
        end
      end
    end else begin
      lrsp_valid <= 1'b0;
      flush_done <= 1'b0;
      unique case (fsm)
        S_IDLE: begin
          if (flush_req) begin
            r_flush <= 1'b1;
            fl_idx  <= '0;
            fsm     <= S_FLUSH;
          end else if (lreq_valid) begin
            r_req <= lreq;
            r_set <= in_set;
            if (!in_cacheable) begin
              fsm <= S_BYP_REQ;
            end else if (lreq.op == LN_AMO || (lreq.op == LN_ST && lreq.size == SZ_B)) begin
              // not cached: evict a cached copy first, then go around the cache
              if (in_hit) begin
                r_way <= in_hway;
                if (h_st == L_DV || h_st == L_DPV) begin
                  nxt <= NX_BYP;
                  fsm <= S_WB_REQ;
                end else begin
                  st[in_set][in_hway] <= L_I;
                  fsm <= S_BYP_REQ;
                end
              end else begin
                fsm <= S_BYP_REQ;
              end
            end else if (in_hit) begin
              r_way <= in_hway;
              if (lreq.op == LN_LD) begin
                if (h_st == L_DPV && (h_ctrl & in_hwm) != in_hwm) begin
                  fsm <= S_FILL_REQ;                      // rh(i)
                end else begin
                  lrsp_valid <= 1'b1;                     // rh / rh(v)
                  lrsp_data  <= pick_word(lreq.addr, h_data);
                end
              end else begin
                data[in_set][in_hway] <= merge_line(h_data, place_word(lreq.addr, lreq.wdata), in_bm);
                unique case (h_st)
                  L_C:     begin st[in_set][in_hway] <= L_DV; ctrl[in_set][in_hway] <= in_hwm; end
                  L_DV:    ctrl[in_set][in_hway] <= h_ctrl | in_hwm;
                  default: begin
                    ctrl[in_set][in_hway] <= h_ctrl | in_hwm;
                    if ((h_ctrl | in_hwm) == '1) st[in_set][in_hway] <= L_DV;  // wh(last)
                  end
                endcase
                lrsp_valid <= 1'b1;
              end
            end else begin
              // rm / wm: choose a victim, write it back if dirty
              r_way <= in_victim;
              if (!in_has_inv) rr[in_set] <= rr[in_set] + 1'b1;
              nxt <= (lreq.op == LN_LD) ? NX_FILL : NX_ALLOC;
              if (!in_has_inv && (st[in_set][in_victim] == L_DV || st[in_set][in_victim] == L_DPV))
                fsm <= S_WB_REQ;
              else if (lreq.op == LN_LD)
                fsm <= S_FILL_REQ;
              else begin
                // write miss into a free or clean way: allocate without fetch
                st[in_set][in_victim]   <= L_DPV;
                ctrl[in_set][in_victim] <= in_hwm;
                tag[in_set][in_victim]  <= in_tag;
                tsp[in_set][in_victim]  <= lreq.space;
                data[in_set][in_victim] <= place_word(lreq.addr, lreq.wdata);
                lrsp_valid <= 1'b1;
              end
            end
          end
        end

        S_FLUSH: begin
          if (st[fl_set][fl_way] == L_DV || st[fl_set][fl_way] == L_DPV) begin
            r_set <= fl_set;
            r_way <= fl_way;
            fsm   <= S_WB_REQ;
          end else begin
            st[fl_set][fl_way] <= L_I;
            if (fl_idx == IDX_W'(ENTRIES - 1)) begin
              r_flush    <= 1'b0;
              flush_done <= 1'b1;
              fsm        <= S_IDLE;
            end else begin
              fl_idx <= fl_idx + 1'b1;
            end
          end
        end

        S_WB_REQ: if (mreq_ready) fsm <= S_WB_RSP;

        S_WB_RSP: if (mrsp_valid) begin
          st[r_set][r_way] <= L_I;                        // rpl : wb(v)
          if (r_flush) begin
            fsm <= S_FLUSH;                               // S_FLUSH revisits this (now invalid) entry
          end else begin
            unique case (nxt)
              NX_FILL: fsm <= S_FILL_REQ;
              NX_BYP:  fsm <= S_BYP_REQ;
              default: begin
                st[r_set][r_way]   <= L_DPV;
                ctrl[r_set][r_way] <= in_hwm_r();
                tag[r_set][r_way]  <= r_req.addr[ADDR_W-1 -: TAG_W];
                tsp[r_set][r_way]  <= r_req.space;
                data[r_set][r_way] <= place_word(r_req.addr, r_req.wdata);
                lrsp_valid <= 1'b1;
                fsm <= S_IDLE;
              end
            endcase
          end
        end

        S_FILL_REQ: if (mreq_ready) fsm <= S_FILL_RSP;

        S_FILL_RSP: if (mrsp_valid) begin
          if (st[r_set][r_way] == L_DPV && tag[r_set][r_way] == r_req.addr[ADDR_W-1 -: TAG_W]
              && tsp[r_set][r_way] == r_req.space) begin
            // rh(i): merge memory under the dirty half-words, line becomes DV
            data[r_set][r_way] <= merge_line(mrsp.rdata, data[r_set][r_way],
                                             hw_to_bmask(ctrl[r_set][r_way]));
            st[r_set][r_way]   <= L_DV;
            lrsp_data <= pick_word(r_req.addr,
                           merge_line(mrsp.rdata, data[r_set][r_way], hw_to_bmask(ctrl[r_set][r_way])));
          end else begin
            data[r_set][r_way] <= mrsp.rdata;             // rm: line becomes C
            st[r_set][r_way]   <= L_C;
            ctrl[r_set][r_way] <= '0;
            tag[r_set][r_way]  <= r_req.addr[ADDR_W-1 -: TAG_W];
            tsp[r_set][r_way]  <= r_req.space;
            lrsp_data <= pick_word(r_req.addr, mrsp.rdata);
          end
          lrsp_valid <= 1'b1;
          fsm <= S_IDLE;
        end

        S_BYP_REQ: if (mreq_ready) fsm <= S_BYP_RSP;

        S_BYP_RSP: if (mrsp_valid) begin
          lrsp_valid <= 1'b1;
          lrsp_data  <= (r_req.op == LN_AMO) ? mrsp.rdata[31:0] : pick_word(r_req.addr, mrsp.rdata);
          fsm <= S_IDLE;
        end

        default: fsm <= S_IDLE;
      endcase
    end
  end

  // half-words written by the captured request
  function automatic logic [LINE_HW-1:0] in_hwm_r();
    bmask_t b;
    logic [LINE_HW-1:0] h;
    b = access_bmask(r_req.addr, r_req.size);
    for (int i = 0; i < LINE_HW; i++) h[i] = b[2*i] | b[2*i+1];
    return h;
  endfunction

  // A memory request must hold still until it is accepted.
  property p_mreq_stable;
    @(posedge clk) disable iff (!rst_n) mreq_valid && !mreq_ready |=> mreq_valid && $stable(mreq);
  endproperty
  assert property (p_mreq_stable);

endmodule
