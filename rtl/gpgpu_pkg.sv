// gpgpu_pkg: types and constants shared by the GPGPU memory hierarchy and
// the per-lane front end.
//
// Every level below the lane (tinyCache, coalescer, SM-L1, IL1, SM-L2, shared
// TLB) talks through one request/response pair: a request carries a whole
// 64-byte line with a byte mask, and every request is answered by exactly
// one response. Addresses are byte addresses; line requests use the line's
// base address. The 64-byte line follows the document's cache tables; the
// 32-bit virtual and physical addresses, the 4 KiB page and the encodings are
// this design's own choices.
package gpgpu_pkg;

  localparam int unsigned ADDR_W      = 32;              // virtual and physical address width
  localparam int unsigned LINE_BYTES  = 64;              // line size at every level
  localparam int unsigned LINE_BITS   = LINE_BYTES * 8;
  localparam int unsigned LINE_HW     = LINE_BYTES / 2;  // half-words per line
  localparam int unsigned OFF_W       = $clog2(LINE_BYTES);
  localparam int unsigned KID_W       = 2;               // log2(4 SMs) kernel-id bits
  localparam int unsigned PAGE_OFF_W  = 12;              // 4 KiB pages
  localparam int unsigned VPN_W       = ADDR_W - PAGE_OFF_W;

  typedef logic [LINE_BITS-1:0]  line_t;
  typedef logic [LINE_BYTES-1:0] bmask_t;
  typedef logic [ADDR_W-1:0]     addr_t;
  typedef logic [KID_W-1:0]      kid_t;
  typedef logic [VPN_W-1:0]      vpn_t;

  // Address space of a data reference.
  typedef enum logic {SP_GLOBAL = 1'b0, SP_SHARED = 1'b1} space_e;

  // Operations between memory levels.
  //  MEM_RD : read a line, response carries it
  //  MEM_WR : write the bytes selected by wmask, response is an acknowledge
  //  MEM_AMO: atomic add of wdata[31:0] to the 32-bit word at addr, response
  //           carries the old word in rdata[31:0]
  typedef enum logic [1:0] {MEM_RD = 2'd0, MEM_WR = 2'd1, MEM_AMO = 2'd2} mem_op_e;

  typedef struct packed {
    mem_op_e op;
    space_e  space;
    kid_t    kid;
    addr_t   addr;
    line_t   wdata;
    bmask_t  wmask;
  } mem_req_t;

  typedef struct packed {
    line_t rdata;
  } mem_rsp_t;

  // Operations a lane issues to its tinyCache.
  typedef enum logic [1:0] {LN_LD = 2'd0, LN_ST = 2'd1, LN_AMO = 2'd2} lane_op_e;

  // Access size in bytes: 1, 2 or 4, naturally aligned.
  typedef enum logic [1:0] {SZ_B = 2'd0, SZ_H = 2'd1, SZ_W = 2'd2} size_e;

  typedef struct packed {
    lane_op_e    op;
    space_e      space;
    size_e       size;
    addr_t       addr;
    logic [31:0] wdata;
  } lane_req_t;

  // Cache flush commands (write back dirty lines, then invalidate).
  typedef enum logic [1:0] {FL_ALL = 2'd0, FL_KID = 2'd1, FL_PAGE = 2'd2} flush_mode_e;

  // Instruction classes reported by a lane when an instruction retires,
  // used by the warp scheduler to decide on a warp switch.
  typedef enum logic [2:0] {
    IC_ALU = 3'd0, IC_MEM = 3'd1, IC_BRA = 3'd2, IC_BAR = 3'd3, IC_EXIT = 3'd4
  } iclass_e;

  // Warp switch triggers.
  typedef enum logic [2:0] {
    TRIG_NON = 3'd0, TRIG_MEM = 3'd1, TRIG_BRA = 3'd2, TRIG_MBR = 3'd3, TRIG_ALL = 3'd4
  } trigger_e;

  // Byte-select mask of an aligned access inside a line.
  function automatic bmask_t access_bmask(addr_t a, size_e s);
    bmask_t m;
    logic [OFF_W-1:0] o;
    m = '0;
    o = a[OFF_W-1:0];
    unique case (s)
      SZ_B:    m[o] = 1'b1;
      SZ_H:    begin m[{o[OFF_W-1:1], 1'b0}] = 1'b1; m[{o[OFF_W-1:1], 1'b1}] = 1'b1; end
      default: for (int i = 0; i < 4; i++) m[{o[OFF_W-1:2], 2'(i)}] = 1'b1;
    endcase
    return m;
  endfunction

  // Place a 32-bit store value at its byte lanes within a line.
  function automatic line_t place_word(addr_t a, logic [31:0] d);
    line_t l;
    l = '0;
    for (int w = 0; w < LINE_BYTES / 4; w++)
      if (a[OFF_W-1:2] == (OFF_W-2)'(w)) l[w*32 +: 32] = d;
    return l;
  endfunction

  // Extract the 32-bit word holding byte address a from a line.
  function automatic logic [31:0] pick_word(addr_t a, line_t l);
    logic [31:0] d;
    d = '0;
    for (int w = 0; w < LINE_BYTES / 4; w++)
      if (a[OFF_W-1:2] == (OFF_W-2)'(w)) d = l[w*32 +: 32];
    return d;
  endfunction

  // Merge the bytes selected by m from n over o.
  function automatic line_t merge_line(line_t o, line_t n, bmask_t m);
    line_t r;
    for (int i = 0; i < LINE_BYTES; i++) r[i*8 +: 8] = m[i] ? n[i*8 +: 8] : o[i*8 +: 8];
    return r;
  endfunction

  // Expand a per-half-word mask to a byte mask.
  function automatic bmask_t hw_to_bmask(logic [LINE_HW-1:0] h);
    bmask_t m;
    for (int i = 0; i < LINE_HW; i++) begin m[2*i] = h[i]; m[2*i+1] = h[i]; end
    return m;
  endfunction

  function automatic addr_t line_base(addr_t a);
    return {a[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};
  endfunction

endpackage
