// svp_dcache: data cache supporting decoupled loads through register lists.
//
// 1 kB, 4-way set associative, 64-byte lines (8 quadwords). Loads never
// block the pipeline on a miss. When a load misses, the load details (byte
// offset in the line and size: 8 bytes, or 4 bytes sign-extended) and a link to the next register waiting on the same
// line are stored in the target register itself (svp_pkg::nf_reg_t, written
// by the pipeline with WR_LOAD using ld_nf), and the line keeps the head of
// that list of registers. When the line arrives from memory, a walker visits
// the list, one register per cycle, and writes each register with its word
// (WR_DATA), which also wakes any thread suspended on it.
//
// Interface:
//   ld_*  lookup (combinational): ld_hit with ld_data, or ld_miss_ok with
//         ld_nf for the target register, or neither (no line can be
//         replaced: retry). State changes only with ld_commit.
//   st_*  quadword store. The cache is write-through without allocation: a
//         present line is updated and the write goes to a one-entry buffer
//         that issues a memory write tagged with the family number, so the
//         family's outstanding-write counter can be decremented on the ack.
//         st_ready is low while the buffer is full.
//   fill_* line data from memory (tag index = line).
//   wk_*  walker: wk_v/wk_addr/wk_data is a register write request, done
//         when wk_grant; wk_nf is the walked register's current contents.
//   req_* memory request (line reads first, then the store buffer).
// Per-line register lists, write acknowledgement and tags follow the
// description of the core; write-through/no-allocate, the one-entry store
// buffer and the lowest-free-way replacement are this design's own choices.
module svp_dcache
  import svp_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // load
  input  logic                 ld_v,
  input  addr_t                ld_addr,
  input  logic                 ld_long,
  input  ra_t                  ld_dst,
  input  logic                 ld_commit,
  output logic                 ld_hit,
  output word_t                ld_data,
  output logic                 ld_miss_ok,
  output nf_reg_t              ld_nf,
  // store
  input  logic                 st_commit,
  input  addr_t                st_addr,
  input  word_t                st_data,
  input  fid_t                 st_fid,
  output logic                 st_ready,
  // fill
  input  logic                 fill_v,
  input  line_t                fill_line,
  input  logic [LINE_BITS-1:0] fill_data,
  // register-list walker
  output logic                 wk_v,
  output ra_t                  wk_addr,
  output word_t                wk_data,
  input  nf_reg_t              wk_nf,
  input  logic                 wk_grant,
  // memory request
  output logic                 req_v,
  output mem_req_t             req,
  input  logic                 req_ack
);

  localparam int unsigned SET_W = $clog2(NSETS);
  localparam int unsigned TAG_W = 64 - SET_W - 6;
  typedef logic [TAG_W-1:0] tag_t;

  logic [LINE_BITS-1:0] data [NLINES];
  tag_t                 tag  [NLINES];
  logic                 vld  [NLINES];
  logic                 ldg  [NLINES];
  logic                 rqp  [NLINES];
  logic                 wkp  [NLINES];
  logic                 lst_v[NLINES];
  ra_t                  lst_h[NLINES];

  logic  wk_act;
  line_t wk_line;
  ra_t   wk_reg;

  logic     sb_v;
  mem_req_t sb;

  // ---- load lookup ----
  logic [SET_W-1:0] set;
  tag_t             ctag;
  logic             hit_any, vic_found, hit_fill, hit_ldg;
  line_t            hit_line, vic_line;

  // The loaded value: the quadword at off[5:3], or its longword at off[2]
  // sign-extended.
  function automatic word_t pick(logic [LINE_BITS-1:0] l, logic [5:0] off, logic lng);
    word_t q = l[64*off[5:3] +: 64];
    logic [31:0] h = off[2] ? q[63:32] : q[31:0];
    return lng ? {{32{h[31]}}, h} : q;
  endfunction

  always_comb begin
    set  = ld_addr[6 +: SET_W];
    ctag = ld_addr[63 -: TAG_W];
    hit_any = 1'b0; hit_line = '0; vic_found = 1'b0; vic_line = '0;
    for (int w = CACHE_WAYS - 1; w >= 0; w--) begin
      automatic line_t ln = line_t'(set * CACHE_WAYS + w);
      if ((vld[ln] || ldg[ln]) && tag[ln] == ctag) begin
        hit_any = 1'b1; hit_line = ln;
      end
      if (!ldg[ln] && !wkp[ln] && !(wk_act && wk_line == ln)) begin
        vic_found = 1'b1; vic_line = ln;
      end
    end
    hit_fill = hit_any && ldg[hit_line] && fill_v && fill_line == hit_line;
    hit_ldg  = hit_any && ldg[hit_line] && !hit_fill;
    ld_hit   = ld_v && hit_any && !hit_ldg;
    ld_data  = pick(hit_fill ? fill_data : data[hit_line], ld_addr[5:0], ld_long);
    ld_miss_ok = ld_v && !ld_hit && (hit_ldg || vic_found);
    ld_nf = '0;
    ld_nf.ld_off    = ld_addr[5:0];
    ld_nf.ld_long   = ld_long;
    ld_nf.ld_next   = hit_ldg ? lst_h[hit_line] : '0;
    ld_nf.ld_next_v = hit_ldg && lst_v[hit_line];
  end

  // ---- walker ----
  logic  wk_pick_v;
  line_t wk_pick;
  always_comb begin
    wk_pick_v = 1'b0; wk_pick = '0;
    for (int i = NLINES - 1; i >= 0; i--)
      if (wkp[i]) begin wk_pick_v = 1'b1; wk_pick = line_t'(i); end
    wk_v    = wk_act;
    wk_addr = wk_reg;
    wk_data = pick(data[wk_line], wk_nf.ld_off, wk_nf.ld_long);
  end

  // ---- memory requests ----
  logic  rq_line_v;
  line_t rq_line;
  always_comb begin
    rq_line_v = 1'b0; rq_line = '0;
    for (int i = NLINES - 1; i >= 0; i--)
      if (rqp[i]) begin rq_line_v = 1'b1; rq_line = line_t'(i); end
    req_v = rq_line_v || sb_v;
    if (rq_line_v) begin
      req.tag.kind  = TAG_DREAD;
      req.tag.index = TAGIX_W'(rq_line);
      req.addr      = {tag[rq_line], rq_line[LINE_W-1 -: SET_W], 6'b0};
      req.wdata     = '0;
    end else begin
      req = sb;
    end
    st_ready = !sb_v;
  end

  logic st_hit;
  line_t st_line;
  always_comb begin
    st_hit = 1'b0; st_line = '0;
    for (int w = 0; w < CACHE_WAYS; w++) begin
      automatic line_t ln = line_t'(st_addr[6 +: SET_W] * CACHE_WAYS + w);
      if (vld[ln] && tag[ln] == st_addr[63 -: TAG_W]) begin st_hit = 1'b1; st_line = ln; end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NLINES; i++) begin
        vld[i] <= 1'b0; ldg[i] <= 1'b0; rqp[i] <= 1'b0; wkp[i] <= 1'b0; lst_v[i] <= 1'b0;
      end
      wk_act <= 1'b0;
      sb_v   <= 1'b0;
    end else begin
      if (req_v && req_ack) begin
        if (rq_line_v) rqp[rq_line] <= 1'b0;
        else           sb_v <= 1'b0;
      end
      if (st_commit) begin
        sb_v <= 1'b1;
        sb.tag.kind  <= TAG_WRITE;
        sb.tag.index <= TAGIX_W'(st_fid);
        sb.addr      <= st_addr;
        sb.wdata     <= st_data;
      end
      if (fill_v) begin
        vld[fill_line] <= 1'b1;
        ldg[fill_line] <= 1'b0;
        wkp[fill_line] <= lst_v[fill_line];
      end
      // walker
      if (wk_act && wk_grant) begin
        if (wk_nf.ld_next_v) wk_reg <= wk_nf.ld_next;
        else begin
          wk_act <= 1'b0;
          lst_v[wk_line] <= 1'b0;
        end
      end
      if ((!wk_act || (wk_grant && !wk_nf.ld_next_v)) && wk_pick_v) begin
        wk_act  <= 1'b1;
        wk_line <= wk_pick;
        wk_reg  <= lst_h[wk_pick];
        wkp[wk_pick] <= 1'b0;
      end
      if (ld_commit && ld_miss_ok) begin
        if (hit_ldg) begin
          lst_h[hit_line] <= ld_dst;
        end else begin
          vld[vic_line]   <= 1'b0;
          ldg[vic_line]   <= 1'b1;
          rqp[vic_line]   <= 1'b1;
          lst_v[vic_line] <= 1'b1;
          lst_h[vic_line] <= ld_dst;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (fill_v) data[fill_line] <= fill_data;
    if (st_commit && st_hit) data[st_line][64*st_addr[5:3] +: 64] <= st_data;
    if (ld_commit && ld_miss_ok && !hit_ldg) tag[vic_line] <= ctag;
  end

  a_store_buffer_free: assert property (@(posedge clk) disable iff (!rst_n)
    st_commit |-> !sb_v);

endmodule
