// svp_icache: instruction cache with per-line lists of waiting threads.
//
// 1 kB, 4-way set associative, 64-byte lines (16 lines in 4 sets). Besides
// tag and data, each line keeps the head and tail of a list of threads (the
// links are in the thread table) waiting for the line to arrive, and a
// reference counter of threads bound to it, which keeps a line from being
// evicted while threads on the Active List still need it.
//
// I-cache check (one thread per cycle, from the head of the Ready List):
//   hit on a present line   -> chk_accept and chk_hit: the thread goes to the
//                              Active List; the line's counter goes up.
//   hit on a line in flight -> chk_accept: the thread joins the line's list
//                              (chk_link_* chains it behind the old tail).
//   miss                    -> a line of the set with counter 0 and no read
//                              in flight is reinitialised, its read is
//                              queued for the memory interface and the thread
//                              starts the line's list. If no line can be
//                              replaced, chk_accept stays low and the thread
//                              must be presented again.
// Line fill (mem response): data is stored and the whole list of the line is
// handed to the Active List on act_* in the same cycle.
// Release (rel_v): a thread left the pipeline; the line's counter goes down.
// Memory requests: req_v/req_addr/req_line until req_ack; one per line.
// rd_line/rd_data is a combinational read of a line for the pipeline.
// Organisation, lists and counters follow the description of the core;
// replacement order (lowest free way) is this design's own choice.
module svp_icache
  import svp_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // check
  input  logic                 chk_v,
  input  tid_t                 chk_tid,
  input  addr_t                chk_pc,
  output logic                 chk_accept,
  output logic                 chk_hit,
  output line_t                chk_line,
  output logic                 chk_link_v,
  output tid_t                 chk_link_from,
  output tid_t                 chk_link_to,
  // release
  input  logic                 rel_v,
  input  line_t                rel_line,
  // fill
  input  logic                 fill_v,
  input  line_t                fill_line,
  input  logic [LINE_BITS-1:0] fill_data,
  output logic                 act_v,
  output tid_t                 act_h,
  output tid_t                 act_t,
  // memory request
  output logic                 req_v,
  output addr_t                req_addr,
  output line_t                req_line,
  input  logic                 req_ack,
  // pipeline read
  input  line_t                rd_line,
  output logic [LINE_BITS-1:0] rd_data
);

  localparam int unsigned SET_W = $clog2(NSETS);
  localparam int unsigned TAG_W = 64 - SET_W - 6;
  typedef logic [TAG_W-1:0] tag_t;

  logic [LINE_BITS-1:0] data [NLINES];
  tag_t                 tag  [NLINES];
  logic                 vld  [NLINES];
  logic                 ldg  [NLINES];
  logic                 rqp  [NLINES];
  logic                 lst_v[NLINES];
  tid_t                 lst_h[NLINES], lst_t[NLINES];
  logic [TID_W:0]       refc [NLINES];

  logic [SET_W-1:0] set;
  tag_t             ctag;
  logic             hit_any, hit_ldg, vic_found;
  line_t            hit_line, vic_line;

  assign rd_data = data[rd_line];

  always_comb begin
    set = chk_pc[6 +: SET_W];
    ctag = chk_pc[63 -: TAG_W];
    hit_any = 1'b0; hit_line = '0; vic_found = 1'b0; vic_line = '0;
    for (int w = CACHE_WAYS - 1; w >= 0; w--) begin
      automatic line_t ln = line_t'(set * CACHE_WAYS + w);
      if ((vld[ln] || ldg[ln]) && tag[ln] == ctag) begin
        hit_any = 1'b1; hit_line = ln;
      end
      if (!ldg[ln] && refc[ln] == '0 && !(rel_v && rel_line == ln)) begin
        vic_found = 1'b1; vic_line = ln;
      end
    end
    // A line whose fill arrives this cycle counts as present.
    hit_ldg = hit_any && ldg[hit_line] && !(fill_v && fill_line == hit_line);
    chk_accept = chk_v && (hit_any || vic_found);
    chk_hit    = chk_v && hit_any && !hit_ldg;
    chk_line   = hit_any ? hit_line : vic_line;
    chk_link_v    = chk_v && hit_ldg && lst_v[hit_line];
    chk_link_from = lst_t[hit_line];
    chk_link_to   = chk_tid;
    act_v = fill_v && lst_v[fill_line];
    act_h = lst_h[fill_line];
    act_t = lst_t[fill_line];
    req_v = 1'b0; req_line = '0;
    for (int i = NLINES - 1; i >= 0; i--)
      if (rqp[i]) begin req_v = 1'b1; req_line = line_t'(i); end
    req_addr = {tag[req_line], req_line[LINE_W-1 -: SET_W] , 6'b0};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NLINES; i++) begin
        vld[i] <= 1'b0; ldg[i] <= 1'b0; rqp[i] <= 1'b0;
        lst_v[i] <= 1'b0; refc[i] <= '0;
      end
    end else begin
      for (int i = 0; i < NLINES; i++) begin
        automatic logic inc = chk_accept && chk_line == line_t'(i);
        automatic logic dec = rel_v && rel_line == line_t'(i);
        refc[i] <= refc[i] + (TID_W+1)'(inc) - (TID_W+1)'(dec);
      end
      if (req_v && req_ack) rqp[req_line] <= 1'b0;
      if (fill_v) begin
        vld[fill_line]   <= 1'b1;
        ldg[fill_line]   <= 1'b0;
        lst_v[fill_line] <= 1'b0;
      end
      if (chk_accept) begin
        if (!hit_any) begin
          // miss: reinitialise the victim and start its waiting list
          vld[vic_line]   <= 1'b0;
          ldg[vic_line]   <= 1'b1;
          rqp[vic_line]   <= 1'b1;
          lst_v[vic_line] <= 1'b1;
          lst_h[vic_line] <= chk_tid;
          lst_t[vic_line] <= chk_tid;
        end else if (hit_ldg) begin
          if (!lst_v[hit_line]) lst_h[hit_line] <= chk_tid;
          lst_v[hit_line] <= 1'b1;
          lst_t[hit_line] <= chk_tid;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (fill_v) data[fill_line] <= fill_data;
    if (chk_accept && !hit_any) tag[vic_line] <= ctag;
  end

endmodule
