// svp_thread_table: the Thread Table and the thread lists built on it.
//
// Each entry holds the non-register state of one thread (svp_pkg::thread_t:
// PC, family, register-context slot, first/last flags, bound I-cache line)
// and one link field. Thread states are kept as singly linked lists through
// that link field, so a whole list of threads can be moved to another list in
// one cycle by splicing head and tail. Three queues are kept here:
//   LST_FREE   empty entries, available to the thread creation process
//   LST_READY  threads that need their I-cache line checked
//   LST_ACTIVE threads whose line is present, waiting for the pipeline
// Lists that live elsewhere (threads suspended on a register, threads
// waiting for an I-cache line) share the same link field; their owners only
// keep head and tail and ask for links through the link_* ports.
//
// Interface, per list l: head_v/head give the front element; pop[l] removes
// it at the clock edge; app_v[l][a] appends the chain app_h..app_t (already
// linked, or a single thread with app_h == app_t). Pops take effect before
// appends, and appends are applied in port order, all in one cycle.
// Entry fields are read combinationally on two ports and written on three:
// a full-entry write (creation), a PC write and an I-cache line write.
// After reset every entry is on the free list in index order.
// The linked-list organisation is the one described for the core; the port
// structure is this design's own.
module svp_thread_table
  import svp_pkg::*;
#(
  parameter int unsigned NT   = NTHREADS,
  parameter int unsigned NAPP = 3
) (
  input  logic    clk,
  input  logic    rst_n,
  // lists
  input  logic    pop    [3],
  output logic    head_v [3],
  output tid_t    head   [3],
  input  logic    app_v  [3][NAPP],
  input  tid_t    app_h  [3][NAPP],
  input  tid_t    app_t  [3][NAPP],
  input  logic    link_v    [2],
  input  tid_t    link_from [2],
  input  tid_t    link_to   [2],
  // entry fields
  input  tid_t    rd_tid   [2],
  output thread_t rd_entry [2],
  input  logic    wr_init,
  input  tid_t    wr_init_tid,
  input  thread_t wr_init_entry,
  input  logic    wr_pc,
  input  tid_t    wr_pc_tid,
  input  addr_t   wr_pc_val,
  input  logic    wr_cline,
  input  tid_t    wr_cline_tid,
  input  line_t   wr_cline_val
);

  localparam int LST_FREE = 0, LST_READY = 1, LST_ACTIVE = 2;

  thread_t ent [NT];
  tid_t    nxt [NT];
  tid_t    lh [3], lt [3];
  logic    lv [3];

  always_comb begin
    for (int l = 0; l < 3; l++) begin
      head_v[l] = lv[l];
      head[l]   = lh[l];
    end
    for (int r = 0; r < 2; r++) rd_entry[r] = ent[rd_tid[r]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NT; i++) nxt[i] <= tid_t'((i + 1) % NT);
      for (int l = 0; l < 3; l++) begin
        lh[l] <= '0;
        lt[l] <= '0;
        lv[l] <= 1'b0;
      end
      lh[LST_FREE] <= '0;
      lt[LST_FREE] <= tid_t'(NT - 1);
      lv[LST_FREE] <= 1'b1;
    end else begin
      for (int l = 0; l < 3; l++) begin
        automatic tid_t h = lh[l];
        automatic tid_t t = lt[l];
        automatic logic v = lv[l];
        if (pop[l] && v) begin
          if (h == t) v = 1'b0;
          else        h = nxt[h];
        end
        for (int a = 0; a < NAPP; a++) begin
          if (app_v[l][a]) begin
            if (!v) h = app_h[l][a];
            else    nxt[t] <= app_h[l][a];
            t = app_t[l][a];
            v = 1'b1;
          end
        end
        lh[l] <= h;
        lt[l] <= t;
        lv[l] <= v;
      end
      for (int k = 0; k < 2; k++)
        if (link_v[k]) nxt[link_from[k]] <= link_to[k];
    end
  end

  always_ff @(posedge clk) begin
    if (wr_init) ent[wr_init_tid] <= wr_init_entry;
    if (wr_pc) ent[wr_pc_tid].pc <= wr_pc_val;
    if (wr_cline) ent[wr_cline_tid].cline <= wr_cline_val;
  end

  a_pop_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
    pop[LST_ACTIVE] |-> lv[LST_ACTIVE]);

endmodule
