// svp_core: one microthreaded processor core implementing the SVP model.
//
// The core interleaves many threads in one in-order pipeline and never
// stalls on a long-latency result: a thread that needs a value that is not
// there yet (a load in flight, a shared channel not yet written by its
// predecessor) is suspended on that register and the pipeline carries on
// with another thread. Threads move between lists kept in the thread table:
//
//   creation -> Ready List -> I-cache check -> Active List -> pipeline
//                  ^   ^            |  (line in flight: waits on the line,
//                  |   |            |   joins the Active List on arrival)
//                  |   +-- wake ----+-- register written (was suspended)
//                  +------ switch (SWCH, branch, end of cache line)
//
// Blocks: svp_reg_file (state bits, suspended lists), svp_thread_table
// (entries, Ready/Active/free lists), svp_family_table (families, thread
// creation, context release, completion), svp_icache, svp_dcache
// (decoupled loads), svp_reg_map (Global/Shared/Local/Dependent windows),
// svp_annot_decode (SWCH/END annotations) and svp_alu.
//
// Execution: the pipeline is modelled as a single stage. Each cycle it
// executes one instruction of the running thread: operands are read through
// the register window; if one is not FULL the thread is suspended on it
// (its PC kept, so the instruction is retried when woken). Otherwise the
// instruction completes. The thread leaves the pipeline after an instruction
// annotated END (terminates) or SWCH, after any branch, and after the last
// instruction of its cache line (these go back to the Ready List). When a
// thread leaves, the next thread is taken from the Active List in the same
// cycle, so a switch costs no cycle. The instruction set is a subset of the
// Alpha integer ISA (operate group of svp_alu, LDA, LDL, LDQ, STQ, BR, BEQ,
// BNE).
//
// External ports: family creation (the parent thread is outside the core;
// its registers are written and read through the host register port),
// family completion (sync), the tagged memory interface (responses may come
// in any order) and a vector of event pulses.
//
// Register-file write priority: D-cache walker, host, creation process,
// pipeline; the pipeline holds its instruction when it loses. Memory
// request priority: I-cache, then D-cache.
// The thread flow, the switch conditions, the annotations, register
// mapping and tags follow the description of the core. The single-stage
// pipeline, the instruction subset, the host ports and the priorities are
// this design's own.
module svp_core
  import svp_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // family creation
  input  logic     cr_v,
  input  addr_t    cr_pc,
  input  word_t    cr_start,
  input  word_t    cr_step,
  input  word_t    cr_limit,
  input  window_t  cr_win,
  output logic     cr_ack,
  output fid_t     cr_fid,
  // family completion
  output logic     done_v,
  output fid_t     done_fid,
  // host register access (parent's globals and shareds)
  input  logic     hw_v,
  input  ra_t      hw_addr,
  input  word_t    hw_data,
  output logic     hw_grant,
  input  ra_t      hr_addr,
  output word_t    hr_data,
  output reg_state_e hr_state,
  // memory interface
  output logic     mem_req_v,
  output mem_req_t mem_req,
  input  logic     mem_req_ready,
  input  logic     mem_rsp_v,
  input  mem_rsp_t mem_rsp,
  // events
  output core_ev_t ev
);

  localparam int LST_FREE = 0, LST_READY = 1, LST_ACTIVE = 2;

  // ------------------------------------------------------------------
  // register file
  ra_t        rf_rd_addr  [4];
  word_t      rf_rd_data  [4];
  reg_state_e rf_rd_state [4];
  logic       rf_wr_en;
  wr_op_e     rf_wr_op;
  ra_t        rf_wr_addr;
  word_t      rf_wr_data;
  tid_t       rf_wr_tid;
  logic       wake_v, link_v;
  tid_t       wake_h, wake_t, link_from, link_to;

  svp_reg_file #(.NRD(4)) u_rf (
    .clk, .rst_n,
    .rd_addr(rf_rd_addr), .rd_data(rf_rd_data), .rd_state(rf_rd_state),
    .wr_en(rf_wr_en), .wr_op(rf_wr_op), .wr_addr(rf_wr_addr), .wr_data(rf_wr_data),
    .wr_tid(rf_wr_tid),
    .wake_valid(wake_v), .wake_head(wake_h), .wake_tail(wake_t),
    .link_valid(link_v), .link_from(link_from), .link_to(link_to)
  );

  // ------------------------------------------------------------------
  // thread table
  logic    tt_pop [3], tt_head_v [3];
  tid_t    tt_head [3];
  logic    tt_app_v [3][3];
  tid_t    tt_app_h [3][3], tt_app_t [3][3];
  logic    tt_link_v [2];
  tid_t    tt_link_from [2], tt_link_to [2];
  tid_t    tt_rd_tid [2];
  thread_t tt_rd [2];
  logic    tt_wr_init, tt_wr_pc;
  tid_t    tt_wr_init_tid, tt_wr_pc_tid;
  thread_t tt_wr_init_entry;
  addr_t   tt_wr_pc_val;

  // icache
  logic  ic_accept, ic_hit, ic_link_v, ic_act_v, ic_req_v, ic_req_ack;
  tid_t  ic_link_from, ic_link_to, ic_act_h, ic_act_t;
  line_t ic_line, ic_req_line;
  addr_t ic_req_addr;
  logic  ic_rel_v;
  line_t ic_rel_line;
  logic [LINE_BITS-1:0] ic_rd_data;

  // family table
  logic    ft_fr_pop, ft_rw_v, ft_rw_grant, ft_rdy_v, ft_rel_v, ft_hold_v;
  wr_op_e  ft_rw_op;
  ra_t     ft_rw_addr;
  word_t   ft_rw_data;
  tid_t    ft_rdy_tid, ft_rel_tid;
  window_t win;

  // pipeline state
  logic  r_v;
  tid_t  r_tid;
  addr_t r_pc;
  fid_t  r_fid;
  slot_t r_slot;
  logic  r_first, r_last;
  line_t r_cline;

  // pipeline results (combinational)
  logic   p_wr_v, p_grant, p_stall, p_commit, p_leave, p_ready, p_term;
  wr_op_e p_wr_op;
  ra_t    p_wr_addr;
  word_t  p_wr_data;
  addr_t  p_next_pc;
  logic   fetch;

  // d-cache
  logic     dc_ld_v, dc_ld_commit, dc_ld_hit, dc_ld_miss_ok;
  addr_t    dc_ld_addr;
  logic     dc_ld_long;
  ra_t      dc_ld_dst;
  word_t    dc_ld_data;
  nf_reg_t  dc_ld_nf;
  nf_reg_t  ld_rec;          // load record written into the target register
  nf_reg_t  wk_rec;          // record of the register the walker completes
  logic     dc_st_commit, dc_st_ready;
  addr_t    dc_st_addr;
  word_t    dc_st_data;
  logic     dc_wk_v, dc_wk_grant;
  ra_t      dc_wk_addr;
  word_t    dc_wk_data;
  logic     dc_req_v, dc_req_ack;
  mem_req_t dc_req;

  // ------------------------------------------------------------------
  // list plumbing
  always_comb begin
    for (int l = 0; l < 3; l++)
      for (int a = 0; a < 3; a++) begin
        tt_app_v[l][a] = 1'b0; tt_app_h[l][a] = '0; tt_app_t[l][a] = '0;
      end
    // free list: released contexts
    tt_app_v[LST_FREE][0] = ft_rel_v;
    tt_app_h[LST_FREE][0] = ft_rel_tid;
    tt_app_t[LST_FREE][0] = ft_rel_tid;
    // Ready List: created threads (1), switched threads (5a), woken threads (6)
    tt_app_v[LST_READY][0] = ft_rdy_v;
    tt_app_h[LST_READY][0] = ft_rdy_tid;
    tt_app_t[LST_READY][0] = ft_rdy_tid;
    tt_app_v[LST_READY][1] = p_commit && p_ready;
    tt_app_h[LST_READY][1] = r_tid;
    tt_app_t[LST_READY][1] = r_tid;
    tt_app_v[LST_READY][2] = wake_v;
    tt_app_h[LST_READY][2] = wake_h;
    tt_app_t[LST_READY][2] = wake_t;
    // Active List: I-cache hit (3a), line arrival (3b)
    tt_app_v[LST_ACTIVE][0] = ic_hit;
    tt_app_h[LST_ACTIVE][0] = tt_head[LST_READY];
    tt_app_t[LST_ACTIVE][0] = tt_head[LST_READY];
    tt_app_v[LST_ACTIVE][1] = ic_act_v;
    tt_app_h[LST_ACTIVE][1] = ic_act_h;
    tt_app_t[LST_ACTIVE][1] = ic_act_t;

    tt_pop[LST_FREE]   = ft_fr_pop;
    tt_pop[LST_READY]  = ic_accept;
    tt_pop[LST_ACTIVE] = fetch;

    tt_link_v[0] = link_v;    tt_link_from[0] = link_from;    tt_link_to[0] = link_to;
    tt_link_v[1] = ic_link_v; tt_link_from[1] = ic_link_from; tt_link_to[1] = ic_link_to;

    tt_rd_tid[0] = tt_head[LST_READY];
    tt_rd_tid[1] = tt_head[LST_ACTIVE];
    tt_wr_pc     = p_commit && p_leave;
    tt_wr_pc_tid = r_tid;
    tt_wr_pc_val = p_next_pc;
  end

  svp_thread_table u_tt (
    .clk, .rst_n,
    .pop(tt_pop), .head_v(tt_head_v), .head(tt_head),
    .app_v(tt_app_v), .app_h(tt_app_h), .app_t(tt_app_t),
    .link_v(tt_link_v), .link_from(tt_link_from), .link_to(tt_link_to),
    .rd_tid(tt_rd_tid), .rd_entry(tt_rd),
    .wr_init(tt_wr_init), .wr_init_tid(tt_wr_init_tid), .wr_init_entry(tt_wr_init_entry),
    .wr_pc(tt_wr_pc), .wr_pc_tid(tt_wr_pc_tid), .wr_pc_val(tt_wr_pc_val),
    .wr_cline(ic_accept), .wr_cline_tid(tt_head[LST_READY]), .wr_cline_val(ic_line)
  );

  // ------------------------------------------------------------------
  // memory interface: I-cache first, then D-cache
  logic  ic_fill_v, dc_fill_v, wack_v;
  always_comb begin
    mem_req_v = ic_req_v || dc_req_v;
    if (ic_req_v) begin
      mem_req.tag.kind  = TAG_IREAD;
      mem_req.tag.index = TAGIX_W'(ic_req_line);
      mem_req.addr      = ic_req_addr;
      mem_req.wdata     = '0;
    end else begin
      mem_req = dc_req;
    end
    ic_req_ack = ic_req_v && mem_req_ready;
    dc_req_ack = !ic_req_v && dc_req_v && mem_req_ready;
    ic_fill_v  = mem_rsp_v && mem_rsp.tag.kind == TAG_IREAD;
    dc_fill_v  = mem_rsp_v && mem_rsp.tag.kind == TAG_DREAD;
    wack_v     = mem_rsp_v && mem_rsp.tag.kind == TAG_WRITE;
  end

  svp_icache u_ic (
    .clk, .rst_n,
    .chk_v(tt_head_v[LST_READY]), .chk_tid(tt_head[LST_READY]), .chk_pc(tt_rd[0].pc),
    .chk_accept(ic_accept), .chk_hit(ic_hit), .chk_line(ic_line),
    .chk_link_v(ic_link_v), .chk_link_from(ic_link_from), .chk_link_to(ic_link_to),
    .rel_v(ic_rel_v), .rel_line(ic_rel_line),
    .fill_v(ic_fill_v), .fill_line(line_t'(mem_rsp.tag.index)), .fill_data(mem_rsp.data),
    .act_v(ic_act_v), .act_h(ic_act_h), .act_t(ic_act_t),
    .req_v(ic_req_v), .req_addr(ic_req_addr), .req_line(ic_req_line), .req_ack(ic_req_ack),
    .rd_line(r_cline), .rd_data(ic_rd_data)
  );

  svp_dcache u_dc (
    .clk, .rst_n,
    .ld_v(dc_ld_v), .ld_addr(dc_ld_addr), .ld_long(dc_ld_long), .ld_dst(dc_ld_dst), .ld_commit(dc_ld_commit),
    .ld_hit(dc_ld_hit), .ld_data(dc_ld_data), .ld_miss_ok(dc_ld_miss_ok), .ld_nf(dc_ld_nf),
    .st_commit(dc_st_commit), .st_addr(dc_st_addr), .st_data(dc_st_data), .st_fid(r_fid),
    .st_ready(dc_st_ready),
    .fill_v(dc_fill_v), .fill_line(line_t'(mem_rsp.tag.index)), .fill_data(mem_rsp.data),
    .wk_v(dc_wk_v), .wk_addr(dc_wk_addr), .wk_data(dc_wk_data), .wk_nf(wk_rec),
    .wk_grant(dc_wk_grant),
    .req_v(dc_req_v), .req(dc_req), .req_ack(dc_req_ack)
  );

  svp_family_table u_ft (
    .clk, .rst_n,
    .cr_v, .cr_pc, .cr_start, .cr_step, .cr_limit, .cr_win, .cr_ack, .cr_fid,
    .fr_v(tt_head_v[LST_FREE]), .fr_tid(tt_head[LST_FREE]), .fr_pop(ft_fr_pop),
    .tt_wr(tt_wr_init), .tt_tid(tt_wr_init_tid), .tt_entry(tt_wr_init_entry),
    .rw_v(ft_rw_v), .rw_op(ft_rw_op), .rw_addr(ft_rw_addr), .rw_data(ft_rw_data),
    .rw_grant(ft_rw_grant),
    .rdy_v(ft_rdy_v), .rdy_tid(ft_rdy_tid),
    .rd_fid(r_fid), .rd_win(win),
    .term_v(p_commit && p_term), .term_fid(r_fid), .term_slot(r_slot),
    .rel_v(ft_rel_v), .rel_tid(ft_rel_tid),
    .wis_v(dc_st_commit), .wis_fid(r_fid),
    .wack_v(wack_v), .wack_fid(fid_t'(mem_rsp.tag.index)),
    .ris_v(dc_ld_commit && !dc_ld_hit), .ris_fid(r_fid), .ris_slot(r_slot),
    .rack_v(dc_wk_grant), .rack_fid(wk_rec.ld_fid), .rack_slot(wk_rec.ld_slot),
    .hold_v(ft_hold_v),
    .done_v, .done_fid
  );

  // ------------------------------------------------------------------
  // pipeline: decode
  logic [31:0] instr;
  annot_e      annot;
  logic        last_in_line;

  svp_annot_decode u_an (
    .line(ic_rd_data), .word(r_pc[5:2]), .instr(instr), .annot(annot),
    .last_in_line(last_in_line)
  );

  logic [5:0]  op;
  logic [4:0]  va, vb, vc;
  logic [6:0]  func;
  logic        islit;
  word_t       lit, disp16, disp21;
  logic        is_opr, is_lda, is_ldl, is_ldq, is_stq, is_br, is_beq, is_bne, is_branch;
  logic        need_a, need_b;
  logic [4:0]  vdst;
  logic        has_dst;

  always_comb begin
    op     = instr[31:26];
    va     = instr[25:21];
    vb     = instr[20:16];
    vc     = instr[4:0];
    func   = instr[11:5];
    islit  = instr[12];
    lit    = word_t'(instr[20:13]);
    disp16 = {{48{instr[15]}}, instr[15:0]};
    disp21 = {{43{instr[20]}}, instr[20:0]};
    is_opr = op inside {6'h10, 6'h11, 6'h12, 6'h13};
    is_lda = op == 6'h08;
    is_ldl = op == 6'h28;
    is_ldq = op == 6'h29;
    is_stq = op == 6'h2D;
    is_br  = op == 6'h30;
    is_beq = op == 6'h39;
    is_bne = op == 6'h3D;
    is_branch = is_br || is_beq || is_bne;
    need_a = is_opr || is_stq || is_beq || is_bne;
    need_b = (is_opr && !islit) || is_lda || is_ldl || is_ldq || is_stq;
    has_dst = is_opr || is_lda || is_ldl || is_ldq || is_br;
    vdst    = (is_lda || is_ldl || is_ldq || is_br) ? va : vc;
  end

  ra_t  pa, pb, pd;
  logic za, zb, zd;
  svp_reg_map u_map_a (.vreg(va),   .win, .slot(r_slot), .first(r_first), .last(r_last), .preg(pa), .is_zero(za));
  svp_reg_map u_map_b (.vreg(vb),   .win, .slot(r_slot), .first(r_first), .last(r_last), .preg(pb), .is_zero(zb));
  svp_reg_map u_map_d (.vreg(vdst), .win, .slot(r_slot), .first(r_first), .last(r_last), .preg(pd), .is_zero(zd));

  assign rf_rd_addr[0] = pa;
  assign rf_rd_addr[1] = pb;
  assign rf_rd_addr[2] = dc_wk_addr;
  assign rf_rd_addr[3] = hr_addr;
  assign wk_rec = nf_reg_t'(rf_rd_data[2]);
  assign hr_data  = rf_rd_data[3];
  assign hr_state = rf_rd_state[3];

  logic  a_ok, b_ok, susp;
  ra_t   susp_reg;
  word_t a_val, b_val, alu_y, ea;
  logic  alu_known, taken;

  assign a_val = za ? '0 : rf_rd_data[0];
  assign b_val = zb ? '0 : rf_rd_data[1];

  svp_alu u_alu (.opcode(op), .func(func), .a(a_val), .b(islit ? lit : b_val),
                 .y(alu_y), .known(alu_known));

  always_comb begin
    a_ok = !need_a || za || rf_rd_state[0] == RS_FULL;
    b_ok = !need_b || zb || rf_rd_state[1] == RS_FULL;
    susp = r_v && !(a_ok && b_ok);
    susp_reg = !a_ok ? pa : pb;
    // natural alignment: low address bits are ignored
    ea = (b_val + disp16) & (is_ldl ? ~64'd3 : ~64'd7);
    taken = is_br || (is_beq && a_val == '0) || (is_bne && a_val != '0);

    // d-cache access
    dc_ld_v    = r_v && !susp && (is_ldq || is_ldl) && !zd;
    dc_ld_addr = ea;
    dc_ld_long = is_ldl;
    dc_ld_dst  = pd;
    dc_st_addr = ea;
    dc_st_data = a_val;
    ld_rec         = dc_ld_nf;
    ld_rec.ld_fid  = r_fid;
    ld_rec.ld_slot = r_slot;

    // register write of this instruction
    p_wr_v = 1'b0; p_wr_op = WR_DATA; p_wr_addr = pd; p_wr_data = '0;
    if (susp) begin
      p_wr_v = 1'b1; p_wr_op = WR_SUSPEND; p_wr_addr = susp_reg;
    end else if (r_v && has_dst && !zd) begin
      p_wr_v = 1'b1;
      if (is_opr)       p_wr_data = alu_known ? alu_y : '0;
      else if (is_lda)  p_wr_data = b_val + disp16;
      else if (is_br)   p_wr_data = r_pc + 64'd4;
      else if (is_ldq || is_ldl) begin
        if (dc_ld_hit) p_wr_data = dc_ld_data;
        else begin p_wr_op = WR_LOAD; p_wr_data = word_t'(ld_rec); end
      end
    end

    p_stall = r_v && ((p_wr_v && !p_grant) ||
                      (dc_ld_v && !dc_ld_hit && !dc_ld_miss_ok) ||
                      (!susp && is_stq && !dc_st_ready));
    p_commit = r_v && !p_stall;
    dc_ld_commit = p_commit && dc_ld_v;
    dc_st_commit = p_commit && !susp && is_stq;

    // control flow and thread switching
    p_next_pc = susp ? r_pc
              : (is_branch && taken) ? r_pc + 64'd4 + (disp21 << 2)
              : r_pc + 64'd4;
    p_term  = !susp && annot == AN_END;
    p_ready = !susp && !p_term && (annot == AN_SWCH || is_branch || last_in_line);
    p_leave = susp || p_term || p_ready;
    fetch   = tt_head_v[LST_ACTIVE] && (!r_v || (p_commit && p_leave));
    ic_rel_v    = p_commit && p_leave;
    ic_rel_line = r_cline;
  end

  // register-file write port arbitration
  always_comb begin
    dc_wk_grant = 1'b0; hw_grant = 1'b0; ft_rw_grant = 1'b0; p_grant = 1'b0;
    rf_wr_en = 1'b1; rf_wr_op = WR_DATA; rf_wr_addr = '0; rf_wr_data = '0; rf_wr_tid = r_tid;
    if (dc_wk_v) begin
      dc_wk_grant = 1'b1; rf_wr_addr = dc_wk_addr; rf_wr_data = dc_wk_data;
    end else if (hw_v) begin
      hw_grant = 1'b1; rf_wr_addr = hw_addr; rf_wr_data = hw_data;
    end else if (ft_rw_v) begin
      ft_rw_grant = 1'b1; rf_wr_op = ft_rw_op; rf_wr_addr = ft_rw_addr; rf_wr_data = ft_rw_data;
    end else if (p_wr_v) begin
      p_grant = 1'b1; rf_wr_op = p_wr_op; rf_wr_addr = p_wr_addr; rf_wr_data = p_wr_data;
    end else begin
      rf_wr_en = 1'b0;
    end
  end

  // pipeline state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_v <= 1'b0;
    end else begin
      if (fetch) begin
        r_v     <= 1'b1;
        r_tid   <= tt_head[LST_ACTIVE];
        // word 0 of a line holds annotations, never an instruction
        r_pc    <= (tt_rd[1].pc[5:2] == 4'd0) ? tt_rd[1].pc + 64'd4 : tt_rd[1].pc;
        r_fid   <= tt_rd[1].fid;
        r_slot  <= tt_rd[1].slot;
        r_first <= tt_rd[1].first;
        r_last  <= tt_rd[1].last;
        r_cline <= tt_rd[1].cline;
      end else if (p_commit) begin
        if (p_leave) r_v <= 1'b0;
        else         r_pc <= p_next_pc;
      end
    end
  end

  // event pulses
  always_comb begin
    ev = '0;
    ev.issue     = p_commit && !susp;
    ev.sw_swch   = p_commit && p_ready && annot == AN_SWCH;
    ev.sw_end    = p_commit && p_term;
    ev.sw_eol    = p_commit && p_ready && last_in_line;
    ev.sw_branch = p_commit && p_ready && is_branch;
    ev.suspend   = p_commit && susp;
    ev.wake      = wake_v;
    ev.ic_hit    = ic_hit;
    ev.ic_miss   = ic_accept && !ic_hit && !ic_link_v;
    ev.ic_join   = ic_link_v;
    ev.ic_fill   = ic_act_v;
    ev.dc_hit    = dc_ld_commit && dc_ld_hit;
    ev.dc_miss   = dc_ld_commit && !dc_ld_hit && !dc_ld_nf.ld_next_v;
    ev.dc_join   = dc_ld_commit && !dc_ld_hit && dc_ld_nf.ld_next_v;
    ev.store     = dc_st_commit;
    ev.stall     = p_stall;
    ev.create    = ft_rdy_v;
    ev.freed     = ft_rel_v;
    ev.rd_hold   = ft_hold_v;
    ev.sync      = done_v;
  end

  a_known_op: assert property (@(posedge clk) disable iff (!rst_n)
    p_commit && !susp && is_opr |-> alu_known);

endmodule
