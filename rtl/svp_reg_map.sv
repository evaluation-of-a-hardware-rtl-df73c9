// svp_reg_map: translation of a thread's architectural register number to a
// physical register of the register file.
//
// A thread sees a window of at most 31 registers (register 31 reads as zero,
// as in the base ISA), laid out as Globals, Shareds, Locals, Dependents:
//   v <  G              global g   -> parent's globals        gbase + g
//   v <  G+S            shared s   -> own context             ctx(slot) + s
//                                     (last thread: parent's shareds pshbase + s)
//   v <  G+S+L          local l    -> own context             ctx(slot) + S + l
//   v <  G+2S+L         dependent d-> previous thread's shared ctx(slot-1) + d
//                                     (first thread: parent's shareds pshbase + d)
// where ctx(k) = ctxbase + k*(S+L) and slots are used round-robin over the
// family's nblk contexts. So the shared channel between consecutive threads
// is one physical register, written by the producer and read by the consumer.
// Purely combinational. The mapping of the four classes follows the
// register-mapping figure of the design; the order of the classes inside the
// window is this design's own choice.
module svp_reg_map
  import svp_pkg::*;
(
  input  logic [4:0] vreg,
  input  window_t    win,
  input  slot_t      slot,
  input  logic       first,
  input  logic       last,
  output ra_t        preg,
  output logic       is_zero   // r31 or outside the window: reads 0, writes dropped
);

  logic [5:0] g, s, l;
  logic [5:0] v;
  ra_t        vo;   // offset of v inside its register class
  slot_t      prev;
  ra_t        ctx_size;

  always_comb begin
    v = {1'b0, vreg};
    g = {1'b0, win.n_glob};
    s = {1'b0, win.n_shrd};
    l = {1'b0, win.n_locl};
    ctx_size = ra_t'(s) + ra_t'(l);
    prev = (slot == '0) ? slot_t'(win.nblk - 1'b1) : slot_t'(slot - 1'b1);
    is_zero = 1'b0;
    preg = '0;
    vo = ra_t'(v) - ra_t'(g);
    if (v >= g + s + l) vo = ra_t'(v) - ra_t'(g) - ra_t'(s) - ra_t'(l);
    if (vreg == 5'd31) begin
      is_zero = 1'b1;
    end else if (v < g) begin
      preg = win.gbase + ra_t'(v);
    end else if (v < g + s) begin
      preg = last ? win.pshbase + vo
                  : win.ctxbase + ra_t'(slot) * ctx_size + vo;
    end else if (v < g + s + l) begin
      preg = win.ctxbase + ra_t'(slot) * ctx_size + vo;
    end else if (v < g + s + l + s) begin
      preg = first ? win.pshbase + vo
                   : win.ctxbase + ra_t'(prev) * ctx_size + vo;
    end else begin
      is_zero = 1'b1;
    end
  end

endmodule
