// svp_mem_model: behavioural model of the memory system behind a core
// (stands in for the L2 caches, the on-chip directory ring and DRAM, which
// are not modelled as RTL). Not synthesizable.
//
// Accepts one tagged request per cycle (mem_req_ready is low on random
// cycles), applies writes when accepted, and answers every request after a
// random latency between LAT_MIN and LAT_MAX cycles. When several answers
// are due, a random one is sent first, so responses come out of order and
// only their tags tell them apart. Read answers carry the whole 64-byte
// line as it is when the answer is sent; write answers are acknowledgements.
// mem[] holds MEMQ quadwords from address 0; testbenches fill it directly.
module svp_mem_model
  import svp_pkg::*;
#(
  parameter int unsigned MEMQ    = 16384,
  parameter int unsigned LAT_MIN = 20,
  parameter int unsigned LAT_MAX = 60
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     mem_req_v,
  input  mem_req_t mem_req,
  output logic     mem_req_ready,
  output logic     mem_rsp_v,
  output mem_rsp_t mem_rsp
);

  word_t mem [MEMQ];

  typedef struct {
    mem_tag_t    tag;
    addr_t       addr;
    longint      due;
  } pend_t;

  pend_t  q[$];
  longint now;
  int unsigned n_req;

  initial begin
    mem_req_ready = 1'b0;
    mem_rsp_v = 1'b0;
    mem_rsp = '0;
    now = 0;
    s_v = 1'b0;
    n_req = 0;
  end

  function automatic logic [LINE_BITS-1:0] line_of(addr_t a);
    logic [LINE_BITS-1:0] l;
    for (int j = 0; j < 8; j++) l[64*j +: 64] = mem[((a >> 3) & ~64'd7) + j];
    return l;
  endfunction

  // Inputs are sampled shortly before the rising edge so that the values
  // seen are those the core acted on at that edge.
  logic     s_v;
  mem_req_t s_req;
  always begin
    @(negedge clk);
    #2;
    s_v   = mem_req_v && mem_req_ready;
    s_req = mem_req;
  end

  always @(posedge clk) begin
    now++;
    if (!rst_n) begin
      q.delete();
      mem_req_ready <= 1'b0;
      mem_rsp_v <= 1'b0;
    end else begin
      // request accepted at this edge
      if (s_v) begin
        automatic pend_t p;
        p.tag  = s_req.tag;
        p.addr = s_req.addr;
        p.due  = now + longint'(LAT_MIN + ($urandom % (LAT_MAX - LAT_MIN + 1)));
        if (s_req.tag.kind == TAG_WRITE) mem[s_req.addr >> 3] = s_req.wdata;
        q.push_back(p);
        n_req++;
      end
      mem_req_ready <= ($urandom % 10) < 8;
      // one answer per cycle, picked at random among those due
      begin
        automatic int due_ix [$];
        for (int i = 0; i < q.size(); i++) if (q[i].due <= now) due_ix.push_back(i);
        if (due_ix.size() > 0) begin
          automatic int k = due_ix[$urandom % due_ix.size()];
          mem_rsp_v <= 1'b1;
          mem_rsp.tag <= q[k].tag;
          mem_rsp.data <= (q[k].tag.kind == TAG_WRITE) ? '0 : line_of(q[k].addr);
          q.delete(k);
        end else begin
          mem_rsp_v <= 1'b0;
        end
      end
    end
  end

endmodule
