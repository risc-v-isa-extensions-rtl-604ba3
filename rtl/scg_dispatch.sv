// scg_dispatch: steers decoded custom instructions, in program order, into
// the two extended backend pipelines, and orders the pipelines' accesses to
// the partial sum buffer (PSB) so that generation and merging can overlap
// without either pipeline overtaking the other on a shared slot.
//
// The generation pipeline (Partial Sum Unit) and the merge pipeline (Merge
// Unit) are each in order; the only state they share is the PSB. On the
// generation side only STPS touches the PSB; on the merge side MERGE touches
// up to three slots and STRES one. For every slot s the block counts, modulo
// 2^TAG_W:
//   g_iss[s] / g_done[s]  STPS instructions to s dispatched / finished,
//   m_iss[s] / m_done[s]  merge-side instructions touching s dispatched /
//                         finished (an instruction counts once per slot).
// At dispatch an instruction takes, for each slot it touches, the other
// pipeline's issue count as its tag: the number of older instructions of
// the other pipeline that touch the slot. It may leave its queue for its
// unit only when the other pipeline's completion count has reached every one
// of its tags, i.e. all those older accesses are finished:
//   STPS to s           waits for m_done[s] == tag  (write after read/write)
//   MERGE / STRES       waits for g_done[t] == tag_t for each slot t
//                       (read after write, write after write).
// Younger accesses cannot finish first (they wait for this one in turn), so
// equality is exact. Dispatch itself never stalls on a slot conflict: a MERGE
// waiting for its STPS sits at the head of the merge queue while the
// instructions that generate the next partial sum block flow past it into
// the generation pipeline. This is what lets the merge of P11 and P21 run
// while P31 is being generated.
//
// Interface: in_* is the decoded instruction with its register values
// (valid/ready); gen_* / mrg_* push queue entries (instruction + tags);
// *_head_* are the queue outputs and *_go says whether the head may go to
// its unit; the *_done inputs report finished PSB accesses. An illegal
// instruction is accepted and dropped with a one-cycle illegal pulse;
// gen_wait / mrg_wait flag a head held back by an ordering tag.
// Timing: combinational from in_valid to the pushes and from the heads to
// *_go; counters update at the clock edge. At most 2^TAG_W - 1 accesses to
// one slot may be in flight per pipeline; the queues hold far fewer.
//
// The split into two pipelines and the overlap of generation and merging
// follow the document; the document does not say how the pipelines are kept
// in order on the PSB, and this tag scheme is this implementation's choice.
module scg_dispatch
  import scg_pkg::*;
#(
  parameter int unsigned VLEN  = scg_pkg::DEFAULT_VLEN,
  parameter int unsigned SLOTS = scg_pkg::DEFAULT_PSB_SLOTS
) (
  input  logic        clk,
  input  logic        rst_n,
  // decoded instruction
  input  logic        in_valid,
  output logic        in_ready,
  input  logic        in_legal,
  input  logic        in_to_merge,
  input  scg_cmd_t    in_cmd,
  // pushes into the pipeline queues
  output logic        gen_valid,
  input  logic        gen_ready,
  output scg_qentry_t gen_entry,
  output logic        mrg_valid,
  input  logic        mrg_ready,
  output scg_qentry_t mrg_entry,
  // queue heads
  input  logic        gen_head_valid,
  input  scg_qentry_t gen_head,
  output logic        gen_go,
  input  logic        mrg_head_valid,
  input  scg_qentry_t mrg_head,
  output logic        mrg_go,
  // completed PSB accesses
  input  logic                     stps_done,
  input  logic [$clog2(SLOTS)-1:0] stps_slot,
  input  logic                     mu_done,
  input  logic                     mu_is_merge,   // else STRES
  input  logic [$clog2(SLOTS)-1:0] mu_src0,
  input  logic [$clog2(SLOTS)-1:0] mu_src1,
  input  logic [$clog2(SLOTS)-1:0] mu_dst,
  // status
  output logic        gen_wait,
  output logic        mrg_wait,
  output logic        illegal
);

  localparam int unsigned SW = $clog2(SLOTS);
  localparam int unsigned SB = $clog2(2 * VLEN);   // byte offset bits in a slot

  logic [TAG_W-1:0] g_iss [SLOTS], g_done [SLOTS], m_iss [SLOTS], m_done [SLOTS];

  function automatic logic [SW-1:0] slot_of(input logic [XLEN-1:0] addr);
    return addr[SB +: SW];
  endfunction

  // does a merge-side instruction touch slot t
  function automatic logic mu_touches(input logic is_merge, input logic [SW-1:0] a,
                                      input logic [SW-1:0] b, input logic [SW-1:0] c,
                                      input int unsigned t);
    return (a == SW'(t)) || (is_merge && (b == SW'(t) || c == SW'(t)));
  endfunction

  logic          in_is_stps, in_is_merge;
  logic [SW-1:0] in_a, in_b, in_c;
  logic          gen_fire, mrg_fire;
  logic [SW-1:0] gh_slot, mh_a, mh_b, mh_c;
  logic          gh_is_stps, mh_is_merge;

  always_comb begin
    in_is_stps  = in_cmd.op == F3_STPS;
    in_is_merge = in_cmd.op == F3_MERGE;
    in_a        = slot_of(in_cmd.rs1_val);
    in_b        = slot_of(in_cmd.rs2_val);
    in_c        = slot_of(in_cmd.rd_val);

    gen_entry.cmd  = in_cmd;
    gen_entry.tag0 = m_iss[in_c];
    gen_entry.tag1 = '0;
    gen_entry.tag2 = '0;
    mrg_entry.cmd  = in_cmd;
    mrg_entry.tag0 = g_iss[in_a];
    mrg_entry.tag1 = g_iss[in_b];
    mrg_entry.tag2 = g_iss[in_c];

    gen_valid = in_valid && in_legal && !in_to_merge;
    mrg_valid = in_valid && in_legal &&  in_to_merge;
    in_ready  = !in_legal || (in_to_merge ? mrg_ready : gen_ready);
    illegal   = in_valid && !in_legal;
    gen_fire  = gen_valid && gen_ready;
    mrg_fire  = mrg_valid && mrg_ready;

    // heads
    gh_is_stps  = gen_head.cmd.op == F3_STPS;
    gh_slot     = slot_of(gen_head.cmd.rd_val);
    gen_go      = !gh_is_stps || (m_done[gh_slot] == gen_head.tag0);
    mh_is_merge = mrg_head.cmd.op == F3_MERGE;
    mh_a        = slot_of(mrg_head.cmd.rs1_val);
    mh_b        = slot_of(mrg_head.cmd.rs2_val);
    mh_c        = slot_of(mrg_head.cmd.rd_val);
    mrg_go      = (g_done[mh_a] == mrg_head.tag0)
               && (!mh_is_merge || (g_done[mh_b] == mrg_head.tag1
                                    && g_done[mh_c] == mrg_head.tag2));
    gen_wait    = gen_head_valid && !gen_go;
    mrg_wait    = mrg_head_valid && !mrg_go;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SLOTS; s++) begin
        g_iss[s]  <= '0;
        g_done[s] <= '0;
        m_iss[s]  <= '0;
        m_done[s] <= '0;
      end
    end else begin
      for (int s = 0; s < SLOTS; s++) begin
        if (gen_fire && in_is_stps && in_c == SW'(s)) g_iss[s] <= g_iss[s] + 1'b1;
        if (stps_done && stps_slot == SW'(s))         g_done[s] <= g_done[s] + 1'b1;
        if (mrg_fire && mu_touches(in_is_merge, in_a, in_b, in_c, s))
          m_iss[s] <= m_iss[s] + 1'b1;
        if (mu_done && mu_touches(mu_is_merge, mu_src0, mu_src1, mu_dst, s))
          m_done[s] <= m_done[s] + 1'b1;
      end
    end
  end

  for (genvar s = 0; s < SLOTS; s++) begin : g_chk
    a_no_stps_overrun: assert property (@(posedge clk) disable iff (!rst_n)
      stps_done && stps_slot == SW'(s) |-> g_done[s] != g_iss[s]);
    a_no_mu_overrun: assert property (@(posedge clk) disable iff (!rst_n)
      mu_done && mu_touches(mu_is_merge, mu_src0, mu_src1, mu_dst, s) |-> m_done[s] != m_iss[s]);
  end

endmodule
