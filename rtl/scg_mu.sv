// scg_mu: Merge Unit, the execution unit of the merge pipeline. It runs the
// two merge-side instructions of the SCG SpMM extension:
//   MERGE  PSB[x(rd)] = PSB[x(rs1)] + PSB[x(rs2)], element by element on
//          VLEN FP16 adders: one instruction merges two whole partial sum
//          blocks, so the merge pipeline needs one dispatch slot per merge;
//   STRES  writes the finished block PSB[x(rs1)] to memory at x(rd); the
//          block size is VLEN elements, implied by the vector length.
//
// How it works: a controller latches one instruction from the queue. MERGE
// reads both source slots, adds them and writes the destination slot in the
// next cycle (EXEC); STRES holds a memory write request until it is accepted
// (STORE). The next instruction is accepted in the cycle the current one
// finishes, so merges sustain one per cycle. Every finished instruction is
// reported to dispatch with the slots it read and wrote.
//
// Interface: cmd (valid/ready) from the merge queue; two PSB read ports and
// one PSB write port; memory write request (valid/ready, byte address,
// VLEN*16-bit data); completion report (one-cycle done pulse).
//
// The instructions, their operand roles and the adder count (= VLEN) follow
// the document; the state sequence and the completion report are this
// implementation's choices.
module scg_mu
  import scg_pkg::*;
#(
  parameter int unsigned VLEN  = scg_pkg::DEFAULT_VLEN,
  parameter int unsigned SLOTS = scg_pkg::DEFAULT_PSB_SLOTS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // instruction from the merge queue
  input  logic                     cmd_valid,
  output logic                     cmd_ready,
  input  scg_cmd_t                 cmd,
  // partial sum buffer
  output logic [$clog2(SLOTS)-1:0] psb_rd_slot0,
  input  logic [VLEN-1:0][15:0]    psb_rd_data0,
  output logic [$clog2(SLOTS)-1:0] psb_rd_slot1,
  input  logic [VLEN-1:0][15:0]    psb_rd_data1,
  output logic                     psb_we,
  output logic [$clog2(SLOTS)-1:0] psb_slot,
  output logic [VLEN-1:0][15:0]    psb_wdata,
  // memory write of result C
  output logic                     wr_req_valid,
  input  logic                     wr_req_ready,
  output logic [XLEN-1:0]          wr_req_addr,
  output logic [VLEN-1:0][15:0]    wr_req_data,
  // completion report to dispatch
  output logic                     done,
  output logic                     done_is_merge,
  output logic [$clog2(SLOTS)-1:0] done_src0,
  output logic [$clog2(SLOTS)-1:0] done_src1,
  output logic [$clog2(SLOTS)-1:0] done_dst,
  output logic                     busy
);

  localparam int unsigned SW = $clog2(SLOTS);
  localparam int unsigned SB = $clog2(2 * VLEN);

  typedef enum logic [1:0] {S_IDLE, S_EXEC, S_STORE} state_e;

  state_e   state, state_nx;
  scg_cmd_t cq;
  logic [VLEN-1:0][15:0] sum;

  for (genvar i = 0; i < VLEN; i++) begin : g_add
    fp16_add u_add (.a(psb_rd_data0[i]), .b(psb_rd_data1[i]), .s(sum[i]));
  end

  always_comb begin
    psb_rd_slot0  = cq.rs1_val[SB +: SW];
    psb_rd_slot1  = cq.rs2_val[SB +: SW];
    psb_slot      = cq.rd_val[SB +: SW];
    psb_wdata     = sum;
    psb_we        = (state == S_EXEC);
    wr_req_valid  = (state == S_STORE);
    wr_req_addr   = cq.rd_val;
    wr_req_data   = psb_rd_data0;
    done          = (state == S_EXEC) || (state == S_STORE && wr_req_ready);
    done_is_merge = (state == S_EXEC);
    done_src0     = psb_rd_slot0;
    done_src1     = psb_rd_slot1;
    done_dst      = psb_slot;

    cmd_ready = (state == S_IDLE) || done;
    state_nx  = done ? S_IDLE : state;
    if (cmd_valid && cmd_ready)
      state_nx = (cmd.op == F3_MERGE) ? S_EXEC : S_STORE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cq    <= '0;
    end else begin
      state <= state_nx;
      if (cmd_valid && cmd_ready) cq <= cmd;
    end
  end

  assign busy = (state != S_IDLE);

  a_merge_pipe_ops_only: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid |-> (cmd.op == F3_MERGE || cmd.op == F3_STRES));

endmodule
