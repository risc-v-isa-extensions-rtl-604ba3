// scg_spmm_ext: the SpMM extension of an out-of-order RISC-V core, as seen
// from the core: a decoder for the seven custom instructions plus two extra
// backend pipelines that compute the outer product of an SCG-compressed
// sparse matrix A and a dense matrix B.
//
// Structure (one instruction port in, in program order):
//   scg_decoder   -> recognises opcode 0x0b, extracts fields
//   scg_dispatch  -> steers LDVALIDX/VSMV/LDPRF/VSMUL/STPS to the generation
//                    pipeline and MERGE/STRES to the merge pipeline, tagging
//                    each PSB access so that a queue head that touches a
//                    slot still in use by older work of the other pipeline
//                    waits (gen_psb_wait / mrg_psb_wait) while the other
//                    queue keeps moving
//   2 x scg_cmd_queue  one instruction queue per pipeline
//   scg_psu       Partial Sum Unit: loads, VSMV, VSMUL on VLEN multipliers,
//                 STPS; owns the vector register file scg_vrf
//   scg_mu        Merge Unit: MERGE on VLEN adders, STRES
//   scg_psb       Partial Sum Buffer shared by both pipelines (4 slots, 64 B)
// Because the two pipelines run at the same time, the merge of earlier
// partial sum blocks overlaps the generation of the next one.
//
// Interface: the host presents a custom instruction word with the values of
// the GPRs named by rs1, rs2 and rd (cmd_*, valid/ready); VSMV returns a
// scalar on resp_* (valid/ready). Memory is reached through the host's
// load/store unit: a read port used by the PSU for A and B (request
// valid/ready, in-order response), a prefetch hint, and a write port used by
// the MU for result C. psu_busy, mu_busy, gen_psb_wait and mrg_psb_wait
// report activity.
// All ports are synchronous to clk; rst_n is an asynchronous active-low
// reset.
//
// The decoder, the two pipelines, the units and their sizes follow the
// document. The command port stands in for the core's coprocessor interface,
// whose signals the document does not give; the queue depth, the PSB ordering
// tags and the memory port handshakes are this implementation's
// choices.
module scg_spmm_ext
  import scg_pkg::*;
#(
  parameter int unsigned VLEN        = scg_pkg::DEFAULT_VLEN,
  parameter int unsigned NUM_VREGS   = scg_pkg::DEFAULT_NUM_VREGS,
  parameter int unsigned SLOTS       = scg_pkg::DEFAULT_PSB_SLOTS,
  parameter int unsigned QUEUE_DEPTH = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // custom instruction from the host core
  input  logic                  cmd_valid,
  output logic                  cmd_ready,
  input  logic [31:0]           cmd_inst,
  input  logic [XLEN-1:0]       cmd_rs1_val,
  input  logic [XLEN-1:0]       cmd_rs2_val,
  input  logic [XLEN-1:0]       cmd_rd_val,
  output logic                  cmd_illegal,
  // scalar write-back (VSMV)
  output logic                  resp_valid,
  input  logic                  resp_ready,
  output logic [4:0]            resp_rd,
  output logic [XLEN-1:0]       resp_data,
  // memory read port (A and B) and prefetch hint
  output logic                  mem_rd_req_valid,
  input  logic                  mem_rd_req_ready,
  output logic [XLEN-1:0]       mem_rd_req_addr,
  input  logic                  mem_rd_resp_valid,
  input  logic [VLEN*16-1:0]    mem_rd_resp_data,
  output logic                  mem_pf_valid,
  output logic [XLEN-1:0]       mem_pf_addr,
  // memory write port (C)
  output logic                  mem_wr_req_valid,
  input  logic                  mem_wr_req_ready,
  output logic [XLEN-1:0]       mem_wr_req_addr,
  output logic [VLEN*16-1:0]    mem_wr_req_data,
  // activity
  output logic                  psu_busy,
  output logic                  mu_busy,
  output logic                  gen_psb_wait,   // STPS at queue head waits for older merges
  output logic                  mrg_psb_wait    // MERGE/STRES at queue head waits for older STPS
);

  localparam int unsigned RW = $clog2(NUM_VREGS);
  localparam int unsigned SW = $clog2(SLOTS);

  // ---------------- decode ----------------
  scg_op_e     dec_op;
  logic [6:0]  dec_funct7;
  logic [4:0]  dec_rs1, dec_rs2, dec_rd;
  logic        dec_legal, dec_to_merge;
  logic        dec_reads_rs1, dec_reads_rs2, dec_reads_rd;
  scg_cmd_t    dec_cmd;

  scg_decoder u_dec (
    .inst      (cmd_inst),
    .legal     (dec_legal),
    .op        (dec_op),
    .funct7    (dec_funct7),
    .rs1       (dec_rs1),
    .rs2       (dec_rs2),
    .rd        (dec_rd),
    .to_merge  (dec_to_merge),
    .reads_rs1 (dec_reads_rs1),
    .reads_rs2 (dec_reads_rs2),
    .reads_rd  (dec_reads_rd)
  );

  // Register values the instruction does not read are zeroed so that the
  // queues carry no stale data.
  always_comb begin
    dec_cmd.op      = dec_op;
    dec_cmd.funct7  = dec_funct7;
    dec_cmd.rs1     = dec_rs1;
    dec_cmd.rs2     = dec_rs2;
    dec_cmd.rd      = dec_rd;
    dec_cmd.rs1_val = dec_reads_rs1 ? cmd_rs1_val : '0;
    dec_cmd.rs2_val = dec_reads_rs2 ? cmd_rs2_val : '0;
    dec_cmd.rd_val  = dec_reads_rd  ? cmd_rd_val  : '0;
  end

  // ---------------- dispatch ----------------
  logic        gen_push_valid, gen_push_ready, mrg_push_valid, mrg_push_ready;
  scg_qentry_t gen_push, mrg_push;
  logic        gen_q_valid, gen_q_ready, mrg_q_valid, mrg_q_ready;
  scg_qentry_t gen_q_head, mrg_q_head;
  logic        gen_go, mrg_go, psu_cmd_ready, mu_cmd_ready;
  logic        stps_done;
  logic [SW-1:0] stps_slot;
  logic        mu_done, mu_done_is_merge;
  logic [SW-1:0] mu_src0, mu_src1, mu_dst;

  scg_dispatch #(.VLEN(VLEN), .SLOTS(SLOTS)) u_disp (
    .clk, .rst_n,
    .in_valid       (cmd_valid),
    .in_ready       (cmd_ready),
    .in_legal       (dec_legal),
    .in_to_merge    (dec_to_merge),
    .in_cmd         (dec_cmd),
    .gen_valid      (gen_push_valid),
    .gen_ready      (gen_push_ready),
    .gen_entry      (gen_push),
    .mrg_valid      (mrg_push_valid),
    .mrg_ready      (mrg_push_ready),
    .mrg_entry      (mrg_push),
    .gen_head_valid (gen_q_valid),
    .gen_head       (gen_q_head),
    .gen_go         (gen_go),
    .mrg_head_valid (mrg_q_valid),
    .mrg_head       (mrg_q_head),
    .mrg_go         (mrg_go),
    .stps_done      (stps_done),
    .stps_slot      (stps_slot),
    .mu_done        (mu_done),
    .mu_is_merge    (mu_done_is_merge),
    .mu_src0        (mu_src0),
    .mu_src1        (mu_src1),
    .mu_dst         (mu_dst),
    .gen_wait       (gen_psb_wait),
    .mrg_wait       (mrg_psb_wait),
    .illegal        (cmd_illegal)
  );

  // ---------------- queues ----------------
  scg_cmd_queue #(.T(scg_qentry_t), .DEPTH(QUEUE_DEPTH)) u_gen_q (
    .clk, .rst_n,
    .in_valid  (gen_push_valid),
    .in_ready  (gen_push_ready),
    .in_data   (gen_push),
    .out_valid (gen_q_valid),
    .out_ready (gen_q_ready),
    .out_data  (gen_q_head)
  );

  scg_cmd_queue #(.T(scg_qentry_t), .DEPTH(QUEUE_DEPTH)) u_mrg_q (
    .clk, .rst_n,
    .in_valid  (mrg_push_valid),
    .in_ready  (mrg_push_ready),
    .in_data   (mrg_push),
    .out_valid (mrg_q_valid),
    .out_ready (mrg_q_ready),
    .out_data  (mrg_q_head)
  );

  // a queue head goes to its unit only when its PSB ordering tags allow it
  assign gen_q_ready = psu_cmd_ready && gen_go;
  assign mrg_q_ready = mu_cmd_ready  && mrg_go;

  // ---------------- generation pipeline ----------------
  logic                  vrf_we;
  logic [RW-1:0]         vrf_waddr, vrf_raddr_a, vrf_raddr_b;
  logic [VLEN-1:0][15:0] vrf_wdata, vrf_rdata_a, vrf_rdata_b;
  logic                  psb_gen_we;
  logic [SW-1:0]         psb_gen_slot;
  logic [VLEN-1:0][15:0] psb_gen_wdata;
  scg_resp_t             psu_resp;

  scg_vrf #(.VLEN(VLEN), .NUM_VREGS(NUM_VREGS)) u_vrf (
    .clk, .rst_n,
    .we      (vrf_we),
    .waddr   (vrf_waddr),
    .wdata   (vrf_wdata),
    .raddr_a (vrf_raddr_a),
    .rdata_a (vrf_rdata_a),
    .raddr_b (vrf_raddr_b),
    .rdata_b (vrf_rdata_b)
  );

  scg_psu #(.VLEN(VLEN), .NUM_VREGS(NUM_VREGS), .SLOTS(SLOTS)) u_psu (
    .clk, .rst_n,
    .cmd_valid     (gen_q_valid && gen_go),
    .cmd_ready     (psu_cmd_ready),
    .cmd           (gen_q_head.cmd),
    .vrf_we        (vrf_we),
    .vrf_waddr     (vrf_waddr),
    .vrf_wdata     (vrf_wdata),
    .vrf_raddr_a   (vrf_raddr_a),
    .vrf_rdata_a   (vrf_rdata_a),
    .vrf_raddr_b   (vrf_raddr_b),
    .vrf_rdata_b   (vrf_rdata_b),
    .psb_we        (psb_gen_we),
    .psb_slot      (psb_gen_slot),
    .psb_wdata     (psb_gen_wdata),
    .rd_req_valid  (mem_rd_req_valid),
    .rd_req_ready  (mem_rd_req_ready),
    .rd_req_addr   (mem_rd_req_addr),
    .rd_resp_valid (mem_rd_resp_valid),
    .rd_resp_data  (mem_rd_resp_data),
    .pf_valid      (mem_pf_valid),
    .pf_addr       (mem_pf_addr),
    .resp_valid    (resp_valid),
    .resp_ready    (resp_ready),
    .resp          (psu_resp),
    .busy          (psu_busy)
  );

  assign resp_rd   = psu_resp.rd;
  assign resp_data = psu_resp.data;
  assign stps_done = psb_gen_we;
  assign stps_slot = psb_gen_slot;

  // ---------------- merge pipeline ----------------
  logic [SW-1:0]         psb_rd_slot0, psb_rd_slot1, psb_mu_slot;
  logic [VLEN-1:0][15:0] psb_rd_data0, psb_rd_data1, psb_mu_wdata, mu_wr_data;
  logic                  psb_mu_we;

  scg_psb #(.VLEN(VLEN), .SLOTS(SLOTS)) u_psb (
    .clk, .rst_n,
    .gen_we    (psb_gen_we),
    .gen_slot  (psb_gen_slot),
    .gen_wdata (psb_gen_wdata),
    .mu_we     (psb_mu_we),
    .mu_slot   (psb_mu_slot),
    .mu_wdata  (psb_mu_wdata),
    .rd_slot0  (psb_rd_slot0),
    .rd_data0  (psb_rd_data0),
    .rd_slot1  (psb_rd_slot1),
    .rd_data1  (psb_rd_data1)
  );

  scg_mu #(.VLEN(VLEN), .SLOTS(SLOTS)) u_mu (
    .clk, .rst_n,
    .cmd_valid     (mrg_q_valid && mrg_go),
    .cmd_ready     (mu_cmd_ready),
    .cmd           (mrg_q_head.cmd),
    .psb_rd_slot0  (psb_rd_slot0),
    .psb_rd_data0  (psb_rd_data0),
    .psb_rd_slot1  (psb_rd_slot1),
    .psb_rd_data1  (psb_rd_data1),
    .psb_we        (psb_mu_we),
    .psb_slot      (psb_mu_slot),
    .psb_wdata     (psb_mu_wdata),
    .wr_req_valid  (mem_wr_req_valid),
    .wr_req_ready  (mem_wr_req_ready),
    .wr_req_addr   (mem_wr_req_addr),
    .wr_req_data   (mu_wr_data),
    .done          (mu_done),
    .done_is_merge (mu_done_is_merge),
    .done_src0     (mu_src0),
    .done_src1     (mu_src1),
    .done_dst      (mu_dst),
    .busy          (mu_busy)
  );

  assign mem_wr_req_data = mu_wr_data;

endmodule
