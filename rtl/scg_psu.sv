// scg_psu: Partial Sum Unit, the execution unit of the generation pipeline.
// It runs the five generation instructions of the SCG SpMM extension:
//   LDVALIDX  two VLEN-element loads from x(rd): the nonzero values of an SCG
//             group into vr(rs2), then their column indices, stored 2*VLEN
//             bytes further on, into vr(rs1);
//   VSMV      returns element funct7 of vr(rs1) (a column index, i.e. the row
//             of the dense matrix B to use) to GPR rd;
//   LDPRF     loads VLEN elements of B from x(rs1) into vr(rd) and sends a
//             prefetch hint for x(rs2), the next chunk of B;
//   VSMUL     vr(rd)[i] = vr(rs1)[funct7] * vr(rs2)[i] for all VLEN lanes, on
//             VLEN FP16 multipliers (scalar-vector product = one partial sum
//             block of the outer product);
//   STPS      copies vr(rs1) into the partial sum buffer slot at x(rd).
//
// How it works: a small controller latches one instruction from the queue
// and steps through it: EXEC (VSMUL, STPS: one cycle), LD_REQ / LD_RESP (one
// outstanding memory read per beat; LDVALIDX has two beats) and RESP (VSMV
// waits for the host to take the scalar). The next instruction is accepted
// in the cycle the current one finishes, so VSMUL and STPS sustain one per
// cycle. Element indices use the low log2(VLEN) bits of funct7 and register
// numbers the low log2(NUM_VREGS) bits of their fields.
//
// Interface: cmd (valid/ready) from the generation queue; VRF write port and
// two read ports; PSB write port (its write is also the STPS completion
// reported to dispatch); memory read request (valid/ready, byte address) with
// an in-order response (valid, VLEN*16-bit data); prefetch hint (one-cycle
// pulse, no handshake); scalar response to the host (valid/ready).
//
// The instruction set, the operand roles and the multiplier count (= VLEN)
// follow the document. The two-beat layout of LDVALIDX, the state sequence,
// the byte addressing of PSB slots and one outstanding read are this
// implementation's choices.
module scg_psu
  import scg_pkg::*;
#(
  parameter int unsigned VLEN      = scg_pkg::DEFAULT_VLEN,
  parameter int unsigned NUM_VREGS = scg_pkg::DEFAULT_NUM_VREGS,
  parameter int unsigned SLOTS     = scg_pkg::DEFAULT_PSB_SLOTS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // instruction from the generation queue
  input  logic                         cmd_valid,
  output logic                         cmd_ready,
  input  scg_cmd_t                     cmd,
  // vector register file
  output logic                         vrf_we,
  output logic [$clog2(NUM_VREGS)-1:0] vrf_waddr,
  output logic [VLEN-1:0][15:0]        vrf_wdata,
  output logic [$clog2(NUM_VREGS)-1:0] vrf_raddr_a,
  input  logic [VLEN-1:0][15:0]        vrf_rdata_a,
  output logic [$clog2(NUM_VREGS)-1:0] vrf_raddr_b,
  input  logic [VLEN-1:0][15:0]        vrf_rdata_b,
  // partial sum buffer write (STPS)
  output logic                         psb_we,
  output logic [$clog2(SLOTS)-1:0]     psb_slot,
  output logic [VLEN-1:0][15:0]        psb_wdata,
  // memory reads for A and B
  output logic                         rd_req_valid,
  input  logic                         rd_req_ready,
  output logic [XLEN-1:0]              rd_req_addr,
  input  logic                         rd_resp_valid,
  input  logic [VLEN-1:0][15:0]        rd_resp_data,
  output logic                         pf_valid,
  output logic [XLEN-1:0]              pf_addr,
  // scalar result of VSMV to the host
  output logic                         resp_valid,
  input  logic                         resp_ready,
  output scg_resp_t                    resp,
  output logic                         busy
);

  localparam int unsigned IW = (VLEN > 1) ? $clog2(VLEN) : 1;
  localparam int unsigned RW = $clog2(NUM_VREGS);
  localparam int unsigned SW = $clog2(SLOTS);
  localparam int unsigned SB = $clog2(2 * VLEN);

  typedef enum logic [2:0] {S_IDLE, S_EXEC, S_LD_REQ, S_LD_RESP, S_RESP} state_e;

  state_e          state, state_nx;
  scg_cmd_t        cq;
  logic            beat;
  logic            done;
  logic [IW-1:0]   eidx;
  logic [15:0]     scalar;
  logic [VLEN-1:0][15:0] prod;

  assign eidx   = cq.funct7[IW-1:0];
  assign scalar = vrf_rdata_a[eidx];

  for (genvar i = 0; i < VLEN; i++) begin : g_mul
    fp16_mul u_mul (.a(scalar), .b(vrf_rdata_b[i]), .p(prod[i]));
  end

  always_comb begin
    vrf_raddr_a  = cq.rs1[RW-1:0];
    vrf_raddr_b  = cq.rs2[RW-1:0];
    vrf_we       = 1'b0;
    vrf_waddr    = cq.rd[RW-1:0];
    vrf_wdata    = prod;
    psb_we       = 1'b0;
    psb_slot     = cq.rd_val[SB +: SW];
    psb_wdata    = vrf_rdata_a;
    rd_req_valid = (state == S_LD_REQ);
    rd_req_addr  = (cq.op == F3_LDVALIDX)
                 ? cq.rd_val + (beat ? XLEN'(2 * VLEN) : '0)
                 : cq.rs1_val;
    pf_valid     = (state == S_LD_REQ) && (cq.op == F3_LDPRF) && rd_req_ready;
    pf_addr      = cq.rs2_val;
    resp_valid   = (state == S_RESP);
    resp.rd      = cq.rd;
    resp.data    = XLEN'(scalar);
    done         = 1'b0;
    state_nx     = state;

    unique case (state)
      S_IDLE: ;
      S_EXEC: begin
        done = 1'b1;
        if (cq.op == F3_VSMUL) vrf_we = 1'b1;
        if (cq.op == F3_STPS)  psb_we = 1'b1;
      end
      S_LD_REQ:
        if (rd_req_ready) state_nx = S_LD_RESP;
      S_LD_RESP:
        if (rd_resp_valid) begin
          vrf_we    = 1'b1;
          vrf_wdata = rd_resp_data;
          if (cq.op == F3_LDVALIDX)
            vrf_waddr = beat ? cq.rs1[RW-1:0] : cq.rs2[RW-1:0];
          if (cq.op == F3_LDVALIDX && !beat) state_nx = S_LD_REQ;
          else                               done = 1'b1;
        end
      S_RESP:
        if (resp_ready) done = 1'b1;
      default: ;
    endcase

    cmd_ready = (state == S_IDLE) || done;
    if (done) state_nx = S_IDLE;
    if (cmd_valid && cmd_ready) begin
      unique case (cmd.op)
        F3_LDVALIDX, F3_LDPRF: state_nx = S_LD_REQ;
        F3_VSMV:               state_nx = S_RESP;
        default:               state_nx = S_EXEC;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cq    <= '0;
      beat  <= 1'b0;
    end else begin
      state <= state_nx;
      if (cmd_valid && cmd_ready) begin
        cq   <= cmd;
        beat <= 1'b0;
      end else if (state == S_LD_RESP && rd_resp_valid) begin
        beat <= 1'b1;
      end
    end
  end

  assign busy = (state != S_IDLE);

  a_resp_only_when_waiting: assert property (@(posedge clk) disable iff (!rst_n)
    rd_resp_valid |-> state == S_LD_RESP);

endmodule
