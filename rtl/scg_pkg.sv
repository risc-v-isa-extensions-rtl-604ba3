// scg_pkg: types and constants shared by the SCG sparse-SpMM instruction
// extension.
//
// The extension adds seven custom instructions in the RISC-V custom-0 major
// opcode (0x0b). Each uses the R-type layout: funct7[31:25], rs2[24:20],
// rs1[19:15], funct3[14:12], rd[11:7], opcode[6:0]; funct3 selects the
// instruction. Vectors hold VLEN FP16 elements (VLEN = 8, 128 bits). The
// opcode, the funct3 numbering, the field roles, VLEN = 8, the 4 x 128-bit
// vector register file and the 64-byte partial sum buffer follow the
// published design; the command and queue-entry records passed between stages and the PSB
// byte addressing (slot = address / (2*VLEN), i.e. / 16) are choices of this implementation.
package scg_pkg;

  localparam int unsigned XLEN = 64;  // RV64 host
  localparam int unsigned DEFAULT_VLEN      = 8;  // FP16 elements per vector (128 bits)
  localparam int unsigned DEFAULT_NUM_VREGS = 4;  // vr0..vr3
  localparam int unsigned DEFAULT_PSB_SLOTS = 4;  // 4 blocks of VLEN elements = 64 B

  localparam logic [6:0] OPC_CUSTOM0 = 7'h0b;

  typedef enum logic [2:0] {
    F3_LDVALIDX = 3'd0,  // load SCG values -> vr(rs2), column indices -> vr(rs1), from x(rd)
    F3_VSMV     = 3'd1,  // x(rd) <- vr(rs1)[funct7]
    F3_LDPRF    = 3'd2,  // vr(rd) <- mem[x(rs1)], prefetch x(rs2)
    F3_VSMUL    = 3'd3,  // vr(rd)[:] <- vr(rs1)[funct7] * vr(rs2)[:]
    F3_STPS     = 3'd4,  // PSB[x(rd)] <- vr(rs1)
    F3_MERGE    = 3'd5,  // PSB[x(rd)] <- PSB[x(rs1)] + PSB[x(rs2)]
    F3_STRES    = 3'd6   // mem[x(rd)] <- PSB[x(rs1)]
  } scg_op_e;

  // Decoded instruction with the three register values it reads. The
  // register values are those of the GPRs named in the rs1, rs2 and rd
  // fields; rd is read as a source for LDVALIDX, STPS, MERGE and STRES.
  typedef struct packed {
    scg_op_e          op;
    logic [6:0]       funct7;   // element index for VSMV / VSMUL
    logic [4:0]       rs1;
    logic [4:0]       rs2;
    logic [4:0]       rd;
    logic [XLEN-1:0]  rs1_val;
    logic [XLEN-1:0]  rs2_val;
    logic [XLEN-1:0]  rd_val;
  } scg_cmd_t;

  // Queue entry: the instruction plus the ordering tags the dispatch stage
  // gives it for the partial sum buffer slots it touches (see scg_dispatch).
  // Generation pipeline: tag0 belongs to the STPS slot. Merge pipeline:
  // tag0, tag1, tag2 belong to the slots of x(rs1), x(rs2) and x(rd).
  localparam int unsigned TAG_W = 4;
  typedef struct packed {
    scg_cmd_t          cmd;
    logic [TAG_W-1:0]  tag0;
    logic [TAG_W-1:0]  tag1;
    logic [TAG_W-1:0]  tag2;
  } scg_qentry_t;

  // Scalar write-back of VSMV to the host core.
  typedef struct packed {
    logic [4:0]      rd;
    logic [XLEN-1:0] data;
  } scg_resp_t;


endpackage
