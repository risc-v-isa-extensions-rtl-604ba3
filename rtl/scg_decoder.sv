// scg_decoder: custom-instruction decoder added to the host core's decode
// stage. It recognises the seven SpMM instructions in the custom-0 major
// opcode (0x0b), extracts their fields and says which extended pipeline
// executes them: LDVALIDX, VSMV, LDPRF, VSMUL and STPS go to the generation
// pipeline (Partial Sum Unit), MERGE and STRES to the merge pipeline (Merge
// Unit). It also says which general-purpose registers the host must read:
// for LDVALIDX, STPS, MERGE and STRES the rd field names a register that
// holds an address, so rd is read as a source. (VSMV is the only
// instruction that writes a general-purpose register, through the response
// port of the Partial Sum Unit.)
//
// Interface and timing: purely combinational. funct3 = 7 inside opcode 0x0b
// is flagged illegal. The encoding (Table of instruction formats: funct3 0..6,
// field roles) follows the document.
module scg_decoder
  import scg_pkg::*;
(
  input  logic [31:0] inst,
  output logic        legal,       // one of the seven instructions
  output scg_op_e     op,
  output logic [6:0]  funct7,
  output logic [4:0]  rs1,
  output logic [4:0]  rs2,
  output logic [4:0]  rd,
  output logic        to_merge,    // executes on the merge pipeline
  output logic        reads_rs1,   // rs1 names a GPR read as a source
  output logic        reads_rs2,
  output logic        reads_rd
);

  always_comb begin
    funct7    = inst[31:25];
    rs2       = inst[24:20];
    rs1       = inst[19:15];
    rd        = inst[11:7];
    op        = scg_op_e'(inst[14:12]);
    legal     = (inst[6:0] == OPC_CUSTOM0) && (inst[14:12] != 3'd7);
    to_merge  = 1'b0;
    reads_rs1 = 1'b0;
    reads_rs2 = 1'b0;
    reads_rd  = 1'b0;
    if (legal) begin
      unique case (op)
        F3_LDVALIDX: reads_rd = 1'b1;
        F3_VSMV:     ;
        F3_LDPRF:    begin reads_rs1 = 1'b1; reads_rs2 = 1'b1; end
        F3_VSMUL:    ;
        F3_STPS:     reads_rd = 1'b1;
        F3_MERGE:    begin to_merge = 1'b1; reads_rs1 = 1'b1; reads_rs2 = 1'b1; reads_rd = 1'b1; end
        F3_STRES:    begin to_merge = 1'b1; reads_rs1 = 1'b1; reads_rd = 1'b1; end
        default:     ;
      endcase
    end
  end

endmodule
