// scg_vrf: vector register file of the extension, NUM_VREGS registers of
// VLEN FP16 elements (4 x 128 bits by default). It holds the SCG values and
// column indices loaded by LDVALIDX, the rows of the dense matrix loaded by
// LDPRF and the products of VSMUL before STPS moves them to the partial sum
// buffer.
//
// How it works: flip-flop registers, reset to zero, with one write port and
// two combinational read ports (a and b). The Partial Sum Unit is the only
// user: a load writes one register per cycle, VSMUL reads two registers and
// writes a third.
//
// Timing: a write in cycle t is visible on the read ports from cycle t+1.
// The size (4 x 128 bits) follows the document; the document draws the file
// as two halves, VRF_A and VRF_B, without saying how registers split between
// them, so this implementation keeps a single file with two read ports.
module scg_vrf #(
  parameter int unsigned VLEN      = scg_pkg::DEFAULT_VLEN,
  parameter int unsigned NUM_VREGS = scg_pkg::DEFAULT_NUM_VREGS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         we,
  input  logic [$clog2(NUM_VREGS)-1:0] waddr,
  input  logic [VLEN-1:0][15:0]        wdata,
  input  logic [$clog2(NUM_VREGS)-1:0] raddr_a,
  output logic [VLEN-1:0][15:0]        rdata_a,
  input  logic [$clog2(NUM_VREGS)-1:0] raddr_b,
  output logic [VLEN-1:0][15:0]        rdata_b
);

  logic [VLEN-1:0][15:0] regs [NUM_VREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_VREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata_a = regs[raddr_a];
  assign rdata_b = regs[raddr_b];

endmodule
