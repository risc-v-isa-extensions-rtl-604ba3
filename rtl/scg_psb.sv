// scg_psb: Partial Sum Buffer, a small scratchpad of SLOTS blocks of VLEN
// FP16 elements (4 x 16 bytes = 64 bytes by default). It stages partial sum
// blocks between the two extended pipelines: the Partial Sum Unit stores new
// blocks with STPS while the Merge Unit reads two blocks, adds them and
// writes the merged block back, or reads a finished block for STRES. Slots
// of consumed blocks are reused for new ones.
//
// How it works: flip-flop storage, reset to zero, with two write ports (one
// per pipeline) and two combinational read ports (both used by the Merge
// Unit). The two pipelines never write the same slot in the same cycle: the
// dispatch stage holds back any instruction whose slots conflict with work in
// flight on the other pipeline; an assertion checks it.
//
// Timing: a write in cycle t is visible on the read ports from cycle t+1.
// The 64-byte size and the four-block capacity follow the document; the port
// arrangement is this implementation's choice.
module scg_psb #(
  parameter int unsigned VLEN  = scg_pkg::DEFAULT_VLEN,
  parameter int unsigned SLOTS = scg_pkg::DEFAULT_PSB_SLOTS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // write port of the generation pipeline (STPS)
  input  logic                     gen_we,
  input  logic [$clog2(SLOTS)-1:0] gen_slot,
  input  logic [VLEN-1:0][15:0]    gen_wdata,
  // write port of the merge pipeline (MERGE result)
  input  logic                     mu_we,
  input  logic [$clog2(SLOTS)-1:0] mu_slot,
  input  logic [VLEN-1:0][15:0]    mu_wdata,
  // read ports of the merge pipeline
  input  logic [$clog2(SLOTS)-1:0] rd_slot0,
  output logic [VLEN-1:0][15:0]    rd_data0,
  input  logic [$clog2(SLOTS)-1:0] rd_slot1,
  output logic [VLEN-1:0][15:0]    rd_data1
);

  logic [VLEN-1:0][15:0] slots [SLOTS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SLOTS; i++) slots[i] <= '0;
    end else begin
      if (gen_we) slots[gen_slot] <= gen_wdata;
      if (mu_we)  slots[mu_slot]  <= mu_wdata;
    end
  end

  assign rd_data0 = slots[rd_slot0];
  assign rd_data1 = slots[rd_slot1];

  a_no_write_collision: assert property (@(posedge clk) disable iff (!rst_n)
    !(gen_we && mu_we && gen_slot == mu_slot));

endmodule
