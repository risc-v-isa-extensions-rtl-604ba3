// scg_cmd_queue: the instruction queue at the head of each extended backend
// pipeline. It holds decoded custom instructions, with their register
// values, between dispatch and the unit that executes them (the Partial Sum
// Unit on one pipeline, the Merge Unit on the other), so that dispatch can
// run ahead of a unit that is busy with a memory access or a merge.
//
// How it works: a circular buffer of DEPTH entries with read and write
// pointers and an occupancy count. Push and pop use valid/ready handshakes;
// a push and a pop may happen in the same cycle, also when full (the pop
// frees the entry first).
//
// Timing: an entry pushed in cycle t is visible at the output in cycle t+1.
// The document only names this queue in its pipeline drawing; the depth of 4
// and the handshake are this implementation's choices.
module scg_cmd_queue #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  T                mem [DEPTH];
  logic [PW-1:0]   wr_ptr, rd_ptr;
  logic            push, pop;
  logic [CW-1:0]   count;

  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];
  assign in_ready  = (count != CW'(DEPTH)) || out_ready;
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [PW-1:0] incr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= incr(wr_ptr);
      if (pop)  rd_ptr <= incr(rd_ptr);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

endmodule
