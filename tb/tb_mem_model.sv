// tb_mem_model: behavioural model of the host's load/store unit and memory,
// for testbenches only. Byte-addressed little-endian memory of BYTES bytes.
// Reads: a request is accepted when rd_req_ready is high (ready is random,
// READY_PCT percent of cycles); the VLEN*16-bit response follows, in order,
// after 1..MAX_LAT cycles. Writes: accepted when wr_req_ready is high, also
// random. Prefetch hints are counted. Counters of stalled cycles let a test
// check that back-pressure occurred.
module tb_mem_model #(
  parameter int VLEN      = 8,
  parameter int BYTES     = 65536,
  parameter int MAX_LAT   = 4,
  parameter int READY_PCT = 70
) (
  input  logic                clk,
  input  logic                rd_req_valid,
  output logic                rd_req_ready,
  input  logic [63:0]         rd_req_addr,
  output logic                rd_resp_valid,
  output logic [VLEN*16-1:0]  rd_resp_data,
  input  logic                pf_valid,
  input  logic [63:0]         pf_addr,
  input  logic                wr_req_valid,
  output logic                wr_req_ready,
  input  logic [63:0]         wr_req_addr,
  input  logic [VLEN*16-1:0]  wr_req_data
);
  localparam int VB = VLEN * 2;

  logic [7:0] mem [BYTES];
  int rd_stall_cycles = 0, wr_stall_cycles = 0, reads = 0, writes = 0, prefetches = 0;
  logic [63:0] last_pf_addr = 0;

  typedef struct { int due; logic [VLEN*16-1:0] data; } pend_t;
  pend_t pend [$];
  int cyc = 0;

  function automatic logic [VLEN*16-1:0] read_vec(input logic [63:0] addr);
    logic [VLEN*16-1:0] v;
    for (int i = 0; i < VB; i++) v[8*i +: 8] = mem[(int'(addr) + i) % BYTES];
    return v;
  endfunction

  initial begin
    for (int i = 0; i < BYTES; i++) mem[i] = 8'h00;
    rd_req_ready  = 1'b0;
    wr_req_ready  = 1'b0;
    rd_resp_valid = 1'b0;
    rd_resp_data  = '0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rd_req_valid && !rd_req_ready) rd_stall_cycles++;
    if (wr_req_valid && !wr_req_ready) wr_stall_cycles++;
    if (rd_req_valid && rd_req_ready) begin
      pend_t p;
      p.due  = cyc + $urandom_range(1, MAX_LAT);
      p.data = read_vec(rd_req_addr);
      pend.push_back(p);
      reads++;
    end
    if (pf_valid) begin prefetches++; last_pf_addr = pf_addr; end
    if (wr_req_valid && wr_req_ready) begin
      for (int i = 0; i < VB; i++) mem[(int'(wr_req_addr) + i) % BYTES] = wr_req_data[8*i +: 8];
      writes++;
    end
    rd_req_ready <= ($urandom_range(0, 99) < READY_PCT);
    wr_req_ready <= ($urandom_range(0, 99) < READY_PCT);
    if (pend.size() != 0 && pend[0].due <= cyc) begin
      rd_resp_valid <= 1'b1;
      rd_resp_data  <= pend[0].data;
      void'(pend.pop_front());
    end else begin
      rd_resp_valid <= 1'b0;
    end
  end
endmodule
