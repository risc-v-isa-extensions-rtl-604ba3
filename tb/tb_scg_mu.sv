// tb_scg_mu: runs the Merge Unit on a partial sum buffer that the testbench
// fills through the buffer's generation write port. Random MERGE
// instructions are checked element by element against the reference FP16
// adder, the completion reports against the slots used, STRES against a
// memory model with random back-pressure, and back-to-back MERGEs against a
// rate of one per cycle.
module tb_scg_mu;
  import scg_pkg::*;
  import tb_fp16_ref_pkg::*;
  localparam int VLEN = 8;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready;
  scg_cmd_t cmd = '0;
  logic [1:0] psb_rd_slot0, psb_rd_slot1, psb_slot;
  logic [VLEN-1:0][15:0] psb_rd_data0, psb_rd_data1, psb_wdata, wr_req_data;
  logic psb_we;
  logic wr_req_valid, wr_req_ready;
  logic [63:0] wr_req_addr;
  logic done, done_is_merge, busy;
  logic [1:0] done_src0, done_src1, done_dst;
  logic gen_we = 0;
  logic [1:0] gen_slot = 0;
  logic [VLEN-1:0][15:0] gen_wdata = '0;
  logic rd_req_ready, rd_resp_valid;
  logic [VLEN*16-1:0] rd_resp_data;
  int checks = 0, failures = 0;

  scg_mu dut (.*);
  scg_psb u_psb (.clk, .rst_n, .gen_we, .gen_slot, .gen_wdata,
                 .mu_we(psb_we), .mu_slot(psb_slot), .mu_wdata(psb_wdata),
                 .rd_slot0(psb_rd_slot0), .rd_data0(psb_rd_data0),
                 .rd_slot1(psb_rd_slot1), .rd_data1(psb_rd_data1));
  tb_mem_model #(.VLEN(VLEN), .BYTES(4096)) u_mem (
    .clk, .rd_req_valid(1'b0), .rd_req_ready, .rd_req_addr(64'd0), .rd_resp_valid,
    .rd_resp_data, .pf_valid(1'b0), .pf_addr(64'd0),
    .wr_req_valid, .wr_req_ready, .wr_req_addr, .wr_req_data(wr_req_data));

  always #5 clk = ~clk;

  logic [VLEN-1:0][15:0] model [4];
  int cyc = 0, merge_cycles [$];
  int done_cnt = 0;
  logic [5:0] last_done;   // {is_merge, src0, src1} packed loosely
  logic [1:0] last_dst;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (psb_we) merge_cycles.push_back(cyc);
    if (done) begin done_cnt++; last_done = {done_is_merge, done_src0, done_src1, 1'b0}; last_dst = done_dst; end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic send(input scg_op_e op, input int s1, input int s2, input longint vd);
    cmd = '0;
    cmd.op = op;
    cmd.rs1_val = 64'(16 * s1); cmd.rs2_val = 64'(16 * s2); cmd.rd_val = 64'(vd);
    cmd_valid = 1; #1;
    while (!cmd_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic wait_idle();
    #1;
    while (busy) begin @(negedge clk); #1; end
  endtask

  task automatic fill(input int s);
    gen_we = 1; gen_slot = 2'(s);
    for (int i = 0; i < VLEN; i++) gen_wdata[i] = rand_h();
    model[s] = gen_wdata;
    @(negedge clk);
    gen_we = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++) fill(s);
    for (int n = 0; n < 300; n++) begin
      automatic int a = $urandom_range(0, 3), b = $urandom_range(0, 3), d = $urandom_range(0, 3);
      automatic logic [VLEN-1:0][15:0] expect_v;
      automatic int dc = done_cnt;
      for (int i = 0; i < VLEN; i++) expect_v[i] = add(model[a][i], model[b][i]);
      send(F3_MERGE, a, b, 16 * d);
      wait_idle();
      model[d] = expect_v;
      chk(done_cnt == dc + 1 && last_done[5] && last_done[4:3] == 2'(a) && last_done[2:1] == 2'(b)
          && last_dst == 2'(d), "merge completion report");
      // read back through STRES
      dc = done_cnt;
      send(F3_STRES, d, 0, 256 + 16 * (n % 16));
      wait_idle();
      chk(done_cnt == dc + 1 && !last_done[5] && last_done[4:3] == 2'(d), "stres completion report");
      for (int i = 0; i < VLEN; i++) begin
        automatic logic [15:0] m = {u_mem.mem[256 + 16 * (n % 16) + 2 * i + 1], u_mem.mem[256 + 16 * (n % 16) + 2 * i]};
        chk(m == expect_v[i], "merged element in memory");
      end
      if (n % 8 == 0) fill($urandom_range(0, 3));
    end
    // throughput: three MERGEs back to back
    merge_cycles.delete();
    send(F3_MERGE, 0, 1, 32);
    send(F3_MERGE, 2, 3, 0);
    send(F3_MERGE, 0, 1, 16);
    wait_idle();
    chk(merge_cycles.size() == 3 && merge_cycles[2] - merge_cycles[0] == 2, "one MERGE per cycle");
    chk(u_mem.wr_stall_cycles > 0, "write back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
