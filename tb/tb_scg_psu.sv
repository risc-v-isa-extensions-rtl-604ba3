// tb_scg_psu: runs the Partial Sum Unit with a vector register file, a
// memory model with random latency and back-pressure, and a capture of its
// partial sum buffer writes. Each round loads an SCG group with LDVALIDX,
// reads an index back with VSMV, loads a chunk of B with LDPRF (checking the
// prefetch hint), multiplies with VSMUL and stores with STPS; the stored
// block is compared with products computed by the reference FP16 model.
// Also checks that VSMUL and STPS issue back to back at one per cycle.
module tb_scg_psu;
  import scg_pkg::*;
  import tb_fp16_ref_pkg::*;
  localparam int VLEN = 8;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready;
  scg_cmd_t cmd = '0;
  logic vrf_we;
  logic [1:0] vrf_waddr, vrf_raddr_a, vrf_raddr_b;
  logic [VLEN-1:0][15:0] vrf_wdata, vrf_rdata_a, vrf_rdata_b, psb_wdata, rd_resp_data;
  logic psb_we;
  logic [1:0] psb_slot;
  logic rd_req_valid, rd_req_ready, rd_resp_valid, pf_valid;
  logic [63:0] rd_req_addr, pf_addr;
  logic resp_valid, resp_ready = 1;
  scg_resp_t resp;
  logic busy;
  logic wr_req_ready;
  int checks = 0, failures = 0;

  scg_psu dut (.*);
  scg_vrf u_vrf (.clk, .rst_n, .we(vrf_we), .waddr(vrf_waddr), .wdata(vrf_wdata),
                 .raddr_a(vrf_raddr_a), .rdata_a(vrf_rdata_a),
                 .raddr_b(vrf_raddr_b), .rdata_b(vrf_rdata_b));
  tb_mem_model #(.VLEN(VLEN), .BYTES(4096)) u_mem (
    .clk, .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_resp_valid,
    .rd_resp_data(rd_resp_data), .pf_valid, .pf_addr,
    .wr_req_valid(1'b0), .wr_req_ready, .wr_req_addr(64'd0), .wr_req_data('0));

  always #5 clk = ~clk;

  // captured PSB writes and scalar responses
  logic [VLEN-1:0][15:0] psb_cap [4];
  int psb_writes = 0;
  int resp_cnt = 0;
  scg_resp_t last_resp;
  int psb_write_cycle [$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (psb_we) begin psb_cap[psb_slot] <= psb_wdata; psb_writes++; psb_write_cycle.push_back(cyc); end
    if (resp_valid && resp_ready) begin last_resp = resp; resp_cnt++; end
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

  task automatic send(input scg_op_e op, input int f7, input int rs1, input int rs2, input int rd,
                      input longint v1, input longint v2, input longint vd);
    cmd = '0;
    cmd.op = op; cmd.funct7 = 7'(f7); cmd.rs1 = 5'(rs1); cmd.rs2 = 5'(rs2); cmd.rd = 5'(rd);
    cmd.rs1_val = 64'(v1); cmd.rs2_val = 64'(v2); cmd.rd_val = 64'(vd);
    cmd_valid = 1; #1;
    while (!cmd_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic wait_idle();
    #1;
    while (busy) begin @(negedge clk); #1; end
  endtask

  function automatic void put16(input int addr, input logic [15:0] v);
    u_mem.mem[addr] = v[7:0]; u_mem.mem[addr + 1] = v[15:8];
  endfunction

  initial begin
    logic [15:0] vals [VLEN], idx [VLEN], brow [VLEN];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 40; round++) begin
      automatic int a_addr = 64 * (round % 8);       // SCG group: values then indices
      automatic int e = $urandom_range(0, VLEN - 1);
      automatic int b_addr, slot, rsp_before, pf_before;
      for (int i = 0; i < VLEN; i++) begin
        vals[i] = rand_h();
        idx[i]  = 16'($urandom_range(0, 63));
        put16(a_addr + 2 * i, vals[i]);
        put16(a_addr + 2 * VLEN + 2 * i, idx[i]);
      end
      // LDVALIDX vr0 (values), vr1 (indices), address in x(rd)
      send(F3_LDVALIDX, 0, 1, 0, 10, 0, 0, a_addr);
      // VSMV r3 = vr1[e]
      rsp_before = resp_cnt;
      send(F3_VSMV, e, 1, 0, 3, 0, 0, 0);
      wait_idle();
      chk(resp_cnt == rsp_before + 1 && last_resp.rd == 5'd3, "VSMV response");
      chk(last_resp.data == 64'(idx[e]), "VSMV data = column index");
      // B row chunk for that index, at 1024 + idx*16
      b_addr = 1024 + 16 * int'(last_resp.data);
      for (int i = 0; i < VLEN; i++) begin
        brow[i] = rand_h();
        put16(b_addr + 2 * i, brow[i]);
      end
      pf_before = u_mem.prefetches;
      send(F3_LDPRF, 0, 4, 5, 2, b_addr, b_addr + 16, 0);
      wait_idle();
      chk(u_mem.prefetches == pf_before + 1 && u_mem.last_pf_addr == 64'(b_addr + 16), "prefetch hint");
      // VSMUL vr3 = vr0[e] * vr2 ; STPS vr3 -> slot
      slot = round % 4;
      send(F3_VSMUL, e, 0, 2, 3, 0, 0, 0);
      send(F3_STPS, 0, 3, 0, 6, 0, 0, 16 * slot);
      wait_idle();
      @(negedge clk);
      for (int i = 0; i < VLEN; i++)
        chk(psb_cap[slot][i] == mul(vals[e], brow[i]), "partial sum element");
      // the column indices also arrived in vr1 unchanged
      send(F3_STPS, 0, 1, 0, 6, 0, 0, 16 * ((slot + 1) % 4));
      wait_idle();
      @(negedge clk);
      for (int i = 0; i < VLEN; i++)
        chk(psb_cap[(slot + 1) % 4][i] == idx[i], "index vector");
    end
    // throughput: VSMUL, STPS, VSMUL, STPS back to back
    psb_write_cycle.delete();
    fork
      begin
        send(F3_VSMUL, 1, 0, 2, 3, 0, 0, 0);
        send(F3_STPS, 0, 3, 0, 6, 0, 0, 0);
        send(F3_VSMUL, 2, 0, 2, 3, 0, 0, 0);
        send(F3_STPS, 0, 3, 0, 6, 0, 0, 16);
      end
    join
    wait_idle();
    @(negedge clk);
    chk(psb_write_cycle.size() == 2 && psb_write_cycle[1] - psb_write_cycle[0] == 2,
        "VSMUL+STPS pairs at one instruction per cycle");
    chk(u_mem.rd_stall_cycles > 0, "memory back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
