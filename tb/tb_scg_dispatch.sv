// tb_scg_dispatch: directed sequences for the steering and the PSB ordering
// tags. The testbench plays both queues: it takes the pushed entries and
// presents them back as queue heads. Checked: routing to the two pipelines;
// that a MERGE is never held at dispatch; that a MERGE head waits for an
// older STPS to its sources (read after write) and is released by its
// completion; that a younger STPS waits for an older MERGE that reads or
// writes its slot; that unrelated instructions go at once; queue
// back-pressure; illegal instructions.
module tb_scg_dispatch;
  import scg_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_legal = 1, in_to_merge = 0;
  scg_cmd_t in_cmd = '0;
  logic gen_valid, gen_ready = 1, mrg_valid, mrg_ready = 1;
  scg_qentry_t gen_entry, mrg_entry, gen_head = '0, mrg_head = '0;
  logic gen_head_valid = 0, mrg_head_valid = 0, gen_go, mrg_go;
  logic stps_done = 0, mu_done = 0, mu_is_merge = 0;
  logic [1:0] stps_slot = 0, mu_src0 = 0, mu_src1 = 0, mu_dst = 0;
  logic gen_wait, mrg_wait, illegal;
  int checks = 0, failures = 0;

  scg_dispatch dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Present an instruction at the current negedge; it is taken at the next
  // clock edge if in_ready.
  task automatic present(input scg_op_e op, input int s_rs1, input int s_rs2, input int s_rd);
    in_valid = 1;
    in_legal = 1;
    in_cmd = '0;
    in_cmd.op = op;
    in_cmd.rs1_val = 64'(s_rs1 * 16);
    in_cmd.rs2_val = 64'(s_rs2 * 16);
    in_cmd.rd_val  = 64'(s_rd * 16);
    in_to_merge = (op == F3_MERGE || op == F3_STRES);
    #1;
  endtask

  task automatic step();   // one clock edge, back at the next negedge
    @(negedge clk);
    in_valid = 0; stps_done = 0; mu_done = 0;
    #1;
  endtask

  scg_qentry_t stps0, merge012, stps1, stres1;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1;
    // 1. STPS to slot 0 goes to the generation queue, tag = 0 older merges
    present(F3_STPS, 0, 0, 0);
    chk(gen_valid && !mrg_valid && in_ready, "STPS routed to generation queue");
    chk(gen_entry.tag0 == 0 && gen_entry.cmd.rd_val == 64'd0, "STPS entry");
    stps0 = gen_entry;
    step();
    // 2. MERGE 0,1 -> 2 is dispatched at once with tag0 = 1 older STPS to slot 0
    present(F3_MERGE, 0, 1, 2);
    chk(mrg_valid && !gen_valid && in_ready, "MERGE dispatched without stall");
    chk(mrg_entry.tag0 == 1 && mrg_entry.tag1 == 0 && mrg_entry.tag2 == 0, "MERGE tags");
    merge012 = mrg_entry;
    step();
    // 3. as queue head it must wait for the STPS
    mrg_head = merge012; mrg_head_valid = 1; #1;
    chk(!mrg_go && mrg_wait, "MERGE head waits for older STPS (RAW)");
    // 4. a younger STPS to slot 1 (read by the MERGE) is dispatched ...
    present(F3_STPS, 0, 0, 1);
    chk(gen_valid && in_ready && gen_entry.tag0 == 1, "younger STPS tagged behind the MERGE");
    stps1 = gen_entry;
    step();
    // ... and waits at the head of its queue (WAR)
    gen_head = stps0; gen_head_valid = 1; #1;
    chk(gen_go && !gen_wait, "older STPS goes");
    stps_done = 1; stps_slot = 0;      // the STPS to slot 0 finishes
    step();
    gen_head = stps1; #1;
    chk(!gen_go && gen_wait, "younger STPS waits for the MERGE (WAR)");
    chk(mrg_go && !mrg_wait, "MERGE released by STPS completion");
    // 5. a VSMUL at the head is never held
    gen_head.cmd.op = F3_VSMUL; #1;
    chk(gen_go, "VSMUL head goes");
    gen_head = stps1; #1;
    // 6. STRES of slot 1, dispatched after the younger STPS: tag0 = 1
    present(F3_STRES, 1, 0, 0);
    chk(mrg_valid && in_ready && mrg_entry.tag0 == 1, "STRES tagged behind STPS slot 1");
    stres1 = mrg_entry;
    step();
    // the MERGE completes: reads 0,1 writes 2
    mu_done = 1; mu_is_merge = 1; mu_src0 = 0; mu_src1 = 1; mu_dst = 2;
    step();
    chk(gen_go && !gen_wait, "younger STPS released by MERGE completion");
    mrg_head = stres1; #1;
    chk(!mrg_go, "STRES waits for STPS slot 1");
    stps_done = 1; stps_slot = 1;
    step();
    chk(mrg_go, "STRES released");
    // 7. a STPS to slot 2 (written by the finished MERGE) is free; one to
    //    slot 1 (read by the pending STRES) waits
    present(F3_STPS, 0, 0, 2);
    chk(gen_valid && gen_entry.tag0 == 1, "STPS slot 2 tag");
    gen_head = gen_entry; #1;
    chk(gen_go, "STPS slot 2 goes (MERGE already done)");
    step();
    present(F3_STPS, 0, 0, 1);
    gen_head = gen_entry; #1;
    chk(!gen_go, "STPS slot 1 waits for STRES");
    step();
    mu_done = 1; mu_is_merge = 0; mu_src0 = 1;
    step();
    chk(gen_go, "STPS slot 1 released by STRES completion");
    // 8. back-pressure and illegal instructions
    gen_ready = 0;
    present(F3_VSMV, 0, 0, 0);
    chk(gen_valid && !in_ready, "full queue holds dispatch");
    gen_ready = 1;
    step();
    in_valid = 1; in_legal = 0; #1;
    chk(illegal && in_ready && !gen_valid && !mrg_valid, "illegal dropped");
    step();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
