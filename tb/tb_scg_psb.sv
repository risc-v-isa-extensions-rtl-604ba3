// tb_scg_psb: checks reset to zero, then random writes from both pipelines
// (to different slots in the same cycle) and reads on both ports against a
// reference array.
module tb_scg_psb;
  localparam int VLEN = 8, SLOTS = 4;
  logic clk = 0, rst_n = 0;
  logic gen_we = 0, mu_we = 0;
  logic [1:0] gen_slot = 0, mu_slot = 0, rd_slot0 = 0, rd_slot1 = 0;
  logic [VLEN-1:0][15:0] gen_wdata = '0, mu_wdata = '0, rd_data0, rd_data1;
  logic [VLEN-1:0][15:0] model [SLOTS];
  int checks = 0, failures = 0;

  scg_psb #(.VLEN(VLEN), .SLOTS(SLOTS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    for (int i = 0; i < SLOTS; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < SLOTS; i++) begin
      rd_slot0 = 2'(i); rd_slot1 = 2'(i); #1;
      chk(rd_data0 == '0 && rd_data1 == '0, "reset value");
    end
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      gen_we = 1'($urandom); mu_we = 1'($urandom);
      gen_slot = 2'($urandom);
      mu_slot  = 2'($urandom);
      if (mu_slot == gen_slot) mu_slot = gen_slot + 2'd1;
      for (int e = 0; e < VLEN; e++) begin
        gen_wdata[e] = 16'($urandom); mu_wdata[e] = 16'($urandom);
      end
      rd_slot0 = 2'($urandom); rd_slot1 = 2'($urandom);
      #1;
      chk(rd_data0 == model[rd_slot0], "read port 0");
      chk(rd_data1 == model[rd_slot1], "read port 1");
      @(posedge clk);
      if (gen_we) model[gen_slot] = gen_wdata;
      if (mu_we)  model[mu_slot]  = mu_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
