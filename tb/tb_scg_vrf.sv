// tb_scg_vrf: checks reset to zero, then random writes and reads on both
// read ports against a reference array (writes visible the next cycle).
module tb_scg_vrf;
  localparam int VLEN = 8, NR = 4;
  logic clk = 0, rst_n = 0;
  logic we = 0;
  logic [1:0] waddr = 0, raddr_a = 0, raddr_b = 0;
  logic [VLEN-1:0][15:0] wdata = '0, rdata_a, rdata_b;
  logic [VLEN-1:0][15:0] model [NR];
  int checks = 0, failures = 0;

  scg_vrf #(.VLEN(VLEN), .NUM_VREGS(NR)) dut (.*);
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
    for (int i = 0; i < NR; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NR; i++) begin
      raddr_a = 2'(i); raddr_b = 2'(NR - 1 - i); #1;
      chk(rdata_a == '0 && rdata_b == '0, "reset value");
    end
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      we = 1'($urandom);
      waddr = 2'($urandom);
      for (int e = 0; e < VLEN; e++) wdata[e] = 16'($urandom);
      raddr_a = 2'($urandom); raddr_b = 2'($urandom);
      #1;
      chk(rdata_a == model[raddr_a], "port a");
      chk(rdata_b == model[raddr_b], "port b");
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
