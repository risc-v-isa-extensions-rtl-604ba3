// tb_scg_decoder: encodes each of the seven instructions with random fields
// and checks the decoded operation, fields, pipeline choice and register
// reads against the instruction table; also checks that other opcodes and
// funct3 = 7 are rejected.
module tb_scg_decoder;
  import scg_pkg::*;
  logic [31:0] inst;
  logic legal, to_merge, reads_rs1, reads_rs2, reads_rd;
  scg_op_e op;
  logic [6:0] funct7;
  logic [4:0] rs1, rs2, rd;
  int checks = 0, failures = 0;

  scg_decoder dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s inst=%h", what, inst); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // expected per funct3: {to_merge, reads_rs1, reads_rs2, reads_rd}
    logic [3:0] expect_tab [7];
    expect_tab[0] = 4'b0001;  // LDVALIDX: input addr in rd
    expect_tab[1] = 4'b0000;  // VSMV
    expect_tab[2] = 4'b0110;  // LDPRF: input addr rs1, prefetch addr rs2
    expect_tab[3] = 4'b0000;  // VSMUL
    expect_tab[4] = 4'b0001;  // STPS: buffer addr in rd
    expect_tab[5] = 4'b1111;  // MERGE
    expect_tab[6] = 4'b1101;  // STRES
    for (int n = 0; n < 700; n++) begin
      automatic int f3 = n % 7;
      automatic logic [6:0] f7 = 7'($urandom);
      automatic logic [4:0] a = 5'($urandom), b = 5'($urandom), d = 5'($urandom);
      inst = {f7, b, a, 3'(f3), d, 7'h0b};
      #1;
      chk(legal, "legal");
      chk(op == scg_op_e'(f3), "op");
      chk(funct7 == f7 && rs2 == b && rs1 == a && rd == d, "fields");
      chk({to_merge, reads_rs1, reads_rs2, reads_rd} == expect_tab[f3], "class");
    end
    for (int n = 0; n < 200; n++) begin
      inst = {$urandom} & ~32'h7f | 32'h0b | 32'h7000;  // funct3 = 7
      #1;
      chk(!legal && !to_merge && !reads_rd, "funct3 7 rejected");
      inst = 32'($urandom);
      if (inst[6:0] == 7'h0b) inst[0] = 1'b0;
      #1;
      chk(!legal, "other opcode rejected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
