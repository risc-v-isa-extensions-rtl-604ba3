// tb_fp16_mul: checks fp16_mul against the real-valued reference on directed
// cases (exact products, rounding ties, overflow, underflow, specials) and on
// random operands.
module tb_fp16_mul;
  import tb_fp16_ref_pkg::*;
  logic [15:0] a, b, p;
  int checks = 0, failures = 0;
  fp16_mul dut (.a(a), .b(b), .p(p));

  task automatic check(input logic [15:0] x, input logic [15:0] y);
    logic [15:0] exp_p;
    a = x; b = y; #1;
    exp_p = mul(x, y);
    checks++;
    if (p !== exp_p) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h expected %h", x, y, p, exp_p);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h3c00, 16'h3c00);  // 1*1
    check(16'h4000, 16'h4200);  // 2*3 = 6
    check(16'hc000, 16'h3800);  // -2*0.5
    check(16'h3c01, 16'h3c01);  // rounding
    check(16'h7bff, 16'h4000);  // overflow
    check(16'h0400, 16'h3800);  // underflow to zero
    check(16'h7c00, 16'h0000);  // inf*0
    check(16'h7c00, 16'hc000);  // -inf
    check(16'h7e01, 16'h3c00);  // NaN
    check(16'h8000, 16'h3c00);  // -0
    for (int i = 0; i < 20000; i++) check(rand_h(), rand_h());
    if (p !== mul(a, b)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
