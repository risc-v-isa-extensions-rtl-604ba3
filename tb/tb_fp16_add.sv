// tb_fp16_add: checks fp16_add against the real-valued reference on directed
// cases (cancellation, far-apart exponents, ties, overflow, specials) and on
// random operands.
module tb_fp16_add;
  import tb_fp16_ref_pkg::*;
  logic [15:0] a, b, s;
  int checks = 0, failures = 0;
  fp16_add dut (.a(a), .b(b), .s(s));

  task automatic check(input logic [15:0] x, input logic [15:0] y);
    logic [15:0] exp_s;
    a = x; b = y; #1;
    exp_s = add(x, y);
    checks++;
    if (s !== exp_s) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h = %h expected %h", x, y, s, exp_s);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h3c00, 16'h3c00);  // 1+1
    check(16'h3c00, 16'hbc00);  // 1-1 = +0
    check(16'h3c01, 16'hbc00);  // cancellation
    check(16'h6400, 16'h0400);  // far apart
    check(16'h3c00, 16'h1400);  // tie region
    check(16'h7bff, 16'h7bff);  // overflow
    check(16'h7c00, 16'hfc00);  // inf-inf
    check(16'h8000, 16'h8000);  // -0 + -0
    check(16'h4248, 16'hc247);  // near cancellation
    for (int i = 0; i < 20000; i++) check(rand_h(), rand_h());
    for (int i = 0; i < 5000; i++) begin
      automatic logic [15:0] x = rand_h();
      check(x, {~x[15], x[14:10], 10'($urandom)});  // opposite signs, same exponent
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
