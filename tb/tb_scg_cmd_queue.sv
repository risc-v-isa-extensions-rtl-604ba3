// tb_scg_cmd_queue: random pushes and pops against a reference FIFO; checks
// order, data, back-pressure when full and the one-cycle latency.
module tb_scg_cmd_queue;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [15:0] in_data = 0, out_data;
  int checks = 0, failures = 0, full_seen = 0, pops = 0;
  logic [15:0] model [$];

  scg_cmd_queue #(.T(logic [15:0]), .DEPTH(DEPTH)) dut (.*);

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
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 99) < (cyc < 2500 ? 80 : 40));
      in_data   = 16'($urandom);
      out_ready = ($urandom_range(0, 99) < (cyc < 2500 ? 40 : 80));
      #1;
      chk(out_valid == (model.size() != 0), "out_valid");
      if (out_valid) chk(out_data == model[0], "out_data");
      chk(in_ready == (model.size() < DEPTH || out_ready), "in_ready");
      if (model.size() == DEPTH && !out_ready) full_seen++;
      @(posedge clk);
      if (out_valid && out_ready) begin void'(model.pop_front()); pops++; end
      if (in_valid && in_ready) model.push_back(in_data);
    end
    chk(full_seen > 0, "queue never filled");
    chk(pops > 1000, "too few pops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
