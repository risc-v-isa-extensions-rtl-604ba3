// tb_scg_llm_slice: runs the extension at its default parameters on slices
// of the LLM projection layers the design targets. A layer multiplies a pruned
// weight matrix W (out x in) by the activations X (in x tokens); the work per
// output row grows with the inner dimension "in" and with the density, so the
// slice kept here is one full row block of W (VLEN = 8 output rows, all "in"
// columns) against one VLEN-wide column block of X (8 tokens). Every distinct
// inner dimension of the targeted layers is run: 2048 (OPT-1.3B and
// TinyLLaMA-1.1B Q/K/V/O and up projections), 4096 (LLaMA2-7B Q/K/V/O and up),
// 5632 (TinyLLaMA-1.1B down), 8192 (OPT-1.3B down) and 11008 (LLaMA2-7B down),
// each at unstructured sparsity 0.4, 0.5 and 0.6. The weights are random
// FP16 with a random unstructured zero pattern (the real pruned weights are
// not available), stored in SCG layout, and the result is compared with a
// reference that adds the products in the same order as the kernel. The
// instruction sequence is the same outer-product kernel as in the end-to-end
// test. The cycle count of each slice is printed together with the number of
// SCG groups it processed. The layer widths and the three sparsity levels
// are those of the published evaluation; the slicing, the random data and the
// host model are this testbench's own choices.
module tb_scg_llm_slice;
  import scg_pkg::*;
  import tb_fp16_ref_pkg::*;

  localparam int VLEN = 8;
  localparam int M = 8, KMAX = 11008, N = 8;
  localparam int NK = 5;
  localparam int K_LIST [NK] = '{2048, 4096, 5632, 8192, 11008};
  int K;
  localparam int A_BASE = 'h00000, B_BASE = 'h40000, C_BASE = 'h70000;
  localparam int ROWSIZE_B = N * 2;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, cmd_illegal;
  logic [31:0] cmd_inst = 0;
  logic [63:0] cmd_rs1_val = 0, cmd_rs2_val = 0, cmd_rd_val = 0;
  logic resp_valid, resp_ready;
  logic [4:0] resp_rd;
  logic [63:0] resp_data;
  logic mem_rd_req_valid, mem_rd_req_ready, mem_rd_resp_valid, mem_pf_valid;
  logic [63:0] mem_rd_req_addr, mem_pf_addr, mem_wr_req_addr;
  logic [VLEN*16-1:0] mem_rd_resp_data, mem_wr_req_data;
  logic mem_wr_req_valid, mem_wr_req_ready;
  logic psu_busy, mu_busy, gen_psb_wait, mrg_psb_wait;

  scg_spmm_ext dut (.*);

  tb_mem_model #(.VLEN(VLEN), .BYTES('h80000)) u_mem (
    .clk, .rd_req_valid(mem_rd_req_valid), .rd_req_ready(mem_rd_req_ready),
    .rd_req_addr(mem_rd_req_addr), .rd_resp_valid(mem_rd_resp_valid),
    .rd_resp_data(mem_rd_resp_data), .pf_valid(mem_pf_valid), .pf_addr(mem_pf_addr),
    .wr_req_valid(mem_wr_req_valid), .wr_req_ready(mem_wr_req_ready),
    .wr_req_addr(mem_wr_req_addr), .wr_req_data(mem_wr_req_data));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_overlap = 0, n_mrg_wait = 0, n_gen_wait = 0, n_disp_full = 0;
  int n_resp = 0, n_illegal = 0, n_merge = 0, n_stres = 0;
  logic [63:0] resp_q [$];

  // progress watchdog: a hang shows as no accepted instruction for 100k cycles
  int since_cmd = 0;
  always @(posedge clk) begin
    since_cmd <= (cmd_valid && cmd_ready) ? 0 : since_cmd + 1;
    if (since_cmd == 100000) begin
      failures++;
      $display("no instruction accepted for 100000 cycles");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  always @(posedge clk) begin
    resp_ready <= ($urandom_range(0, 99) < 70);
    if (rst_n) begin
      if (psu_busy && mu_busy) n_overlap++;
      if (mrg_psb_wait) n_mrg_wait++;
      if (gen_psb_wait) n_gen_wait++;
      if (cmd_valid && !cmd_ready) n_disp_full++;
      if (cmd_illegal) n_illegal++;
      if (resp_valid && resp_ready) begin resp_q.push_back(resp_data); n_resp++; end
    end
  end

  initial begin
    repeat (60000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- host side ----------------
  function automatic logic [31:0] enc(input scg_op_e op, input int f7, input int rs2,
                                      input int rs1, input int rd);
    return {7'(f7), 5'(rs2), 5'(rs1), 3'(op), 5'(rd), 7'h0b};
  endfunction

  task automatic issue(input logic [31:0] inst, input longint v1, input longint v2, input longint vd);
    cmd_inst = inst; cmd_rs1_val = 64'(v1); cmd_rs2_val = 64'(v2); cmd_rd_val = 64'(vd);
    cmd_valid = 1; #1;
    while (!cmd_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic get_resp(output logic [63:0] v);
    while (resp_q.size() == 0) @(negedge clk);
    v = resp_q.pop_front();
  endtask

  function automatic void put16(input int addr, input logic [15:0] v);
    u_mem.mem[addr] = v[7:0]; u_mem.mem[addr + 1] = v[15:8];
  endfunction
  function automatic logic [15:0] get16(input int addr);
    return {u_mem.mem[addr + 1], u_mem.mem[addr]};
  endfunction

  // ---------------- matrices ----------------
  logic [15:0] A [M][KMAX];
  logic [15:0] B [KMAX][N];
  int          nzc [M][KMAX];   // column of the j-th nonzero of each row
  int          nnz [M];
  int          grp_base [M / VLEN];
  int          ngrp [M / VLEN];

  function automatic logic [15:0] rand_val();
    return {1'($urandom), 5'($urandom_range(13, 16)), 10'($urandom)};
  endfunction

  task automatic build(input int sparsity_pct);
    int addr = A_BASE;
    for (int r = 0; r < M; r++) begin
      nnz[r] = 0;
      for (int c = 0; c < K; c++) begin
        A[r][c] = ($urandom_range(0, 99) < sparsity_pct) ? 16'h0000 : rand_val();
        if (c == r % K && A[r][c] == 16'h0000) A[r][c] = rand_val();  // no empty row
        if (A[r][c] != 16'h0000) begin nzc[r][nnz[r]] = c; nnz[r]++; end
      end
    end
    for (int k = 0; k < K; k++)
      for (int c = 0; c < N; c++) begin
        B[k][c] = rand_val();
        put16(B_BASE + k * ROWSIZE_B + 2 * c, B[k][c]);
      end
    // SCG: per row block, group j = j-th nonzero of each row, zero padded
    for (int rb = 0; rb < M / VLEN; rb++) begin
      ngrp[rb] = 0;
      for (int i = 0; i < VLEN; i++) if (nnz[rb * VLEN + i] > ngrp[rb]) ngrp[rb] = nnz[rb * VLEN + i];
      grp_base[rb] = addr;
      for (int j = 0; j < ngrp[rb]; j++) begin
        for (int i = 0; i < VLEN; i++) begin
          int r = rb * VLEN + i;
          put16(addr + 2 * i,            (j < nnz[r]) ? A[r][nzc[r][j]] : 16'h0000);
          put16(addr + 2 * VLEN + 2 * i, (j < nnz[r]) ? 16'(nzc[r][j]) : 16'h0000);
        end
        addr += 4 * VLEN;
      end
    end
    for (int a = C_BASE; a < C_BASE + M * N * 2; a++) u_mem.mem[a] = 8'hee;
  endtask

  // ---------------- PSB slot rotation ----------------
  bit live [4];
  int next_slot = 0;
  function automatic int alloc();
    for (int t = 0; t < 4; t++) begin
      int s = (next_slot + t) % 4;
      if (!live[s]) begin live[s] = 1; next_slot = (s + 1) % 4; return s; end
    end
    return -1;
  endfunction

  // one generation block: partial sum of nonzero j of row i of block rb,
  // column block cb, into a fresh PSB slot
  task automatic gen_block(input int rb, input int i, input int j, input int cb, output int slot);
    logic [63:0] k;
    longint r4;
    issue(enc(F3_LDVALIDX, 0, 0, 1, 10), 0, 0, grp_base[rb] + 4 * VLEN * j);  // vr0 values, vr1 indices
    issue(enc(F3_VSMV, i, 0, 1, 3), 0, 0, 0);                                  // r3 = vr1[i]
    get_resp(k);
    r4 = B_BASE + longint'(k) * ROWSIZE_B + 2 * VLEN * cb;
    issue(enc(F3_LDPRF, 0, 5, 4, 2), r4, r4 + 2 * VLEN, 0);                    // vr2 = B chunk
    issue(enc(F3_VSMUL, i, 2, 0, 3), 0, 0, 0);                                 // vr3 = vr0[i]*vr2
    slot = alloc();
    issue(enc(F3_STPS, 0, 0, 3, 6), 0, 0, 16 * slot);                          // PSB <- vr3
  endtask

  task automatic run_spmm();
    for (int s = 0; s < 4; s++) live[s] = 0;
    for (int rb = 0; rb < M / VLEN; rb++)
      for (int i = 0; i < VLEN; i++)
        for (int cb = 0; cb < N / VLEN; cb++) begin
          int first = 0, p = 0, acc = 0, d = 0;
          for (int j = 0; j < ngrp[rb]; j++) begin
            gen_block(rb, i, j, cb, p);
            if (j == 0) begin
              first = p;
              acc = p;
            end else begin
              d = alloc();
              issue(enc(F3_MERGE, 0, 7, 6, 8), 16 * (j == 1 ? first : acc), 16 * p, 16 * d);
              n_merge++;
              live[p] = 0;
              live[j == 1 ? first : acc] = 0;
              acc = d;
            end
          end
          issue(enc(F3_STRES, 0, 0, 6, 9), 16 * acc, 0,
                C_BASE + (rb * VLEN + i) * N * 2 + 2 * VLEN * cb);
          n_stres++;
          live[acc] = 0;
        end
  endtask

  // drained once both units have been idle for 16 cycles in a row
  task automatic wait_drain();
    int idle = 0;
    while (idle < 16) begin
      @(negedge clk);
      idle = (psu_busy || mu_busy) ? 0 : idle + 1;
    end
  endtask

  task automatic check_c(input int sp);
    int bad = 0;
    for (int r = 0; r < M; r++)
      for (int c = 0; c < N; c++) begin
        logic [15:0] ref_v;
        int grp_n = ngrp[r / VLEN];
        // same order as the kernel: P0 + P1, then Pj + acc; padded groups add 0 * B[0][c]
        for (int j = 0; j < grp_n; j++) begin
          logic [15:0] pj = (j < nnz[r]) ? mul(A[r][nzc[r][j]], B[nzc[r][j]][c]) : mul(16'h0000, B[0][c]);
          ref_v = (j == 0) ? pj : add(j == 1 ? ref_v : pj, j == 1 ? pj : ref_v);
        end
        checks++;
        if (get16(C_BASE + r * N * 2 + 2 * c) !== ref_v) begin
          failures++; bad++;
          if (bad < 5) $display("FAIL sparsity %0d C[%0d][%0d] = %h expected %h", sp, r, c,
                                get16(C_BASE + r * N * 2 + 2 * c), ref_v);
        end
      end
  endtask

  initial begin
    int sp_list [3] = '{40, 50, 60};
    int t0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (K_LIST[kk]) begin
      K = K_LIST[kk];
      foreach (sp_list[n]) begin
        build(sp_list[n]);
        t0 = $time / 10;
        run_spmm();
        wait_drain();
        $display("in=%0d sparsity 0.%0d: %0d SCG groups x %0d rows x %0d tokens, %0d cycles",
                 K, sp_list[n] / 10, ngrp[0], M, N, $time / 10 - t0);
        check_c(sp_list[n]);
      end
    end
    chk(n_illegal == 0, "no illegal instruction flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
