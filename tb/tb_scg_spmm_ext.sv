// tb_scg_spmm_ext: end-to-end test of the SpMM extension at its default
// parameters (VLEN = 8, 4 vector registers, 4 PSB slots). The testbench
// plays the host core and its memory:
//   * it builds a random unstructured-sparse A (M x K, FP16) at sparsities
//     0.4, 0.5 and 0.6 and a dense B (K x N), and stores A in SCG layout:
//     for each block of VLEN rows, group j holds the j-th nonzero of every
//     row (zero-padded) as VLEN values followed by their VLEN column indices;
//   * for each output row and each VLEN-wide column block it issues the
//     instruction sequence of the outer-product kernel: per nonzero a
//     generation block (LDVALIDX, VSMV, LDPRF with prefetch of the next
//     chunk, VSMUL, STPS) and after the second one a MERGE that folds the new
//     partial sum block into the running sum, with PSB slots taken in
//     rotation; finally STRES writes the row block of C;
//   * C is compared with a reference computed with the same FP16 rounding
//     order, in the testbench's own arithmetic.
// A short extra sequence provokes the remaining mechanisms (a store that must
// wait for an older merge, a full instruction queue, an illegal encoding).
// Every mechanism is counted and a mechanism that never occurred is a
// failure: overlap of generation and merging, merge waiting for a store,
// store waiting for a merge, dispatch back-pressure, memory back-pressure on
// reads and writes, prefetch hints, scalar responses, illegal instructions.
module tb_scg_spmm_ext;
  import scg_pkg::*;
  import tb_fp16_ref_pkg::*;

  localparam int VLEN = 8;
  localparam int M = 32, K = 256, N = 32;
  localparam int A_BASE = 'h0000, B_BASE = 'h8000, C_BASE = 'hc000;
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

  tb_mem_model #(.VLEN(VLEN), .BYTES(65536)) u_mem (
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
    repeat (20000000) @(posedge clk);
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
  logic [15:0] A [M][K];
  logic [15:0] B [K][N];
  int          nzc [M][K];   // column of the j-th nonzero of each row
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
    foreach (sp_list[n]) begin
      build(sp_list[n]);
      t0 = $time / 10;
      run_spmm();
      wait_drain();
      $display("sparsity 0.%0d: M=%0d K=%0d N=%0d, %0d cycles", sp_list[n] / 10, M, K, N, $time / 10 - t0);
      check_c(sp_list[n]);
    end

    // extra sequence: STPS, STPS, MERGE, then a STPS into a slot the MERGE
    // still has to read; then a burst of VSMULs behind a slow load; then an
    // illegal encoding.
    issue(enc(F3_STPS, 0, 0, 3, 6), 0, 0, 0);
    issue(enc(F3_STPS, 0, 0, 3, 6), 0, 0, 16);
    issue(enc(F3_MERGE, 0, 7, 6, 8), 0, 16, 32);
    issue(enc(F3_STPS, 0, 0, 0, 6), 0, 0, 0);
    issue(enc(F3_LDPRF, 0, 5, 4, 2), B_BASE, B_BASE + 16, 0);
    for (int n = 0; n < 8; n++) issue(enc(F3_VSMUL, n, 2, 0, 3), 0, 0, 0);
    issue({17'h0, 3'd7, 5'd0, 7'h0b}, 0, 0, 0);
    wait_drain();
    // slot 0 now holds vr0 (the values of the last SCG group loaded): the
    // late store must have waited for the MERGE and landed after it
    issue(enc(F3_STRES, 0, 0, 6, 9), 0, 0, C_BASE + 'h800);
    wait_drain();
    begin
      automatic int last = grp_base[M / VLEN - 1] + 4 * VLEN * (ngrp[M / VLEN - 1] - 1);
      for (int e = 0; e < VLEN; e++)
        chk(get16(C_BASE + 'h800 + 2 * e) == get16(last + 2 * e), "late store into slot 0 after the merge");
    end

    $display("mechanisms: overlap=%0d merge_wait=%0d store_wait=%0d dispatch_full=%0d rd_stall=%0d wr_stall=%0d prefetch=%0d vsmv=%0d illegal=%0d merges=%0d stres=%0d",
             n_overlap, n_mrg_wait, n_gen_wait, n_disp_full, u_mem.rd_stall_cycles,
             u_mem.wr_stall_cycles, u_mem.prefetches, n_resp, n_illegal, n_merge, n_stres);
    chk(n_overlap > 0, "generation and merging overlapped");
    chk(n_mrg_wait > 0, "merge waited for a store");
    chk(n_gen_wait > 0, "store waited for a merge");
    chk(n_disp_full > 0, "dispatch back-pressure");
    chk(u_mem.rd_stall_cycles > 0, "memory read back-pressure");
    chk(u_mem.wr_stall_cycles > 0, "memory write back-pressure");
    chk(u_mem.prefetches > 0, "prefetch hints");
    chk(n_resp > 0, "VSMV responses");
    chk(n_illegal == 1, "illegal instruction flagged once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
