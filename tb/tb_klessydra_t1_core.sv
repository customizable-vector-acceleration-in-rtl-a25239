// Self-checking test of the core in the co-processor configurations that
// the top-level test (M=3, F=3, D=4) does not use: one SPMI and one MFU for
// all three harts with one lane (SISD) and two lanes (SIMD), a dedicated
// SPMI and MFU per hart with one lane (symmetric MIMD), and dedicated SPMIs
// with a single shared MFU of one and of eight lanes (heterogeneous MIMD,
// with and without SIMD). Each configuration runs the same
// three-hart program from its own program and data memories: every hart
// loads two 20-element vectors into the SPMs, adds and multiplies them, takes
// their dot product, stores the results, sums them with a scalar loop and
// sets a completion flag. In the shared scheme the harts use disjoint parts
// of the common SPM address space. Results are compared with a reference
// model; every configuration must show self-referencing jumps caused by a
// busy MFU.
module tb_klessydra_t1_core;
  import klessydra_pkg::*;
  import kasm_pkg::*;

  localparam int NC = 5, NH = 3, L = 20, SB = 4096;
  localparam int CM [NC] = '{1, 1, 3, 3, 3};
  localparam int CF [NC] = '{1, 1, 3, 1, 1};
  localparam int CD [NC] = '{1, 2, 1, 1, 8};

  logic clk = 0, rst_n = 1, fetch_en = 0;
  initial #1 rst_n = 0;  // falling edge applies the asynchronous reset before the first clock
  always #5 clk = ~clk;
  logic pwe = 0; logic [31:0] pa = 0, pd = 0;
  logic bq = 0, bw = 0; logic [31:0] ba = 0, bd = 0;
  logic [31:0] brd [NC];
  logic rmfu [NC];

  for (genvar g = 0; g < NC; g++) begin : g_cfg
    logic ireq, dreq, dwe; logic [3:0] dbe;
    logic [31:0] iaddr, idata, daddr, dwd, drd;
    logic commit, rlsu, lact, exc; logic [CF[g]-1:0] mact; logic [CM[g]-1:0] hm, hl;
    klessydra_t1_core #(.H(NH), .M(CM[g]), .F(CF[g]), .D(CD[g]), .N(3), .SPM_BYTES(SB)) u_core (
      .clk_i(clk), .rst_ni(rst_n), .fetch_en_i(fetch_en),
      .instr_req_o(ireq), .instr_addr_o(iaddr), .instr_rdata_i(idata),
      .data_req_o(dreq), .data_we_o(dwe), .data_be_o(dbe), .data_addr_o(daddr), .data_wdata_o(dwd),
      .data_rdata_i(drd),
      .stat_commit_o(commit), .stat_replay_mfu_o(rmfu[g]), .stat_replay_lsu_o(rlsu),
      .stat_mfu_active_o(mact), .stat_lsu_active_o(lact), .stat_halt_mfu_o(hm), .stat_halt_lsu_o(hl),
      .stat_exc_o(exc));
    prog_mem #(.PMEM_BYTES(4096)) u_pm (.clk_i(clk), .req_i(ireq), .addr_i(iaddr), .rdata_o(idata),
      .we_i(pwe), .waddr_i(pa), .wdata_i(pd));
    data_mem #(.DMEM_BYTES(65536)) u_dm (.clk_i(clk), .req_i(dreq), .we_i(dwe), .be_i(dbe), .addr_i(daddr),
      .wdata_i(dwd), .rdata_o(drd), .bk_req_i(bq), .bk_we_i(bw), .bk_addr_i(ba), .bk_wdata_i(bd),
      .bk_rdata_o(brd[g]));
  end

  int checks = 0, failures = 0;
  task automatic check(string w, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; if (failures < 20) $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int n_rmfu [NC] = '{0, 0, 0, 0, 0};
  always @(posedge clk) for (int g = 0; g < NC; g++) if (rmfu[g]) n_rmfu[g]++;

  logic [31:0] prog [$];
  function automatic void e(logic [31:0] w); prog.push_back(w); endfunction

  initial begin
    logic [31:0] va [NH][L], vb [NH][L], d;
    bit all_done;
    // program
    e(i_csrrs(5, CSR_MHARTID, 0));
    e(i_lui(20, DMEM_BASE)); e(i_slli(6, 5, 12)); e(i_add(20, 20, 6)); e(i_addi(21, 20, 'h400));
    e(i_lui(10, SPM_BASE)); e(i_slli(6, 5, 10)); e(i_add(10, 10, 6));      // spmA + hart*0x400
    e(i_lui(6, SB)); e(i_add(11, 10, 6)); e(i_add(12, 11, 6));              // spmB, spmC
    e(i_addi(17, 0, L*4)); e(i_csrrw(0, CSR_MVSIZE, 17));
    e(i_addi(16, 0, L*4)); e(i_kv(V_MEMLD, 10, 20, 16));
    e(i_addi(15, 20, 'h100)); e(i_kv(V_MEMLD, 11, 15, 16));
    e(i_kv(V_ADDV, 12, 10, 11));
    e(i_addi(14, 12, 'h80));  e(i_kv(V_VMUL, 14, 10, 11));
    e(i_addi(14, 12, 'h100)); e(i_kv(V_DOTP, 14, 10, 11));
    e(i_addi(14, 21, 0));     e(i_kv(V_MEMSTR, 14, 12, 16));
    e(i_addi(14, 21, 'h80));  e(i_addi(15, 12, 'h80)); e(i_kv(V_MEMSTR, 14, 15, 16));
    e(i_addi(14, 21, 'h100)); e(i_addi(15, 12, 'h100)); e(i_addi(16, 0, 4)); e(i_kv(V_MEMSTR, 14, 15, 16));
    // scalar sum of the kaddv results
    e(i_addi(6, 21, 0)); e(i_addi(7, 0, L)); e(i_addi(8, 0, 0));
    e(i_lw(9, 6, 0)); e(i_add(8, 8, 9)); e(i_addi(6, 6, 4)); e(i_addi(7, 7, -1)); e(i_bne(7, 0, -16));
    e(i_sw(8, 21, 'h200));
    e(i_addi(9, 0, 1)); e(i_sw(9, 21, 'h3FC));
    e(i_jal(0, 0));
    for (int h = 0; h < NH; h++) for (int i = 0; i < L; i++) begin va[h][i] = $urandom; vb[h][i] = $urandom; end

    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk); pwe = 1; pa = RESET_PC + 32'(4*i); pd = prog[i];
    end
    @(negedge clk); pwe = 0;
    for (int h = 0; h < NH; h++) for (int i = 0; i < L; i++) begin
      @(negedge clk); bq = 1; bw = 1; ba = DMEM_BASE + 32'(h*4096 + 4*i); bd = va[h][i];
      @(negedge clk); ba = DMEM_BASE + 32'(h*4096 + 'h100 + 4*i); bd = vb[h][i];
    end
    @(negedge clk); bq = 0; bw = 0; fetch_en = 1;
    do begin
      repeat (32) @(negedge clk);
      all_done = 1;
      for (int h = 0; h < NH; h++) begin
        @(negedge clk); bq = 1; ba = DMEM_BASE + 32'(h*4096 + 'h7FC);
        @(negedge clk); bq = 0;
        for (int g = 0; g < NC; g++) if (brd[g] != 1) all_done = 0;
      end
    end while (!all_done);
    for (int h = 0; h < NH; h++) begin
      logic [31:0] dp, sum;
      dp = 0; sum = 0;
      for (int i = 0; i < L; i++) begin dp += va[h][i] * vb[h][i]; sum += va[h][i] + vb[h][i]; end
      for (int w = 0; w < 'h81; w++) begin
        logic [31:0] ex; bit chk;
        chk = 1;
        if (w < L) ex = va[h][w] + vb[h][w];
        else if (w >= 32 && w < 32 + L) ex = va[h][w-32] * vb[h][w-32];
        else if (w == 64) ex = dp;
        else if (w == 128) ex = sum;
        else chk = 0;
        if (chk) begin
          @(negedge clk); bq = 1; ba = DMEM_BASE + 32'(h*4096 + 'h400 + 4*w);
          @(negedge clk); bq = 0;
          for (int g = 0; g < NC; g++) check($sformatf("cfg %0d hart %0d word %0d", g, h, w), brd[g], ex);
        end
      end
    end
    for (int g = 0; g < NC; g++) begin
      $display("config M=%0d F=%0d D=%0d: self-referencing jumps on the shared MFU = %0d", CM[g], CF[g], CD[g], n_rmfu[g]);
      check("MFU busy replay seen", 32'(n_rmfu[g] > 0), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
