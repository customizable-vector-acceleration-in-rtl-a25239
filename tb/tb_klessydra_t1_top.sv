// End-to-end test of the Klessydra T1 system at its default configuration
// (3 harts, M=3, F=3, D=4, 16 KB SPMs, 32 KB program and 1 MB data memory).
//
// The program, built here with the encoders of kasm_pkg, runs on all three
// harts at once; each hart reads MHARTID and works on its own data block:
//  1. a 3x3 convolution of an SxS fixed-point feature map written the way a
//     convolutional layer is vectorised for this core: zero-padded FM in
//     spmA (kbcst + row-wise kmemld), pre-scaling with ksrav, kernel in spmB,
//     row-by-row ksvmulsc / ksrav / kaddv into spmC, bias with ksvaddsc,
//     krelu, kmemstr back to main memory;
//  2. a fully-connected style dot product with post scaling (kdotpps) plus
//     every other vector instruction once on 16-element vectors, and a
//     packed add and dot product with 8-bit elements (MVTYPE = 0);
//  3. an SPM address error (exception path), scalar loops, byte/half
//     accesses and a completion flag.
// A reference model in this testbench computes every expected word. The
// test counts each mechanism of the core: self-referencing jumps on a busy
// MFU and on a busy LSU, Halt MFU and Halt LSU from the contention handler,
// several MFUs active at once (MIMD), scalar execution overlapping the LSU
// and/or the MFUs, and SPM exceptions; one that never happens is a failure.
module tb_klessydra_t1_top;
  import klessydra_pkg::*;
  import kasm_pkg::*;

  localparam int S    = 8;      // feature map size
  localparam int L    = 16;     // dot-product length
  localparam int PRE  = 2;
  localparam int POST = 8;
  localparam int NH   = 3;

  // per-hart data block offsets
  localparam int O_IN = 'h000, O_K = 'h100, O_BIAS = 'h140, O_V = 'h180, O_WT = 'h1C0, O_OUT = 'h200;
  localparam int O_RES = 'h400;

  logic clk = 1'b0, rst_n = 1'b1, fetch_en = 1'b0;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset before the first clock
  always #5 clk = ~clk;

  logic        pload_we = 1'b0;
  logic [31:0] pload_addr = '0, pload_wdata = '0;
  logic        bk_req = 1'b0, bk_we = 1'b0;
  logic [31:0] bk_addr = '0, bk_wdata = '0, bk_rdata;
  logic        st_commit, st_rmfu, st_rlsu, st_lsu_act, st_exc;
  logic [2:0]  st_mfu_act, st_hmfu, st_hlsu;

  klessydra_t1_top dut (
    .clk_i(clk), .rst_ni(rst_n), .fetch_en_i(fetch_en),
    .pload_we_i(pload_we), .pload_addr_i(pload_addr), .pload_wdata_i(pload_wdata),
    .bk_req_i(bk_req), .bk_we_i(bk_we), .bk_addr_i(bk_addr), .bk_wdata_i(bk_wdata),
    .bk_rdata_o(bk_rdata),
    .stat_commit_o(st_commit), .stat_replay_mfu_o(st_rmfu), .stat_replay_lsu_o(st_rlsu),
    .stat_mfu_active_o(st_mfu_act), .stat_lsu_active_o(st_lsu_act),
    .stat_halt_mfu_o(st_hmfu), .stat_halt_lsu_o(st_hlsu), .stat_exc_o(st_exc)
  );

  int checks = 0, failures = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------------- program
  logic [31:0] prog [$];
  function automatic void e(logic [31:0] w); prog.push_back(w); endfunction

  function automatic void build_program();
    e(i_csrrs(5, CSR_MHARTID, 0));
    e(i_lui(20, DMEM_BASE));
    e(i_slli(6, 5, 12));
    e(i_add(20, 20, 6));
    e(i_addi(21, 20, O_RES));
    e(i_lui(10, SPM_BASE + 32'h0000)); e(i_lui(11, SPM_BASE + 32'h4000));
    e(i_lui(12, SPM_BASE + 32'h8000)); e(i_lui(13, SPM_BASE + 32'hC000));
    // zero-padded feature map in spmA, cleared output in spmC
    e(i_addi(17, 0, (S+2)*(S+2)*4)); e(i_csrrw(0, CSR_MVSIZE, 17));
    e(i_kv(V_BCST, 10, 0, 0));
    e(i_kv(V_BCST, 12, 0, 0));
    for (int r = 0; r < S; r++) begin
      e(i_addi(14, 10, ((r+1)*(S+2)+1)*4));
      e(i_addi(15, 20, O_IN + r*S*4));
      e(i_addi(16, 0, S*4));
      e(i_kv(V_MEMLD, 14, 15, 16));
    end
    e(i_addi(16, 0, PRE)); e(i_kv(V_SRAV, 10, 10, 16));
    // kernel and bias in spmB
    e(i_addi(15, 20, O_K)); e(i_addi(16, 0, 36)); e(i_kv(V_MEMLD, 11, 15, 16));
    e(i_addi(14, 11, 40)); e(i_addi(15, 20, O_BIAS)); e(i_addi(16, 0, 4)); e(i_kv(V_MEMLD, 14, 15, 16));
    e(i_addi(17, 0, 36)); e(i_csrrw(0, CSR_MVSIZE, 17));
    e(i_addi(16, 0, PRE)); e(i_kv(V_SRAV, 11, 11, 16));
    // convolution, one output row per vector
    e(i_addi(17, 0, S*4)); e(i_csrrw(0, CSR_MVSIZE, 17));
    e(i_addi(18, 0, POST));
    for (int i = 0; i < S; i++)
      for (int kr = 0; kr < 3; kr++)
        for (int kc = 0; kc < 3; kc++) begin
          e(i_addi(14, 10, ((i+kr)*(S+2)+kc)*4));
          e(i_addi(15, 11, (kr*3+kc)*4));
          e(i_kv(V_SVMULSC, 13, 14, 15));
          e(i_kv(V_SRAV, 13, 13, 18));
          e(i_addi(16, 12, i*S*4));
          e(i_kv(V_ADDV, 16, 16, 13));
        end
    // bias, ReLU, store
    e(i_addi(17, 0, S*S*4)); e(i_csrrw(0, CSR_MVSIZE, 17));
    e(i_addi(15, 11, 40)); e(i_kv(V_SVADDSC, 12, 12, 15));
    e(i_kv(V_RELU, 12, 12, 0));
    e(i_addi(16, 0, S*S*4)); e(i_addi(14, 20, O_OUT)); e(i_kv(V_MEMSTR, 14, 12, 16));
    // dot product and the other vector operations
    e(i_addi(15, 20, O_V));  e(i_addi(16, 0, L*4)); e(i_kv(V_MEMLD, 10, 15, 16));
    e(i_addi(15, 20, O_WT)); e(i_kv(V_MEMLD, 11, 15, 16));
    e(i_addi(17, 0, L*4)); e(i_csrrw(0, CSR_MVSIZE, 17)); e(i_csrrw(0, CSR_MPSCLFAC, 18));
    e(i_addi(22, 0, 7)); e(i_addi(23, 0, -3)); e(i_addi(24, 0, 3)); e(i_addi(25, 0, 5));
    e(i_addi(26, 0, 'h55)); e(i_addi(27, 0, 2));
    e(i_addi(14, 12, 'h400)); e(i_kv(V_DOTPPS, 14, 10, 11));
    e(i_addi(14, 12, 'h404)); e(i_kv(V_DOTP,   14, 10, 11));
    e(i_addi(14, 12, 'h408)); e(i_kv(V_VRED,   14, 10, 0));
    e(i_addi(14, 13, 'h000)); e(i_kv(V_ADDV,    14, 10, 11));
    e(i_addi(14, 13, 'h040)); e(i_kv(V_SUBV,    14, 10, 11));
    e(i_addi(14, 13, 'h080)); e(i_kv(V_VMUL,    14, 10, 11));
    e(i_addi(14, 13, 'h0C0)); e(i_kv(V_SVADDRF, 14, 10, 22));
    e(i_addi(14, 13, 'h100)); e(i_kv(V_SVMULRF, 14, 10, 23));
    e(i_addi(14, 13, 'h140)); e(i_kv(V_SRLV,    14, 10, 24));
    e(i_addi(14, 13, 'h180)); e(i_kv(V_VSLT,    14, 10, 11));
    e(i_addi(14, 13, 'h1C0)); e(i_kv(V_SVSLT,   14, 10, 25));
    e(i_addi(14, 13, 'h200)); e(i_kv(V_VCP,     14, 10, 0));
    e(i_addi(14, 13, 'h240)); e(i_kv(V_SVMULSC, 14, 10, 11));
    e(i_addi(14, 13, 'h280)); e(i_kv(V_BCST,    14, 26, 0));
    e(i_addi(14, 13, 'h2C0)); e(i_kv(V_RELU,    14, 10, 0));
    e(i_addi(14, 13, 'h300)); e(i_kv(V_SRAV,    14, 10, 27));
    e(i_addi(14, 21, 'h010)); e(i_addi(15, 12, 'h400)); e(i_addi(16, 0, 12)); e(i_kv(V_MEMSTR, 14, 15, 16));
    // 8-bit elements (MVTYPE = 0): packed add and dot product, then back to 32 bits
    e(i_csrrw(0, CSR_MVTYPE, 0));
    e(i_addi(14, 13, 'h340)); e(i_kv(V_ADDV,    14, 10, 11));
    e(i_addi(14, 13, 'h380)); e(i_kv(V_DOTP,    14, 10, 11));
    e(i_csrrw(0, CSR_MVTYPE, 27));
    e(i_addi(14, 21, 'h040)); e(i_addi(16, 0, 'h384)); e(i_kv(V_MEMSTR, 14, 13, 16));
    // SPM address error: destination 0 is outside the SPM section
    e(i_kv(V_ADDV, 0, 10, 11));
    // scalar sum of the output map (backward branch loop)
    e(i_addi(6, 20, O_OUT)); e(i_addi(7, 0, S*S)); e(i_addi(8, 0, 0));
    e(i_lw(9, 6, 0)); e(i_add(8, 8, 9)); e(i_addi(6, 6, 4)); e(i_addi(7, 7, -1)); e(i_bne(7, 0, -16));
    e(i_sw(8, 21, 0));
    // byte and half-word accesses
    e(i_sw(0, 21, 4)); e(i_addi(9, 0, -2)); e(i_sb(9, 21, 5));
    e(i_lhu(8, 21, 4)); e(i_sw(8, 21, 8));
    e(i_lb(8, 21, 5));  e(i_sw(8, 21, 12));
    // MHARTID and completion flag
    e(i_sw(5, 21, 'h3F8));
    e(i_addi(9, 0, 1)); e(i_sw(9, 21, 'h7FC));
    e(i_jal(0, 0));
  endfunction

  // ---------------------------------------------------------------- data + model
  logic [31:0] din  [NH][1024];   // data block words (offset / 4)
  logic [31:0] vexp [NH][1024];   // expected result block words
  logic        vchk [NH][1024];

  function automatic logic [31:0] sra(logic [31:0] a, int s);
    return $unsigned($signed(a) >>> s);
  endfunction

  task automatic make_data_and_model();
    for (int h = 0; h < NH; h++) begin
      logic [31:0] fm [S+2][S+2];
      logic [31:0] k [9];
      logic [31:0] om [S*S];
      logic [31:0] va [L], vb [L];
      logic [31:0] acc;
      for (int w = 0; w < 1024; w++) begin din[h][w] = '0; vchk[h][w] = 1'b0; vexp[h][w] = '0; end
      for (int i = 0; i < S*S; i++) din[h][O_IN/4 + i] = 32'($signed($urandom_range(0, 1 << 21)) - (1 << 20));
      for (int i = 0; i < 9; i++)   din[h][O_K/4 + i]  = 32'($signed($urandom_range(0, 1 << 13)) - (1 << 12));
      din[h][O_BIAS/4] = 32'($signed($urandom_range(0, 1 << 16)) - (1 << 15));
      for (int i = 0; i < L; i++) begin
        din[h][O_V/4 + i]  = 32'($signed($urandom_range(0, 1 << 16)) - (1 << 15));
        din[h][O_WT/4 + i] = 32'($signed($urandom_range(0, 1 << 16)) - (1 << 15));
      end
      // convolution
      for (int r = 0; r < S+2; r++) for (int c = 0; c < S+2; c++) fm[r][c] = '0;
      for (int r = 0; r < S; r++) for (int c = 0; c < S; c++) fm[r+1][c+1] = sra(din[h][O_IN/4 + r*S + c], PRE);
      for (int i = 0; i < 9; i++) k[i] = sra(din[h][O_K/4 + i], PRE);
      for (int i = 0; i < S; i++)
        for (int j = 0; j < S; j++) begin
          acc = '0;
          for (int kr = 0; kr < 3; kr++)
            for (int kc = 0; kc < 3; kc++)
              acc = acc + sra(fm[i+kr][j+kc] * k[kr*3+kc], POST);
          acc = acc + din[h][O_BIAS/4];
          om[i*S+j] = acc[31] ? '0 : acc;
        end
      for (int i = 0; i < S*S; i++) begin vexp[h][O_OUT/4 + i] = om[i]; vchk[h][O_OUT/4 + i] = 1'b1; end
      // vector operations
      for (int i = 0; i < L; i++) begin va[i] = din[h][O_V/4 + i]; vb[i] = din[h][O_WT/4 + i]; end
      begin
        logic [31:0] dpps, dp, red;
        dpps = '0; dp = '0; red = '0;
        for (int i = 0; i < L; i++) begin
          dpps = dpps + sra(va[i] * vb[i], POST);
          dp   = dp + va[i] * vb[i];
          red  = red + va[i];
        end
        vexp[h][(O_RES+'h10)/4] = dpps; vexp[h][(O_RES+'h14)/4] = dp; vexp[h][(O_RES+'h18)/4] = red;
        for (int q = 0; q < 3; q++) vchk[h][(O_RES+'h10)/4 + q] = 1'b1;
      end
      for (int i = 0; i < L; i++) begin
        logic [31:0] r [13];
        r[0]  = va[i] + vb[i];
        r[1]  = va[i] - vb[i];
        r[2]  = va[i] * vb[i];
        r[3]  = va[i] + 32'd7;
        r[4]  = va[i] * 32'hFFFF_FFFD;
        r[5]  = va[i] >> 3;
        r[6]  = {31'b0, $signed(va[i]) < $signed(vb[i])};
        r[7]  = {31'b0, $signed(va[i]) < 5};
        r[8]  = va[i];
        r[9]  = va[i] * vb[0];
        r[10] = 32'h55;
        r[11] = va[i][31] ? '0 : va[i];
        r[12] = sra(va[i], 2);
        for (int q = 0; q < 13; q++) begin
          vexp[h][(O_RES+'h40)/4 + q*16 + i] = r[q];
          vchk[h][(O_RES+'h40)/4 + q*16 + i] = 1'b1;
        end
      end
      // 8-bit elements
      begin
        logic [31:0] dp8, w8;
        dp8 = '0;
        for (int i = 0; i < L; i++) begin
          w8 = '0;
          for (int k = 0; k < 4; k++) begin
            w8[8*k +: 8] = va[i][8*k +: 8] + vb[i][8*k +: 8];
            dp8 = dp8 + 32'($signed(va[i][8*k +: 8]) * $signed(vb[i][8*k +: 8]));
          end
          vexp[h][(O_RES+'h380)/4 + i] = w8; vchk[h][(O_RES+'h380)/4 + i] = 1'b1;
        end
        vexp[h][(O_RES+'h3C0)/4] = dp8; vchk[h][(O_RES+'h3C0)/4] = 1'b1;
      end
      // scalar results
      acc = '0;
      for (int i = 0; i < S*S; i++) acc = acc + om[i];
      vexp[h][O_RES/4] = acc;           vchk[h][O_RES/4] = 1'b1;
      vexp[h][O_RES/4 + 1] = 32'h0000_FE00; vchk[h][O_RES/4 + 1] = 1'b1;
      vexp[h][O_RES/4 + 2] = 32'h0000_FE00; vchk[h][O_RES/4 + 2] = 1'b1;
      vexp[h][O_RES/4 + 3] = 32'hFFFF_FFFE; vchk[h][O_RES/4 + 3] = 1'b1;
      vexp[h][(O_RES+'h3F8)/4] = 32'(h);  vchk[h][(O_RES+'h3F8)/4] = 1'b1;
    end
  endtask

  // ---------------------------------------------------------------- bk port helpers
  task automatic bk_write(logic [31:0] a, logic [31:0] d);
    @(negedge clk); bk_req = 1'b1; bk_we = 1'b1; bk_addr = a; bk_wdata = d;
    @(negedge clk); bk_req = 1'b0; bk_we = 1'b0;
  endtask
  task automatic bk_read(logic [31:0] a, output logic [31:0] d);
    @(negedge clk); bk_req = 1'b1; bk_we = 1'b0; bk_addr = a;
    @(negedge clk); bk_req = 1'b0; d = bk_rdata;
  endtask

  // ---------------------------------------------------------------- event counters
  int n_rmfu = 0, n_rlsu = 0, n_hmfu = 0, n_hlsu = 0, n_mimd = 0, n_ss_part = 0, n_ss_full = 0;
  int n_exc = 0, n_commit = 0, cycles = 0;
  bit running = 0;
  always @(posedge clk) if (running) begin
    cycles++;
    if (st_commit) n_commit++;
    if (st_rmfu) n_rmfu++;
    if (st_rlsu) n_rlsu++;
    if (st_hmfu != 0) n_hmfu++;
    if (st_hlsu != 0) n_hlsu++;
    if ($countones(st_mfu_act) >= 2) n_mimd++;
    if (st_commit && (st_mfu_act != 0) && st_lsu_act) n_ss_full++;
    else if (st_commit && ((st_mfu_act != 0) || st_lsu_act)) n_ss_part++;
    if (st_exc) n_exc++;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    bit all_done;
    build_program();
    make_data_and_model();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk); pload_we = 1'b1; pload_addr = RESET_PC + 32'(4*i); pload_wdata = prog[i];
    end
    @(negedge clk); pload_we = 1'b0;
    for (int h = 0; h < NH; h++)
      for (int w = 0; w < 1024; w++)
        bk_write(DMEM_BASE + 32'(h*4096 + 4*w), din[h][w]);
    $display("program: %0d instructions", prog.size());
    @(negedge clk); fetch_en = 1'b1; running = 1;
    do begin
      repeat (64) @(negedge clk);
      all_done = 1;
      for (int h = 0; h < NH; h++) begin
        bk_read(DMEM_BASE + 32'(h*4096 + O_RES + 'h7FC), d);
        if (d != 32'd1) all_done = 0;
      end
    end while (!all_done);
    running = 0;
    for (int h = 0; h < NH; h++)
      for (int w = 0; w < 1024; w++)
        if (vchk[h][w]) begin
          bk_read(DMEM_BASE + 32'(h*4096 + 4*w), d);
          check($sformatf("hart %0d word +%h", h, 4*w), d, vexp[h][w]);
        end
    $display("cycles=%0d commits=%0d replay_mfu=%0d replay_lsu=%0d halt_mfu=%0d halt_lsu=%0d mimd=%0d superscalar_partial=%0d superscalar_full=%0d exc=%0d",
             cycles, n_commit, n_rmfu, n_rlsu, n_hmfu, n_hlsu, n_mimd, n_ss_part, n_ss_full, n_exc);
    check("self-referencing jump on busy MFU happened", 32'(n_rmfu > 0), 1);
    check("self-referencing jump on busy LSU happened", 32'(n_rlsu > 0), 1);
    check("Halt MFU happened", 32'(n_hmfu > 0), 1);
    check("Halt LSU happened", 32'(n_hlsu > 0), 1);
    check("several MFUs active together (MIMD)", 32'(n_mimd > 0), 1);
    check("scalar overlapping one co-processor unit", 32'(n_ss_part > 0), 1);
    check("scalar overlapping LSU and MFU", 32'(n_ss_full > 0), 1);
    check("one SPM exception per hart", 32'(n_exc), NH);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
