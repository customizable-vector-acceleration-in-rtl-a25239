// Layer-sized VGG-16 kernels on the full processing system at its default
// configuration (3 harts, M=3, F=3, D=4, four 16 KB SPMs per hart). Each
// hart runs a different layer type at once, selected by its MHARTID:
//   hart 0: 3x3 convolution of a 32x32 map (the size of the first layers),
//           two input channels accumulated into one output channel. Each
//           channel is zero-padded into spmA by clearing it with kbcst and
//           loading the 32 rows with kmemld; kernel weights go to spmB;
//           both are pre-scaled with ksrav. For every output row and kernel
//           tap, ksvmulsc multiplies the shifted input row by the weight
//           into spmD, ksrav post-scales it and kaddv adds it into the
//           output row in spmC. Then the bias is added (ksvaddsc), krelu
//           applied and the 32x32 result stored with one kmemstr.
//   hart 1: fully connected layer with 512 inputs (the size of the first
//           fully connected layer) and 16 outputs: the input vector is
//           loaded and pre-scaled once, each weight row is loaded into
//           spmB, pre-scaled and reduced with kdotpps (post-scaling by
//           MPSCLFAC) into spmC; bias (kaddv), krelu and kmemstr follow.
//   hart 2: 2x2 max pooling of a 32x32 map to 16x16 with scalar loads,
//           compares and stores in a loop, as the max-pooling layers are
//           run without the co-processor.
// Fixed-point scaling uses a pre-shift of 2 and a post-shift of 8. Results
// are compared with a model of the same integer arithmetic (low 32 bits of
// each product, arithmetic shifts, wrap-around sums).
module tb_vgg_layers;
  import klessydra_pkg::*;
  import kasm_pkg::*;

  localparam int NH = 3;
  localparam int PRE = 2, POST = 8;
  // hart 0: convolution
  localparam int CS = 32, CI = 2;
  localparam int C_IN = 'h0000, C_K = 'h2000, C_BIAS = 'h2100, C_OUT = 'h3000;
  // hart 1: fully connected
  localparam int FN = 512, FO = 16;
  localparam int F_IN = 'h0000, F_W = 'h1000, F_BIAS = 'h9000, F_OUT = 'h9100;
  // hart 2: max pooling
  localparam int PS = 32;
  localparam int P_IN = 'h0000, P_OUT = 'h1000;
  localparam int REGION = 'h10000, DONE = 'hFFFC;

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
  logic [31:0] sec [$];
  function automatic void e(logic [31:0] w); sec.push_back(w); endfunction
  function automatic int lo12(int v); return (v <<< 20) >>> 20; endfunction
  // load a 32-bit constant
  function automatic void li(logic [4:0] rd, int v);
    e(i_lui(rd, 32'(v + 'h800))); e(i_addi(rd, rd, lo12(v)));
  endfunction
  // rd = rs + constant of any size (uses x28 when it does not fit 12 bits)
  function automatic void addk(logic [4:0] rd, logic [4:0] rs, int v);
    if (v >= -2048 && v < 2048) e(i_addi(rd, rs, v));
    else begin li(28, v); e(i_add(rd, rs, 28)); end
  endfunction
  function automatic void setsize(int bytes);
    li(17, bytes); e(i_csrrw(0, CSR_MVSIZE, 17));
  endfunction
  function automatic void finish_section();
    addk(29, 20, DONE); e(i_addi(9, 0, 1)); e(i_sw(9, 29, 0));
    e(i_jal(0, 0));
  endfunction

  // common: x5 hart id, x20 data region, x10..x13 spmA..spmD
  function automatic void sec_conv();
    sec.delete();
    setsize(CS*CS*4); e(i_kv(V_BCST, 12, 0, 0));                   // clear output map
    for (int c = 0; c < CI; c++) begin
      setsize((CS+2)*(CS+2)*4); e(i_kv(V_BCST, 10, 0, 0));        // zero padding
      li(16, CS*4);
      for (int r = 0; r < CS; r++) begin
        addk(14, 10, ((r+1)*(CS+2)+1)*4);
        addk(15, 20, C_IN + c*CS*CS*4 + r*CS*4);
        e(i_kv(V_MEMLD, 14, 15, 16));
      end
      e(i_addi(16, 0, PRE)); e(i_kv(V_SRAV, 10, 10, 16));
      addk(14, 11, c*64); addk(15, 20, C_K + c*36); e(i_addi(16, 0, 36));
      e(i_kv(V_MEMLD, 14, 15, 16));
      setsize(36); e(i_addi(16, 0, PRE)); e(i_kv(V_SRAV, 14, 14, 16));
      setsize(CS*4); e(i_addi(18, 0, POST));
      for (int i = 0; i < CS; i++) begin
        addk(24, 10, i*(CS+2)*4);
        addk(25, 12, i*CS*4);
        for (int kr = 0; kr < 3; kr++)
          for (int kc = 0; kc < 3; kc++) begin
            e(i_addi(14, 24, (kr*(CS+2)+kc)*4));
            e(i_addi(15, 11, c*64 + (kr*3+kc)*4));
            e(i_kv(V_SVMULSC, 13, 14, 15));
            e(i_kv(V_SRAV, 13, 13, 18));
            e(i_kv(V_ADDV, 25, 25, 13));
          end
      end
    end
    addk(14, 11, 'h400); addk(15, 20, C_BIAS); e(i_addi(16, 0, 4)); e(i_kv(V_MEMLD, 14, 15, 16));
    setsize(CS*CS*4);
    e(i_kv(V_SVADDSC, 12, 12, 14));
    e(i_kv(V_RELU, 12, 12, 0));
    li(16, CS*CS*4); addk(14, 20, C_OUT); e(i_kv(V_MEMSTR, 14, 12, 16));
    finish_section();
  endfunction

  function automatic void sec_fc();
    sec.delete();
    li(16, FN*4); addk(15, 20, F_IN); e(i_kv(V_MEMLD, 10, 15, 16));
    setsize(FN*4); e(i_addi(18, 0, PRE)); e(i_kv(V_SRAV, 10, 10, 18));
    e(i_addi(19, 0, POST)); e(i_csrrw(0, CSR_MPSCLFAC, 19));
    addk(15, 20, F_W);
    for (int o = 0; o < FO; o++) begin
      e(i_kv(V_MEMLD, 11, 15, 16));
      e(i_kv(V_SRAV, 11, 11, 18));
      e(i_addi(14, 12, o*4));
      e(i_kv(V_DOTPPS, 14, 10, 11));
      e(i_add(15, 15, 16));
    end
    addk(15, 20, F_BIAS); e(i_addi(16, 0, FO*4)); e(i_kv(V_MEMLD, 13, 15, 16));
    setsize(FO*4);
    e(i_kv(V_ADDV, 12, 12, 13));
    e(i_kv(V_RELU, 12, 12, 0));
    addk(14, 20, F_OUT); e(i_kv(V_MEMSTR, 14, 12, 16));
    finish_section();
  endfunction

  function automatic void sec_pool();
    int outer, inner;
    sec.delete();
    addk(6, 20, P_IN); addk(7, 20, P_OUT); e(i_addi(8, 0, PS/2));
    outer = sec.size();
    e(i_addi(9, 0, PS/2));
    inner = sec.size();
    e(i_lw(21, 6, 0)); e(i_lw(22, 6, 4)); e(i_lw(23, 6, PS*4)); e(i_lw(24, 6, PS*4+4));
    e(i_blt(22, 21, 8)); e(i_addi(21, 22, 0));     // x21 = max(x21, x22)
    e(i_blt(24, 23, 8)); e(i_addi(23, 24, 0));     // x23 = max(x23, x24)
    e(i_blt(23, 21, 8)); e(i_addi(21, 23, 0));     // x21 = max(x21, x23)
    e(i_sw(21, 7, 0));
    e(i_addi(6, 6, 8)); e(i_addi(7, 7, 4)); e(i_addi(9, 9, -1));
    e(i_bne(9, 0, (inner - sec.size()) * 4));
    e(i_addi(6, 6, PS*4)); e(i_addi(8, 8, -1));
    e(i_bne(8, 0, (outer - sec.size()) * 4));
    finish_section();
  endfunction

  function automatic void build_program();
    logic [31:0] s0 [$], s1 [$], s2 [$];
    int hdr, a0, a1, a2;
    sec_conv(); s0 = sec;
    sec_fc();   s1 = sec;
    sec_pool(); s2 = sec;
    hdr = 13;
    a0 = hdr; a1 = a0 + s0.size(); a2 = a1 + s1.size();
    prog.delete();
    prog.push_back(i_csrrs(5, CSR_MHARTID, 0));                      // 0
    prog.push_back(i_lui(20, DMEM_BASE));                            // 1
    prog.push_back(i_slli(6, 5, 16));                                // 2
    prog.push_back(i_add(20, 20, 6));                                // 3
    prog.push_back(i_lui(10, SPM_BASE + 32'h0000));                  // 4
    prog.push_back(i_lui(11, SPM_BASE + 32'h4000));                  // 5
    prog.push_back(i_lui(12, SPM_BASE + 32'h8000));                  // 6
    prog.push_back(i_lui(13, SPM_BASE + 32'hC000));                  // 7
    prog.push_back(i_addi(6, 0, 1));                                 // 8
    prog.push_back(i_blt(5, 6, (a0 - 9) * 4));                       // 9
    prog.push_back(i_bne(5, 6, 8));                                  // 10
    prog.push_back(i_jal(0, (a1 - 11) * 4));                         // 11
    prog.push_back(i_jal(0, (a2 - 12) * 4));                         // 12
    foreach (s0[i]) prog.push_back(s0[i]);
    foreach (s1[i]) prog.push_back(s1[i]);
    foreach (s2[i]) prog.push_back(s2[i]);
  endfunction

  // ---------------------------------------------------------------- data + model
  typedef struct { int unsigned addr; logic [31:0] val; } wr_t;
  wr_t         init [$];
  logic [31:0] exp_conv [CS*CS];
  logic [31:0] exp_fc   [FO];
  logic [31:0] exp_pool [PS*PS/4];

  function automatic logic [31:0] sra(logic [31:0] a, int s);
    return $unsigned($signed(a) >>> s);
  endfunction
  function automatic logic [31:0] rnd(int bits);
    return 32'($signed($urandom_range(0, 1 << bits)) - (1 << (bits - 1)));
  endfunction
  function automatic void put(int hart, int off, logic [31:0] v);
    wr_t w;
    w.addr = DMEM_BASE + 32'(hart * REGION + off); w.val = v;
    init.push_back(w);
  endfunction

  function automatic void make_data_and_model();
    logic [31:0] in  [CI][CS*CS];
    logic [31:0] k   [CI][9];
    logic [31:0] bias, acc;
    logic [31:0] fin [FN];
    logic [31:0] fw  [FN];
    logic [31:0] pin [PS*PS];
    // convolution
    for (int c = 0; c < CI; c++) begin
      for (int i = 0; i < CS*CS; i++) begin in[c][i] = rnd(21); put(0, C_IN + 4*(c*CS*CS + i), in[c][i]); end
      for (int i = 0; i < 9; i++) begin k[c][i] = rnd(13); put(0, C_K + 4*(c*9 + i), k[c][i]); end
    end
    bias = rnd(16); put(0, C_BIAS, bias);
    for (int i = 0; i < CS; i++)
      for (int j = 0; j < CS; j++) begin
        acc = '0;
        for (int c = 0; c < CI; c++)
          for (int kr = 0; kr < 3; kr++)
            for (int kc = 0; kc < 3; kc++) begin
              int r, q;
              logic [31:0] x;
              r = i + kr - 1; q = j + kc - 1;
              x = (r < 0 || r >= CS || q < 0 || q >= CS) ? '0 : sra(in[c][r*CS + q], PRE);
              acc = acc + sra(x * sra(k[c][kr*3 + kc], PRE), POST);
            end
        acc = acc + bias;
        exp_conv[i*CS + j] = acc[31] ? '0 : acc;
      end
    // fully connected
    for (int i = 0; i < FN; i++) begin fin[i] = rnd(16); put(1, F_IN + 4*i, fin[i]); end
    for (int o = 0; o < FO; o++) begin
      acc = '0;
      for (int i = 0; i < FN; i++) begin
        fw[i] = rnd(16); put(1, F_W + 4*(o*FN + i), fw[i]);
        acc = acc + sra(sra(fin[i], PRE) * sra(fw[i], PRE), POST);
      end
      bias = rnd(20); put(1, F_BIAS + 4*o, bias);
      acc = acc + bias;
      exp_fc[o] = acc[31] ? '0 : acc;
    end
    // max pooling
    for (int i = 0; i < PS*PS; i++) begin pin[i] = $urandom; put(2, P_IN + 4*i, pin[i]); end
    for (int r = 0; r < PS/2; r++)
      for (int c = 0; c < PS/2; c++) begin
        logic signed [31:0] m;
        m = $signed(pin[2*r*PS + 2*c]);
        if ($signed(pin[2*r*PS + 2*c + 1])   > m) m = $signed(pin[2*r*PS + 2*c + 1]);
        if ($signed(pin[(2*r+1)*PS + 2*c])   > m) m = $signed(pin[(2*r+1)*PS + 2*c]);
        if ($signed(pin[(2*r+1)*PS + 2*c+1]) > m) m = $signed(pin[(2*r+1)*PS + 2*c+1]);
        exp_pool[r*PS/2 + c] = $unsigned(m);
      end
  endfunction

  // ---------------------------------------------------------------- bk port helpers
  task automatic bk_write(logic [31:0] a, logic [31:0] d);
    @(negedge clk); bk_req = 1'b1; bk_we = 1'b1; bk_addr = a; bk_wdata = d;
    @(negedge clk); bk_req = 1'b0; bk_we = 1'b0;
  endtask
  task automatic bk_read(logic [31:0] a, output logic [31:0] d);
    @(negedge clk); bk_req = 1'b1; bk_we = 1'b0; bk_addr = a;
    @(negedge clk); bk_req = 1'b0; d = bk_rdata;
  endtask

  // ---------------------------------------------------------------- counters
  int cycles = 0, n_rmfu = 0, n_hlsu = 0, n_hmfu = 0, n_mimd = 0, n_exc = 0;
  bit running = 0;
  always @(posedge clk) if (running) begin
    cycles++;
    if (st_rmfu) n_rmfu++;
    if (st_hlsu != 0) n_hlsu++;
    if (st_hmfu != 0) n_hmfu++;
    if ($countones(st_mfu_act) >= 2) n_mimd++;
    if (st_exc) n_exc++;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
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
    check("program fits the program memory", 32'(RESET_PC/4 + prog.size() <= 32768/4), 1);
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk); pload_we = 1'b1; pload_addr = RESET_PC + 32'(4*i); pload_wdata = prog[i];
    end
    @(negedge clk); pload_we = 1'b0;
    foreach (init[i]) bk_write(init[i].addr, init[i].val);
    $display("program: %0d instructions, %0d data words", prog.size(), init.size());
    @(negedge clk); fetch_en = 1'b1; running = 1;
    do begin
      repeat (256) @(negedge clk);
      all_done = 1;
      for (int h = 0; h < NH; h++) begin
        bk_read(DMEM_BASE + 32'(h*REGION + DONE), d);
        if (d != 32'd1) all_done = 0;
      end
    end while (!all_done);
    running = 0;
    for (int i = 0; i < CS*CS; i++) begin
      bk_read(DMEM_BASE + 32'(C_OUT + 4*i), d);
      check($sformatf("conv out %0d", i), d, exp_conv[i]);
    end
    for (int o = 0; o < FO; o++) begin
      bk_read(DMEM_BASE + 32'(REGION + F_OUT + 4*o), d);
      check($sformatf("fc out %0d", o), d, exp_fc[o]);
    end
    for (int i = 0; i < PS*PS/4; i++) begin
      bk_read(DMEM_BASE + 32'(2*REGION + P_OUT + 4*i), d);
      check($sformatf("pool out %0d", i), d, exp_pool[i]);
    end
    $display("cycles=%0d replay_mfu=%0d halt_mfu=%0d halt_lsu=%0d mimd=%0d", cycles, n_rmfu, n_hmfu, n_hlsu, n_mimd);
    check("no SPM exception", 32'(n_exc), 0);
    check("MFUs of different harts active together", 32'(n_mimd > 0), 1);
    check("LSU halted by contention", 32'(n_hlsu > 0), 1);
    check("MFU halted by contention", 32'(n_hmfu > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
