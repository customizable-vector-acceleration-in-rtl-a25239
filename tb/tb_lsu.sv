// Self-checking test of the load-store unit on behavioural models of the
// one-cycle data memory and of four 1 KB scratchpads. Checks scalar stores
// (byte, half, word with byte enables) and loads (sign/zero extension),
// kmemld and kmemstr bursts of random length against a reference model, the
// rate of one 32-bit word per cycle, waiting while Halt LSU is raised, and
// the exception for an SPM address outside the SPM section.
module tb_lsu;
  import klessydra_pkg::*;
  localparam int N = 4, SB = 1024, W = SB / 4, DW = 1024;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge applies the asynchronous reset before the first clock
  always #5 clk = ~clk;
  logic busy, done, exc, ld, st, uns, kreq, pend, active, halt;
  logic [31:0] a, wdat, ldd; logic [1:0] size, hart; vcmd_t kc; logic [N-1:0] need;
  logic dreq, dwe; logic [3:0] dbe; logic [31:0] da, dwd, drd;
  logic sre, swe; logic [1:0] srs, sws; logic [7:0] srw, sww; logic [31:0] srd, swd;
  lsu #(.N(N), .SPM_BYTES(SB)) dut (.clk_i(clk), .rst_ni(rst_n), .busy_o(busy), .done_o(done), .exc_o(exc),
    .ld_i(ld), .st_i(st), .addr_i(a), .wdata_i(wdat), .size_i(size), .uns_i(uns), .ld_data_o(ldd),
    .kreq_i(kreq), .kcmd_i(kc), .hart_o(hart), .pend_o(pend), .active_o(active), .need_o(need), .halt_i(halt),
    .dmem_req_o(dreq), .dmem_we_o(dwe), .dmem_be_o(dbe), .dmem_addr_o(da), .dmem_wdata_o(dwd), .dmem_rdata_i(drd),
    .spm_rd_en_o(sre), .spm_rd_spm_o(srs), .spm_rd_word_o(srw), .spm_rdata_i(srd),
    .spm_wr_en_o(swe), .spm_wr_spm_o(sws), .spm_wr_word_o(sww), .spm_wdata_o(swd));

  logic [31:0] dmem [DW];
  logic [31:0] spm [N][W];
  int n_access = 0;
  always @(posedge clk) begin
    if (dreq) begin
      if (dwe) begin for (int b = 0; b < 4; b++) if (dbe[b]) dmem[(da >> 2) % DW][8*b +: 8] <= dwd[8*b +: 8]; end
      else drd <= dmem[(da >> 2) % DW];
    end
    if (sre) srd <= spm[srs][srw];
    if (swe) spm[sws][sww] <= swd;
    if (dreq || sre || swe) n_access++;
  end

  int checks = 0, failures = 0;
  task automatic check(string w, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; if (failures < 10) $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [31:0] mref [DW];
  logic [31:0] sref [N][W];

  task automatic burst(vcmd_t c, output int cyc);
    @(negedge clk); kreq = 1; kc = c;
    @(negedge clk); kreq = 0; cyc = 1;
    while (busy) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    vcmd_t c; int cyc, c1, c2;
    ld = 0; st = 0; a = 0; wdat = 0; size = 2; uns = 0; kreq = 0; kc = '0; halt = 0;
    for (int i = 0; i < DW; i++) begin dmem[i] = $urandom; mref[i] = dmem[i]; end
    for (int s = 0; s < N; s++) for (int w = 0; w < W; w++) begin spm[s][w] = $urandom; sref[s][w] = spm[s][w]; end
    repeat (2) @(negedge clk); rst_n = 1;
    // scalar accesses
    for (int n = 0; n < 1500; n++) begin
      automatic int wi = $urandom_range(0, DW-1); int off; logic [31:0] v, e;
      size = 2'($urandom_range(0, 2)); uns = $urandom_range(0, 1);
      off = (size == 0) ? $urandom_range(0, 3) : (size == 1) ? 2 * $urandom_range(0, 1) : 0;
      a = DMEM_BASE + 32'(4 * wi + off);
      @(negedge clk);
      if ($urandom_range(0, 1)) begin
        st = 1; wdat = $urandom;
        if (size == 0) mref[wi][8*off +: 8] = wdat[7:0];
        else if (size == 1) mref[wi][8*off +: 16] = wdat[15:0];
        else mref[wi] = wdat;
        @(negedge clk); st = 0;
      end else begin
        ld = 1;
        @(negedge clk); ld = 0;
        v = mref[wi] >> (8 * off);
        e = (size == 0) ? (uns ? {24'b0, v[7:0]} : {{24{v[7]}}, v[7:0]}) :
            (size == 1) ? (uns ? {16'b0, v[15:0]} : {{16{v[15]}}, v[15:0]}) : v;
        check("load data", ldd, e);
      end
    end
    for (int i = 0; i < DW; i++) check("memory after scalar", dmem[i], mref[i]);
    // bursts
    for (int n = 0; n < 200; n++) begin
      automatic int len = $urandom_range(0, 60), s = $urandom_range(0, N-1), sw = $urandom_range(0, W - 61), mw = $urandom_range(0, DW - 61);
      c = '0;
      c.hart = 2'($urandom_range(0, 2));
      c.rs2 = 32'(4 * len);
      if ($urandom_range(0, 1)) begin
        c.vop = V_MEMLD; c.rd = SPM_BASE + 32'(s * SB + 4 * sw); c.rs1 = DMEM_BASE + 32'(4 * mw);
        for (int i = 0; i < len; i++) sref[s][sw + i] = mref[mw + i];
      end else begin
        c.vop = V_MEMSTR; c.rs1 = SPM_BASE + 32'(s * SB + 4 * sw); c.rd = DMEM_BASE + 32'(4 * mw);
        for (int i = 0; i < len; i++) mref[mw + i] = sref[s][sw + i];
      end
      burst(c, cyc);
      check("hart tag", 32'(hart), 32'(c.hart));
      check("need mask", 32'(need), 32'(1 << s));
      for (int i = 0; i < DW; i++) check("dmem", dmem[i], mref[i]);
      for (int q = 0; q < N; q++) for (int w = 0; w < W; w++) check("spm", spm[q][w], sref[q][w]);
    end
    // rate: one word per cycle
    c = '0; c.vop = V_MEMLD; c.rd = SPM_BASE; c.rs1 = DMEM_BASE;
    c.rs2 = 32'(4 * 16); burst(c, c1);
    c.rs2 = 32'(4 * 32); burst(c, c2);
    check("one word per cycle", 32'(c2 - c1), 16);
    // halt
    halt = 1;
    @(negedge clk); kreq = 1; kc = c; @(negedge clk); kreq = 0;
    n_access = 0;
    repeat (8) @(negedge clk);
    check("pending while halted", 32'(pend), 1);
    check("no access while halted", 32'(n_access), 0);
    halt = 0;
    while (busy) @(negedge clk);
    check("access after halt", 32'(n_access > 0), 1);
    // exception
    c.rd = 32'h0000_2000;
    @(negedge clk); kreq = 1; kc = c; @(negedge clk); kreq = 0;
    n_access = 0;
    begin
      int seen = 0;
      repeat (5) begin @(negedge clk); if (exc) seen = 1; end
      check("exception raised", 32'(seen), 1);
    end
    check("no access on exception", 32'(n_access), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
