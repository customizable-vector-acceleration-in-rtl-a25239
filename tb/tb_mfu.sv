// Self-checking test of the MFU with D=4 lanes on a behavioural model of
// four 1 KB scratchpads (one-cycle reads, lane-ordered data). Every vector
// operation is issued with random operands, element widths (MVTYPE 8, 16
// and 32 bits), SPM addresses and lengths
// (including lengths that are not a multiple of D and zero); the whole SPM
// contents are compared with a reference model after each instruction. It
// also checks that the unit waits while halted, that a bad SPM address is
// dropped with an exception, and the rate: D elements per cycle, i.e. the
// busy time grows by one cycle for every D more elements.
module tb_mfu;
  import klessydra_pkg::*;
  localparam int N = 4, D = 4, SB = 1024, W = SB / 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge applies the asynchronous reset before the first clock
  always #5 clk = ~clk;
  logic req, busy, done, exc, pend, active, halt;
  vcmd_t cmd; logic [1:0] hart; logic [N-1:0] need;
  logic r1e, r2e, we; logic [1:0] r1s, r2s, ws; logic [7:0] r1w, r2w, ww; logic [D-1:0] wm;
  logic [31:0] rd1 [D], rd2 [D], wd [D];
  mfu #(.D(D), .N(N), .SPM_BYTES(SB)) dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .cmd_i(cmd),
    .busy_o(busy), .done_o(done), .exc_o(exc), .hart_o(hart), .pend_o(pend), .active_o(active),
    .need_o(need), .halt_i(halt),
    .rd1_en_o(r1e), .rd1_spm_o(r1s), .rd1_word_o(r1w), .rdata1_i(rd1),
    .rd2_en_o(r2e), .rd2_spm_o(r2s), .rd2_word_o(r2w), .rdata2_i(rd2),
    .wr_en_o(we), .wr_spm_o(ws), .wr_word_o(ww), .wr_mask_o(wm), .wdata_o(wd));

  // behavioural scratchpads
  logic [31:0] spm [N][W];
  int n_access = 0;
  always @(posedge clk) begin
    for (int i = 0; i < D; i++) begin
      rd1[i] <= spm[r1s][(int'(r1w) + i) % W];
      rd2[i] <= spm[r2s][(int'(r2w) + i) % W];
    end
    if (we) for (int i = 0; i < D; i++) if (wm[i]) spm[ws][(int'(ww) + i) % W] <= wd[i];
    if (r1e || r2e || we) n_access++;
  end

  int checks = 0, failures = 0;
  task automatic check(string w, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; if (failures < 10) $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [31:0] model [N][W];
  function automatic logic [31:0] sra(logic [31:0] a, int s); return $unsigned($signed(a) >>> s); endfunction
  function automatic logic [31:0] addr(int s, int w); return SPM_BASE + 32'(s * SB + 4 * w); endfunction

  // reference execution of one instruction on 'model': elements of 8, 16
  // or 32 bits packed in words, element results truncated to their width,
  // reductions summed in 32 bits
  task automatic ref_exec(vcmd_t c);
    int n = int'(c.size >> 2);
    int sd = int'((c.rd - SPM_BASE) / SB), wd0 = int'(((c.rd - SPM_BASE) % SB) / 4);
    int s1 = int'((c.rs1 - SPM_BASE) / SB), w1 = int'(((c.rs1 - SPM_BASE) % SB) / 4);
    int s2 = int'((c.rs2 - SPM_BASE) / SB), w2 = int'(((c.rs2 - SPM_BASE) % SB) / 4);
    int ne = (c.vtype == 0) ? 4 : (c.vtype == 1) ? 2 : 1;
    int wb = 32 / ne;
    logic [31:0] a, b, sc, acc, r, res, mask;
    logic [31:0] out [W];
    int ae, au, be, se, sh, t;
    sc = (c.vop inside {V_SVADDSC, V_SVMULSC}) ? model[s2][w2] >> (8 * c.rs2[1:0]) :
         (c.vop == V_BCST) ? c.rs1 : c.rs2;
    mask = (wb == 32) ? 32'hFFFF_FFFF : (32'd1 << wb) - 1;
    se = int'(sc << (32 - wb)) >>> (32 - wb);
    sh = int'(sc[4:0]);
    acc = 0;
    for (int i = 0; i < n; i++) begin
      a = model[s1][w1 + i];
      b = model[s2][w2 + i];
      res = 0;
      for (int k = 0; k < ne; k++) begin
        ae = int'(a << (32 - wb * (k + 1))) >>> (32 - wb);
        au = int'((a >> (wb * k)) & mask);
        be = int'(b << (32 - wb * (k + 1))) >>> (32 - wb);
        case (c.vop)
          V_ADDV: r = ae + be;          V_SUBV: r = ae - be;          V_VMUL: r = ae * be;
          V_SVADDSC, V_SVADDRF: r = ae + se;
          V_SVMULSC, V_SVMULRF: r = ae * se;
          V_SRLV: r = au >> sh;         V_SRAV: r = ae >>> sh;
          V_RELU: r = (ae < 0) ? 0 : ae;
          V_VSLT: r = (ae < be) ? 1 : 0;
          V_SVSLT: r = (ae < se) ? 1 : 0;
          V_BCST: r = se;
          V_VRED: acc = acc + ae;
          V_DOTP: acc = acc + ae * be;
          V_DOTPPS: begin t = (ae * be) >>> c.sclfac; acc = acc + t; end
          default: r = ae;
        endcase
        res = res | ((r & mask) << (wb * k));
      end
      out[i] = res;
    end
    if (vop_is_reduction(c.vop)) model[sd][wd0] = acc;
    else for (int i = 0; i < n; i++) model[sd][wd0 + i] = out[i];
  endtask

  task automatic run(vcmd_t c, output int cyc);
    @(negedge clk); req = 1; cmd = c;
    @(negedge clk); req = 0; cyc = 1;
    while (busy) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    int cyc, c4, c8;
    vcmd_t c;
    req = 0; halt = 0; cmd = '0;
    for (int s = 0; s < N; s++) for (int w = 0; w < W; w++) begin
      spm[s][w] = (w % 5 == 0) ? 32'($signed($urandom_range(0, 64)) - 32) : $urandom;
      model[s][w] = spm[s][w];
    end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      automatic int len = (n % 25 == 0) ? 0 : $urandom_range(1, 40);
      automatic int sd = $urandom_range(0, N-1), s1 = $urandom_range(0, N-1), s2 = $urandom_range(0, N-1);
      c = '0;
      c.vop    = vop_e'($urandom_range(3, 19));
      c.hart   = 2'($urandom_range(0, 2));
      c.size   = 32'(len * 4);
      c.sclfac = 5'($urandom);
      c.vtype  = 2'($urandom_range(0, 3));
      // destination does not overlap the sources
      c.rd  = addr(sd, (sd == s1 || sd == s2) ? 150 + $urandom_range(0, 50) : $urandom_range(0, 200));
      c.rs1 = addr(s1, $urandom_range(0, 100));
      c.rs2 = addr(s2, $urandom_range(0, 100));
      if (c.vop inside {V_SVADDRF, V_SVMULRF, V_SRLV, V_SRAV, V_SVSLT}) c.rs2 = $urandom;
      if (c.vop == V_BCST) c.rs1 = $urandom;
      if (c.vop inside {V_SVADDSC, V_SVMULSC}) c.rs2[1:0] = 2'($urandom_range(0, 3));
      ref_exec(c);
      run(c, cyc);
      check("hart tag", 32'(hart), 32'(c.hart));
      for (int s = 0; s < N; s++) for (int w = 0; w < W; w++) check($sformatf("%s spm%0d[%0d]", c.vop.name(), s, w), spm[s][w], model[s][w]);
    end
    // rate: 8D elements take exactly 4 cycles more than 4D elements
    c = '0; c.vop = V_ADDV; c.rd = addr(3, 0); c.rs1 = addr(0, 1); c.rs2 = addr(1, 2);
    c.size = 32'(4 * 4 * D); ref_exec(c); run(c, c4);
    c.size = 32'(8 * 4 * D); ref_exec(c); run(c, c8);
    check("D elements per cycle", 32'(c8 - c4), 4);
    // halt: no SPM access while halted in PEND
    halt = 1;
    c.size = 32'(4 * D); ref_exec(c);
    @(negedge clk); req = 1; cmd = c; @(negedge clk); req = 0;
    n_access = 0;
    repeat (10) @(negedge clk);
    check("pending while halted", 32'(pend), 1);
    check("no SPM access while halted", 32'(n_access), 0);
    halt = 0;
    while (busy) @(negedge clk);
    check("runs after halt", spm[3][0], model[3][0]);
    // exception: destination outside the SPM section
    c.rd = 32'h0000_1000;
    @(negedge clk); req = 1; cmd = c; @(negedge clk); req = 0;
    n_access = 0;
    begin
      int seen = 0;
      repeat (6) begin @(negedge clk); if (exc) seen = 1; end
      check("exception raised", 32'(seen), 1);
    end
    check("nothing written on exception", 32'(n_access), 0);
    check("idle after exception", 32'(busy), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
