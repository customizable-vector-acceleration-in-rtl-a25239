// Self-checking test of the SPM interface with N=4 SPMs of 1 KB and D=4
// banks. Random D-word reads on both MFU ports and masked D-word writes at
// unaligned word addresses (exercising bank interleaving and data rotation)
// run in the same cycles as single-word LSU reads and writes on other SPMs;
// all read data are compared with a reference array one cycle later. The
// contention handler is then checked for the four cases: LSU holds an SPM
// the MFU wants (Halt MFU), MFU holds an SPM the LSU wants (Halt LSU), both
// start on a common SPM (LSU first) and disjoint SPMs (no halt).
module tb_spmi;
  localparam int N = 4, D = 4, SB = 1024, W = SB / 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic r1e, r2e, we_m, lre, lwe;
  logic [1:0] r1s, r2s, ws, lrs, lws;
  logic [7:0] r1w, r2w, ww, lrw, lww;
  logic [D-1:0] wm;
  logic [31:0] rd1 [D], rd2 [D], wdm [D], lrd, lwd;
  logic mp, ma, lp, la, hm, hl; logic [N-1:0] mn, ln;
  spmi #(.N(N), .D(D), .SPM_BYTES(SB)) dut (.clk_i(clk),
    .m_rd1_en_i(r1e), .m_rd1_spm_i(r1s), .m_rd1_word_i(r1w), .m_rdata1_o(rd1),
    .m_rd2_en_i(r2e), .m_rd2_spm_i(r2s), .m_rd2_word_i(r2w), .m_rdata2_o(rd2),
    .m_wr_en_i(we_m), .m_wr_spm_i(ws), .m_wr_word_i(ww), .m_wr_mask_i(wm), .m_wdata_i(wdm),
    .l_rd_en_i(lre), .l_rd_spm_i(lrs), .l_rd_word_i(lrw), .l_rdata_o(lrd),
    .l_wr_en_i(lwe), .l_wr_spm_i(lws), .l_wr_word_i(lww), .l_wdata_i(lwd),
    .m_pend_i(mp), .m_active_i(ma), .m_need_i(mn), .l_pend_i(lp), .l_active_i(la), .l_need_i(ln),
    .halt_mfu_o(hm), .halt_lsu_o(hl));
  int checks = 0, failures = 0;
  task automatic check(string w, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; if (failures < 10) $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  logic [31:0] ref_m [N][W];
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic idle();
    r1e = 0; r2e = 0; we_m = 0; lre = 0; lwe = 0; wm = 0;
    r1s = 0; r2s = 0; ws = 0; lrs = 0; lws = 0; r1w = 0; r2w = 0; ww = 0; lrw = 0; lww = 0; lwd = 0;
    for (int i = 0; i < D; i++) wdm[i] = 0;
    mp = 0; ma = 0; lp = 0; la = 0; mn = 0; ln = 0;
  endtask
  initial begin
    logic [31:0] e1 [D], e2 [D], el;
    logic p1, p2, pl;
    idle();
    // fill every SPM through the LSU write port
    for (int s = 0; s < N; s++) for (int w = 0; w < W; w++) begin
      @(negedge clk); lwe = 1; lws = 2'(s); lww = 8'(w); lwd = $urandom; ref_m[s][w] = lwd;
    end
    @(negedge clk); idle();
    p1 = 0; p2 = 0; pl = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // check data requested in the previous cycle
      if (p1) for (int i = 0; i < D; i++) check("vs1 lane", rd1[i], e1[i]);
      if (p2) for (int i = 0; i < D; i++) check("vs2 lane", rd2[i], e2[i]);
      if (pl) check("lsu read", lrd, el);
      idle();
      r1e = $urandom_range(0, 1); r1s = 2'($urandom_range(0, 1)); r1w = 8'($urandom_range(0, W - D));
      r2e = $urandom_range(0, 1); r2s = 2'($urandom_range(0, 1)); r2w = 8'($urandom_range(0, W - D));
      we_m = $urandom_range(0, 1); ws = 2'($urandom_range(0, 1)); ww = 8'($urandom_range(0, W - D)); wm = D'($urandom);
      for (int i = 0; i < D; i++) wdm[i] = $urandom;
      lre = $urandom_range(0, 1); lrs = 2'($urandom_range(2, 3)); lrw = 8'($urandom_range(0, W - 1));
      lwe = $urandom_range(0, 1); lws = 2'($urandom_range(2, 3)); lww = 8'($urandom_range(0, W - 1)); lwd = $urandom;
      // expected read data: contents before this cycle's writes
      p1 = r1e; p2 = r2e; pl = lre;
      for (int i = 0; i < D; i++) begin e1[i] = ref_m[r1s][r1w + i]; e2[i] = ref_m[r2s][r2w + i]; end
      el = ref_m[lrs][lrw];
      if (we_m) for (int i = 0; i < D; i++) if (wm[i]) ref_m[ws][ww + i] = wdm[i];
      if (lwe) ref_m[lws][lww] = lwd;
    end
    // contention handler
    @(negedge clk); idle();
    la = 1; ln = 4'b0010; mp = 1; mn = 4'b0011; #1;
    check("halt MFU while LSU holds its SPM", 32'(hm), 1); check("no LSU halt", 32'(hl), 0);
    idle(); ma = 1; mn = 4'b0100; lp = 1; ln = 4'b0100; #1;
    check("halt LSU while MFU holds its SPM", 32'(hl), 1); check("no MFU halt 2", 32'(hm), 0);
    idle(); mp = 1; mn = 4'b1001; lp = 1; ln = 4'b1000; #1;
    check("tie: LSU first", 32'(hl), 0); check("tie: MFU waits", 32'(hm), 1);
    idle(); mp = 1; mn = 4'b0011; lp = 1; ln = 4'b0100; la = 0; ma = 0; #1;
    check("disjoint: no MFU halt", 32'(hm), 0); check("disjoint: no LSU halt", 32'(hl), 0);
    idle(); ma = 1; mn = 4'b0011; lp = 1; ln = 4'b1000; #1;
    check("disjoint with MFU running", 32'(hl), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
