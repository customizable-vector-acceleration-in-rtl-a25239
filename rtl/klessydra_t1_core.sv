// Klessydra T1 core: an interleaved multi-threaded RV32I pipeline with a
// configurable vector co-processor.
//
// Pipeline. Four stages shared by H hardware threads (harts): Fetch, Decode
// (register read), Execute (ALU/branch/CSR, or hand-off to the LSU or an
// MFU) and Write-back. Each cycle the next hart in rotation is fetched, so
// with H >= 3 two instructions of one hart are never in the pipeline
// together and there is no forwarding, interlock or branch prediction: a
// hart's PC is updated by its own instruction in Execute before the hart's
// next fetch slot. Every hart has its own PC, registers and CSRs.
//
// Co-processor. M scratchpad interfaces (SPMI, each with N SPMs of D banks)
// and F MFUs (D lanes each) are shared out by hart: hart h uses SPMI h mod M
// and MFU h mod F. M = F = H gives dedicated co-processors per hart (MIMD),
// M = F = 1 a single shared one, M = H with F = 1 dedicated SPMs with a
// shared MFU. One LSU serves all harts for scalar memory accesses and for
// the kmemld/kmemstr bursts. Vector instructions read their three operands
// (two addresses or scalars and the destination address) from the register
// file and only write the SPMs, so the MFU runs in parallel with the
// hart's following scalar instructions and with the LSU.
//
// Self-referencing jump. A vector instruction that reaches Execute while
// its MFU is busy, or a memory instruction while the LSU is busy, is not
// executed: the hart's PC is set back to that instruction, which is fetched
// again on the hart's next turn. Other harts keep running; nothing stalls.
// Ordering between the LSU and the MFU inside a hart's SPMs is kept by the
// SPMI contention handler.
//
// Memory interfaces: a program-memory port with one-cycle read latency and
// a data-memory port with one-cycle read latency and byte enables. The stat
// outputs report per-cycle events for monitoring.
// The structure (rotation, replicated state, self-referencing jump, M/F/D
// configurations, LSU/MFU/SPMI split) follows the core description; the
// hart-to-unit mapping rule and the pipeline timing are this design's.
module klessydra_t1_core
  import klessydra_pkg::*;
#(
  parameter int unsigned H         = 3,
  parameter int unsigned M         = 3,
  parameter int unsigned F         = 3,
  parameter int unsigned D         = 4,
  parameter int unsigned N         = 4,
  parameter int unsigned SPM_BYTES = 16384,
  localparam int unsigned HA = $clog2(H)
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic          fetch_en_i,
  // program memory
  output logic          instr_req_o,
  output logic [31:0]   instr_addr_o,
  input  logic [31:0]   instr_rdata_i,
  // data memory
  output logic          data_req_o,
  output logic          data_we_o,
  output logic [3:0]    data_be_o,
  output logic [31:0]   data_addr_o,
  output logic [31:0]   data_wdata_o,
  input  logic [31:0]   data_rdata_i,
  // events
  output logic          stat_commit_o,      // an instruction executed
  output logic          stat_replay_mfu_o,  // self-referencing jump, MFU busy
  output logic          stat_replay_lsu_o,  // self-referencing jump, LSU busy
  output logic [F-1:0]  stat_mfu_active_o,
  output logic          stat_lsu_active_o,
  output logic [M-1:0]  stat_halt_mfu_o,
  output logic [M-1:0]  stat_halt_lsu_o,
  output logic          stat_exc_o          // SPM address error
);
  localparam int unsigned W  = SPM_BYTES / 4;
  localparam int unsigned WA = $clog2(W);
  localparam int unsigned NA = (N > 1) ? $clog2(N) : 1;

  initial assert (F == M || F == 1) else $error("core: F must equal M or be 1");
  initial assert (M <= H)           else $error("core: M must not exceed H");

  // ================================================================ Fetch
  logic          f_valid;
  logic [HA-1:0] f_hart;
  logic [31:0]   f_pc;

  logic          upd_valid;
  logic [HA-1:0] upd_hart;
  logic [31:0]   upd_pc;

  pc_unit #(.H(H)) u_pc (
    .clk_i, .rst_ni, .fetch_en_i,
    .fetch_valid_o(f_valid), .fetch_hart_o(f_hart), .fetch_pc_o(f_pc),
    .upd_valid_i(upd_valid), .upd_hart_i(upd_hart), .upd_pc_i(upd_pc)
  );

  assign instr_req_o  = f_valid;
  assign instr_addr_o = f_pc;

  logic          d_valid_q;
  logic [HA-1:0] d_hart_q;
  logic [31:0]   d_pc_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      d_valid_q <= 1'b0;
      d_hart_q  <= '0;
      d_pc_q    <= '0;
    end else begin
      d_valid_q <= f_valid;
      d_hart_q  <= f_hart;
      d_pc_q    <= f_pc;
    end
  end

  // ================================================================ Decode
  dec_t        d_dec;
  logic [31:0] d_a, d_b, d_c;

  logic          w_we;
  logic [HA-1:0] w_hart;
  logic [4:0]    w_rd;
  logic [31:0]   w_data;

  decoder u_dec (.instr_i(instr_rdata_i), .dec_o(d_dec));

  regfile #(.H(H)) u_rf (
    .clk_i, .rst_ni,
    .rhart_i(d_hart_q), .raddr_a_i(d_dec.rs1), .raddr_b_i(d_dec.rs2), .raddr_c_i(d_dec.rd),
    .rdata_a_o(d_a), .rdata_b_o(d_b), .rdata_c_o(d_c),
    .we_i(w_we), .whart_i(w_hart), .waddr_i(w_rd), .wdata_i(w_data)
  );

  logic          e_valid_q;
  logic [HA-1:0] e_hart_q;
  logic [31:0]   e_pc_q, e_a_q, e_b_q, e_c_q;
  dec_t          e_dec_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      e_valid_q <= 1'b0;
      e_hart_q  <= '0;
      e_pc_q    <= '0;
      e_dec_q   <= '0;
      e_a_q     <= '0;
      e_b_q     <= '0;
      e_c_q     <= '0;
    end else begin
      e_valid_q <= d_valid_q;
      e_hart_q  <= d_hart_q;
      e_pc_q    <= d_pc_q;
      e_dec_q   <= d_dec;
      e_a_q     <= d_a;
      e_b_q     <= d_b;
      e_c_q     <= d_c;
    end
  end

  // ================================================================ Execute
  logic [F-1:0] mfu_busy;
  logic         lsu_busy;
  int unsigned  e_f;
  assign e_f = 32'(e_hart_q) % F;

  logic needs_mfu, needs_lsu, replay_mfu, replay_lsu, commit;
  assign needs_mfu  = e_dec_q.valid && e_dec_q.unit == U_MFU;
  assign needs_lsu  = e_dec_q.valid && e_dec_q.unit inside {U_KMEM, U_LOAD, U_STORE};
  assign replay_mfu = e_valid_q && needs_mfu && mfu_busy[e_f];
  assign replay_lsu = e_valid_q && needs_lsu && lsu_busy;
  assign commit     = e_valid_q && !replay_mfu && !replay_lsu;

  logic [31:0] alu_a, alu_b, alu_res;
  logic        br_taken;
  assign alu_a = e_dec_q.a_is_pc ? e_pc_q : e_a_q;
  assign alu_b = e_dec_q.b_is_imm ? e_dec_q.imm : e_b_q;

  alu u_alu (
    .op_i(e_dec_q.alu_op), .br_op_i(e_dec_q.br_op), .a_i(alu_a), .b_i(alu_b),
    .res_o(alu_res), .br_taken_o(br_taken)
  );

  // CSRs
  logic [31:0] csr_rdata;
  logic [31:0] mvsize   [H];
  logic [1:0]  mvtype   [H];
  logic [4:0]  mpsclfac [H];
  logic        csr_req;
  assign csr_req = commit && e_dec_q.valid && e_dec_q.unit == U_CSR;

  csr_file #(.H(H)) u_csr (
    .clk_i, .rst_ni, .req_i(csr_req), .csr_op_i(e_dec_q.csr_op), .hart_i(e_hart_q),
    .addr_i(e_dec_q.csr_addr),
    .wdata_i(e_dec_q.csr_imm ? {27'b0, e_dec_q.rs1} : e_a_q),
    .rdata_o(csr_rdata), .mvsize_o(mvsize), .mvtype_o(mvtype), .mpsclfac_o(mpsclfac)
  );

  // next PC
  logic [31:0] pc_plus4;
  assign pc_plus4  = e_pc_q + 32'd4;
  assign upd_valid = e_valid_q;
  assign upd_hart  = e_hart_q;
  always_comb begin
    upd_pc = pc_plus4;
    if (!commit)                                             upd_pc = e_pc_q;
    else if (e_dec_q.valid && e_dec_q.unit == U_JAL)         upd_pc = e_pc_q + e_dec_q.imm;
    else if (e_dec_q.valid && e_dec_q.unit == U_JALR)        upd_pc = (e_a_q + e_dec_q.imm) & ~32'd1;
    else if (e_dec_q.valid && e_dec_q.unit == U_BRANCH && br_taken) upd_pc = e_pc_q + e_dec_q.imm;
  end

  // vector command
  vcmd_t vcmd;
  always_comb begin
    vcmd.vop    = e_dec_q.vop;
    vcmd.hart   = 2'(e_hart_q);
    vcmd.rd     = e_c_q;
    vcmd.rs1    = e_a_q;
    vcmd.rs2    = e_b_q;
    vcmd.size   = mvsize[e_hart_q];
    vcmd.sclfac = mpsclfac[e_hart_q];
    vcmd.vtype  = mvtype[e_hart_q];
  end

  // ================================================================ LSU
  logic          lsu_ld, lsu_st, lsu_kreq, lsu_pend, lsu_active, lsu_halt, lsu_exc, lsu_done;
  logic [1:0]    lsu_hart;
  logic [N-1:0]  lsu_need;
  logic [31:0]   lsu_ld_data, lsu_spm_rdata, lsu_spm_wdata;
  logic          lsu_rd_en, lsu_wr_en;
  logic [NA-1:0] lsu_rd_spm, lsu_wr_spm;
  logic [WA-1:0] lsu_rd_word, lsu_wr_word;

  assign lsu_ld   = commit && e_dec_q.valid && e_dec_q.unit == U_LOAD;
  assign lsu_st   = commit && e_dec_q.valid && e_dec_q.unit == U_STORE;
  assign lsu_kreq = commit && e_dec_q.valid && e_dec_q.unit == U_KMEM;

  lsu #(.N(N), .SPM_BYTES(SPM_BYTES)) u_lsu (
    .clk_i, .rst_ni, .busy_o(lsu_busy), .done_o(lsu_done), .exc_o(lsu_exc),
    .ld_i(lsu_ld), .st_i(lsu_st), .addr_i(alu_a + e_dec_q.imm), .wdata_i(e_b_q),
    .size_i(e_dec_q.mem_size), .uns_i(e_dec_q.mem_uns), .ld_data_o(lsu_ld_data),
    .kreq_i(lsu_kreq), .kcmd_i(vcmd), .hart_o(lsu_hart), .pend_o(lsu_pend),
    .active_o(lsu_active), .need_o(lsu_need), .halt_i(lsu_halt),
    .dmem_req_o(data_req_o), .dmem_we_o(data_we_o), .dmem_be_o(data_be_o),
    .dmem_addr_o(data_addr_o), .dmem_wdata_o(data_wdata_o), .dmem_rdata_i(data_rdata_i),
    .spm_rd_en_o(lsu_rd_en), .spm_rd_spm_o(lsu_rd_spm), .spm_rd_word_o(lsu_rd_word),
    .spm_rdata_i(lsu_spm_rdata),
    .spm_wr_en_o(lsu_wr_en), .spm_wr_spm_o(lsu_wr_spm), .spm_wr_word_o(lsu_wr_word),
    .spm_wdata_o(lsu_spm_wdata)
  );

  int unsigned lsu_m;
  assign lsu_m = 32'(lsu_hart) % M;

  // ================================================================ MFUs
  logic          mfu_req    [F];
  logic          mfu_done   [F];
  logic [F-1:0]  mfu_exc;
  logic [1:0]    mfu_hart   [F];
  logic          mfu_pend   [F];
  logic          mfu_active [F];
  logic [N-1:0]  mfu_need   [F];
  logic          mfu_halt   [F];
  logic          mfu_rd1_en [F], mfu_rd2_en [F], mfu_wr_en [F];
  logic [NA-1:0] mfu_rd1_spm[F], mfu_rd2_spm[F], mfu_wr_spm[F];
  logic [WA-1:0] mfu_rd1_word[F], mfu_rd2_word[F], mfu_wr_word[F];
  logic [D-1:0]  mfu_wr_mask[F];
  logic [31:0]   mfu_wdata  [F][D];
  logic [31:0]   mfu_rdata1 [F][D];
  logic [31:0]   mfu_rdata2 [F][D];

  for (genvar f = 0; f < F; f++) begin : g_mfu
    assign mfu_req[f] = commit && needs_mfu && e_f == f;
    mfu #(.D(D), .N(N), .SPM_BYTES(SPM_BYTES)) u_mfu (
      .clk_i, .rst_ni, .req_i(mfu_req[f]), .cmd_i(vcmd), .busy_o(mfu_busy[f]),
      .done_o(mfu_done[f]), .exc_o(mfu_exc[f]), .hart_o(mfu_hart[f]),
      .pend_o(mfu_pend[f]), .active_o(mfu_active[f]), .need_o(mfu_need[f]), .halt_i(mfu_halt[f]),
      .rd1_en_o(mfu_rd1_en[f]), .rd1_spm_o(mfu_rd1_spm[f]), .rd1_word_o(mfu_rd1_word[f]),
      .rdata1_i(mfu_rdata1[f]),
      .rd2_en_o(mfu_rd2_en[f]), .rd2_spm_o(mfu_rd2_spm[f]), .rd2_word_o(mfu_rd2_word[f]),
      .rdata2_i(mfu_rdata2[f]),
      .wr_en_o(mfu_wr_en[f]), .wr_spm_o(mfu_wr_spm[f]), .wr_word_o(mfu_wr_word[f]),
      .wr_mask_o(mfu_wr_mask[f]), .wdata_o(mfu_wdata[f])
    );
  end

  // ================================================================ SPMIs
  logic [31:0] sp_rdata1 [M][D];
  logic [31:0] sp_rdata2 [M][D];
  logic [31:0] sp_lrdata [M];
  logic        sp_halt_mfu [M];
  logic        sp_halt_lsu [M];

  for (genvar m = 0; m < M; m++) begin : g_spmi
    // the MFU (if any) currently working for a hart of this SPMI
    logic          sel;
    int unsigned   fs;
    always_comb begin
      sel = 1'b0;
      fs  = 0;
      for (int unsigned f = 0; f < F; f++)
        if (mfu_busy[f] && (32'(mfu_hart[f]) % M) == m) begin
          sel = 1'b1;
          fs  = f;
        end
    end
    logic lsel;
    assign lsel = lsu_busy && lsu_m == m;

    spmi #(.N(N), .D(D), .SPM_BYTES(SPM_BYTES)) u_spmi (
      .clk_i,
      .m_rd1_en_i(sel && mfu_rd1_en[fs]), .m_rd1_spm_i(mfu_rd1_spm[fs]), .m_rd1_word_i(mfu_rd1_word[fs]),
      .m_rdata1_o(sp_rdata1[m]),
      .m_rd2_en_i(sel && mfu_rd2_en[fs]), .m_rd2_spm_i(mfu_rd2_spm[fs]), .m_rd2_word_i(mfu_rd2_word[fs]),
      .m_rdata2_o(sp_rdata2[m]),
      .m_wr_en_i(sel && mfu_wr_en[fs]), .m_wr_spm_i(mfu_wr_spm[fs]), .m_wr_word_i(mfu_wr_word[fs]),
      .m_wr_mask_i(mfu_wr_mask[fs]), .m_wdata_i(mfu_wdata[fs]),
      .l_rd_en_i(lsel && lsu_rd_en), .l_rd_spm_i(lsu_rd_spm), .l_rd_word_i(lsu_rd_word),
      .l_rdata_o(sp_lrdata[m]),
      .l_wr_en_i(lsel && lsu_wr_en), .l_wr_spm_i(lsu_wr_spm), .l_wr_word_i(lsu_wr_word),
      .l_wdata_i(lsu_spm_wdata),
      .m_pend_i(sel && mfu_pend[fs]), .m_active_i(sel && mfu_active[fs]), .m_need_i(mfu_need[fs]),
      .l_pend_i(lsel && lsu_pend), .l_active_i(lsel && lsu_active), .l_need_i(lsu_need),
      .halt_mfu_o(sp_halt_mfu[m]), .halt_lsu_o(sp_halt_lsu[m])
    );
  end

  for (genvar f = 0; f < F; f++) begin : g_mfu_ret
    int unsigned mt;
    assign mt            = 32'(mfu_hart[f]) % M;
    assign mfu_rdata1[f] = sp_rdata1[mt];
    assign mfu_rdata2[f] = sp_rdata2[mt];
    assign mfu_halt[f]   = sp_halt_mfu[mt];
  end

  assign lsu_spm_rdata = sp_lrdata[lsu_m];
  assign lsu_halt      = sp_halt_lsu[lsu_m];

  // ================================================================ Write-back
  logic          wb_valid_q, wb_load_q;
  logic [HA-1:0] wb_hart_q;
  logic [4:0]    wb_rd_q;
  logic [31:0]   wb_res_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      wb_valid_q <= 1'b0;
      wb_load_q  <= 1'b0;
      wb_hart_q  <= '0;
      wb_rd_q    <= '0;
      wb_res_q   <= '0;
    end else begin
      wb_valid_q <= commit && e_dec_q.valid && e_dec_q.rd_we;
      wb_load_q  <= e_dec_q.unit == U_LOAD;
      wb_hart_q  <= e_hart_q;
      wb_rd_q    <= e_dec_q.rd;
      unique case (e_dec_q.unit)
        U_JAL, U_JALR: wb_res_q <= pc_plus4;
        U_CSR:         wb_res_q <= csr_rdata;
        default:       wb_res_q <= alu_res;
      endcase
    end
  end

  assign w_we   = wb_valid_q;
  assign w_hart = wb_hart_q;
  assign w_rd   = wb_rd_q;
  assign w_data = wb_load_q ? lsu_ld_data : wb_res_q;

  // ================================================================ events
  assign stat_commit_o     = commit;
  assign stat_replay_mfu_o = replay_mfu;
  assign stat_replay_lsu_o = replay_lsu;
  assign stat_lsu_active_o = lsu_active;
  assign stat_exc_o        = lsu_exc || (|mfu_exc);
  for (genvar f = 0; f < F; f++) begin : g_st_f
    assign stat_mfu_active_o[f] = mfu_active[f];
  end
  for (genvar m = 0; m < M; m++) begin : g_st_m
    assign stat_halt_mfu_o[m] = sp_halt_mfu[m];
    assign stat_halt_lsu_o[m] = sp_halt_lsu[m];
  end
endmodule
