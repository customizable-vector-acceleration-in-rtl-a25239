// Load-store unit: scalar loads/stores and the scratchpad burst transfers.
//
// Scalar path. In the execute stage a load (ld_i) or store (st_i) drives the
// data memory directly: stores write the selected bytes (byte, half or word,
// from size_i and the address low bits) in the same cycle; loads get their
// word one cycle later, in the write-back stage, where ld_data_o gives it
// aligned and sign- or zero-extended. The execute stage may issue a scalar
// access only while busy_o is low.
//
// Burst path. kmemld copies rs2 bytes from main memory at (rs1) into the SPM
// at (rd); kmemstr copies rs2 bytes from the SPM at (rs1) to main memory at
// (rd). Both move one 32-bit word per cycle over the LSU bus through a
// two-stage loop (request a word, then write it on the other side). A
// command (kreq_i/kcmd_i, accepted while busy_o is low) first waits in PEND
// while the SPM contention handler raises halt_i, then runs with active_o
// high; need_o names the SPM it uses and hart_o the hart whose SPM interface
// it targets. A command whose SPM address is outside the SPM section is
// dropped with exc_o. n words take n + 2 cycles.
// Byte counts are rounded down to whole words and addresses must be word
// aligned. The instructions and the 32-bit bus follow the co-processor
// description; the timing is this design's choice.
module lsu
  import klessydra_pkg::*;
#(
  parameter int unsigned N         = 4,
  parameter int unsigned SPM_BYTES = 16384,
  localparam int unsigned W  = SPM_BYTES / 4,
  localparam int unsigned WA = $clog2(W),
  localparam int unsigned NA = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  output logic          busy_o,
  output logic          done_o,
  output logic          exc_o,
  // scalar access from the execute stage
  input  logic          ld_i,
  input  logic          st_i,
  input  logic [31:0]   addr_i,
  input  logic [31:0]   wdata_i,
  input  logic [1:0]    size_i,
  input  logic          uns_i,
  output logic [31:0]   ld_data_o,
  // burst command
  input  logic          kreq_i,
  input  vcmd_t         kcmd_i,
  output logic [1:0]    hart_o,
  output logic          pend_o,
  output logic          active_o,
  output logic [N-1:0]  need_o,
  input  logic          halt_i,
  // data memory
  output logic          dmem_req_o,
  output logic          dmem_we_o,
  output logic [3:0]    dmem_be_o,
  output logic [31:0]   dmem_addr_o,
  output logic [31:0]   dmem_wdata_o,
  input  logic [31:0]   dmem_rdata_i,
  // SPM (through the SPMI of hart_o)
  output logic          spm_rd_en_o,
  output logic [NA-1:0] spm_rd_spm_o,
  output logic [WA-1:0] spm_rd_word_o,
  input  logic [31:0]   spm_rdata_i,
  output logic          spm_wr_en_o,
  output logic [NA-1:0] spm_wr_spm_o,
  output logic [WA-1:0] spm_wr_word_o,
  output logic [31:0]   spm_wdata_o
);
  typedef enum logic [1:0] { S_IDLE, S_PEND, S_RUN } state_e;

  state_e      state_q;
  vcmd_t       cmd_q;
  logic [31:0] n_q, idx_q, s2_idx_q;
  logic        s2_q;

  function automatic logic in_spm(logic [31:0] a);
    return a >= SPM_BASE && (a - SPM_BASE) < 32'(N * SPM_BYTES);
  endfunction
  function automatic logic [NA-1:0] spm_of(logic [31:0] a);
    return NA'((a - SPM_BASE) / 32'(SPM_BYTES));
  endfunction
  function automatic logic [WA-1:0] word_of(logic [31:0] a);
    return WA'(((a - SPM_BASE) % 32'(SPM_BYTES)) >> 2);
  endfunction

  logic        is_ld;       // kmemld (else kmemstr)
  logic [31:0] spm_addr, mem_addr;
  logic        cmd_ok;
  assign is_ld    = (cmd_q.vop == V_MEMLD);
  assign spm_addr = is_ld ? cmd_q.rd  : cmd_q.rs1;
  assign mem_addr = is_ld ? cmd_q.rs1 : cmd_q.rd;
  assign cmd_ok   = in_spm(spm_addr);

  always_comb begin
    need_o = '0;
    need_o[spm_of(spm_addr)] = 1'b1;
  end

  assign busy_o   = (state_q != S_IDLE);
  assign pend_o   = (state_q == S_PEND) && cmd_ok;
  assign active_o = (state_q == S_RUN);
  assign hart_o   = cmd_q.hart;

  logic issue;
  assign issue = (state_q == S_RUN) && (idx_q < n_q);

  // -------------------------------------------------------- memory ports
  always_comb begin
    dmem_req_o   = 1'b0;
    dmem_we_o    = 1'b0;
    dmem_be_o    = 4'hF;
    dmem_addr_o  = addr_i;
    dmem_wdata_o = wdata_i;
    if (state_q == S_RUN) begin
      if (is_ld) begin
        dmem_req_o  = issue;
        dmem_addr_o = mem_addr + (idx_q << 2);
      end else begin
        dmem_req_o   = s2_q;
        dmem_we_o    = 1'b1;
        dmem_addr_o  = mem_addr + (s2_idx_q << 2);
        dmem_wdata_o = spm_rdata_i;
      end
    end else if (state_q == S_IDLE && (ld_i || st_i)) begin
      dmem_req_o = 1'b1;
      dmem_we_o  = st_i;
      unique case (size_i)
        2'd0: begin
          dmem_be_o    = 4'b0001 << addr_i[1:0];
          dmem_wdata_o = {4{wdata_i[7:0]}};
        end
        2'd1: begin
          dmem_be_o    = addr_i[1] ? 4'b1100 : 4'b0011;
          dmem_wdata_o = {2{wdata_i[15:0]}};
        end
        default: dmem_be_o = 4'hF;
      endcase
    end
  end

  assign spm_rd_en_o   = issue && !is_ld;
  assign spm_rd_spm_o  = spm_of(spm_addr);
  assign spm_rd_word_o = word_of(spm_addr) + WA'(idx_q);
  assign spm_wr_en_o   = s2_q && is_ld;
  assign spm_wr_spm_o  = spm_of(spm_addr);
  assign spm_wr_word_o = word_of(spm_addr) + WA'(s2_idx_q);
  assign spm_wdata_o   = dmem_rdata_i;

  // -------------------------------------------------------- load alignment (WB)
  logic [1:0] ld_off_q, ld_size_q;
  logic       ld_uns_q;
  always_ff @(posedge clk_i) begin
    ld_off_q  <= addr_i[1:0];
    ld_size_q <= size_i;
    ld_uns_q  <= uns_i;
  end

  logic [31:0] sh;
  assign sh = dmem_rdata_i >> {ld_off_q, 3'b000};
  always_comb begin
    unique case (ld_size_q)
      2'd0:    ld_data_o = ld_uns_q ? {24'b0, sh[7:0]}  : {{24{sh[7]}},  sh[7:0]};
      2'd1:    ld_data_o = ld_uns_q ? {16'b0, sh[15:0]} : {{16{sh[15]}}, sh[15:0]};
      default: ld_data_o = dmem_rdata_i;
    endcase
  end

  // -------------------------------------------------------- burst control
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q  <= S_IDLE;
      cmd_q    <= '0;
      n_q      <= '0;
      idx_q    <= '0;
      s2_q     <= 1'b0;
      s2_idx_q <= '0;
      done_o   <= 1'b0;
      exc_o    <= 1'b0;
    end else begin
      done_o <= 1'b0;
      exc_o  <= 1'b0;
      unique case (state_q)
        S_IDLE: if (kreq_i) begin
          cmd_q   <= kcmd_i;
          n_q     <= kcmd_i.rs2 >> 2;
          idx_q   <= '0;
          s2_q    <= 1'b0;
          state_q <= S_PEND;
        end
        S_PEND: begin
          if (!cmd_ok) begin
            exc_o   <= 1'b1;
            done_o  <= 1'b1;
            state_q <= S_IDLE;
          end else if (!halt_i) begin
            state_q <= S_RUN;
          end
        end
        S_RUN: begin
          s2_q     <= issue;
          s2_idx_q <= idx_q;
          if (issue) idx_q <= idx_q + 32'd1;
          if (!issue && !s2_q) begin
            done_o  <= 1'b1;
            state_q <= S_IDLE;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk_i) disable iff (!rst_ni) (ld_i || st_i) |-> !busy_o)
    else $error("lsu: scalar access while a burst is running");
endmodule
