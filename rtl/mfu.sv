// Multi-purpose functional unit (MFU) of the vector co-processor.
//
// Executes one vector instruction at a time on vectors held in the
// scratchpad memories, D elements (lanes) per cycle, and writes its results
// back to the scratchpads only. A command (cmd_i with req_i, accepted while
// busy_o is low = MFU_req / MFU_busy) carries the operation, the three
// register values (SPM addresses, a scalar or a shift amount), the vector
// length MVSIZE in bytes and the post-scaling factor MPSCLFAC of the issuing
// hart.
//
// Sequence ("MFU init" and "hardware loop"):
//   PEND  the command is checked (every SPM address must lie in the SPM
//         section, else exc_o pulses and the command is dropped) and waits
//         while the SPM contention handler raises halt_i;
//   SCAL  for ksvaddsc/ksvmulsc the scalar at (rs2) is read from the SPM;
//   RUN   a two-stage loop: each cycle the next D-word group of vs1 (and
//         vs2) is requested, and the group requested in the previous cycle
//         is computed by the D lanes and written to vd with a per-lane mask
//         for a partial last group;
//   FIN   reductions (kvred, kdotp, kdotpps) write their accumulated sum as
//         one word at (rd).
// A vector of n words takes about ceil(n/D) + 2 cycles (+2 for a scalar in
// the SPM, +1 for reductions). The element width is the issuing hart's
// MVTYPE (8, 16 or 32 bits, packed in 32-bit words, see mfu_lane); MVSIZE
// counts bytes and is rounded down to whole words. For ksvaddsc/ksvmulsc
// the scalar is the element at byte address (rs2). The MFU owns the SPMs
// it uses while active_o is high (need_o lists them); it shows pend_o while
// it waits.
// The list of operations, the D lanes, the busy/request handshake and the
// SPM-only results follow the co-processor description; the pipeline, the
// timing and the exception rule are this design's choices.
module mfu
  import klessydra_pkg::*;
#(
  parameter int unsigned D         = 4,
  parameter int unsigned N         = 4,
  parameter int unsigned SPM_BYTES = 16384,
  localparam int unsigned W  = SPM_BYTES / 4,
  localparam int unsigned WA = $clog2(W),
  localparam int unsigned NA = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic          req_i,
  input  vcmd_t         cmd_i,
  output logic          busy_o,
  output logic          done_o,
  output logic          exc_o,
  output logic [1:0]    hart_o,
  // contention handler
  output logic          pend_o,
  output logic          active_o,
  output logic [N-1:0]  need_o,
  input  logic          halt_i,
  // SPM ports
  output logic          rd1_en_o,
  output logic [NA-1:0] rd1_spm_o,
  output logic [WA-1:0] rd1_word_o,
  input  logic [31:0]   rdata1_i [D],
  output logic          rd2_en_o,
  output logic [NA-1:0] rd2_spm_o,
  output logic [WA-1:0] rd2_word_o,
  input  logic [31:0]   rdata2_i [D],
  output logic          wr_en_o,
  output logic [NA-1:0] wr_spm_o,
  output logic [WA-1:0] wr_word_o,
  output logic [D-1:0]  wr_mask_o,
  output logic [31:0]   wdata_o [D]
);
  typedef enum logic [2:0] { S_IDLE, S_PEND, S_SCAL, S_SCALW, S_RUN, S_FIN } state_e;

  state_e      state_q;
  vcmd_t       cmd_q;
  logic [31:0] n_q;       // vector length in words
  logic [31:0] idx_q;     // next element to request
  logic        s2_q;      // a group is in the compute/write stage
  logic [31:0] s2_idx_q;  // first element of that group
  logic [31:0] acc_q;
  logic [31:0] scal_q;

  // -------------------------------------------------------- address decode
  function automatic logic in_spm(logic [31:0] a);
    return a >= SPM_BASE && (a - SPM_BASE) < 32'(N * SPM_BYTES);
  endfunction
  function automatic logic [NA-1:0] spm_of(logic [31:0] a);
    return NA'((a - SPM_BASE) / 32'(SPM_BYTES));
  endfunction
  function automatic logic [WA-1:0] word_of(logic [31:0] a);
    return WA'(((a - SPM_BASE) % 32'(SPM_BYTES)) >> 2);
  endfunction

  logic uses_rs1, uses_rs2, cmd_ok;
  assign uses_rs1 = vop_rs1_is_spm(cmd_q.vop);
  assign uses_rs2 = vop_rs2_is_spm(cmd_q.vop);
  assign cmd_ok   = in_spm(cmd_q.rd) && (!uses_rs1 || in_spm(cmd_q.rs1)) &&
                    (!uses_rs2 || in_spm(cmd_q.rs2));

  always_comb begin
    need_o = '0;
    need_o[spm_of(cmd_q.rd)] = 1'b1;
    if (uses_rs1) need_o[spm_of(cmd_q.rs1)] = 1'b1;
    if (uses_rs2) need_o[spm_of(cmd_q.rs2)] = 1'b1;
  end

  assign busy_o   = (state_q != S_IDLE);
  assign pend_o   = (state_q == S_PEND) && cmd_ok;
  assign active_o = busy_o && (state_q != S_PEND);
  assign hart_o   = cmd_q.hart;

  // -------------------------------------------------------- lanes
  logic [31:0] s_op;
  always_comb begin
    if (vop_scalar_in_spm(cmd_q.vop)) s_op = scal_q >> {cmd_q.rs2[1:0], 3'b000};
    else if (cmd_q.vop == V_BCST)     s_op = cmd_q.rs1;
    else                              s_op = cmd_q.rs2;
  end

  logic [31:0]  lane_res [D];
  logic [D-1:0] lane_ok;
  for (genvar i = 0; i < D; i++) begin : g_lane
    mfu_lane u_lane (
      .op_i    (cmd_q.vop),
      .ew_i    (cmd_q.vtype),
      .a_i     (rdata1_i[i]),
      .b_i     (rdata2_i[i]),
      .s_i     (s_op),
      .sclfac_i(cmd_q.sclfac),
      .res_o   (lane_res[i])
    );
    assign lane_ok[i] = (s2_idx_q + 32'(i)) < n_q;
  end

  // accumulator input: sum of the valid lanes of this group
  logic [31:0] grp_sum;
  always_comb begin
    grp_sum = '0;
    for (int i = 0; i < int'(D); i++)
      if (lane_ok[i]) grp_sum = grp_sum + lane_res[i];
  end

  // -------------------------------------------------------- SPM requests
  logic issue;
  assign issue = (state_q == S_RUN) && (idx_q < n_q);

  always_comb begin
    rd1_en_o   = issue && uses_rs1;
    rd1_spm_o  = spm_of(cmd_q.rs1);
    rd1_word_o = word_of(cmd_q.rs1) + WA'(idx_q);
    rd2_en_o   = (issue && uses_rs2) || (state_q == S_SCAL);
    rd2_spm_o  = spm_of(cmd_q.rs2);
    rd2_word_o = word_of(cmd_q.rs2) + ((state_q == S_SCAL) ? '0 : WA'(idx_q));
    wr_spm_o   = spm_of(cmd_q.rd);
    if (state_q == S_FIN) begin
      wr_en_o   = 1'b1;
      wr_word_o = word_of(cmd_q.rd);
      wr_mask_o = D'(1);
      for (int i = 0; i < int'(D); i++) wdata_o[i] = acc_q;
    end else begin
      wr_en_o   = s2_q && !vop_is_reduction(cmd_q.vop);
      wr_word_o = word_of(cmd_q.rd) + WA'(s2_idx_q);
      wr_mask_o = lane_ok;
      wdata_o   = lane_res;
    end
  end

  // -------------------------------------------------------- control
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q  <= S_IDLE;
      cmd_q    <= '0;
      n_q      <= '0;
      idx_q    <= '0;
      s2_q     <= 1'b0;
      s2_idx_q <= '0;
      acc_q    <= '0;
      scal_q   <= '0;
      done_o   <= 1'b0;
      exc_o    <= 1'b0;
    end else begin
      done_o <= 1'b0;
      exc_o  <= 1'b0;
      unique case (state_q)
        S_IDLE: if (req_i) begin
          cmd_q   <= cmd_i;
          n_q     <= cmd_i.size >> 2;
          idx_q   <= '0;
          acc_q   <= '0;
          s2_q    <= 1'b0;
          state_q <= S_PEND;
        end
        S_PEND: begin
          if (!cmd_ok) begin
            exc_o   <= 1'b1;
            done_o  <= 1'b1;
            state_q <= S_IDLE;
          end else if (!halt_i) begin
            state_q <= vop_scalar_in_spm(cmd_q.vop) ? S_SCAL : S_RUN;
          end
        end
        S_SCAL:  state_q <= S_SCALW;
        S_SCALW: begin
          scal_q  <= rdata2_i[0];
          state_q <= S_RUN;
        end
        S_RUN: begin
          s2_q     <= issue;
          s2_idx_q <= idx_q;
          if (issue) idx_q <= idx_q + 32'(D);
          if (s2_q && vop_is_reduction(cmd_q.vop)) acc_q <= acc_q + grp_sum;
          if (!issue && !s2_q) begin
            if (vop_is_reduction(cmd_q.vop)) begin
              state_q <= S_FIN;
            end else begin
              done_o  <= 1'b1;
              state_q <= S_IDLE;
            end
          end
        end
        S_FIN: begin
          done_o  <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
