// Scratchpad memory interface (SPMI): N scratchpad memories (SPMs) of
// SPM_BYTES each, every SPM split into D word-interleaved banks.
//
// Bank interleaving: word w of an SPM lives in bank (w mod D), row (w div D).
// Any D consecutive words therefore sit in D different banks and a D-lane
// MFU can read or write a whole group in one cycle from any word address.
// "Data rotate" reorders the bank outputs into lane order (lane i = word
// w+i) on reads and the lane data into bank order on writes.
//
// Ports. The MFU side has two D-word read ports (vs1, vs2) and one D-word
// write port (vd) with a per-lane write mask; a port addresses one SPM and a
// starting word. The LSU side has a one-word read port and a one-word write
// port (the 32-bit LSU bus). Read data, for both sides, is valid on the
// cycle after the request. Every bank has two read ports and one write
// port, so vs1 and vs2 may lie in the same SPM.
//
// Contention handler. A unit that has an instruction ready (x_pend_i) shows
// the set of SPMs that instruction touches (x_need_i) and keeps showing it
// while it runs (x_active_i). An instruction may start only when none of its
// SPMs is held by the other unit's running instruction: otherwise Halt MFU /
// Halt LSU is raised and the unit waits. If both would start in the same
// cycle on a common SPM, the LSU goes first. So the MFU and the LSU work in
// parallel on different SPMs and never touch the same SPM at once.
// The structure (N SPMs of D banks, bank interleave, data rotate, contention
// handler with halt signals) follows the co-processor description; the
// granularity of the contention check (whole instructions), the port counts
// and the LSU priority are this design's choices.
module spmi #(
  parameter int unsigned N         = 4,
  parameter int unsigned D         = 4,
  parameter int unsigned SPM_BYTES = 16384,
  localparam int unsigned W  = SPM_BYTES / 4,
  localparam int unsigned WA = $clog2(W),
  localparam int unsigned NA = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk_i,
  // MFU vs1 read port
  input  logic          m_rd1_en_i,
  input  logic [NA-1:0] m_rd1_spm_i,
  input  logic [WA-1:0] m_rd1_word_i,
  output logic [31:0]   m_rdata1_o [D],
  // MFU vs2 read port
  input  logic          m_rd2_en_i,
  input  logic [NA-1:0] m_rd2_spm_i,
  input  logic [WA-1:0] m_rd2_word_i,
  output logic [31:0]   m_rdata2_o [D],
  // MFU vd write port
  input  logic          m_wr_en_i,
  input  logic [NA-1:0] m_wr_spm_i,
  input  logic [WA-1:0] m_wr_word_i,
  input  logic [D-1:0]  m_wr_mask_i,
  input  logic [31:0]   m_wdata_i [D],
  // LSU 32-bit port
  input  logic          l_rd_en_i,
  input  logic [NA-1:0] l_rd_spm_i,
  input  logic [WA-1:0] l_rd_word_i,
  output logic [31:0]   l_rdata_o,
  input  logic          l_wr_en_i,
  input  logic [NA-1:0] l_wr_spm_i,
  input  logic [WA-1:0] l_wr_word_i,
  input  logic [31:0]   l_wdata_i,
  // contention handler
  input  logic          m_pend_i,
  input  logic          m_active_i,
  input  logic [N-1:0]  m_need_i,
  input  logic          l_pend_i,
  input  logic          l_active_i,
  input  logic [N-1:0]  l_need_i,
  output logic          halt_mfu_o,
  output logic          halt_lsu_o
);
  localparam int unsigned R  = W / D;
  localparam int unsigned RA = (R > 1) ? $clog2(R) : 1;

  initial assert ((D & (D - 1)) == 0 && (W % D) == 0)
    else $error("spmi: D must be a power of two dividing the SPM word count");

  // ------------------------------------------------------------ contention
  logic [N-1:0] m_held, l_held;
  assign m_held     = m_active_i ? m_need_i : '0;
  assign l_held     = l_active_i ? l_need_i : '0;
  assign halt_lsu_o = l_pend_i && ((l_need_i & m_held) != '0);
  assign halt_mfu_o = m_pend_i && (((m_need_i & l_held) != '0) ||
                      (l_pend_i && !halt_lsu_o && ((m_need_i & l_need_i) != '0)));

  // ------------------------------------------------------------ bank ports
  logic          ra_en   [N][D];
  logic [RA-1:0] ra_addr [N][D];
  logic [31:0]   ra_data [N][D];
  logic          rb_en   [N][D];
  logic [RA-1:0] rb_addr [N][D];
  logic [31:0]   rb_data [N][D];
  logic          we      [N][D];
  logic [RA-1:0] waddr   [N][D];
  logic [31:0]   wdata   [N][D];

  // lane that maps to bank b for a group starting at word w
  function automatic int unsigned lane_of(int unsigned b, int unsigned w);
    return (b + D - (w % D)) % D;
  endfunction

  always_comb begin
    for (int unsigned s = 0; s < N; s++) begin
      for (int unsigned b = 0; b < D; b++) begin
        int unsigned l1, l2, lw;
        l1 = lane_of(b, 32'(m_rd1_word_i));
        l2 = lane_of(b, 32'(m_rd2_word_i));
        lw = lane_of(b, 32'(m_wr_word_i));
        // port A: MFU vs1, otherwise LSU read
        ra_en[s][b]   = 1'b0;
        ra_addr[s][b] = RA'((32'(m_rd1_word_i) + l1) / D);
        if (m_rd1_en_i && 32'(m_rd1_spm_i) == s) begin
          ra_en[s][b] = 1'b1;
        end else if (l_rd_en_i && 32'(l_rd_spm_i) == s && (32'(l_rd_word_i) % D) == b) begin
          ra_en[s][b]   = 1'b1;
          ra_addr[s][b] = RA'(32'(l_rd_word_i) / D);
        end
        // port B: MFU vs2
        rb_en[s][b]   = m_rd2_en_i && 32'(m_rd2_spm_i) == s;
        rb_addr[s][b] = RA'((32'(m_rd2_word_i) + l2) / D);
        // write port: MFU vd, otherwise LSU write
        we[s][b]    = 1'b0;
        waddr[s][b] = RA'((32'(m_wr_word_i) + lw) / D);
        wdata[s][b] = m_wdata_i[lw];
        if (m_wr_en_i && 32'(m_wr_spm_i) == s) begin
          we[s][b] = m_wr_mask_i[lw];
        end else if (l_wr_en_i && 32'(l_wr_spm_i) == s && (32'(l_wr_word_i) % D) == b) begin
          we[s][b]    = 1'b1;
          waddr[s][b] = RA'(32'(l_wr_word_i) / D);
          wdata[s][b] = l_wdata_i;
        end
      end
    end
  end

  for (genvar s = 0; s < N; s++) begin : g_spm
    for (genvar b = 0; b < D; b++) begin : g_bank
      spm_bank #(.ROWS(R)) u_bank (
        .clk_i,
        .ra_en_i  (ra_en[s][b]),  .ra_addr_i(ra_addr[s][b]), .ra_data_o(ra_data[s][b]),
        .rb_en_i  (rb_en[s][b]),  .rb_addr_i(rb_addr[s][b]), .rb_data_o(rb_data[s][b]),
        .we_i     (we[s][b]),     .waddr_i  (waddr[s][b]),   .wdata_i  (wdata[s][b])
      );
    end
  end

  // ------------------------------------------------------------ data rotate
  logic [NA-1:0] r1_spm_q, r2_spm_q, l_spm_q;
  logic [WA-1:0] r1_word_q, r2_word_q, l_word_q;

  always_ff @(posedge clk_i) begin
    r1_spm_q  <= m_rd1_spm_i;
    r1_word_q <= m_rd1_word_i;
    r2_spm_q  <= m_rd2_spm_i;
    r2_word_q <= m_rd2_word_i;
    l_spm_q   <= l_rd_spm_i;
    l_word_q  <= l_rd_word_i;
  end

  always_comb begin
    for (int unsigned i = 0; i < D; i++) begin
      m_rdata1_o[i] = ra_data[r1_spm_q][(32'(r1_word_q) + i) % D];
      m_rdata2_o[i] = rb_data[r2_spm_q][(32'(r2_word_q) + i) % D];
    end
    l_rdata_o = ra_data[l_spm_q][32'(l_word_q) % D];
  end

  // The contention handler keeps the two sides apart.
  always_ff @(posedge clk_i) begin
    if ((m_rd1_en_i || m_wr_en_i) && (l_rd_en_i || l_wr_en_i)) begin
      assert (!(m_rd1_en_i && l_rd_en_i && m_rd1_spm_i == l_rd_spm_i))
        else $error("spmi: MFU and LSU read the same SPM");
      assert (!(m_wr_en_i && l_wr_en_i && m_wr_spm_i == l_wr_spm_i))
        else $error("spmi: MFU and LSU write the same SPM");
    end
  end
endmodule
