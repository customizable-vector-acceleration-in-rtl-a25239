// Replicated control/status registers, one set per hart.
//
// Each hart has MHARTID (read-only, equal to the hart index), MCYCLE (cycle
// counter shared by all harts, read-only here) and the three vector CSRs of
// the co-processor: MVSIZE (vector length in bytes used by MFU operations),
// MVTYPE (element width: 0 = 8, 1 = 16, 2 = 32 bits) and MPSCLFAC (post-scaling
// shift of kdotpps). A CSR instruction in the execute stage presents csr_op_i,
// hart_i, addr_i and wdata_i with req_i high; rdata_o returns the old value
// combinationally and the new value is written on the next rising edge, as
// CSRRW / CSRRS / CSRRC define. The vector CSR values of every hart are
// output so the execute stage can attach them to vector commands.
// Per-hart replication and the three vector CSRs follow the core
// description; CSR numbers, reset values and the MVTYPE encoding are this
// design's choices (MVSIZE resets to 0, MVTYPE to 32-bit, MPSCLFAC to 0).
module csr_file
  import klessydra_pkg::*;
#(
  parameter int unsigned H = 3
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  input  logic                 req_i,
  input  csr_op_e              csr_op_i,
  input  logic [$clog2(H)-1:0] hart_i,
  input  logic [11:0]          addr_i,
  input  logic [31:0]          wdata_i,
  output logic [31:0]          rdata_o,
  output logic [31:0]          mvsize_o   [H],
  output logic [1:0]           mvtype_o   [H],
  output logic [4:0]           mpsclfac_o [H]
);
  logic [31:0] mvsize   [H];
  logic [1:0]  mvtype   [H];
  logic [4:0]  mpsclfac [H];
  logic [31:0] mcycle;

  always_comb begin
    unique case (addr_i)
      CSR_MHARTID:  rdata_o = 32'(hart_i);
      CSR_MCYCLE:   rdata_o = mcycle;
      CSR_MVSIZE:   rdata_o = mvsize[hart_i];
      CSR_MVTYPE:   rdata_o = {30'b0, mvtype[hart_i]};
      CSR_MPSCLFAC: rdata_o = {27'b0, mpsclfac[hart_i]};
      default:      rdata_o = '0;
    endcase
  end

  logic [31:0] nv;
  always_comb begin
    unique case (csr_op_i)
      CSR_RW:  nv = wdata_i;
      CSR_RS:  nv = rdata_o | wdata_i;
      default: nv = rdata_o & ~wdata_i;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      mcycle <= '0;
      for (int h = 0; h < int'(H); h++) begin
        mvsize[h]   <= '0;
        mvtype[h]   <= 2'd2;
        mpsclfac[h] <= '0;
      end
    end else begin
      mcycle <= mcycle + 32'd1;
      if (req_i) begin
        unique case (addr_i)
          CSR_MVSIZE:   mvsize[hart_i]   <= nv;
          CSR_MVTYPE:   mvtype[hart_i]   <= nv[1:0];
          CSR_MPSCLFAC: mpsclfac[hart_i] <= nv[4:0];
          default: ;
        endcase
      end
    end
  end

  assign mvsize_o   = mvsize;
  assign mvtype_o   = mvtype;
  assign mpsclfac_o = mpsclfac;
endmodule
