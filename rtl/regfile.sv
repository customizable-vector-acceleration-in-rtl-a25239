// Replicated integer register file of the interleaved multi-threaded core.
//
// Every hart owns a full RISC-V set of 32 registers of 32 bits, so the shared
// pipeline can hold instructions of different harts without any register
// dependency between them. Three combinational read ports serve the Decode
// stage (the third reads register rd, which the vector instructions use as
// the destination address) (register indices plus the hart of the decoded instruction); one
// write port, updated on the rising clock edge, serves the write-back stage.
// Register x0 always reads as zero. Registers are cleared by reset.
// The replication per hart follows the core description; port counts and
// reset-to-zero are this design's choices.
module regfile #(
  parameter int unsigned H = 3
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  input  logic [$clog2(H)-1:0] rhart_i,
  input  logic [4:0]           raddr_a_i,
  input  logic [4:0]           raddr_b_i,
  input  logic [4:0]           raddr_c_i,
  output logic [31:0]          rdata_a_o,
  output logic [31:0]          rdata_b_o,
  output logic [31:0]          rdata_c_o,
  input  logic                 we_i,
  input  logic [$clog2(H)-1:0] whart_i,
  input  logic [4:0]           waddr_i,
  input  logic [31:0]          wdata_i
);
  logic [31:0] regs [H][32];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int h = 0; h < int'(H); h++)
        for (int r = 0; r < 32; r++) regs[h][r] <= '0;
    end else if (we_i && waddr_i != 5'd0) begin
      regs[whart_i][waddr_i] <= wdata_i;
    end
  end

  assign rdata_a_o = (raddr_a_i == 5'd0) ? '0 : regs[rhart_i][raddr_a_i];
  assign rdata_b_o = (raddr_b_i == 5'd0) ? '0 : regs[rhart_i][raddr_b_i];
  assign rdata_c_o = (raddr_c_i == 5'd0) ? '0 : regs[rhart_i][raddr_c_i];
endmodule
