// One bank of a scratchpad memory: ROWS words of 32 bits, two synchronous
// read ports and one write port. Read data appear one cycle after the
// request. A read and a write of the same row in the same cycle return the
// old contents. Banks are word-interleaved by the SPM interface so that D
// consecutive words of a vector sit in D different banks.
module spm_bank #(
  parameter int unsigned ROWS = 1024
) (
  input  logic                    clk_i,
  input  logic                    ra_en_i,
  input  logic [$clog2(ROWS)-1:0] ra_addr_i,
  output logic [31:0]             ra_data_o,
  input  logic                    rb_en_i,
  input  logic [$clog2(ROWS)-1:0] rb_addr_i,
  output logic [31:0]             rb_data_o,
  input  logic                    we_i,
  input  logic [$clog2(ROWS)-1:0] waddr_i,
  input  logic [31:0]             wdata_i
);
  logic [31:0] mem [ROWS];

  always_ff @(posedge clk_i) begin
    if (ra_en_i) ra_data_o <= mem[ra_addr_i];
    if (rb_en_i) rb_data_o <= mem[rb_addr_i];
    if (we_i)    mem[waddr_i] <= wdata_i;
  end
endmodule
