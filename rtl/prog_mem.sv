// Program memory: 32 KB of instruction RAM with a one-cycle synchronous read.
//
// The fetch stage presents a byte address; the 32-bit word at that address
// (bits [1:0] ignored, address taken modulo the size) is on rdata_o after the
// next rising edge. A separate write port loads the program before the core
// is started. Size and placement at address 0 follow the platform memory map;
// the load port is this design's stand-in for the platform's boot path.
module prog_mem #(
  parameter int unsigned PMEM_BYTES = 32768
) (
  input  logic        clk_i,
  input  logic        req_i,
  input  logic [31:0] addr_i,
  output logic [31:0] rdata_o,
  input  logic        we_i,
  input  logic [31:0] waddr_i,
  input  logic [31:0] wdata_i
);
  localparam int unsigned WORDS = PMEM_BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk_i) begin
    if (we_i) mem[waddr_i[AW+1:2]] <= wdata_i;
    if (req_i) rdata_o <= mem[addr_i[AW+1:2]];
  end
endmodule
