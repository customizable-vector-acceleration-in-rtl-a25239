// Data memory: 1 MB RAM with one-cycle latency and two ports.
//
// Port "core" is used by the core's load/store unit: a request with we_i low
// returns the addressed word on rdata_o after the next rising edge; with we_i
// high, the bytes selected by be_i are written. Port "bk" is a second,
// independent word port for loading data and reading results from outside
// the core. Addresses are byte addresses; the word index is taken modulo the
// memory size, which places the RAM at 0x0010_0000 when it is mapped there.
// Size and one-cycle latency follow the platform description; the second port
// is this design's choice.
module data_mem #(
  parameter int unsigned DMEM_BYTES = 1048576
) (
  input  logic        clk_i,
  input  logic        req_i,
  input  logic        we_i,
  input  logic [3:0]  be_i,
  input  logic [31:0] addr_i,
  input  logic [31:0] wdata_i,
  output logic [31:0] rdata_o,
  input  logic        bk_req_i,
  input  logic        bk_we_i,
  input  logic [31:0] bk_addr_i,
  input  logic [31:0] bk_wdata_i,
  output logic [31:0] bk_rdata_o
);
  localparam int unsigned WORDS = DMEM_BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0] mem [WORDS];
  logic [AW-1:0] widx, bidx;
  assign widx = addr_i[AW+1:2];
  assign bidx = bk_addr_i[AW+1:2];

  always_ff @(posedge clk_i) begin
    if (req_i) begin
      if (we_i) begin
        for (int b = 0; b < 4; b++)
          if (be_i[b]) mem[widx][8*b +: 8] <= wdata_i[8*b +: 8];
      end else begin
        rdata_o <= mem[widx];
      end
    end
    if (bk_req_i) begin
      if (bk_we_i) mem[bidx] <= bk_wdata_i;
      else         bk_rdata_o <= mem[bidx];
    end
  end
endmodule
