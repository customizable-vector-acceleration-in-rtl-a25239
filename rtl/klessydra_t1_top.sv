// Klessydra T1 processing system: the multi-threaded core with its vector
// co-processor, its 32 KB program memory and its 1 MB data memory.
//
// The core fetches from the program memory (address 0x0000_0000 upward) and
// loads/stores the data memory (mapped at 0x0010_0000). The scratchpads of
// the co-processor (SPM section at 0x0100_0000) live inside the core.
// Interface: pload_* writes program words while the core is held idle
// (fetch_en_i low); bk_* is a second word port into the data memory, used to
// place input data and read results; fetch_en_i starts all harts at
// 0x0000_0080. The stat_* outputs pass the core's event signals out.
// Parameters: H harts, M SPM interfaces, F MFUs, D lanes per MFU, N SPMs of
// SPM_BYTES each; the defaults are the 3-hart, M=3, F=3, D=4 configuration
// (thread-dedicated co-processors, MIMD + SIMD). Peripherals, boot ROM, debug
// unit and the external flash of the full platform are not part of it.
module klessydra_t1_top #(
  parameter int unsigned H          = 3,
  parameter int unsigned M          = 3,
  parameter int unsigned F          = 3,
  parameter int unsigned D          = 4,
  parameter int unsigned N          = 4,
  parameter int unsigned SPM_BYTES  = 16384,
  parameter int unsigned PMEM_BYTES = 32768,
  parameter int unsigned DMEM_BYTES = 1048576
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         fetch_en_i,
  // program load port
  input  logic         pload_we_i,
  input  logic [31:0]  pload_addr_i,
  input  logic [31:0]  pload_wdata_i,
  // second data-memory port
  input  logic         bk_req_i,
  input  logic         bk_we_i,
  input  logic [31:0]  bk_addr_i,
  input  logic [31:0]  bk_wdata_i,
  output logic [31:0]  bk_rdata_o,
  // events
  output logic         stat_commit_o,
  output logic         stat_replay_mfu_o,
  output logic         stat_replay_lsu_o,
  output logic [F-1:0] stat_mfu_active_o,
  output logic         stat_lsu_active_o,
  output logic [M-1:0] stat_halt_mfu_o,
  output logic [M-1:0] stat_halt_lsu_o,
  output logic         stat_exc_o
);
  logic        instr_req;
  logic [31:0] instr_addr, instr_rdata;
  logic        data_req, data_we;
  logic [3:0]  data_be;
  logic [31:0] data_addr, data_wdata, data_rdata;

  klessydra_t1_core #(
    .H(H), .M(M), .F(F), .D(D), .N(N), .SPM_BYTES(SPM_BYTES)
  ) u_core (
    .clk_i, .rst_ni, .fetch_en_i,
    .instr_req_o(instr_req), .instr_addr_o(instr_addr), .instr_rdata_i(instr_rdata),
    .data_req_o(data_req), .data_we_o(data_we), .data_be_o(data_be),
    .data_addr_o(data_addr), .data_wdata_o(data_wdata), .data_rdata_i(data_rdata),
    .stat_commit_o, .stat_replay_mfu_o, .stat_replay_lsu_o, .stat_mfu_active_o,
    .stat_lsu_active_o, .stat_halt_mfu_o, .stat_halt_lsu_o, .stat_exc_o
  );

  prog_mem #(.PMEM_BYTES(PMEM_BYTES)) u_pmem (
    .clk_i, .req_i(instr_req), .addr_i(instr_addr), .rdata_o(instr_rdata),
    .we_i(pload_we_i), .waddr_i(pload_addr_i), .wdata_i(pload_wdata_i)
  );

  data_mem #(.DMEM_BYTES(DMEM_BYTES)) u_dmem (
    .clk_i, .req_i(data_req), .we_i(data_we), .be_i(data_be), .addr_i(data_addr),
    .wdata_i(data_wdata), .rdata_o(data_rdata),
    .bk_req_i, .bk_we_i, .bk_addr_i, .bk_wdata_i, .bk_rdata_o
  );
endmodule
