// Program counters of the interleaved multi-threaded core ("PC Updater" and
// "Hart Updater").
//
// One PC is kept per hart. The hart updater picks a different hart every
// cycle in fixed rotation 0, 1, ..., H-1, 0, ...; while fetch_en_i is high the
// PC of that hart is sent to the program memory (fetch_valid_o). The PC
// updater rewrites a hart's PC when its previous instruction leaves the
// execute stage (upd_valid_i): with the next sequential address, a branch or
// jump target, or the instruction's own address when the hart has to wait
// for a busy unit (the self-referencing jump). A hart's PC is thus only
// advanced by the execute stage, and with H >= 3 that happens before the
// hart's next fetch slot, so no hart ever has two instructions in the
// pipeline. All PCs reset to RESET_PC.
// Rotation, per-hart PCs and the self-referencing jump follow the core
// description; the reset address is this design's choice.
module pc_unit
  import klessydra_pkg::*;
#(
  parameter int unsigned H = 3
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  input  logic                 fetch_en_i,
  output logic                 fetch_valid_o,
  output logic [$clog2(H)-1:0] fetch_hart_o,
  output logic [31:0]          fetch_pc_o,
  input  logic                 upd_valid_i,
  input  logic [$clog2(H)-1:0] upd_hart_i,
  input  logic [31:0]          upd_pc_i
);
  logic [31:0]          pc [H];
  logic [$clog2(H)-1:0] hart_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      hart_q <= '0;
      for (int h = 0; h < int'(H); h++) pc[h] <= RESET_PC;
    end else begin
      if (fetch_en_i)
        hart_q <= (hart_q == $clog2(H)'(H - 1)) ? '0 : hart_q + 1'b1;
      if (upd_valid_i) pc[upd_hart_i] <= upd_pc_i;
    end
  end

  assign fetch_valid_o = fetch_en_i;
  assign fetch_hart_o  = hart_q;
  assign fetch_pc_o    = pc[hart_q];

  initial assert (H >= 3 && H <= 4)
    else $error("pc_unit: the pipeline needs 3 or 4 harts");
endmodule
