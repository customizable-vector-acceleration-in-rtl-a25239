// Self-checking test of the PC unit: harts are fetched in strict rotation,
// one per cycle; each hart's PC changes only through the update port
// (sequential, jump and self-referencing jump updates are modelled by the
// testbench as an execute stage two cycles behind fetch) and a hart fetches
// its next instruction exactly H cycles after the previous one.
module tb_pc_unit;
  import klessydra_pkg::*;
  localparam int H = 3;
  logic clk = 0, rst_n = 1, fen = 0;
  initial #1 rst_n = 0;  // falling edge applies the asynchronous reset before the first clock
  always #5 clk = ~clk;
  logic fv, uv; logic [1:0] fh, uh; logic [31:0] fpc, upc;
  pc_unit #(.H(H)) dut (.clk_i(clk), .rst_ni(rst_n), .fetch_en_i(fen), .fetch_valid_o(fv),
    .fetch_hart_o(fh), .fetch_pc_o(fpc), .upd_valid_i(uv), .upd_hart_i(uh), .upd_pc_i(upc));
  int checks = 0, failures = 0;
  task automatic check(string w, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  logic [31:0] ref_pc [H];
  int last_fetch [H];
  // two-stage delay line standing for Decode and Execute
  logic [1:0] p_h [2]; logic [31:0] p_pc [2]; logic p_v [2];
  int cyc = 0, n_self = 0, n_jump = 0, prev_h = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    uv = 0; uh = 0; upc = 0;
    for (int h = 0; h < H; h++) begin ref_pc[h] = RESET_PC; last_fetch[h] = -1; end
    p_v[0] = 0; p_v[1] = 0; p_h[0] = 0; p_h[1] = 0; p_pc[0] = 0; p_pc[1] = 0;
    repeat (2) @(negedge clk); rst_n = 1; fen = 1;
    for (int n = 0; n < 1500; n++) begin
      int kind;
      @(negedge clk);
      cyc++;
      // execute-stage update for the instruction fetched two cycles ago
      uv = p_v[1]; uh = p_h[1];
      kind = $urandom_range(0, 3);
      if (kind == 0) begin upc = p_pc[1]; n_self++; end
      else if (kind == 1) begin upc = {$urandom_range(0, 255), 2'b00}; n_jump++; end
      else upc = p_pc[1] + 4;
      #1;
      check("fetch valid", 32'(fv), 1);
      if (n > 0) check("rotation", 32'(fh), 32'((prev_h + 1) % H));
      prev_h = int'(fh);
      check("pc of fetched hart", fpc, ref_pc[fh]);
      if (last_fetch[fh] >= 0) check("fetch spacing", 32'(cyc - last_fetch[fh]), H);
      last_fetch[fh] = cyc;
      @(posedge clk);
      if (uv) ref_pc[uh] = upc;
      p_v[1] = p_v[0]; p_h[1] = p_h[0]; p_pc[1] = p_pc[0];
      p_v[0] = fv; p_h[0] = fh; p_pc[0] = fpc;
    end
    check("self-referencing updates exercised", 32'(n_self > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
