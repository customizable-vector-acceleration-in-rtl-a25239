// Self-checking test of the replicated register file: random writes to every
// hart, reads on all three ports checked against a reference array, x0
// stays zero, and writes of one hart never show in another.
module tb_regfile;
  localparam int H = 3;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge applies the asynchronous reset before the first clock
  always #5 clk = ~clk;
  logic [1:0]  rhart, whart;
  logic [4:0]  ra, rb, rc, wa;
  logic [31:0] da, db, dc, wd;
  logic        we;
  regfile #(.H(H)) dut (.clk_i(clk), .rst_ni(rst_n), .rhart_i(rhart), .raddr_a_i(ra), .raddr_b_i(rb),
    .raddr_c_i(rc), .rdata_a_o(da), .rdata_b_o(db), .rdata_c_o(dc), .we_i(we), .whart_i(whart),
    .waddr_i(wa), .wdata_i(wd));
  logic [31:0] ref_r [H][32];
  int checks = 0, failures = 0;
  task automatic check(string w, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    we = 0; rhart = 0; whart = 0; ra = 0; rb = 0; rc = 0; wa = 0; wd = 0;
    for (int h = 0; h < H; h++) for (int r = 0; r < 32; r++) ref_r[h][r] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); whart = 2'($urandom_range(0, H-1)); wa = 5'($urandom); wd = $urandom;
      rhart = 2'($urandom_range(0, H-1)); ra = 5'($urandom); rb = 5'($urandom); rc = 5'($urandom);
      #1;
      check("port a", da, ref_r[rhart][ra]);
      check("port b", db, ref_r[rhart][rb]);
      check("port c", dc, ref_r[rhart][rc]);
      @(posedge clk);
      if (we && wa != 0) ref_r[whart][wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
