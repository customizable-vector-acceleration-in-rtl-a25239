// Self-checking test of the per-hart CSR file: MHARTID per hart, CSRRW/S/C
// semantics on MVSIZE, MVTYPE and MPSCLFAC (old value returned, new value
// written), independence of the harts' copies and MCYCLE counting.
module tb_csr_file;
  import klessydra_pkg::*;
  localparam int H = 3;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge applies the asynchronous reset before the first clock
  always #5 clk = ~clk;
  logic req; csr_op_e op; logic [1:0] hart; logic [11:0] addr; logic [31:0] wd, rd;
  logic [31:0] mvs [H]; logic [1:0] mvt [H]; logic [4:0] msc [H];
  csr_file #(.H(H)) dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .csr_op_i(op), .hart_i(hart),
    .addr_i(addr), .wdata_i(wd), .rdata_o(rd), .mvsize_o(mvs), .mvtype_o(mvt), .mpsclfac_o(msc));
  int checks = 0, failures = 0;
  task automatic check(string w, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  logic [31:0] r_size [H], r_type [H], r_scl [H];
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] c0;
    req = 0; op = CSR_RW; hart = 0; addr = 0; wd = 0;
    for (int h = 0; h < H; h++) begin r_size[h] = 0; r_type[h] = 2; r_scl[h] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int h = 0; h < H; h++) begin
      hart = 2'(h); addr = CSR_MHARTID; #1; check("mhartid", rd, h);
    end
    addr = CSR_MCYCLE; #1; c0 = rd; repeat (5) @(negedge clk); #1; check("mcycle", rd - c0, 5);
    for (int n = 0; n < 1500; n++) begin
      logic [31:0] oldv, nv, msk;
      int which;
      @(negedge clk);
      hart = 2'($urandom_range(0, H-1)); op = csr_op_e'($urandom_range(0, 2)); wd = $urandom;
      which = $urandom_range(0, 2);
      addr = (which == 0) ? CSR_MVSIZE : (which == 1) ? CSR_MVTYPE : CSR_MPSCLFAC;
      msk = (which == 0) ? 32'hFFFF_FFFF : (which == 1) ? 32'h3 : 32'h1F;
      oldv = (which == 0) ? r_size[hart] : (which == 1) ? r_type[hart] : r_scl[hart];
      req = 1; #1;
      check("old value", rd, oldv);
      nv = (op == CSR_RW) ? wd : (op == CSR_RS) ? (oldv | wd) : (oldv & ~wd);
      nv = nv & msk;
      @(posedge clk); #1; req = 0;
      if (which == 0) r_size[hart] = nv; else if (which == 1) r_type[hart] = nv; else r_scl[hart] = nv;
      for (int h = 0; h < H; h++) begin
        check("mvsize out", mvs[h], r_size[h]);
        check("mvtype out", 32'(mvt[h]), r_type[h]);
        check("mpsclfac out", 32'(msc[h]), r_scl[h]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
