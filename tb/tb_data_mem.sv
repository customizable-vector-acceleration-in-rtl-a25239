// Self-checking test of the data memory: byte-enable writes on the core
// port, whole-word writes on the second port, reads on both ports with one
// cycle of latency, at random addresses of the 1 MB space.
module tb_data_mem;
  logic clk = 0;
  always #5 clk = ~clk;
  logic req = 0, we = 0, bq = 0, bw = 0; logic [3:0] be = 0;
  logic [31:0] addr = 0, wd = 0, rd, ba = 0, bwd = 0, brd;
  data_mem dut (.clk_i(clk), .req_i(req), .we_i(we), .be_i(be), .addr_i(addr), .wdata_i(wd), .rdata_o(rd),
    .bk_req_i(bq), .bk_we_i(bw), .bk_addr_i(ba), .bk_wdata_i(bwd), .bk_rdata_o(brd));
  int checks = 0, failures = 0;
  logic [31:0] ref_m [int];
  task automatic check(string w, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int idx [64];
    for (int i = 0; i < 64; i++) begin
      idx[i] = $urandom_range(0, 262143);
      @(negedge clk); bq = 1; bw = 1; ba = 32'h0010_0000 + 32'(4*idx[i]); bwd = $urandom; ref_m[idx[i]] = bwd;
    end
    @(negedge clk); bq = 0; bw = 0;
    for (int n = 0; n < 2000; n++) begin
      automatic int i = idx[$urandom_range(0, 63)];
      @(negedge clk);
      req = 1; addr = 32'h0010_0000 + 32'(4*i);
      if ($urandom_range(0, 1) == 1) begin
        we = 1; be = 4'($urandom); wd = $urandom;
        for (int b = 0; b < 4; b++) if (be[b]) ref_m[i][8*b +: 8] = wd[8*b +: 8];
        @(negedge clk); req = 0; we = 0;
      end else begin
        we = 0; bq = 1; bw = 0; ba = 32'h0010_0000 + 32'(4*idx[$urandom_range(0, 63)]);
        @(negedge clk); req = 0; bq = 0;
        check("core read", rd, ref_m[i]);
        check("second port read", brd, ref_m[(ba - 32'h0010_0000) / 4]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
