// Self-checking test of the program memory: words written through the load
// port are read back with one cycle of latency over the whole 32 KB.
module tb_prog_mem;
  logic clk = 0;
  always #5 clk = ~clk;
  logic req = 0, we = 0; logic [31:0] addr = 0, rdata, waddr = 0, wdata = 0;
  prog_mem dut (.clk_i(clk), .req_i(req), .addr_i(addr), .rdata_o(rdata), .we_i(we), .waddr_i(waddr), .wdata_i(wdata));
  int checks = 0, failures = 0;
  logic [31:0] ref_m [8192];
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 8192; i++) begin
      @(negedge clk); we = 1; waddr = 32'(4*i); wdata = $urandom; ref_m[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 3000; n++) begin
      automatic int i = $urandom_range(0, 8191);
      @(negedge clk); req = 1; addr = 32'(4*i);
      @(negedge clk); req = 0;
      checks++; if (rdata !== ref_m[i]) begin failures++; $display("FAIL word %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
