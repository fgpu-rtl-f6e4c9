// tb_lram: fills the Link RAM, checks the asynchronous read ports and the
// launch-word outputs (kernel start, global and work-group size per dimension).
module tb_lram;
  import fgpu_pkg::*;
  localparam int unsigned DEPTH = 32, N_RD = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic we = 0;
  logic [4:0] waddr = 0;
  logic [31:0] wdata = 0, kstart;
  idx3_t gsize, wgsize;
  logic [N_RD-1:0][4:0] raddr = '0;
  logic [N_RD-1:0][31:0] rdata;
  logic [31:0] model [DEPTH];

  lram #(.DEPTH(DEPTH), .N_RD(N_RD)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata, .kstart, .gsize, .wgsize);

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = 5'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 0;
    chk(kstart, model[LRAM_KSTART], "kstart");
    for (int d = 0; d < 3; d++) begin
      chk(gsize[d], model[LRAM_GSIZE + d], "gsize");
      chk(wgsize[d], model[LRAM_WGSIZE + d], "wgsize");
    end
    for (int t = 0; t < 200; t++) begin
      for (int p = 0; p < N_RD; p++) raddr[p] = 5'($urandom_range(0, DEPTH - 1));
      #1;
      for (int p = 0; p < N_RD; p++) chk(rdata[p], model[raddr[p]], "read");
    end
    // overwrite of a launch word is visible after the write edge
    @(negedge clk); we = 1; waddr = 5'(LRAM_GSIZE + 2); wdata = 32'd4096;
    @(negedge clk); we = 0;
    chk(gsize[2], 32'd4096, "gsize update");
    chk(gsize[1], model[LRAM_GSIZE + 1], "gsize other dimension kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
