// tb_cram: writes random words into the Code RAM, then reads them back on all
// read ports at once and checks the data arrives exactly one cycle after the
// address (synchronous read).
module tb_cram;
  localparam int unsigned DEPTH = 1024, N_RD = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic we = 0;
  logic [9:0] waddr = 0;
  logic [31:0] wdata = 0;
  logic [N_RD-1:0][9:0] raddr = '0;
  logic [N_RD-1:0][31:0] rdata;
  logic [31:0] model [DEPTH];

  cram #(.DEPTH(DEPTH), .N_RD(N_RD)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = 10'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 300; t++) begin
      logic [N_RD-1:0][9:0] a;
      for (int p = 0; p < N_RD; p++) a[p] = 10'($urandom_range(0, DEPTH - 1));
      @(negedge clk); raddr = a;
      @(negedge clk);
      for (int p = 0; p < N_RD; p++) begin
        checks++;
        if (rdata[p] !== model[a[p]]) begin
          failures++; $display("FAIL port %0d addr %0d: %h vs %h", p, a[p], rdata[p], model[a[p]]);
        end
      end
    end
    // one-cycle latency: data changes only after the clock edge
    @(negedge clk); raddr[0] = 10'd5;
    @(negedge clk); raddr[0] = 10'd6;
    #1; checks++; if (rdata[0] !== model[5]) begin failures++; $display("FAIL latency"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
