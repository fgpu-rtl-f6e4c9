// tb_ctrl_axil: AXI4-Lite writes to the control word, the Link RAM and the
// Code RAM regions, with address and data offered in either order; checks the
// RAM write strobes, addresses and data, the start pulse, the write response,
// and the status read-back of busy/done.
module tb_ctrl_axil;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic s_awvalid = 0, s_awready, s_wvalid = 0, s_wready, s_bvalid, s_bready = 0;
  logic s_arvalid = 0, s_arready, s_rvalid, s_rready = 0;
  logic [15:0] s_awaddr = 0, s_araddr = 0;
  logic [31:0] s_wdata = 0, s_rdata, wdata;
  logic cram_we, lram_we, start, busy = 0, done = 0;
  logic [9:0] cram_waddr;
  logic [4:0] lram_waddr;

  ctrl_axil #(.CRAM_AW(10), .LRAM_AW(5)) dut (.*);

  int n_cram = 0, n_lram = 0, n_start = 0;
  logic [9:0] last_ca; logic [4:0] last_la; logic [31:0] last_d;
  always @(posedge clk) begin
    if (cram_we) begin n_cram++; last_ca = cram_waddr; last_d = wdata; end
    if (lram_we) begin n_lram++; last_la = lram_waddr; last_d = wdata; end
    if (start) n_start++;
  end

  task automatic chk(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0h vs %0h", what, got, exp); end
  endtask

  task automatic wr(input logic [15:0] a, input logic [31:0] d, input int order);
    @(negedge clk);
    if (order != 2) begin s_awvalid = 1; s_awaddr = a; end
    if (order != 1) begin s_wvalid = 1; s_wdata = d; end
    if (order != 0) begin
      repeat (2) @(negedge clk);
      chk(s_bvalid, 0, "no response before both halves");
      s_awvalid = 1; s_awaddr = a; s_wvalid = 1; s_wdata = d;
    end
    do @(posedge clk); while (!(s_awready && s_wready));
    @(negedge clk); s_awvalid = 0; s_wvalid = 0;
    chk(s_bvalid, 1, "bvalid");
    repeat ($urandom_range(0, 2)) @(negedge clk);
    chk(s_bvalid, 1, "bvalid held");
    s_bready = 1; @(negedge clk); s_bready = 0;
    chk(s_bvalid, 0, "bvalid cleared");
  endtask

  task automatic rd(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk); s_arvalid = 1; s_araddr = a;
    do @(posedge clk); while (!s_arready);
    @(negedge clk); s_arvalid = 0;
    chk(s_rvalid, 1, "rvalid");
    d = s_rdata;
    s_rready = 1; @(negedge clk); s_rready = 0;
  endtask

  initial begin
    logic [31:0] d;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      automatic int w = $urandom_range(0, 1023);
      automatic logic [31:0] v = $urandom;
      wr(16'h2000 + 16'(4 * w), v, i % 3);
      chk(n_cram, i + 1, "cram write count"); chk(last_ca, w, "cram addr"); chk(last_d, v, "cram data");
    end
    for (int i = 0; i < 10; i++) begin
      automatic int w = $urandom_range(0, 31);
      automatic logic [31:0] v = $urandom;
      wr(16'h1000 + 16'(4 * w), v, i % 3);
      chk(n_lram, i + 1, "lram write count"); chk(last_la, w, "lram addr"); chk(last_d, v, "lram data");
    end
    chk(n_start, 0, "no start yet");
    wr(16'h0000, 0, 0);
    chk(n_start, 0, "write of 0 does not start");
    wr(16'h0000, 1, 0);
    chk(n_start, 1, "start pulse");
    chk(n_cram, 20, "no stray cram write"); chk(n_lram, 10, "no stray lram write");
    busy = 1; done = 0; rd(16'h0000, d); chk(d, 1, "status busy");
    busy = 0; done = 1; rd(16'h0000, d); chk(d, 2, "status done");
    rd(16'h2004, d); chk(d, 0, "ram region reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
