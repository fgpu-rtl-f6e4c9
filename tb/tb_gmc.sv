// tb_gmc: global memory controller with a small cache (1 KB, 16-word lines)
// under random loads and stores from two request ports, over the behavioural
// AXI4 memory. Each port owns half the words and never has two requests to
// one word in flight, so a shadow memory gives the exact value every load must
// return. After the traffic a flush is requested; then every touched word of
// global memory must equal the shadow. Also checked: each response carries a
// tag the port is waiting for, the controller accepts no more than
// OUTSTANDING requests, and misses, dirty evictions and flush write-backs all
// occurred.
module tb_gmc;
  import fgpu_pkg::*;
  localparam int unsigned NP = 2, OUT = 16, NAXI = 2, NTM = 4, WORDS = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NP-1:0] req_valid = '0, req_ready, rsp_valid;
  mem_req_t [NP-1:0] req = '0;
  mem_rsp_t [NP-1:0] rsp;
  logic flush_start = 0, flush_done;
  logic [NAXI-1:0] arvalid, arready, rvalid, rready, rlast, awvalid, awready, wvalid, wready, wlast, bvalid, bready;
  logic [NAXI-1:0][31:0] araddr, rdata, awaddr, wdata;
  logic [NAXI-1:0][7:0] arlen, awlen;

  gmc #(.N_PORTS(NP), .OUTSTANDING(OUT), .CACHE_BYTES(1024), .LINE_WORDS(16), .N_AXI(NAXI), .N_TM(NTM)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req, .rsp_valid, .rsp, .flush_start, .flush_done,
    .m_arvalid(arvalid), .m_arready(arready), .m_araddr(araddr), .m_arlen(arlen),
    .m_rvalid(rvalid), .m_rready(rready), .m_rdata(rdata), .m_rlast(rlast),
    .m_awvalid(awvalid), .m_awready(awready), .m_awaddr(awaddr), .m_awlen(awlen),
    .m_wvalid(wvalid), .m_wready(wready), .m_wdata(wdata), .m_wlast(wlast),
    .m_bvalid(bvalid), .m_bready(bready));

  axi_mem_model #(.N_PORTS(NAXI), .MEM_WORDS(4096)) u_mem (
    .clk, .arvalid, .arready, .araddr, .arlen, .rvalid, .rready, .rdata, .rlast,
    .awvalid, .awready, .awaddr, .awlen, .wvalid, .wready, .wdata, .wlast, .bvalid, .bready);

  logic [31:0] shadow [WORDS];
  bit          busyw  [WORDS];
  // per port, per tag: outstanding request
  bit          pend   [NP][64];
  mem_req_t    preq   [NP][64];
  int n_sent = 0, n_rsp = 0, n_hit = 0, n_miss = 0, n_evict = 0, n_fwb = 0, max_occ = 0;

  task automatic chk(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0h vs %0h", what, got, exp); end
  endtask

  always @(posedge clk) if (rst_n) begin
    automatic int occ = 0;
    if (dut.miss_start) n_miss++;
    if (dut.miss_start && dut.tm_vdirty != 0) n_evict++;
    if (dut.f_start) n_fwb++;
    if (dut.sel_ok && dut.s_hit) n_hit++;
    for (int e = 0; e < OUT; e++) if (dut.tbl[e].valid) occ++;
    if (occ > max_occ) max_occ = occ;
  end

  // handshakes sampled at the clock edge, bookkeeping at the negative edge
  logic [NP-1:0] acc = '0;
  always @(posedge clk) acc <= req_valid & req_ready;
  bit traffic = 0;
  int remaining = 3000;
  always @(negedge clk) if (rst_n) begin
    for (int p = 0; p < NP; p++) begin
      if (rsp_valid[p]) begin
        automatic int t = int'(rsp[p].tag);
        automatic int w = int'(preq[p][t].addr >> 2);
        n_rsp++;
        chk(pend[p][t], 1, "response to a pending tag");
        if (!preq[p][t].we) chk(rsp[p].rdata, shadow[w], "load data");
        pend[p][t] = 0; busyw[w] = 0;
      end
      if (acc[p]) begin
        pend[p][req[p].tag] = 1; preq[p][req[p].tag] = req[p];
        if (req[p].we) shadow[req[p].addr >> 2] = req[p].wdata;
        n_sent++;
      end
      if (acc[p] || !req_valid[p]) begin
        req_valid[p] = 0;
        if (traffic && remaining > 0 && $urandom_range(0, 2) != 0) begin
          automatic int t = $urandom_range(0, 63);
          automatic int w = ($urandom_range(0, WORDS / 2 - 1) * 2) + p;
          if (!pend[p][t] && !busyw[w]) begin
            req[p].tag = TAG_W'(t); req[p].addr = 32'(w * 4); req[p].we = $urandom_range(0, 1);
            req[p].wdata = $urandom; req_valid[p] = 1; busyw[w] = 1; remaining--;
          end
        end
      end
    end
  end

  initial begin
    for (int w = 0; w < 4096; w++) u_mem.mem[w] = 32'(w * 5 + 11);
    for (int w = 0; w < WORDS; w++) begin shadow[w] = 32'(w * 5 + 11); busyw[w] = 0; end
    for (int p = 0; p < NP; p++) for (int t = 0; t < 64; t++) pend[p][t] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    traffic = 1;
    wait (remaining == 0 && req_valid == 0);
    while (n_rsp != n_sent) @(negedge clk);
    @(negedge clk); flush_start = 1;
    @(negedge clk); flush_start = 0;
    wait (flush_done);
    @(negedge clk);
    for (int w = 0; w < WORDS; w++) chk(u_mem.mem[w], shadow[w], "memory after flush");
    chk(max_occ <= OUT, 1, "table occupancy bounded");
    chk(max_occ == OUT, 1, "table filled at least once");
    chk(n_miss > 0, 1, "misses"); chk(n_hit > 0, 1, "hits");
    chk(n_evict > 0, 1, "dirty evictions"); chk(n_fwb > 0, 1, "flush write-backs");
    $display("sent %0d hits %0d misses %0d evictions %0d flush write-backs %0d", n_sent, n_hit, n_miss, n_evict, n_fwb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5_000_000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
