// tb_cu_mem_ctrl: pushes the 64 accesses of a load and of a store (eight per
// cycle) and plays the global memory controller: it accepts requests with a
// random ready, holds them until the outstanding limit is reached at least
// once, and answers them out of order. Checks each request's address, data
// and write flag against what was pushed, that no more than OUTSTANDING are in
// flight, the register-file writes of load data (lane, address, value), the
// absence of register writes for stores, and mem_done with the wavefront.
module tb_cu_mem_ctrl;
  import fgpu_pkg::*;
  localparam int unsigned OUT = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic push_valid = 0, push_we = 0, busy, req_valid, req_ready = 0, rsp_valid = 0;
  logic [2:0] push_cyc = 0, push_wf = 0, rf_lane, mem_done_wf;
  logic [4:0] push_rd = 0;
  logic [N_PE-1:0][31:0] push_addr = '0, push_wdata = '0;
  mem_req_t req;
  mem_rsp_t rsp = '0;
  logic rf_we, mem_done_valid;
  logic [10:0] rf_addr;
  logic [31:0] rf_wdata;

  cu_mem_ctrl #(.OUTSTANDING(OUT)) dut (.*);

  logic [31:0] exp_addr [64], exp_data [64];
  mem_req_t pending [$];
  int inflight = 0, max_inflight = 0, n_req = 0, n_rf = 0, n_done = 0;
  bit cur_we;
  int cur_wf, cur_rd;

  function automatic logic [31:0] rd_val(logic [31:0] a); return a ^ 32'h5A5A_1234; endfunction

  task automatic chk(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0h vs %0h", what, got, exp); end
  endtask

  // memory side
  always @(posedge clk) if (rst_n) begin
    if (req_valid && req_ready) begin
      chk(req.addr, exp_addr[req.tag], "req addr");
      chk(req.we, cur_we, "req we");
      if (cur_we) chk(req.wdata, exp_data[req.tag], "req wdata");
      pending.push_back(req);
      n_req++;
    end
    if (rf_we) begin
      n_rf++;
      chk(cur_we, 0, "rf write only for loads");
    end
    if (mem_done_valid) begin n_done++; chk(mem_done_wf, cur_wf, "mem_done wf"); end
  end

  // check register writes combinationally against the response being returned
  always @(negedge clk) if (rst_n && rf_we) begin
    chk(rf_lane, rsp.tag[2:0], "rf lane");
    chk(rf_addr, {3'(cur_wf), rsp.tag[5:3], 5'(cur_rd)}, "rf addr");
    chk(rf_wdata, rd_val(exp_addr[rsp.tag]), "rf data");
  end

  task automatic run(input bit we, input int wf, input int rd);
    int answered = 0;
    bit hold = 1;
    cur_we = we; cur_wf = wf; cur_rd = rd;
    for (int i = 0; i < 64; i++) begin exp_addr[i] = $urandom & ~32'h3; exp_data[i] = $urandom; end
    for (int c = 0; c < 8; c++) begin
      @(negedge clk);
      push_valid = 1; push_cyc = 3'(c); push_wf = 3'(wf); push_we = we; push_rd = 5'(rd);
      for (int p = 0; p < 8; p++) begin push_addr[p] = exp_addr[c * 8 + p]; push_wdata[p] = exp_data[c * 8 + p]; end
    end
    @(negedge clk); push_valid = 0;
    chk(busy, 1, "busy");
    while (answered < 64) begin
      @(negedge clk);
      rsp_valid = 0;
      req_ready = ($urandom_range(0, 3) != 0);
      inflight = n_req - answered;
      if (inflight > max_inflight) max_inflight = inflight;
      if (inflight >= OUT) hold = 0;
      if (!hold && pending.size() > 0 && $urandom_range(0, 1)) begin
        int k = $urandom_range(0, pending.size() - 1);
        rsp.tag = pending[k].tag; rsp.rdata = rd_val(pending[k].addr);
        pending.delete(k);
        rsp_valid = 1; answered++;
      end else if (hold && n_req == 64 && pending.size() > 0) hold = 0;
    end
    @(negedge clk); rsp_valid = 0; req_ready = 0;
    @(negedge clk);
    chk(busy, 0, "not busy after all responses");
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    run(0, 3, 7);
    chk(n_req, 64, "64 load requests"); chk(n_rf, 64, "64 register writes");
    chk(n_done, 1, "one mem_done");
    chk(max_inflight, OUT, "outstanding limit reached, not exceeded");
    n_req = 0; max_inflight = 0;
    run(1, 5, 9);
    chk(n_req, 64, "64 store requests"); chk(n_rf, 64, "no register writes for stores");
    chk(n_done, 2, "second mem_done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
