// tb_wg_dispatcher: four modelled compute units with 8 wavefront slots each
// and random work-group run times. Launches 1-D, 2-D and 3-D index spaces of
// several sizes and work-group shapes; checks that every work-group offset
// triple is handed out exactly once, the wavefront count and log2 sizes, that a CU receives one only when it reported room, that the
// flush is requested only after all CUs are idle again, and that done follows
// flush_done and stays until the next start.
module tb_wg_dispatcher;
  import fgpu_pkg::*;
  localparam int unsigned NCU = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, flush_start, flush_done = 0, busy, done;
  logic [31:0] kstart = 0;
  idx3_t gsize = '0, wgsize = '0, alloc_wg_offset;
  logic [3:0] wg_lg0, wg_lg1;
  logic [NCU-1:0] alloc_valid, alloc_ready, cu_idle;
  logic [3:0] alloc_n_wf;
  logic [9:0] alloc_pc;

  wg_dispatcher #(.N_CU(NCU), .PCW(10)) dut (.*);

  // CU models: a list of running work-groups with remaining cycles
  int free_slots [NCU];
  int run_wf [NCU][$];
  int run_t  [NCU][$];
  int seen [longint];
  int n_flush = 0;

  always_comb for (int c = 0; c < NCU; c++) begin
    alloc_ready[c] = (free_slots[c] >= int'(alloc_n_wf));
    cu_idle[c]     = (free_slots[c] == 8);
  end

  function automatic longint key(input idx3_t o);
    return longint'(o[0]) + 64'd65536 * (longint'(o[1]) + 64'd65536 * longint'(o[2]));
  endfunction

  task automatic chk(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d vs %0d", what, got, exp); end
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NCU; c++) begin
      for (int k = run_t[c].size() - 1; k >= 0; k--) begin
        if (run_t[c][k] == 0) begin free_slots[c] += run_wf[c][k]; run_t[c].delete(k); run_wf[c].delete(k); end
        else run_t[c][k]--;
      end
      if (alloc_valid[c]) begin
        chk(alloc_ready[c], 1, "alloc only to a CU with room");
        chk(alloc_pc, kstart[9:0], "alloc pc");
        chk(alloc_n_wf, wgsize[0] * wgsize[1] * wgsize[2] / 64, "wavefronts per work-group");
        chk(32'd1 << wg_lg0, wgsize[0], "log2 size d0");
        chk(32'd1 << wg_lg1, wgsize[1], "log2 size d1");
        if (seen.exists(key(alloc_wg_offset))) begin failures++; $display("FAIL offset twice"); end
        seen[key(alloc_wg_offset)] = 1;
        free_slots[c] -= int'(alloc_n_wf);
        run_wf[c].push_back(int'(alloc_n_wf));
        run_t[c].push_back($urandom_range(3, 60));
      end
    end
    if (flush_start) begin
      n_flush++;
      checks++;
      if (cu_idle != '1) begin failures++; $display("FAIL flush before CUs idle"); end
    end
  end

  task automatic launch(input int g0, input int g1, input int g2,
                        input int w0, input int w1, input int w2, input int ks);
    seen.delete(); n_flush = 0;
    gsize = {32'(g2), 32'(g1), 32'(g0)}; wgsize = {32'(w2), 32'(w1), 32'(w0)}; kstart = ks;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    chk(busy, 1, "busy"); chk(done, 0, "done cleared");
    wait (flush_start);
    @(posedge clk);
    repeat ($urandom_range(1, 20)) @(negedge clk);
    chk(done, 0, "no done before flush_done");
    flush_done = 1; @(negedge clk); flush_done = 0;
    chk(done, 1, "done"); chk(busy, 0, "not busy");
    repeat (3) @(negedge clk);
    chk(done, 1, "done held");
    chk(seen.size(), (g0 / w0) * (g1 / w1) * (g2 / w2), "work-groups dispatched");
    for (int z = 0; z < g2; z += w2)
      for (int y = 0; y < g1; y += w1)
        for (int x = 0; x < g0; x += w0)
          chk(seen.exists(key({32'(z), 32'(y), 32'(x)})), 1, "offset dispatched");
    chk(n_flush, 1, "one flush request");
  endtask

  initial begin
    for (int c = 0; c < NCU; c++) free_slots[c] = 8;
    repeat (2) @(negedge clk); rst_n = 1;
    launch(4096, 1, 1, 64, 1, 1, 3);
    launch(2048, 1, 1, 512, 1, 1, 17);
    launch(64, 1, 1, 64, 1, 1, 9);
    launch(64, 48, 1, 16, 16, 1, 0);      // 2-D, 4 x 3 work-groups of 4 wavefronts
    launch(32, 32, 8, 8, 8, 2, 5);        // 3-D, 4 x 4 x 4 work-groups of 2 wavefronts
    launch(16, 8, 24, 4, 4, 8, 1);        // 3-D, 128 work-items per work-group
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5_000_000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
