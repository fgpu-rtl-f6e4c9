// tb_wf_scheduler: directed test of the wavefront scheduler: allocation of a
// work-group into free slots, round-robin issue with the slot's PC,
// work-group offset and wavefront number, return of a wavefront as ready,
// waiting for memory and re-admission by mem_done, refusal of a work-group
// that does not fit, and release of slots by RET.
module tb_wf_scheduler;
  import fgpu_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic alloc_valid = 0, alloc_ready, issue_valid, issue_ready = 0;
  idx3_t alloc_wg_offset = '0, issue_wg_offset;
  logic [3:0] alloc_n_wf = 0, n_free;
  logic [9:0] alloc_pc = 0, issue_pc, done_pc = 0;
  logic [2:0] issue_wf, issue_wf_in_wg, done_wf = 0, mem_done_wf = 0;
  logic done_valid = 0, done_wait = 0, done_exit = 0, mem_done_valid = 0, idle;

  wf_scheduler #(.PCW(10)) dut (.*);

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %0d vs %0d", what, got, exp); end
  endtask

  task automatic take(input int wf, input int pc, input int idx, input int off);
    @(negedge clk);
    chk(issue_valid, 1, "issue_valid");
    chk(issue_wf, wf, "issue_wf"); chk(issue_pc, pc, "issue_pc");
    chk(issue_wf_in_wg, idx, "issue_wf_in_wg"); chk(issue_wg_offset[0], off, "issue_wg_offset");
    chk(issue_wg_offset[1], off + 1, "issue_wg_offset d1"); chk(issue_wg_offset[2], off + 2, "issue_wg_offset d2");
    issue_ready = 1;
    @(negedge clk); issue_ready = 0;
  endtask

  task automatic fin(input int wf, input int pc, input bit w, input bit x);
    @(negedge clk);
    done_valid = 1; done_wf = 3'(wf); done_pc = 10'(pc); done_wait = w; done_exit = x;
    @(negedge clk); done_valid = 0; done_wait = 0; done_exit = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(idle, 1, "idle after reset"); chk(n_free, 8, "n_free"); chk(issue_valid, 0, "no issue");
    alloc_valid = 1; alloc_n_wf = 3; alloc_wg_offset = {32'd130, 32'd129, 32'd128}; alloc_pc = 5;
    #1 chk(alloc_ready, 1, "alloc_ready");
    @(negedge clk); alloc_valid = 0;
    chk(n_free, 5, "n_free after alloc"); chk(idle, 0, "not idle");
    take(0, 5, 0, 128);
    take(1, 5, 1, 128);
    take(2, 5, 2, 128);
    chk(issue_valid, 0, "all slots executing");
    fin(0, 6, 0, 0);
    take(0, 6, 0, 128);
    fin(1, 7, 1, 0);
    chk(issue_valid, 0, "waiting slot not issued");
    @(negedge clk); mem_done_valid = 1; mem_done_wf = 1;
    @(negedge clk); mem_done_valid = 0;
    take(1, 7, 1, 128);
    // a work-group of 6 wavefronts does not fit into 5 free slots
    alloc_valid = 1; alloc_n_wf = 6; alloc_wg_offset = {32'd514, 32'd513, 32'd512}; alloc_pc = 1;
    #1 chk(alloc_ready, 0, "alloc refused");
    alloc_n_wf = 5;
    #1 chk(alloc_ready, 1, "alloc of 5 accepted");
    @(negedge clk); alloc_valid = 0;
    chk(n_free, 0, "full");
    take(3, 1, 0, 512);
    fin(0, 0, 0, 1); fin(1, 0, 0, 1); fin(2, 0, 0, 1);
    chk(n_free, 3, "three freed");
    take(4, 1, 1, 512);
    take(5, 1, 2, 512);
    take(6, 1, 3, 512);
    take(7, 1, 4, 512);
    for (int w = 3; w < 8; w++) fin(w, 0, 0, 1);
    chk(idle, 1, "idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
