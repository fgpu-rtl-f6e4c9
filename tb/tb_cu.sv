// tb_cu: one compute unit with Code RAM, Link RAM and global memory modelled
// in the testbench (memory answers after a random delay, stores write the
// array). Test 1 runs a straight-line program on one wavefront and checks that
// every instruction takes 10 cycles (issue, fetch, and 8 execute cycles, one
// per group of 8 work-items). Test 2 runs the FIR kernel of the FGPU ISA
// example on two work-groups (2 and 4 wavefronts) at once and compares all
// 384 results with values computed here. Test 3 runs the straight-line
// program on four wavefronts at once and checks that, with fetch overlapping
// execution, a new instruction ends every 8 cycles. Test 4 runs a 3-D
// work-group of 4x4x8 work-items (2 wavefronts) and checks the local
// coordinates and work-group offsets of all three dimensions.
module tb_cu;
  import fgpu_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int unsigned MEMW = 8192;

  logic alloc_valid = 0, alloc_ready, req_valid, req_ready, rsp_valid = 0, idle;
  logic [31:0] cram_rdata, lram_rdata;
  idx3_t alloc_wg_offset = '0;
  logic [3:0] wg_lg0 = 4'd9, wg_lg1 = 4'd0;   // 1-D work-groups unless test 4 sets a shape
  logic [3:0] alloc_n_wf = 0;
  logic [9:0] alloc_pc = 0, cram_raddr;
  logic [4:0] lram_raddr;
  mem_req_t req;
  mem_rsp_t rsp = '0;

  cu #(.PCW(10), .LRAM_AW(5), .OUTSTANDING(32)) dut (.*);

  logic [31:0] cram [1024];
  logic [31:0] lram [32];
  logic [31:0] mem [MEMW];
  always @(posedge clk) cram_rdata <= cram[cram_raddr];
  assign lram_rdata = lram[lram_raddr];

  // memory: fixed-order queue, random delay
  mem_req_t q [$];
  int delay = 0;
  initial req_ready = 0;
  always @(posedge clk) begin
    req_ready <= ($urandom_range(0, 4) != 0);
    rsp_valid <= 0;
    if (req_valid && req_ready) q.push_back(req);
    if (delay > 0) delay--;
    else if (q.size() > 0) begin
      mem_req_t r;
      r = q.pop_front();
      rsp_valid <= 1; rsp.tag <= r.tag;
      rsp.rdata <= r.we ? 32'd0 : mem[(r.addr >> 2) % MEMW];
      if (r.we) mem[(r.addr >> 2) % MEMW] = r.wdata;
      delay = $urandom_range(0, 3);
    end
  end

  task automatic chk(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d vs %0d", what, got, exp); end
  endtask

  task automatic alloc(input int off, input int nwf, input int pc, input int off1 = 0, input int off2 = 0);
    @(negedge clk);
    alloc_valid = 1; alloc_wg_offset = {32'(off2), 32'(off1), 32'(off)}; alloc_n_wf = 4'(nwf); alloc_pc = 10'(pc);
    do @(posedge clk); while (!alloc_ready);
    @(negedge clk); alloc_valid = 0;
  endtask

  longint cyc = 0, last_done = -1;
  int gap_want = 10;
  int n_gap_ok = 0, n_gap_bad = 0;
  bit timing_on = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (timing_on && dut.done_valid) begin
      if (last_done >= 0) begin
        if (cyc - last_done == gap_want) n_gap_ok++; else n_gap_bad++;
      end
      last_done = cyc;
    end
  end

  initial begin
    for (int i = 0; i < MEMW; i++) mem[i] = 32'(i * 3 + 1);
    for (int i = 0; i < 32; i++) lram[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;

    // ---- test 1: straight-line ALU code, one wavefront ----
    lram[LRAM_PARAM_BASE + 0] = 32'h4000;          // result array (word 4096)
    cram[0] = enc_i(OP_LID, 1, 0, 0);
    cram[1] = enc_i(OP_ADDI, 2, 1, -3);
    cram[2] = enc_r(OP_ADD, 3, 1, 2);              // 2*lid - 3
    cram[3] = enc_i(OP_ADDI, 5, 0, 7);
    cram[4] = enc_r(OP_MACC, 3, 5, 1);             // 9*lid - 3
    cram[5] = enc_i(OP_LP, 4, 0, 0);
    cram[6] = enc_i(OP_WGOFF, 6, 0, 0);
    cram[7] = enc_r(OP_ADD, 3, 3, 6);              // + 1000
    cram[8] = enc_i(OP_RET, 0, 0, 0);
    timing_on = 1;
    alloc(1000, 1, 0);
    do @(posedge clk); while (!idle);
    timing_on = 0;
    chk(n_gap_ok, 8, "instructions taking 10 cycles");
    chk(n_gap_bad, 0, "instructions with other timing");
    // results are in registers; store them with a second program
    cram[10] = enc_i(OP_LID, 1, 0, 0);
    cram[11] = enc_i(OP_ADDI, 2, 1, -3);
    cram[12] = enc_r(OP_ADD, 3, 1, 2);
    cram[13] = enc_i(OP_ADDI, 5, 0, 7);
    cram[14] = enc_r(OP_MACC, 3, 5, 1);
    cram[15] = enc_i(OP_LP, 4, 0, 0);
    cram[16] = enc_i(OP_WGOFF, 6, 0, 0);
    cram[17] = enc_r(OP_ADD, 3, 3, 6);
    cram[18] = enc_r(OP_SW, 3, 4, 1);
    cram[19] = enc_i(OP_RET, 0, 0, 0);
    alloc(1000, 1, 10);
    do @(posedge clk); while (!idle);
    for (int i = 0; i < 64; i++) chk(mem[4096 + i], 32'(9 * i - 3 + 1000), "alu result");

    // ---- test 2: FIR kernel on two work-groups ----
    lram[LRAM_PARAM_BASE + 0] = 32'h0;     // input  (word 0)
    lram[LRAM_PARAM_BASE + 1] = 32'h2000;  // filter (word 2048)
    lram[LRAM_PARAM_BASE + 2] = 32'h6000;  // result (word 6144)
    lram[LRAM_PARAM_BASE + 3] = 4;         // taps
    cram[100] = enc_i(OP_LID, 1, 0, 0);
    cram[101] = enc_i(OP_WGOFF, 2, 0, 0);
    cram[102] = enc_r(OP_ADD, 1, 1, 2);
    cram[103] = enc_i(OP_LP, 2, 0, 3);
    cram[104] = enc_i(OP_LP, 3, 0, 0);
    cram[105] = enc_i(OP_LP, 4, 0, 1);
    cram[106] = enc_i(OP_ADDI, 5, 0, 0);
    cram[107] = enc_i(OP_ADDI, 6, 0, 0);
    cram[108] = enc_r(OP_LW, 10, 4, 5);
    cram[109] = enc_r(OP_ADD, 11, 5, 1);
    cram[110] = enc_r(OP_LW, 11, 3, 11);
    cram[111] = enc_r(OP_MACC, 6, 10, 11);
    cram[112] = enc_i(OP_ADDI, 5, 5, 1);
    cram[113] = enc_i(OP_BNE, 5, 2, 108);
    cram[114] = enc_i(OP_LP, 20, 0, 2);
    cram[115] = enc_r(OP_SW, 6, 20, 1);
    cram[116] = enc_i(OP_RET, 0, 0, 0);
    alloc(0, 2, 100);
    alloc(128, 4, 100);
    do @(posedge clk); while (!idle);
    for (int i = 0; i < 384; i++) begin
      logic [31:0] e;
      e = 0;
      for (int k = 0; k < 4; k++) e += 32'((i + k) * 3 + 1) * 32'((2048 + k) * 3 + 1);
      chk(mem[6144 + i], e, "fir result");
    end

    // ---- test 3: four wavefronts, overlapped fetch: one instruction per 8 cycles ----
    lram[LRAM_PARAM_BASE + 0] = 32'h4000;
    gap_want = 8; n_gap_ok = 0; n_gap_bad = 0; last_done = -1;
    timing_on = 1;
    alloc(2000, 4, 10);
    do @(posedge clk); while (!idle);
    timing_on = 0;
    // 4 x 10 instructions; the stores stall and sleep, the rest must keep the 8-cycle rate
    chk(n_gap_ok >= 30, 1, "instructions ending 8 cycles apart");
    $display("8-cycle gaps %0d, other gaps %0d", n_gap_ok, n_gap_bad);
    for (int i = 0; i < 256; i++) chk(mem[4096 + i], 32'(9 * i - 3 + 2000), "alu result, 4 wavefronts");

    // ---- test 4: 3-D work-group 4 x 4 x 8 at offset (40, 7, 300) ----
    // index = lid0 + 4*lid1 + 16*lid2; A_d[index] = lid_d + wgoff_d
    wg_lg0 = 4'd2; wg_lg1 = 4'd2;
    lram[LRAM_PARAM_BASE + 0] = 32'h4000;   // A0 (word 4096)
    lram[LRAM_PARAM_BASE + 1] = 32'h4400;   // A1 (word 4352)
    lram[LRAM_PARAM_BASE + 2] = 32'h4800;   // A2 (word 4608)
    cram[200] = enc_i(OP_LID, 1, 0, 0);
    cram[201] = enc_i(OP_LID, 2, 0, 1);
    cram[202] = enc_i(OP_LID, 3, 0, 2);
    cram[203] = enc_i(OP_ADDI, 5, 1, 0);
    cram[204] = enc_i(OP_ADDI, 6, 0, 4);
    cram[205] = enc_r(OP_MACC, 5, 2, 6);
    cram[206] = enc_i(OP_ADDI, 6, 0, 16);
    cram[207] = enc_r(OP_MACC, 5, 3, 6);     // r5 = index
    cram[208] = enc_i(OP_WGOFF, 7, 0, 0);
    cram[209] = enc_r(OP_ADD, 7, 7, 1);
    cram[210] = enc_i(OP_LP, 8, 0, 0);
    cram[211] = enc_r(OP_SW, 7, 8, 5);
    cram[212] = enc_i(OP_WGOFF, 7, 0, 1);
    cram[213] = enc_r(OP_ADD, 7, 7, 2);
    cram[214] = enc_i(OP_LP, 8, 0, 1);
    cram[215] = enc_r(OP_SW, 7, 8, 5);
    cram[216] = enc_i(OP_WGOFF, 7, 0, 2);
    cram[217] = enc_r(OP_ADD, 7, 7, 3);
    cram[218] = enc_i(OP_LP, 8, 0, 2);
    cram[219] = enc_r(OP_SW, 7, 8, 5);
    cram[220] = enc_i(OP_RET, 0, 0, 0);
    alloc(40, 2, 200, 7, 300);
    do @(posedge clk); while (!idle);
    for (int i = 0; i < 128; i++) begin
      chk(mem[4096 + i], 32'(i % 4 + 40), "3-D lid/wgoff d0");
      chk(mem[4352 + i], 32'((i / 4) % 4 + 7), "3-D lid/wgoff d1");
      chk(mem[4608 + i], 32'(i / 16 + 300), "3-D lid/wgoff d2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5_000_000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
