// tb_fgpu_workloads: the document's workloads that the built instruction set
// can express, at several task sizes, on the smallest configuration of the
// parameter table (2 compute units, 16 outstanding requests per CU, 32 in the
// memory controller, 1 KB cache, one AXI4 port, 2 tag managers). Runs memcpy
// and vecadd at 64, 512 and 4096 work-items, vecmul, FIR with 5 and 20 taps,
// and cross correlation (r[i] = sum_k x[i+k]*y[k], run with the FIR kernel),
// transpose of a 64x64 matrix and multiplication of 32x32 matrices on a 2-D
// index space, and compares every result word with values computed here.
module tb_fgpu_workloads;
  import fgpu_pkg::*;

  localparam int unsigned N_CU = 2;
  localparam int unsigned N_AXI = 1;
  localparam int unsigned MEMW = 32768;
  localparam int unsigned A_W = 0, B_W = 8192, C_W = 16384, F_W = 24576; // word bases
  localparam int sizes [3] = '{64, 512, 4096};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  // control port
  logic        s_awvalid = 0, s_awready, s_wvalid = 0, s_wready, s_bvalid, s_bready = 1;
  logic        s_arvalid = 0, s_arready, s_rvalid, s_rready = 1, done;
  logic [15:0] s_awaddr = 0, s_araddr = 0;
  logic [31:0] s_wdata = 0, s_rdata;
  // memory ports
  logic [N_AXI-1:0] arvalid, arready, rvalid, rready, rlast, awvalid, awready;
  logic [N_AXI-1:0] wvalid, wready, wlast, bvalid, bready;
  logic [N_AXI-1:0][31:0] araddr, rdata, awaddr, wdata;
  logic [N_AXI-1:0][7:0]  arlen, awlen;

  fgpu_top #(.N_CU(N_CU), .CU_OUTSTANDING(16), .GMC_OUTSTANDING(32), .CACHE_BYTES(1024),
             .N_AXI(N_AXI), .N_TM(2)) dut (
    .clk, .rst_n,
    .s_awvalid, .s_awready, .s_awaddr, .s_wvalid, .s_wready, .s_wdata, .s_bvalid, .s_bready,
    .s_arvalid, .s_arready, .s_araddr, .s_rvalid, .s_rready, .s_rdata, .done,
    .m_arvalid(arvalid), .m_arready(arready), .m_araddr(araddr), .m_arlen(arlen),
    .m_rvalid(rvalid), .m_rready(rready), .m_rdata(rdata), .m_rlast(rlast),
    .m_awvalid(awvalid), .m_awready(awready), .m_awaddr(awaddr), .m_awlen(awlen),
    .m_wvalid(wvalid), .m_wready(wready), .m_wdata(wdata), .m_wlast(wlast),
    .m_bvalid(bvalid), .m_bready(bready)
  );

  axi_mem_model #(.N_PORTS(N_AXI), .MEM_WORDS(MEMW)) u_mem (
    .clk, .arvalid, .arready, .araddr, .arlen, .rvalid, .rready, .rdata, .rlast,
    .awvalid, .awready, .awaddr, .awlen, .wvalid, .wready, .wdata, .wlast, .bvalid, .bready
  );

  // ---------------- host tasks ----------------
  task automatic axil_write(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    s_awvalid = 1; s_awaddr = a; s_wvalid = 1; s_wdata = d;
    do @(posedge clk); while (!(s_awready && s_wready));
    @(negedge clk);
    s_awvalid = 0; s_wvalid = 0;
    while (!s_bvalid) @(negedge clk);
  endtask

  task automatic axil_read(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    s_arvalid = 1; s_araddr = a;
    do @(posedge clk); while (!s_arready);
    @(negedge clk);
    s_arvalid = 0;
    while (!s_rvalid) @(negedge clk);
    d = s_rdata;
  endtask

  logic [31:0] prog [$];

  // gsize/wgsize: dimension 0; g1/w1: dimension 1 (dimension 2 is 1)
  task automatic launch(input string name, input int gsize, input int wgsize,
                        input int p0, input int p1, input int p2, input int p3,
                        input int g1 = 1, input int w1 = 1);
    logic [31:0] st;
    longint t0;
    for (int i = 0; i < prog.size(); i++) axil_write(16'h2000 + 16'(4 * i), prog[i]);
    axil_write(16'h1000 + 4 * LRAM_KSTART, 0);
    axil_write(16'h1000 + 4 * LRAM_GSIZE, gsize);
    axil_write(16'h1000 + 4 * (LRAM_GSIZE + 1), g1);
    axil_write(16'h1000 + 4 * (LRAM_GSIZE + 2), 1);
    axil_write(16'h1000 + 4 * LRAM_WGSIZE, wgsize);
    axil_write(16'h1000 + 4 * (LRAM_WGSIZE + 1), w1);
    axil_write(16'h1000 + 4 * (LRAM_WGSIZE + 2), 1);
    axil_write(16'h1000 + 4 * (LRAM_PARAM_BASE + 0), p0);
    axil_write(16'h1000 + 4 * (LRAM_PARAM_BASE + 1), p1);
    axil_write(16'h1000 + 4 * (LRAM_PARAM_BASE + 2), p2);
    axil_write(16'h1000 + 4 * (LRAM_PARAM_BASE + 3), p3);
    t0 = cycles;
    axil_write(16'h0000, 1);
    axil_read(16'h0000, st);
    checks++; if (st[0] !== 1'b1) begin failures++; $display("FAIL %s: busy not set", name); end
    while (!done) @(posedge clk);
    axil_read(16'h0000, st);
    checks++; if (st[1:0] !== 2'b10) begin failures++; $display("FAIL %s: status %b", name, st[1:0]); end
    $display("%s: %0dx%0d work-items, work-group %0dx%0d, %0d cycles", name, gsize, g1, wgsize, w1, cycles - t0);
  endtask

  function automatic logic [31:0] a_val(int i); return 32'(i * 7 + 3); endfunction
  function automatic logic [31:0] b_val(int i); return 32'(i * 13 - 1000); endfunction
  function automatic logic [31:0] f_val(int i); return 32'(i + 2); endfunction

  task automatic check_c(input string name, input int n, input int kind, input int taps);
    int bad = 0;
    for (int i = 0; i < n; i++) begin
      logic [31:0] exp;
      case (kind)
        0: exp = a_val(i);
        1: exp = a_val(i) + b_val(i);
        2: exp = a_val(i) * b_val(i);
        5: exp = a_val((i % taps) * taps + i / taps);                // transpose, taps = N
        6: begin                                                     // matmul, taps = N
          exp = 0;
          for (int k = 0; k < taps; k++) exp += a_val((i / taps) * taps + k) * b_val(k * taps + i % taps);
        end
        default: begin
          exp = 0;
          for (int k = 0; k < taps; k++) exp += a_val(i + k) * f_val(k);
        end
      endcase
      checks++;
      if (u_mem.mem[C_W + i] !== exp) begin
        failures++;
        if (bad++ < 5) $display("FAIL %s: C[%0d]=%0d expected %0d", name, i, u_mem.mem[C_W + i], exp);
      end
    end
  endtask

  // FIR kernel: the FGPU ISA example
  task automatic prog_fir();
    prog = {};
    prog.push_back(enc_i(OP_LID, 1, 0, 0));
    prog.push_back(enc_i(OP_WGOFF, 2, 0, 0));
    prog.push_back(enc_r(OP_ADD, 1, 1, 2));
    prog.push_back(enc_i(OP_LP, 2, 0, 3));
    prog.push_back(enc_i(OP_LP, 3, 0, 0));
    prog.push_back(enc_i(OP_LP, 4, 0, 1));
    prog.push_back(enc_i(OP_ADDI, 5, 0, 0));
    prog.push_back(enc_i(OP_ADDI, 6, 0, 0));
    prog.push_back(enc_r(OP_LW, 10, 4, 5));      // 8: begin
    prog.push_back(enc_r(OP_ADD, 11, 5, 1));
    prog.push_back(enc_r(OP_LW, 11, 3, 11));
    prog.push_back(enc_r(OP_MACC, 6, 10, 11));
    prog.push_back(enc_i(OP_ADDI, 5, 5, 1));
    prog.push_back(enc_i(OP_BNE, 5, 2, 8));
    prog.push_back(enc_i(OP_LP, 20, 0, 2));
    prog.push_back(enc_r(OP_SW, 6, 20, 1));
    prog.push_back(enc_i(OP_RET, 0, 0, 0));
  endtask

  // 2-D kernels: r1 = x (dimension 0), r3 = y (dimension 1), parameter 3 = N
  task automatic prog_xy();
    prog = {};
    prog.push_back(enc_i(OP_LID, 1, 0, 0));
    prog.push_back(enc_i(OP_WGOFF, 2, 0, 0));
    prog.push_back(enc_r(OP_ADD, 1, 1, 2));
    prog.push_back(enc_i(OP_LID, 3, 0, 1));
    prog.push_back(enc_i(OP_WGOFF, 4, 0, 1));
    prog.push_back(enc_r(OP_ADD, 3, 3, 4));
    prog.push_back(enc_i(OP_LP, 9, 0, 3));
  endtask

  // transpose: C[x*N + y] = A[y*N + x]
  task automatic prog_transpose();
    prog_xy();
    prog.push_back(enc_i(OP_ADDI, 5, 1, 0));
    prog.push_back(enc_r(OP_MACC, 5, 3, 9));
    prog.push_back(enc_i(OP_ADDI, 6, 3, 0));
    prog.push_back(enc_r(OP_MACC, 6, 1, 9));
    prog.push_back(enc_i(OP_LP, 10, 0, 0));
    prog.push_back(enc_r(OP_LW, 7, 10, 5));
    prog.push_back(enc_i(OP_LP, 11, 0, 2));
    prog.push_back(enc_r(OP_SW, 7, 11, 6));
    prog.push_back(enc_i(OP_RET, 0, 0, 0));
  endtask

  // matrix multiplication: C[y*N + x] = sum_k A[y*N + k] * B[k*N + x]
  task automatic prog_matmul();
    int loop;
    prog_xy();
    prog.push_back(enc_i(OP_ADDI, 12, 0, 0));
    prog.push_back(enc_r(OP_MACC, 12, 3, 9));    // y*N
    prog.push_back(enc_i(OP_ADDI, 5, 0, 0));     // k
    prog.push_back(enc_i(OP_ADDI, 6, 0, 0));     // sum
    prog.push_back(enc_i(OP_ADDI, 13, 1, 0));    // k*N + x
    prog.push_back(enc_i(OP_LP, 10, 0, 0));
    prog.push_back(enc_i(OP_LP, 11, 0, 1));
    loop = prog.size();
    prog.push_back(enc_r(OP_ADD, 14, 12, 5));
    prog.push_back(enc_r(OP_LW, 15, 10, 14));
    prog.push_back(enc_r(OP_LW, 16, 11, 13));
    prog.push_back(enc_r(OP_MACC, 6, 15, 16));
    prog.push_back(enc_i(OP_ADDI, 5, 5, 1));
    prog.push_back(enc_r(OP_ADD, 13, 13, 9));
    prog.push_back(enc_i(OP_BNE, 5, 9, 16'(loop)));
    prog.push_back(enc_r(OP_ADD, 17, 12, 1));
    prog.push_back(enc_i(OP_LP, 18, 0, 2));
    prog.push_back(enc_r(OP_SW, 6, 18, 17));
    prog.push_back(enc_i(OP_RET, 0, 0, 0));
  endtask

  // element-wise kernels: r1 = global id; op 0 copy, 1 add, 2 multiply
  task automatic prog_elem(input int op);
    prog = {};
    prog.push_back(enc_i(OP_LID, 1, 0, 0));
    prog.push_back(enc_i(OP_WGOFF, 2, 0, 0));
    prog.push_back(enc_r(OP_ADD, 1, 1, 2));
    prog.push_back(enc_i(OP_LP, 3, 0, 0));
    prog.push_back(enc_i(OP_LP, 4, 0, 1));
    prog.push_back(enc_i(OP_LP, 7, 0, 2));
    prog.push_back(enc_r(OP_LW, 5, 3, 1));
    if (op == 0) begin
      prog.push_back(enc_r(OP_SW, 5, 7, 1));
    end else begin
      prog.push_back(enc_r(OP_LW, 6, 4, 1));
      if (op == 1) prog.push_back(enc_r(OP_ADD, 8, 5, 6));
      else begin
        prog.push_back(enc_i(OP_ADDI, 8, 0, 0));
        prog.push_back(enc_r(OP_MACC, 8, 5, 6));
      end
      prog.push_back(enc_r(OP_SW, 8, 7, 1));
    end
    prog.push_back(enc_i(OP_RET, 0, 0, 0));
  endtask

  initial begin
    for (int i = 0; i < MEMW; i++) u_mem.mem[i] = 32'hDEAD_0000 + 32'(i);
    for (int i = 0; i < 8192; i++) begin
      u_mem.mem[A_W + i] = a_val(i);
      u_mem.mem[B_W + i] = b_val(i);
    end
    for (int i = 0; i < 32; i++) u_mem.mem[F_W + i] = f_val(i);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (sizes[k]) begin
      prog_elem(0); launch("memcpy", sizes[k], 64, 4 * A_W, 4 * C_W, 4 * C_W, 0);
      check_c("memcpy", sizes[k], 0, 0);
      prog_elem(1); launch("vecadd", sizes[k], (sizes[k] < 128) ? 64 : 128, 4 * A_W, 4 * B_W, 4 * C_W, 0);
      check_c("vecadd", sizes[k], 1, 0);
    end
    prog_elem(2); launch("vecmul", 2048, 512, 4 * A_W, 4 * B_W, 4 * C_W, 0);
    check_c("vecmul", 2048, 2, 0);
    prog_fir();   launch("fir5", 2048, 256, 4 * A_W, 4 * F_W, 4 * C_W, 5);
    check_c("fir5", 2048, 3, 5);
    prog_fir();   launch("fir20", 1024, 64, 4 * A_W, 4 * F_W, 4 * C_W, 20);
    check_c("fir20", 1024, 3, 20);
    prog_fir();   launch("xcorr", 1024, 128, 4 * A_W, 4 * F_W, 4 * C_W, 16);
    check_c("xcorr", 1024, 3, 16);
    prog_transpose(); launch("transpose", 64, 16, 4 * A_W, 0, 4 * C_W, 64, 64, 4);
    check_c("transpose", 4096, 5, 64);
    prog_matmul();    launch("matmul", 32, 8, 4 * A_W, 4 * B_W, 4 * C_W, 32, 32, 16);
    check_c("matmul", 1024, 6, 32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_500_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
