// cu: compute unit. Eight PEs execute the same instruction of one wavefront
// (64 work-items) over eight cycles: in cycle c, PE p serves work-item c*8+p.
// The unit has two stages. The fetch stage takes a ready wavefront from the
// wavefront scheduler and reads its instruction from the Code RAM
// (synchronous read, data in the next cycle). The execute stage runs the
// instruction for eight cycles, each PE reading its operands from its own
// register-file lane and writing the result back in the same cycle. Fetch of
// the next wavefront's instruction overlaps execution, so with two or more
// ready wavefronts a new instruction starts every 8 cycles; a lone wavefront
// needs 10 cycles per instruction (its next PC is known only at the end).
// Loads and stores hand their 64 addresses to the CU memory controller and put
// the wavefront to sleep until all accesses are done, so other wavefronts run
// meanwhile. A memory instruction that finds the CU memory controller busy
// stalls in its first execute cycle, and the fetch stage waits behind it.
// Branches (BNE) are taken per wavefront, decided by work-item 0, since all
// work-items of a wavefront share one program counter. RET frees the slot.
// The document's CU is an 18-stage pipeline whose PEs and register files run
// at twice the clock; its stages are not described, so this unit keeps the
// same per-instruction rate of 8 cycles with a simpler two-stage structure and
// one clock.
module cu
  import fgpu_pkg::*;
#(
  parameter int unsigned PCW         = 10,
  parameter int unsigned LRAM_AW     = 5,
  parameter int unsigned OUTSTANDING = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  // work-group allocation from the dispatcher
  input  logic                alloc_valid,
  output logic                alloc_ready,
  input  idx3_t               alloc_wg_offset,
  input  logic [3:0]          wg_lg0,          // log2 work-group size, dimension 0
  input  logic [3:0]          wg_lg1,          // log2 work-group size, dimension 1
  input  logic [3:0]          alloc_n_wf,
  input  logic [PCW-1:0]      alloc_pc,
  // Code RAM read port (data one cycle after address)
  output logic [PCW-1:0]      cram_raddr,
  input  logic [31:0]         cram_rdata,
  // Link RAM read port (asynchronous)
  output logic [LRAM_AW-1:0]  lram_raddr,
  input  logic [31:0]         lram_rdata,
  // global memory port
  output logic                req_valid,
  input  logic                req_ready,
  output mem_req_t            req,
  input  logic                rsp_valid,
  input  mem_rsp_t            rsp,
  output logic                idle
);
  localparam int unsigned RFAW = $clog2(N_WF) + $clog2(N_CYC) + $clog2(N_REGS);

  // fetch stage
  logic            f_busy, f_has_ir;
  instr_t          f_ir, f_ir_now;
  logic [2:0]      f_wf, f_wfidx;
  logic [PCW-1:0]  f_pc;
  idx3_t           f_wgoff;
  // execute stage
  logic            e_valid;
  instr_t          ir;
  logic [2:0]      wf_q, wfidx_q, cyc;
  logic [PCW-1:0]  pc_q;
  idx3_t           wgoff_q;
  logic            taken_q;

  // scheduler
  logic            issue_valid, issue_ready;
  logic [2:0]      issue_wf, issue_wf_in_wg;
  logic [PCW-1:0]  issue_pc;
  idx3_t           issue_wg_offset;
  logic            done_valid, done_wait, done_exit;
  logic [PCW-1:0]  done_pc;
  logic            mem_done_valid, sched_idle;
  logic [2:0]      mem_done_wf;
  logic [3:0]      n_free;

  wf_scheduler #(.PCW(PCW)) u_sched (
    .clk, .rst_n,
    .alloc_valid, .alloc_ready, .alloc_wg_offset, .alloc_n_wf, .alloc_pc,
    .issue_valid, .issue_ready, .issue_wf, .issue_pc, .issue_wf_in_wg, .issue_wg_offset,
    .done_valid, .done_wf(wf_q), .done_pc, .done_wait, .done_exit,
    .mem_done_valid, .mem_done_wf, .idle(sched_idle), .n_free
  );

  // decode
  logic is_mem, mem_busy, stall, exec_go;
  assign is_mem  = (ir.op == OP_LW) || (ir.op == OP_SW);
  assign stall   = e_valid && is_mem && (cyc == 3'd0) && mem_busy;
  assign exec_go = e_valid && !stall;

  // the execute stage takes the fetched instruction when it is empty or ends now
  logic e_last, e_load;
  assign e_last   = exec_go && (cyc == 3'(N_CYC - 1));
  assign e_load   = f_busy && (!e_valid || e_last);
  assign f_ir_now = f_has_ir ? f_ir : instr_t'(cram_rdata);

  assign issue_ready = !f_busy;
  assign cram_raddr  = issue_pc;
  assign lram_raddr  = LRAM_AW'(LRAM_PARAM_BASE) + LRAM_AW'(ir.imm);

  // built-in values
  logic [N_PE-1:0][31:0] lid, wgoff;
  rtm u_rtm (.wf_in_wg(wfidx_q), .wg_offset(wgoff_q), .lg0(wg_lg0), .lg1(wg_lg1),
             .cyc, .dim(ir.imm[1:0]), .lid, .wgoff);

  // PE lanes
  logic [N_PE-1:0][31:0] da, db, dc, res, addr, aux;
  logic [N_PE-1:0]       wr_en, ne, mwe;
  logic                  rf_we;
  logic [2:0]            rf_lane;
  logic [RFAW-1:0]       rf_addr;
  logic [31:0]           rf_wdata;

  for (genvar p = 0; p < N_PE; p++) begin : g_lane
    always_comb begin
      unique case (ir.op)
        OP_LID:   aux[p] = lid[p];
        OP_WGOFF: aux[p] = wgoff[p];
        default:  aux[p] = lram_rdata;
      endcase
    end
    assign mwe[p] = rf_we && (rf_lane == 3'(p));
    regfile u_rf (
      .clk,
      .ra({wf_q, cyc, ir.rs}), .rb({wf_q, cyc, instr_rt(ir)}), .rc({wf_q, cyc, ir.rd}),
      .da(da[p]), .db(db[p]), .dc(dc[p]),
      .we0(exec_go && wr_en[p]), .wa0({wf_q, cyc, ir.rd}), .wd0(res[p]),
      .we1(mwe[p]), .wa1(rf_addr), .wd1(rf_wdata)
    );
    pe u_pe (
      .op(ir.op), .a(da[p]), .b(db[p]), .c(dc[p]), .imm(ir.imm), .aux(aux[p]),
      .result(res[p]), .wr_en(wr_en[p]), .addr(addr[p]), .ne(ne[p])
    );
  end

  cu_mem_ctrl #(.OUTSTANDING(OUTSTANDING)) u_mem (
    .clk, .rst_n,
    .push_valid(exec_go && is_mem), .push_cyc(cyc), .push_wf(wf_q),
    .push_we(ir.op == OP_SW), .push_rd(ir.rd), .push_addr(addr), .push_wdata(dc),
    .busy(mem_busy),
    .req_valid, .req_ready, .req, .rsp_valid, .rsp,
    .rf_we, .rf_lane, .rf_addr, .rf_wdata,
    .mem_done_valid, .mem_done_wf
  );

  // end of an instruction
  logic branch;
  assign branch     = (ir.op == OP_BNE) && ((cyc == 3'd0) ? ne[0] : taken_q);
  assign done_valid = e_last;
  assign done_pc    = branch ? PCW'(ir.imm) : pc_q + PCW'(1);
  assign done_wait  = is_mem;
  assign done_exit  = (ir.op == OP_RET);
  assign idle       = sched_idle && !mem_busy && !e_valid && !f_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_busy <= 1'b0; f_has_ir <= 1'b0; f_ir <= '0; f_wf <= '0; f_wfidx <= '0;
      f_pc <= '0; f_wgoff <= '0;
      e_valid <= 1'b0; ir <= '0; wf_q <= '0; wfidx_q <= '0; cyc <= '0;
      pc_q <= '0; wgoff_q <= '0; taken_q <= 1'b0;
    end else begin
      // fetch stage
      if (issue_valid && issue_ready) begin
        f_busy <= 1'b1; f_has_ir <= 1'b0;
        f_wf <= issue_wf; f_wfidx <= issue_wf_in_wg; f_pc <= issue_pc; f_wgoff <= issue_wg_offset;
      end else if (e_load) begin
        f_busy <= 1'b0; f_has_ir <= 1'b0;
      end else if (f_busy && !f_has_ir) begin
        f_ir <= f_ir_now; f_has_ir <= 1'b1;
      end
      // execute stage
      if (e_load) begin
        e_valid <= 1'b1; ir <= f_ir_now; cyc <= '0;
        wf_q <= f_wf; wfidx_q <= f_wfidx; pc_q <= f_pc; wgoff_q <= f_wgoff;
      end else if (e_last) begin
        e_valid <= 1'b0;
      end
      if (exec_go && !e_last) cyc <= cyc + 3'd1;
      if (exec_go && cyc == 3'd0) taken_q <= ne[0];
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(issue_valid && issue_ready && f_busy));
endmodule
