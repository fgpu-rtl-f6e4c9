// cu_mem_ctrl: memory controller of one compute unit. A load or store of a
// wavefront produces 64 accesses, eight per cycle over the eight cycles of the
// instruction (push port). They are kept in a 64-entry buffer and sent to the
// global memory controller one per cycle, with at most OUTSTANDING of them in
// flight. The request tag is the work-item number, so responses may come back
// in any order: load data is written into the register file of lane tag%8 at
// {wavefront, tag/8, rd}. When all 64 responses are back, mem_done tells the
// wavefront scheduler to admit the wavefront again. One memory instruction is
// handled at a time; `busy` stalls the next one in the execute stage.
// The document only names this unit; its buffer, tags and the limit of
// outstanding requests (table range 16/24/32) are this design's reading.
module cu_mem_ctrl
  import fgpu_pkg::*;
#(
  parameter int unsigned OUTSTANDING = 32,
  localparam int unsigned RFAW = $clog2(N_WF) + $clog2(N_CYC) + $clog2(N_REGS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // from the execute stage
  input  logic                    push_valid,
  input  logic [2:0]              push_cyc,
  input  logic [2:0]              push_wf,
  input  logic                    push_we,
  input  logic [4:0]              push_rd,
  input  logic [N_PE-1:0][31:0]   push_addr,
  input  logic [N_PE-1:0][31:0]   push_wdata,
  output logic                    busy,
  // to / from the global memory controller
  output logic                    req_valid,
  input  logic                    req_ready,
  output mem_req_t                req,
  input  logic                    rsp_valid,
  input  mem_rsp_t                rsp,
  // load data into the register files
  output logic                    rf_we,
  output logic [2:0]              rf_lane,
  output logic [RFAW-1:0]         rf_addr,
  output logic [31:0]             rf_wdata,
  // all accesses of the wavefront done
  output logic                    mem_done_valid,
  output logic [2:0]              mem_done_wf
);
  logic [31:0] baddr  [WF_SIZE];
  logic [31:0] bwdata [WF_SIZE];
  logic        active;
  logic        we_q;
  logic [2:0]  wf_q;
  logic [4:0]  rd_q;
  logic [6:0]  filled;    // entries pushed so far
  logic [6:0]  issued;    // entries sent
  logic [6:0]  answered;  // responses received
  logic [$clog2(OUTSTANDING+1)-1:0] inflight;

  assign busy      = active;
  assign req_valid = active && (issued < filled) && (inflight < OUTSTANDING[$bits(inflight)-1:0]);
  assign req.we    = we_q;
  assign req.addr  = baddr[issued[5:0]];
  assign req.wdata = bwdata[issued[5:0]];
  assign req.tag   = issued[5:0];

  assign rf_we    = rsp_valid && !we_q;
  assign rf_lane  = rsp.tag[2:0];
  assign rf_addr  = {wf_q, rsp.tag[5:3], rd_q};
  assign rf_wdata = rsp.rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; we_q <= 1'b0; wf_q <= '0; rd_q <= '0;
      filled <= '0; issued <= '0; answered <= '0; inflight <= '0;
      mem_done_valid <= 1'b0; mem_done_wf <= '0;
    end else begin
      mem_done_valid <= 1'b0;
      if (push_valid) begin
        for (int p = 0; p < N_PE; p++) begin
          baddr [{push_cyc, 3'(p)}] <= push_addr[p];
          bwdata[{push_cyc, 3'(p)}] <= push_wdata[p];
        end
        filled <= filled + 7'(N_PE);
        if (push_cyc == 3'd0) begin
          active <= 1'b1; we_q <= push_we; wf_q <= push_wf; rd_q <= push_rd;
        end
      end
      if (req_valid && req_ready) issued <= issued + 7'd1;
      inflight <= inflight + $bits(inflight)'(req_valid && req_ready) - $bits(inflight)'(rsp_valid);
      if (rsp_valid) begin
        answered <= answered + 7'd1;
        if (answered == 7'(WF_SIZE - 1)) begin
          active <= 1'b0; filled <= '0; issued <= '0; answered <= '0;
          mem_done_valid <= 1'b1; mem_done_wf <= wf_q;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) push_valid && push_cyc == 3'd0 |-> !active);
  assert property (@(posedge clk) disable iff (!rst_n) rsp_valid |-> inflight != 0);
endmodule
