// axi_mem_model: behavioural model of the external global memory for
// simulation. N_PORTS independent AXI4 slave ports (INCR bursts of 32-bit
// beats) share one word array `mem`. Each port serves one burst at a time;
// when RANDOM_GAPS is set, rvalid/awready/wready/arready are withheld in
// random cycles to vary the timing. Not synthesizable in intent.
module axi_mem_model #(
  parameter int unsigned N_PORTS     = 4,
  parameter int unsigned MEM_WORDS   = 32768,
  parameter bit          RANDOM_GAPS = 1'b1
) (
  input  logic                     clk,
  input  logic [N_PORTS-1:0]       arvalid,
  output logic [N_PORTS-1:0]       arready,
  input  logic [N_PORTS-1:0][31:0] araddr,
  input  logic [N_PORTS-1:0][7:0]  arlen,
  output logic [N_PORTS-1:0]       rvalid,
  input  logic [N_PORTS-1:0]       rready,
  output logic [N_PORTS-1:0][31:0] rdata,
  output logic [N_PORTS-1:0]       rlast,
  input  logic [N_PORTS-1:0]       awvalid,
  output logic [N_PORTS-1:0]       awready,
  input  logic [N_PORTS-1:0][31:0] awaddr,
  input  logic [N_PORTS-1:0][7:0]  awlen,
  input  logic [N_PORTS-1:0]       wvalid,
  output logic [N_PORTS-1:0]       wready,
  input  logic [N_PORTS-1:0][31:0] wdata,
  input  logic [N_PORTS-1:0]       wlast,
  output logic [N_PORTS-1:0]       bvalid,
  input  logic [N_PORTS-1:0]       bready
);
  logic [31:0] mem [MEM_WORDS];
  int unsigned n_rd_bursts, n_wr_bursts;

  logic [N_PORTS-1:0]       rbusy, wbusy, gap;
  logic [N_PORTS-1:0][31:0] raddr_q, waddr_q;
  logic [N_PORTS-1:0][7:0]  rcnt, rlen_q;

  initial begin n_rd_bursts = 0; n_wr_bursts = 0; rbusy = '0; wbusy = '0; bvalid = '0; gap = '0; end

  always_comb begin
    for (int p = 0; p < N_PORTS; p++) begin
      arready[p] = !rbusy[p] && !gap[p];
      rvalid[p]  = rbusy[p] && !gap[p];
      rdata[p]   = mem[(raddr_q[p] >> 2) % MEM_WORDS];
      rlast[p]   = (rcnt[p] == rlen_q[p]);
      awready[p] = !wbusy[p] && !bvalid[p] && !gap[p];
      wready[p]  = wbusy[p] && !gap[p];
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < N_PORTS; p++) begin
      gap[p] <= RANDOM_GAPS ? ($urandom_range(0, 3) == 0) : 1'b0;
      if (arvalid[p] && arready[p]) begin
        rbusy[p] <= 1'b1; raddr_q[p] <= araddr[p]; rlen_q[p] <= arlen[p]; rcnt[p] <= '0;
        n_rd_bursts <= n_rd_bursts + 1;
      end else if (rvalid[p] && rready[p]) begin
        raddr_q[p] <= raddr_q[p] + 4; rcnt[p] <= rcnt[p] + 1;
        if (rlast[p]) rbusy[p] <= 1'b0;
      end
      if (awvalid[p] && awready[p]) begin
        wbusy[p] <= 1'b1; waddr_q[p] <= awaddr[p];
        n_wr_bursts <= n_wr_bursts + 1;
      end else if (wvalid[p] && wready[p]) begin
        mem[(waddr_q[p] >> 2) % MEM_WORDS] <= wdata[p];
        waddr_q[p] <= waddr_q[p] + 4;
        if (wlast[p]) begin wbusy[p] <= 1'b0; bvalid[p] <= 1'b1; end
      end
      if (bvalid[p] && bready[p]) bvalid[p] <= 1'b0;
    end
  end
endmodule
