// lram: Link RAM. Holds what the kernel needs besides its binary: the first
// CRAM word of the kernel, the number of work-items to launch and the
// work-group size in each of the three dimensions, and the kernel parameters
// (word map in fgpu_pkg). The host writes it
// through the control interface. The launch words are always visible on their
// own outputs for the work-group dispatcher; each compute unit has an
// asynchronous read port for the LP (load parameter) instruction.
module lram
  import fgpu_pkg::*;
#(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned N_RD  = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                      clk,
  input  logic                      we,
  input  logic [AW-1:0]             waddr,
  input  logic [31:0]               wdata,
  input  logic [N_RD-1:0][AW-1:0]   raddr,
  output logic [N_RD-1:0][31:0]     rdata,
  output logic [31:0]               kstart,
  output idx3_t                     gsize,
  output idx3_t                     wgsize
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;

  always_comb begin
    for (int p = 0; p < N_RD; p++) rdata[p] = mem[raddr[p]];
    kstart = mem[LRAM_KSTART];
    for (int d = 0; d < 3; d++) begin
      gsize[d]  = mem[LRAM_GSIZE + d];
      wgsize[d] = mem[LRAM_WGSIZE + d];
    end
  end
endmodule
