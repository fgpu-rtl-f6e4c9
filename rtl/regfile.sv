// regfile: register file of one PE lane of a compute unit. It holds the 32
// registers of 32 bit of every work-item the lane serves: 8 wavefronts times 8
// work-items per lane (work-item cyc*8+lane of each wavefront). A register is
// addressed by {wavefront, cycle, register}, so switching wavefronts costs
// nothing. Register r0 always reads 0. Three asynchronous read ports (rs, rt,
// rd for MACC and stores) and two write ports: one for the execute stage and
// one for load data returning from memory. The document keeps the register
// files in dual-port RAMs clocked at twice the pipeline clock; this design uses
// one clock and more ports instead.
module regfile
  import fgpu_pkg::*;
#(
  localparam int unsigned AW = $clog2(N_WF) + $clog2(N_CYC) + $clog2(N_REGS)
) (
  input  logic            clk,
  input  logic [AW-1:0]   ra, rb, rc,
  output logic [31:0]     da, db, dc,
  input  logic            we0,
  input  logic [AW-1:0]   wa0,
  input  logic [31:0]     wd0,
  input  logic            we1,
  input  logic [AW-1:0]   wa1,
  input  logic [31:0]     wd1
);
  localparam int unsigned RW = $clog2(N_REGS);
  logic [31:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we0) mem[wa0] <= wd0;
    if (we1) mem[wa1] <= wd1;
  end

  always_comb begin
    da = (ra[RW-1:0] == '0) ? '0 : mem[ra];
    db = (rb[RW-1:0] == '0) ? '0 : mem[rb];
    dc = (rc[RW-1:0] == '0) ? '0 : mem[rc];
  end
endmodule
