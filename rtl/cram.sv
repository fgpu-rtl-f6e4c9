// cram: Code RAM. Holds the kernel binary, one 32-bit instruction per word.
// The host writes it through the control interface; every compute unit has its
// own read port so that all CUs fetch in the same cycle. Reads are synchronous:
// the word addressed in cycle t is on rdata in cycle t+1. The one-write,
// many-read organisation and the depth are this design's choices.
module cram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned N_RD  = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                      clk,
  input  logic                      we,
  input  logic [AW-1:0]             waddr,
  input  logic [31:0]               wdata,
  input  logic [N_RD-1:0][AW-1:0]   raddr,
  output logic [N_RD-1:0][31:0]     rdata
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    for (int p = 0; p < N_RD; p++) rdata[p] <= mem[raddr[p]];
  end
endmodule
