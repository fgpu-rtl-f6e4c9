// rtm: Runtime Memory. Supplies the OpenCL work-item built-in values to the
// eight PEs of a compute unit: the local coordinates of a work-item inside its
// work-group (LID, dimension 0, 1 or 2) and the global offset of its
// work-group in that dimension (WGOFF). In cycle `cyc` of an instruction, PE p
// serves work-item cyc*8+p of the wavefront, so its number inside the
// work-group is n = wf_in_wg*64 + cyc*8 + p. Work-group sizes are powers of two
// (log2 sizes lg0, lg1 of dimensions 0 and 1), so the local coordinates are bit
// fields of n: lid0 = n mod 2^lg0, lid1 = (n >> lg0) mod 2^lg1,
// lid2 = n >> (lg0 + lg1). Purely combinational. The document names the unit
// and its job; computing the values instead of storing them is this design's
// choice. Dimension 3 (imm value 3) reads 0.
module rtm
  import fgpu_pkg::*;
(
  input  logic [2:0]                 wf_in_wg,   // wavefront number inside its work-group
  input  idx3_t                      wg_offset,  // work-group offset per dimension
  input  logic [3:0]                 lg0,        // log2 of the work-group size, dimension 0
  input  logic [3:0]                 lg1,        // log2 of the work-group size, dimension 1
  input  logic [$clog2(N_CYC)-1:0]   cyc,        // cycle of the instruction (0..7)
  input  logic [1:0]                 dim,        // index-space dimension asked for
  output logic [N_PE-1:0][31:0]      lid,        // local coordinate, per PE
  output logic [N_PE-1:0][31:0]      wgoff       // work-group offset, per PE
);
  logic [31:0] mask0, mask1;
  logic [4:0]  sh2;

  assign mask0 = (32'd1 << lg0) - 32'd1;
  assign mask1 = (32'd1 << lg1) - 32'd1;
  assign sh2   = 5'(lg0) + 5'(lg1);

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    // work-item number inside the work-group
    logic [31:0] n;
    assign n = 32'(wf_in_wg) * WF_SIZE + 32'(cyc) * N_PE + 32'(p);
    always_comb begin
      unique case (dim)
        2'd0:    lid[p] = n & mask0;
        2'd1:    lid[p] = (n >> lg0) & mask1;
        2'd2:    lid[p] = n >> sh2;
        default: lid[p] = '0;
      endcase
      wgoff[p] = (dim == 2'd3) ? '0 : wg_offset[dim];
    end
  end
endmodule
