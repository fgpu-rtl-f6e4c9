// wg_dispatcher: work-group dispatcher (the threads scheduler). After `start`
// it cuts the index space of gsize[0] x gsize[1] x gsize[2] work-items into
// work-groups of wgsize[0] x wgsize[1] x wgsize[2] work-items (powers of two,
// product a multiple of 64 and at most 512), walking dimension 0 fastest, and
// hands each work-group, as its global offset per dimension and its number of
// wavefronts, to a compute unit that has enough free wavefront slots,
// searching the CUs round-robin. One work-group is handed out per cycle at
// most. It also gives every CU log2 of the work-group size in dimensions 0 and
// 1 (wg_lg0, wg_lg1) so that local coordinates can be taken from bit fields.
// When all work-groups are handed out and every CU is idle again, it asks the
// global memory controller to write its dirty cache lines back and then raises
// `done` until the next start. Unused dimensions must have size 1.
// The document states that work-groups are scheduled on idle cores and that
// the index space has up to three dimensions; the walk order, the
// power-of-two restriction, the end-of-kernel flush and the handshakes are
// this design's.
module wg_dispatcher
  import fgpu_pkg::*;
#(
  parameter int unsigned N_CU = 8,
  parameter int unsigned PCW  = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [31:0]          kstart,
  input  idx3_t                gsize,
  input  idx3_t                wgsize,
  output logic [N_CU-1:0]      alloc_valid,
  input  logic [N_CU-1:0]      alloc_ready,
  output idx3_t                alloc_wg_offset,
  output logic [3:0]           alloc_n_wf,
  output logic [PCW-1:0]       alloc_pc,
  output logic [3:0]           wg_lg0,
  output logic [3:0]           wg_lg1,
  input  logic [N_CU-1:0]      cu_idle,
  output logic                 flush_start,
  input  logic                 flush_done,
  output logic                 busy,
  output logic                 done
);
  localparam int unsigned CW = (N_CU > 1) ? $clog2(N_CU) : 1;
  typedef enum logic [2:0] {D_IDLE, D_DISPATCH, D_DRAIN, D_FLUSH, D_FWAIT} dstate_e;
  dstate_e     st;
  idx3_t       next_off;
  logic        all_out;     // every work-group has been handed out
  logic [3:0]  lg2;
  logic [5:0]  lg_sum;
  logic [CW-1:0] rr;
  logic        found;
  logic [CW-1:0] pick;

  assign alloc_wg_offset = next_off;
  assign wg_lg0          = log2_pow2(wgsize[0]);
  assign wg_lg1          = log2_pow2(wgsize[1]);
  assign lg2             = log2_pow2(wgsize[2]);
  assign lg_sum          = 6'(wg_lg0) + 6'(wg_lg1) + 6'(lg2);
  // work-items per work-group = 2^lg_sum, wavefronts = 2^(lg_sum-6)
  assign alloc_n_wf      = (lg_sum >= 6'd6 && lg_sum <= 6'd9) ? 4'(4'd1 << (lg_sum - 6'd6)) : 4'd1;
  assign alloc_pc        = kstart[PCW-1:0];
  assign busy            = (st != D_IDLE);
  assign flush_start     = (st == D_FLUSH);

  always_comb begin
    found = 1'b0; pick = '0;
    for (int k = N_CU - 1; k >= 0; k--) begin
      automatic int c = (int'(rr) + k) % N_CU;
      if (alloc_ready[c]) begin found = 1'b1; pick = CW'(c); end
    end
    alloc_valid = '0;
    if (st == D_DISPATCH && !all_out && found) alloc_valid[pick] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= D_IDLE; next_off <= '0; all_out <= 1'b0; rr <= '0; done <= 1'b0;
    end else begin
      unique case (st)
        D_IDLE: if (start) begin
          st <= D_DISPATCH; next_off <= '0; done <= 1'b0;
          all_out <= (gsize[0] == '0) || (gsize[1] == '0) || (gsize[2] == '0);
        end
        D_DISPATCH: begin
          if (all_out) st <= D_DRAIN;
          else if (found) begin
            // step dimension 0, carry into dimensions 1 and 2
            if (next_off[0] + wgsize[0] < gsize[0]) next_off[0] <= next_off[0] + wgsize[0];
            else begin
              next_off[0] <= '0;
              if (next_off[1] + wgsize[1] < gsize[1]) next_off[1] <= next_off[1] + wgsize[1];
              else begin
                next_off[1] <= '0;
                next_off[2] <= next_off[2] + wgsize[2];
                if (next_off[2] + wgsize[2] >= gsize[2]) all_out <= 1'b1;
              end
            end
            rr <= CW'((int'(pick) + 1) % N_CU);
          end
        end
        D_DRAIN: if (&cu_idle) st <= D_FLUSH;
        D_FLUSH: st <= D_FWAIT;
        D_FWAIT: if (flush_done) begin st <= D_IDLE; done <= 1'b1; end
        default: st <= D_IDLE;
      endcase
    end
  end
endmodule
