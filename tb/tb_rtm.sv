// tb_rtm: checks the local coordinates and work-group offsets of the runtime
// memory for every wavefront number, cycle and PE, for several work-group
// shapes (1-D 512 and 64, 2-D 16x8x4, 3-D 8x4x16 and 2x2x128), against a reference that
// counts coordinates with dimension 0 fastest; dimension 3 must read 0.
module tb_rtm;
  import fgpu_pkg::*;
  int checks = 0, failures = 0;
  logic [2:0] wf_in_wg, cyc;
  idx3_t wg_offset;
  logic [3:0] lg0, lg1;
  logic [1:0] dim;
  logic [N_PE-1:0][31:0] lid, wgoff;

  rtm dut (.wf_in_wg, .wg_offset, .lg0, .lg1, .cyc, .dim, .lid, .wgoff);

  task automatic shape(input int s0, input int s1, input int s2);
    int n, want [3];
    for (int w = 0; w < 8; w++)
      for (int c = 0; c < 8; c++) begin
        wf_in_wg = 3'(w); cyc = 3'(c);
        for (int d = 0; d < 3; d++) wg_offset[d] = $urandom;
        for (int d = 0; d < 4; d++) begin
          dim = 2'(d); #1;
          for (int p = 0; p < N_PE; p++) begin
            n = w * 64 + c * 8 + p;
            want[0] = n % s0; want[1] = (n / s0) % s1; want[2] = n / (s0 * s1);
            checks += 2;
            if (lid[p] !== (d == 3 ? 32'd0 : 32'(want[d]))) begin
              failures++; $display("FAIL lid %0dx%0dx%0d d%0d w%0d c%0d p%0d = %0d", s0, s1, s2, d, w, c, p, lid[p]);
            end
            if (wgoff[p] !== (d == 3 ? 32'd0 : wg_offset[d])) begin failures++; $display("FAIL wgoff d%0d", d); end
          end
        end
      end
  endtask

  initial begin
    #1;
    lg0 = 4'd9; lg1 = 4'd0;
    shape(512, 1, 1);
    lg0 = 4'd4; lg1 = 4'd3;
    shape(16, 8, 4);
    lg0 = 4'd3; lg1 = 4'd2;
    shape(8, 4, 16);
    lg0 = 4'd1; lg1 = 4'd1;
    shape(2, 2, 128);
    lg0 = 4'd6; lg1 = 4'd0;
    shape(64, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
