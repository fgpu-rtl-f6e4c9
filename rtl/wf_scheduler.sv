// wf_scheduler: wavefront scheduler of one compute unit. It keeps up to 8
// wavefront slots, each with its own program counter, the offset of its
// work-group and its number inside the work-group. A work-group arriving from
// the dispatcher takes n_wf free slots at once (alloc handshake). Slots that
// are ready are offered to the execute stage in round-robin order (issue
// handshake). When the execute stage finishes an instruction it reports the
// next PC and whether the wavefront is ready again, must wait for memory, or
// has executed RET. A wavefront waiting for memory is admitted again when the
// CU memory controller reports its accesses complete (mem_done).
// The document names this unit and its job; the slot states, the round-robin
// order and the handshakes are this design's choices.
module wf_scheduler
  import fgpu_pkg::*;
#(
  parameter int unsigned PCW = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  // work-group allocation
  input  logic              alloc_valid,
  output logic              alloc_ready,
  input  idx3_t             alloc_wg_offset,
  input  logic [3:0]        alloc_n_wf,
  input  logic [PCW-1:0]    alloc_pc,
  // issue to the execute stage
  output logic              issue_valid,
  input  logic              issue_ready,
  output logic [2:0]        issue_wf,
  output logic [PCW-1:0]    issue_pc,
  output logic [2:0]        issue_wf_in_wg,
  output idx3_t             issue_wg_offset,
  // end of instruction from the execute stage
  input  logic              done_valid,
  input  logic [2:0]        done_wf,
  input  logic [PCW-1:0]    done_pc,
  input  logic              done_wait,   // wavefront waits for memory
  input  logic              done_exit,   // wavefront executed RET
  // memory accesses of a wavefront complete
  input  logic              mem_done_valid,
  input  logic [2:0]        mem_done_wf,
  output logic              idle,
  output logic [3:0]        n_free
);
  typedef enum logic [1:0] {SLOT_FREE, SLOT_READY, SLOT_EXEC, SLOT_WAIT} slot_e;

  slot_e          st     [N_WF];
  logic [PCW-1:0] pc     [N_WF];
  idx3_t          wgoff  [N_WF];
  logic [2:0]     wfidx  [N_WF];
  logic [2:0]     rr;

  // free slot count and round-robin pick
  always_comb begin
    n_free = '0;
    for (int s = 0; s < N_WF; s++) if (st[s] == SLOT_FREE) n_free++;
    idle        = (n_free == 4'(N_WF));
    alloc_ready = (n_free >= alloc_n_wf);
    issue_valid = 1'b0;
    issue_wf    = '0;
    for (int k = N_WF - 1; k >= 0; k--) begin
      if (st[3'(rr + 3'(k))] == SLOT_READY) begin
        issue_valid = 1'b1;
        issue_wf    = 3'(rr + 3'(k));
      end
    end
    issue_pc        = pc[issue_wf];
    issue_wf_in_wg  = wfidx[issue_wf];
    issue_wg_offset = wgoff[issue_wf];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N_WF; s++) begin
        st[s] <= SLOT_FREE; pc[s] <= '0; wgoff[s] <= '0; wfidx[s] <= '0;
      end
      rr <= '0;
    end else begin
      if (alloc_valid && alloc_ready) begin
        automatic int unsigned n = 0;
        for (int s = 0; s < N_WF; s++) begin
          if (st[s] == SLOT_FREE && n < int'(alloc_n_wf)) begin
            st[s]    <= SLOT_READY;
            pc[s]    <= alloc_pc;
            wgoff[s] <= alloc_wg_offset;
            wfidx[s] <= 3'(n);
            n++;
          end
        end
      end
      if (issue_valid && issue_ready) begin
        st[issue_wf] <= SLOT_EXEC;
        rr           <= issue_wf + 3'd1;
      end
      if (done_valid) begin
        pc[done_wf] <= done_pc;
        st[done_wf] <= done_exit ? SLOT_FREE : (done_wait ? SLOT_WAIT : SLOT_READY);
      end
      if (mem_done_valid) st[mem_done_wf] <= SLOT_READY;
    end
  end

  // a wavefront finishing memory must be waiting; the scheduler never issues a busy slot
  assert property (@(posedge clk) disable iff (!rst_n)
                   mem_done_valid |-> st[mem_done_wf] == SLOT_WAIT);
endmodule
