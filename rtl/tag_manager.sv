// tag_manager: miss handler of the global memory controller's cache. Each tag
// manager owns the cache sets whose index modulo the number of tag managers
// equals its own number, and serves one miss at a time. On `start` it first
// writes the victim line back if it is dirty (one AXI4 write burst of
// LINE_WORDS beats, reading the line from the cache data array), then fetches
// the new line with one AXI4 read burst of LINE_WORDS beats, writing each beat
// into the data array. With fill=0 it only writes the line back (cache flush).
// `done` pulses for one cycle when the tag array may be updated.
// The AXI4 port is shared; port_req/port_gnt hold it for the whole miss.
// Bursts are INCR with 32-bit beats. The document names tag managers and says
// that a burst fills one cache line; the rest is this design's choice.
module tag_manager #(
  parameter int unsigned LINE_WORDS = 16,
  parameter int unsigned SETW       = 7,
  localparam int unsigned WW        = $clog2(LINE_WORDS),
  localparam int unsigned TAGW      = 32 - SETW - WW - 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               fill,
  input  logic [SETW-1:0]    set,
  input  logic [TAGW-1:0]    new_tag,
  input  logic               victim_dirty,
  input  logic [TAGW-1:0]    victim_tag,
  output logic               busy,
  output logic [SETW-1:0]    cur_set,
  // cache data array access
  output logic [WW-1:0]      wb_word,     // word of cur_set read for write-back
  input  logic [31:0]        wb_data,
  output logic               fill_we,
  output logic [WW-1:0]      fill_word,
  output logic [31:0]        fill_data,
  output logic               done,
  output logic               done_filled,
  output logic [TAGW-1:0]    done_tag,
  // AXI4 port ownership
  output logic               port_req,
  input  logic               port_gnt,
  // AXI4 master (valid outputs are qualified with port_gnt outside)
  output logic               arvalid,
  input  logic               arready,
  output logic [31:0]        araddr,
  output logic [7:0]         arlen,
  input  logic               rvalid,
  output logic               rready,
  input  logic [31:0]        rdata,
  input  logic               rlast,
  output logic               awvalid,
  input  logic               awready,
  output logic [31:0]        awaddr,
  output logic [7:0]         awlen,
  output logic               wvalid,
  input  logic               wready,
  output logic [31:0]        wdata,
  output logic               wlast,
  input  logic               bvalid,
  output logic               bready
);
  typedef enum logic [2:0] {T_IDLE, T_AW, T_W, T_B, T_AR, T_R, T_DONE} tstate_e;
  tstate_e       st;
  logic          fill_q;
  logic [TAGW-1:0] ntag_q, vtag_q;
  logic [WW-1:0] cnt;

  assign busy      = (st != T_IDLE);
  assign port_req  = (st != T_IDLE) && (st != T_DONE);
  assign wb_word   = cnt;
  assign arvalid   = (st == T_AR) && port_gnt;
  assign araddr    = {ntag_q, cur_set, {WW{1'b0}}, 2'b00};
  assign arlen     = 8'(LINE_WORDS - 1);
  assign rready    = (st == T_R) && port_gnt;
  assign awvalid   = (st == T_AW) && port_gnt;
  assign awaddr    = {vtag_q, cur_set, {WW{1'b0}}, 2'b00};
  assign awlen     = 8'(LINE_WORDS - 1);
  assign wvalid    = (st == T_W) && port_gnt;
  assign wdata     = wb_data;
  assign wlast     = (cnt == WW'(LINE_WORDS - 1));
  assign bready    = (st == T_B) && port_gnt;
  assign fill_we   = rvalid && rready;
  assign fill_word = cnt;
  assign fill_data = rdata;
  assign done        = (st == T_DONE);
  assign done_filled = fill_q;
  assign done_tag    = ntag_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= T_IDLE; fill_q <= 1'b0; ntag_q <= '0; vtag_q <= '0; cnt <= '0; cur_set <= '0;
    end else begin
      unique case (st)
        T_IDLE: if (start) begin
          fill_q <= fill; ntag_q <= new_tag; vtag_q <= victim_tag; cur_set <= set; cnt <= '0;
          st <= victim_dirty ? T_AW : (fill ? T_AR : T_DONE);
        end
        T_AW: if (awvalid && awready) st <= T_W;
        T_W: if (wvalid && wready) begin
          cnt <= cnt + 1'b1;
          if (wlast) st <= T_B;
        end
        T_B: if (bvalid && bready) st <= fill_q ? T_AR : T_DONE;
        T_AR: if (arvalid && arready) st <= T_R;
        T_R: if (rvalid && rready) begin
          cnt <= cnt + 1'b1;
          if (cnt == WW'(LINE_WORDS - 1)) st <= T_DONE;
        end
        T_DONE: st <= T_IDLE;
        default: st <= T_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   rvalid && rready |-> rlast == (cnt == WW'(LINE_WORDS - 1)));
endmodule
