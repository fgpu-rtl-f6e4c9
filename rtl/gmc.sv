// gmc: global memory controller. It collects the memory requests of all
// compute units in a table of OUTSTANDING entries, serves them through a
// direct-mapped, write-back data cache and reaches global memory over N_AXI
// AXI4 ports in bursts of one cache line.
//
// Request table: one request per cycle is accepted, round-robin over the CU
// ports, into any free entry. Every cycle a waiting entry's age grows by one;
// the oldest entry that may proceed is served first, so requests that are not
// served gain priority as they wait.
// Cache: CACHE_BYTES in lines of LINE_WORDS 32-bit words, direct mapped.
// A hit is answered in the next cycle (loads return data, stores set the line
// dirty and return an ack). A miss starts the tag manager that owns the set
// (set modulo N_TM); the request stays in the table and is served again once
// the line is present. While a tag manager is busy, requests to its sets wait.
// Tag manager t uses AXI port t modulo N_AXI; a port is held by one tag
// manager for a whole miss (write-back burst, then fill burst).
// Flush: flush_start writes every dirty line back; flush_done pulses when all
// write-backs have completed.
// The table size, ageing priority, direct mapping, write-back policy, AXI4
// ports, line bursts and tag managers follow the document. The read banks of
// the document's cache are not modelled: one request is served per cycle.
module gmc
  import fgpu_pkg::*;
#(
  parameter int unsigned N_PORTS     = 8,
  parameter int unsigned OUTSTANDING = 64,
  parameter int unsigned CACHE_BYTES = 8192,
  parameter int unsigned LINE_WORDS  = 16,
  parameter int unsigned N_AXI       = 4,
  parameter int unsigned N_TM        = 16,
  localparam int unsigned WW   = $clog2(LINE_WORDS),
  localparam int unsigned SETS = CACHE_BYTES / (4 * LINE_WORDS),
  localparam int unsigned SETW = $clog2(SETS),
  localparam int unsigned TAGW = 32 - SETW - WW - 2
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic     [N_PORTS-1:0]        req_valid,
  output logic     [N_PORTS-1:0]        req_ready,
  input  mem_req_t [N_PORTS-1:0]        req,
  output logic     [N_PORTS-1:0]        rsp_valid,
  output mem_rsp_t [N_PORTS-1:0]        rsp,
  input  logic                          flush_start,
  output logic                          flush_done,
  // AXI4 master ports
  output logic [N_AXI-1:0]              m_arvalid,
  input  logic [N_AXI-1:0]              m_arready,
  output logic [N_AXI-1:0][31:0]        m_araddr,
  output logic [N_AXI-1:0][7:0]         m_arlen,
  input  logic [N_AXI-1:0]              m_rvalid,
  output logic [N_AXI-1:0]              m_rready,
  input  logic [N_AXI-1:0][31:0]        m_rdata,
  input  logic [N_AXI-1:0]              m_rlast,
  output logic [N_AXI-1:0]              m_awvalid,
  input  logic [N_AXI-1:0]              m_awready,
  output logic [N_AXI-1:0][31:0]        m_awaddr,
  output logic [N_AXI-1:0][7:0]         m_awlen,
  output logic [N_AXI-1:0]              m_wvalid,
  input  logic [N_AXI-1:0]              m_wready,
  output logic [N_AXI-1:0][31:0]        m_wdata,
  output logic [N_AXI-1:0]              m_wlast,
  input  logic [N_AXI-1:0]              m_bvalid,
  output logic [N_AXI-1:0]              m_bready
);
  localparam int unsigned PW  = (N_PORTS > 1) ? $clog2(N_PORTS) : 1;
  localparam int unsigned EW  = $clog2(OUTSTANDING);
  localparam int unsigned TMW = (N_TM > 1) ? $clog2(N_TM) : 1;

  typedef struct packed {
    logic            valid;
    logic [PW-1:0]   port;
    mem_req_t        r;
    logic [7:0]      age;
  } entry_t;

  entry_t          tbl [OUTSTANDING];
  logic [TAGW-1:0] tags  [SETS];
  logic [SETS-1:0] tvalid, tdirty;
  logic [31:0]     data  [SETS * LINE_WORDS];
  logic [PW-1:0]   rr;

  function automatic logic [SETW-1:0] set_of(logic [31:0] a);
    return a[WW+2 +: SETW];
  endfunction
  function automatic logic [TAGW-1:0] tag_of(logic [31:0] a);
    return a[31 -: TAGW];
  endfunction
  function automatic int unsigned tm_of(logic [SETW-1:0] s);
    return int'(s) % N_TM;
  endfunction

  // ---------------- tag managers ----------------
  logic [N_TM-1:0]            tm_start, tm_fill, tm_vdirty, tm_busy, tm_we, tm_done, tm_dfill;
  logic [N_TM-1:0][SETW-1:0]  tm_set, tm_cur;
  logic [N_TM-1:0][TAGW-1:0]  tm_ntag, tm_vtag, tm_dtag;
  logic [N_TM-1:0][WW-1:0]    tm_wbw, tm_fw;
  logic [N_TM-1:0][31:0]      tm_wbd, tm_fd;
  logic [N_TM-1:0]            tm_preq, tm_gnt;
  logic [N_TM-1:0]            t_arvalid, t_arready, t_rvalid, t_rready, t_rlast;
  logic [N_TM-1:0]            t_awvalid, t_awready, t_wvalid, t_wready, t_wlast, t_bvalid, t_bready;
  logic [N_TM-1:0][31:0]      t_araddr, t_awaddr, t_wdata, t_rdata;
  logic [N_TM-1:0][7:0]       t_arlen, t_awlen;

  for (genvar t = 0; t < N_TM; t++) begin : g_tm
    assign tm_wbd[t] = data[{tm_cur[t], tm_wbw[t]}];
    tag_manager #(.LINE_WORDS(LINE_WORDS), .SETW(SETW)) u_tm (
      .clk, .rst_n,
      .start(tm_start[t]), .fill(tm_fill[t]), .set(tm_set[t]), .new_tag(tm_ntag[t]),
      .victim_dirty(tm_vdirty[t]), .victim_tag(tm_vtag[t]),
      .busy(tm_busy[t]), .cur_set(tm_cur[t]),
      .wb_word(tm_wbw[t]), .wb_data(tm_wbd[t]),
      .fill_we(tm_we[t]), .fill_word(tm_fw[t]), .fill_data(tm_fd[t]),
      .done(tm_done[t]), .done_filled(tm_dfill[t]), .done_tag(tm_dtag[t]),
      .port_req(tm_preq[t]), .port_gnt(tm_gnt[t]),
      .arvalid(t_arvalid[t]), .arready(t_arready[t]), .araddr(t_araddr[t]), .arlen(t_arlen[t]),
      .rvalid(t_rvalid[t]), .rready(t_rready[t]), .rdata(t_rdata[t]), .rlast(t_rlast[t]),
      .awvalid(t_awvalid[t]), .awready(t_awready[t]), .awaddr(t_awaddr[t]), .awlen(t_awlen[t]),
      .wvalid(t_wvalid[t]), .wready(t_wready[t]), .wdata(t_wdata[t]), .wlast(t_wlast[t]),
      .bvalid(t_bvalid[t]), .bready(t_bready[t])
    );
  end

  // ---------------- AXI port sharing ----------------
  logic [N_AXI-1:0]           owned;
  logic [N_AXI-1:0][TMW-1:0]  owner;

  always_comb begin
    tm_gnt = '0;
    for (int a = 0; a < N_AXI; a++) begin
      m_arvalid[a] = 1'b0; m_araddr[a] = '0; m_arlen[a] = '0; m_rready[a] = 1'b0;
      m_awvalid[a] = 1'b0; m_awaddr[a] = '0; m_awlen[a] = '0;
      m_wvalid[a] = 1'b0; m_wdata[a] = '0; m_wlast[a] = 1'b0; m_bready[a] = 1'b0;
    end
    for (int t = 0; t < N_TM; t++) begin
      automatic int a = t % N_AXI;
      tm_gnt[t]    = owned[a] && (int'(owner[a]) == t);
      t_arready[t] = tm_gnt[t] && m_arready[a];
      t_rvalid[t]  = tm_gnt[t] && m_rvalid[a];
      t_rdata[t]   = m_rdata[a];
      t_rlast[t]   = m_rlast[a];
      t_awready[t] = tm_gnt[t] && m_awready[a];
      t_wready[t]  = tm_gnt[t] && m_wready[a];
      t_bvalid[t]  = tm_gnt[t] && m_bvalid[a];
      if (tm_gnt[t]) begin
        m_arvalid[a] = t_arvalid[t]; m_araddr[a] = t_araddr[t]; m_arlen[a] = t_arlen[t];
        m_rready[a]  = t_rready[t];
        m_awvalid[a] = t_awvalid[t]; m_awaddr[a] = t_awaddr[t]; m_awlen[a] = t_awlen[t];
        m_wvalid[a]  = t_wvalid[t];  m_wdata[a]  = t_wdata[t];  m_wlast[a] = t_wlast[t];
        m_bready[a]  = t_bready[t];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owned <= '0; owner <= '0;
    end else begin
      for (int a = 0; a < N_AXI; a++) begin
        if (owned[a]) begin
          if (!tm_preq[owner[a]]) owned[a] <= 1'b0;
        end else begin
          for (int t = N_TM - 1; t >= 0; t--) begin
            if ((t % N_AXI) == a && tm_preq[t]) begin
              owned[a] <= 1'b1; owner[a] <= TMW'(t);
            end
          end
        end
      end
    end
  end

  // ---------------- request acceptance ----------------
  logic          acc_ok, free_ok;
  logic [PW-1:0] acc_port;
  logic [EW-1:0] free_idx;

  always_comb begin
    free_ok = 1'b0; free_idx = '0;
    for (int e = OUTSTANDING - 1; e >= 0; e--) if (!tbl[e].valid) begin free_ok = 1'b1; free_idx = EW'(e); end
    acc_ok = 1'b0; acc_port = '0;
    for (int k = N_PORTS - 1; k >= 0; k--) begin
      automatic int p = (int'(rr) + k) % N_PORTS;
      if (req_valid[p]) begin acc_ok = free_ok; acc_port = PW'(p); end
    end
    req_ready = '0;
    if (acc_ok) req_ready[acc_port] = 1'b1;
  end

  // ---------------- selection: oldest eligible entry ----------------
  logic          sel_ok;
  logic [EW-1:0] sel;
  always_comb begin
    sel_ok = 1'b0; sel = '0;
    for (int e = 0; e < OUTSTANDING; e++) begin
      if (tbl[e].valid && !tm_busy[tm_of(set_of(tbl[e].r.addr))] &&
          (!sel_ok || tbl[e].age > tbl[sel].age)) begin
        sel_ok = 1'b1; sel = EW'(e);
      end
    end
  end

  entry_t          s;
  logic [SETW-1:0] s_set;
  logic [TAGW-1:0] s_tag;
  logic [WW-1:0]   s_word;
  logic            s_hit;
  always_comb begin
    s      = tbl[sel];
    s_set  = set_of(s.r.addr);
    s_tag  = tag_of(s.r.addr);
    s_word = s.r.addr[2 +: WW];
    s_hit  = tvalid[s_set] && (tags[s_set] == s_tag);
  end

  // ---------------- flush walker ----------------
  typedef enum logic [1:0] {F_IDLE, F_WALK, F_WAIT} fstate_e;
  fstate_e       fst;
  logic [SETW:0] fptr;
  logic          f_start;
  logic [SETW-1:0] fset;
  assign fset    = fptr[SETW-1:0];
  assign f_start = (fst == F_WALK) && !sel_ok && !fptr[SETW] && tvalid[fset] && tdirty[fset]
                   && !tm_busy[tm_of(fset)];

  // miss start
  logic miss_start;
  assign miss_start = sel_ok && !s_hit;

  always_comb begin
    tm_start = '0; tm_fill = '0; tm_vdirty = '0; tm_set = '0; tm_ntag = '0; tm_vtag = '0;
    for (int t = 0; t < N_TM; t++) begin
      if (miss_start && tm_of(s_set) == t) begin
        tm_start[t] = 1'b1; tm_fill[t] = 1'b1; tm_set[t] = s_set; tm_ntag[t] = s_tag;
        tm_vdirty[t] = tvalid[s_set] && tdirty[s_set]; tm_vtag[t] = tags[s_set];
      end else if (f_start && tm_of(fset) == t) begin
        tm_start[t] = 1'b1; tm_fill[t] = 1'b0; tm_set[t] = fset; tm_ntag[t] = tags[fset];
        tm_vdirty[t] = 1'b1; tm_vtag[t] = tags[fset];
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int t = 0; t < N_TM; t++)
      if (tm_we[t]) data[{tm_cur[t], tm_fw[t]}] <= tm_fd[t];
    if (sel_ok && s_hit && s.r.we) data[{s_set, s_word}] <= s.r.wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < OUTSTANDING; e++) tbl[e] <= '0;
      for (int i = 0; i < SETS; i++) tags[i] <= '0;
      tvalid <= '0; tdirty <= '0; rr <= '0;
      rsp_valid <= '0; rsp <= '0;
      fst <= F_IDLE; fptr <= '0; flush_done <= 1'b0;
    end else begin
      // ageing
      for (int e = 0; e < OUTSTANDING; e++)
        if (tbl[e].valid && tbl[e].age != 8'hFF) tbl[e].age <= tbl[e].age + 8'd1;
      // accept
      if (acc_ok) begin
        tbl[free_idx].valid <= 1'b1;
        tbl[free_idx].port  <= acc_port;
        tbl[free_idx].r     <= req[acc_port];
        tbl[free_idx].age   <= '0;
        rr <= PW'((int'(acc_port) + 1) % N_PORTS);
      end
      // serve a hit
      rsp_valid <= '0;
      if (sel_ok && s_hit) begin
        tbl[sel].valid        <= 1'b0;
        rsp_valid[s.port]     <= 1'b1;
        rsp[s.port].tag       <= s.r.tag;
        rsp[s.port].rdata     <= s.r.we ? '0 : data[{s_set, s_word}];
        if (s.r.we) tdirty[s_set] <= 1'b1;
      end
      // line filled or written back
      for (int t = 0; t < N_TM; t++) begin
        if (tm_done[t]) begin
          tdirty[tm_cur[t]] <= 1'b0;
          if (tm_dfill[t]) begin
            tvalid[tm_cur[t]] <= 1'b1;
            tags[tm_cur[t]]   <= tm_dtag[t];
          end
        end
      end
      // flush
      flush_done <= 1'b0;
      unique case (fst)
        F_IDLE: if (flush_start) begin fst <= F_WALK; fptr <= '0; end
        F_WALK: begin
          if (fptr[SETW]) fst <= F_WAIT;
          else if (!sel_ok && (f_start || !(tvalid[fset] && tdirty[fset]))) fptr <= fptr + 1'b1;
        end
        F_WAIT: if (tm_busy == '0 && tm_done == '0) begin fst <= F_IDLE; flush_done <= 1'b1; end
        default: fst <= F_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(rsp_valid));
endmodule
