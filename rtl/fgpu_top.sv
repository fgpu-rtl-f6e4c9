// fgpu_top: FGPU, a GPU-like soft processor that runs OpenCL-style kernels in
// the SIMT model. A host loads the kernel binary into the Code RAM and the
// launch information and parameters into the Link RAM through the AXI4-Lite
// control port, then starts it. The work-group dispatcher hands work-groups to
// N_CU compute units; each compute unit runs up to 8 wavefronts of 64
// work-items on 8 PEs. All global-memory accesses go through the global
// memory controller, whose write-back cache reaches external memory over
// N_AXI AXI4 master ports in line-sized bursts. At the end of a kernel the
// cache is written back and `done` is raised (also readable at 0x0000).
// Defaults follow the document's largest configuration (8 CUs, 64 outstanding
// requests in the memory controller, 8 KB cache, 4 AXI4 ports, 16 tag
// managers, CU limit of 32 outstanding requests). Code RAM depth, Link RAM
// depth and line size are this design's choices. One clock domain.
module fgpu_top
  import fgpu_pkg::*;
#(
  parameter int unsigned N_CU            = 8,
  parameter int unsigned CRAM_DEPTH      = 1024,
  parameter int unsigned LRAM_DEPTH      = 32,
  parameter int unsigned CU_OUTSTANDING  = 32,
  parameter int unsigned GMC_OUTSTANDING = 64,
  parameter int unsigned CACHE_BYTES     = 8192,
  parameter int unsigned LINE_WORDS      = 16,
  parameter int unsigned N_AXI           = 4,
  parameter int unsigned N_TM            = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // AXI4-Lite control slave
  input  logic                   s_awvalid,
  output logic                   s_awready,
  input  logic [15:0]            s_awaddr,
  input  logic                   s_wvalid,
  output logic                   s_wready,
  input  logic [31:0]            s_wdata,
  output logic                   s_bvalid,
  input  logic                   s_bready,
  input  logic                   s_arvalid,
  output logic                   s_arready,
  input  logic [15:0]            s_araddr,
  output logic                   s_rvalid,
  input  logic                   s_rready,
  output logic [31:0]            s_rdata,
  output logic                   done,
  // AXI4 data masters to global memory
  output logic [N_AXI-1:0]       m_arvalid,
  input  logic [N_AXI-1:0]       m_arready,
  output logic [N_AXI-1:0][31:0] m_araddr,
  output logic [N_AXI-1:0][7:0]  m_arlen,
  input  logic [N_AXI-1:0]       m_rvalid,
  output logic [N_AXI-1:0]       m_rready,
  input  logic [N_AXI-1:0][31:0] m_rdata,
  input  logic [N_AXI-1:0]       m_rlast,
  output logic [N_AXI-1:0]       m_awvalid,
  input  logic [N_AXI-1:0]       m_awready,
  output logic [N_AXI-1:0][31:0] m_awaddr,
  output logic [N_AXI-1:0][7:0]  m_awlen,
  output logic [N_AXI-1:0]       m_wvalid,
  input  logic [N_AXI-1:0]       m_wready,
  output logic [N_AXI-1:0][31:0] m_wdata,
  output logic [N_AXI-1:0]       m_wlast,
  input  logic [N_AXI-1:0]       m_bvalid,
  output logic [N_AXI-1:0]       m_bready
);
  localparam int unsigned PCW     = $clog2(CRAM_DEPTH);
  localparam int unsigned LRAM_AW = $clog2(LRAM_DEPTH);

  logic               cram_we, lram_we, start, busy;
  logic [PCW-1:0]     cram_waddr;
  logic [LRAM_AW-1:0] lram_waddr;
  logic [31:0]        wdata, kstart;
  idx3_t              gsize, wgsize;

  ctrl_axil #(.CRAM_AW(PCW), .LRAM_AW(LRAM_AW)) u_ctrl (
    .clk, .rst_n,
    .s_awvalid, .s_awready, .s_awaddr, .s_wvalid, .s_wready, .s_wdata, .s_bvalid, .s_bready,
    .s_arvalid, .s_arready, .s_araddr, .s_rvalid, .s_rready, .s_rdata,
    .cram_we, .cram_waddr, .lram_we, .lram_waddr, .wdata, .start, .busy, .done
  );

  logic [N_CU-1:0][PCW-1:0]     cram_raddr;
  logic [N_CU-1:0][31:0]        cram_rdata, lram_rdata;
  logic [N_CU-1:0][LRAM_AW-1:0] lram_raddr;

  cram #(.DEPTH(CRAM_DEPTH), .N_RD(N_CU)) u_cram (
    .clk, .we(cram_we), .waddr(cram_waddr), .wdata, .raddr(cram_raddr), .rdata(cram_rdata)
  );
  lram #(.DEPTH(LRAM_DEPTH), .N_RD(N_CU)) u_lram (
    .clk, .we(lram_we), .waddr(lram_waddr), .wdata, .raddr(lram_raddr), .rdata(lram_rdata),
    .kstart, .gsize, .wgsize
  );

  logic [N_CU-1:0] alloc_valid, alloc_ready, cu_idle;
  idx3_t           alloc_wg_offset;
  logic [3:0]      wg_lg0, wg_lg1;
  logic [3:0]      alloc_n_wf;
  logic [PCW-1:0]  alloc_pc;
  logic            flush_start, flush_done;

  wg_dispatcher #(.N_CU(N_CU), .PCW(PCW)) u_disp (
    .clk, .rst_n, .start, .kstart, .gsize, .wgsize,
    .alloc_valid, .alloc_ready, .alloc_wg_offset, .alloc_n_wf, .alloc_pc, .wg_lg0, .wg_lg1,
    .cu_idle, .flush_start, .flush_done, .busy, .done
  );

  logic     [N_CU-1:0] req_valid, req_ready, rsp_valid;
  mem_req_t [N_CU-1:0] req;
  mem_rsp_t [N_CU-1:0] rsp;

  for (genvar c = 0; c < N_CU; c++) begin : g_cu
    cu #(.PCW(PCW), .LRAM_AW(LRAM_AW), .OUTSTANDING(CU_OUTSTANDING)) u_cu (
      .clk, .rst_n,
      .alloc_valid(alloc_valid[c]), .alloc_ready(alloc_ready[c]),
      .alloc_wg_offset, .alloc_n_wf, .alloc_pc, .wg_lg0, .wg_lg1,
      .cram_raddr(cram_raddr[c]), .cram_rdata(cram_rdata[c]),
      .lram_raddr(lram_raddr[c]), .lram_rdata(lram_rdata[c]),
      .req_valid(req_valid[c]), .req_ready(req_ready[c]), .req(req[c]),
      .rsp_valid(rsp_valid[c]), .rsp(rsp[c]), .idle(cu_idle[c])
    );
  end

  gmc #(.N_PORTS(N_CU), .OUTSTANDING(GMC_OUTSTANDING), .CACHE_BYTES(CACHE_BYTES),
        .LINE_WORDS(LINE_WORDS), .N_AXI(N_AXI), .N_TM(N_TM)) u_gmc (
    .clk, .rst_n, .req_valid, .req_ready, .req, .rsp_valid, .rsp,
    .flush_start, .flush_done,
    .m_arvalid, .m_arready, .m_araddr, .m_arlen, .m_rvalid, .m_rready, .m_rdata, .m_rlast,
    .m_awvalid, .m_awready, .m_awaddr, .m_awlen, .m_wvalid, .m_wready, .m_wdata, .m_wlast,
    .m_bvalid, .m_bready
  );
endmodule
