// ctrl_axil: AXI4-Lite control interface through which a host loads and
// starts FGPU. Address map (byte addresses, 32-bit words):
//   0x0000          control/status: write bit0=1 starts the kernel;
//                   read returns {done, busy} in bits [1:0]
//   0x1000-0x1FFF   Link RAM words (launch information and parameters)
//   0x2000-0x3FFF   Code RAM words (kernel binary)
// A write is taken when address and data are both valid; the response follows
// in the next cycle. A read answers in the next cycle; RAM regions read as 0.
// The document names an AXI control interface; the map is this design's own.
module ctrl_axil #(
  parameter int unsigned CRAM_AW = 10,
  parameter int unsigned LRAM_AW = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               s_awvalid,
  output logic               s_awready,
  input  logic [15:0]        s_awaddr,
  input  logic               s_wvalid,
  output logic               s_wready,
  input  logic [31:0]        s_wdata,
  output logic               s_bvalid,
  input  logic               s_bready,
  input  logic               s_arvalid,
  output logic               s_arready,
  input  logic [15:0]        s_araddr,
  output logic               s_rvalid,
  input  logic               s_rready,
  output logic [31:0]        s_rdata,
  // to the RAMs and the dispatcher
  output logic               cram_we,
  output logic [CRAM_AW-1:0] cram_waddr,
  output logic               lram_we,
  output logic [LRAM_AW-1:0] lram_waddr,
  output logic [31:0]        wdata,
  output logic               start,
  input  logic               busy,
  input  logic               done
);
  logic wr;
  assign wr        = s_awvalid && s_wvalid && !s_bvalid;
  assign s_awready = wr;
  assign s_wready  = wr;
  assign s_arready = !s_rvalid;

  assign wdata      = s_wdata;
  assign cram_waddr = s_awaddr[2 +: CRAM_AW];
  assign lram_waddr = s_awaddr[2 +: LRAM_AW];
  assign cram_we    = wr && (s_awaddr[15:13] == 3'b001);
  assign lram_we    = wr && (s_awaddr[15:12] == 4'h1);
  assign start      = wr && (s_awaddr[15:12] == 4'h0) && s_wdata[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_bvalid <= 1'b0; s_rvalid <= 1'b0; s_rdata <= '0;
    end else begin
      if (wr) s_bvalid <= 1'b1;
      else if (s_bready) s_bvalid <= 1'b0;
      if (s_arvalid && s_arready) begin
        s_rvalid <= 1'b1;
        s_rdata  <= (s_araddr[15:12] == 4'h0) ? {30'd0, done, busy} : 32'd0;
      end else if (s_rready) s_rvalid <= 1'b0;
    end
  end
endmodule
