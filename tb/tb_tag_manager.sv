// tb_tag_manager: drives one tag manager against a small AXI4 memory model
// and a model of its cache line. Cases: a miss with a dirty victim (write-back
// burst of the old line, then fill burst of the new one), a miss with a clean
// victim (fill only) and a flush write-back (no fill). Checks burst addresses
// and lengths, written and filled data, the done pulse and its tag, that
// nothing is driven on AXI before the port is granted, and that the port is
// requested until the miss is done.
module tb_tag_manager;
  localparam int unsigned LW = 16, SETW = 7, TAGW = 32 - SETW - 4 - 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, fill = 0, victim_dirty = 0, busy, fill_we, done, done_filled, port_req, port_gnt = 0;
  logic [SETW-1:0] set = 0, cur_set;
  logic [TAGW-1:0] new_tag = 0, victim_tag = 0, done_tag;
  logic [3:0] wb_word, fill_word;
  logic [31:0] wb_data, fill_data;
  logic arvalid, arready, rvalid, rready, rlast, awvalid, awready, wvalid, wready, wlast, bvalid, bready;
  logic [31:0] araddr, awaddr, wdata, rdata;
  logic [7:0] arlen, awlen;

  tag_manager #(.LINE_WORDS(LW), .SETW(SETW)) dut (.*);

  logic [31:0] line [LW];
  assign wb_data = line[wb_word];
  always @(posedge clk) if (fill_we) line[fill_word] <= fill_data;

  // AXI4 slave model over a word map
  logic [31:0] mem [int];
  logic [31:0] ra, wa;
  int rc = 0, n_aw = 0, n_ar = 0, n_done = 0;
  logic rbusy = 0, wbusy = 0;
  assign arready = !rbusy;
  assign rvalid  = rbusy;
  assign rdata   = mem.exists(ra) ? mem[ra] : ~ra;
  assign rlast   = (rc == LW - 1);
  assign awready = !wbusy && !bvalid;
  assign wready  = wbusy;
  initial bvalid = 0;
  always @(posedge clk) begin
    if (arvalid && arready) begin rbusy <= 1; ra <= araddr; rc <= 0; n_ar++; end
    else if (rvalid && rready) begin ra <= ra + 4; rc <= rc + 1; if (rlast) rbusy <= 0; end
    if (awvalid && awready) begin wbusy <= 1; wa <= awaddr; n_aw++; end
    else if (wvalid && wready) begin mem[wa] = wdata; wa <= wa + 4; if (wlast) begin wbusy <= 0; bvalid <= 1; end end
    if (bvalid && bready) bvalid <= 0;
    if (done) n_done++;
    if (!port_gnt && (arvalid || awvalid || wvalid || rready || bready)) begin
      failures++; $display("FAIL AXI driven without grant");
    end
  end

  task automatic chk(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0h vs %0h", what, got, exp); end
  endtask

  function automatic logic [31:0] la(logic [TAGW-1:0] t, logic [SETW-1:0] s, int w);
    return {t, s, 4'(w), 2'b00};
  endfunction

  task automatic miss(input bit f, input bit dirty, input int s, input int nt, input int vt);
    logic [31:0] old [LW];
    for (int w = 0; w < LW; w++) begin line[w] = $urandom; old[w] = line[w]; end
    for (int w = 0; w < LW; w++) mem[la(TAGW'(nt), SETW'(s), w)] = 32'hF000_0000 + 32'(w * 17 + nt);
    n_aw = 0; n_ar = 0; n_done = 0;
    @(negedge clk);
    start = 1; fill = f; victim_dirty = dirty; set = SETW'(s); new_tag = TAGW'(nt); victim_tag = TAGW'(vt);
    @(negedge clk); start = 0;
    chk(busy, 1, "busy"); chk(port_req, 1, "port requested");
    repeat (3) @(negedge clk);          // grant arrives late
    port_gnt = 1;
    if (dirty) begin
      wait (awvalid); #1;
      chk(awaddr, la(TAGW'(vt), SETW'(s), 0), "awaddr"); chk(awlen, LW - 1, "awlen");
    end
    if (f) begin
      wait (arvalid); #1;
      chk(araddr, la(TAGW'(nt), SETW'(s), 0), "araddr"); chk(arlen, LW - 1, "arlen");
    end
    wait (done);
    chk(done_tag, nt, "done_tag"); chk(done_filled, f, "done_filled"); chk(cur_set, s, "cur_set");
    @(negedge clk);
    chk(port_req, 0, "port released");
    @(negedge clk);
    chk(busy, 0, "idle");
    port_gnt = 0;
    chk(n_done, 1, "one done pulse");
    chk(n_aw, dirty, "write bursts"); chk(n_ar, f, "read bursts");
    if (dirty) for (int w = 0; w < LW; w++) chk(mem[la(TAGW'(vt), SETW'(s), w)], old[w], "written back");
    if (f) for (int w = 0; w < LW; w++) chk(line[w], 32'hF000_0000 + 32'(w * 17 + nt), "filled");
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    miss(1, 1, 5, 123, 77);
    miss(1, 0, 100, 9, 4);
    miss(0, 1, 33, 55, 55);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
