// tb_regfile: random writes on both write ports and random reads on all three
// read ports against a model array; register 0 of every work-item reads 0.
module tb_regfile;
  localparam int unsigned AW = 11;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [AW-1:0] ra = 0, rb = 0, rc = 0, wa0 = 0, wa1 = 0;
  logic [31:0] da, db, dc, wd0 = 0, wd1 = 0;
  logic we0 = 0, we1 = 0;
  logic [31:0] model [2**AW];

  regfile dut (.clk, .ra, .rb, .rc, .da, .db, .dc, .we0, .wa0, .wd0, .we1, .wa1, .wd1);

  function automatic logic [31:0] expv(logic [AW-1:0] a);
    return (a[4:0] == 0) ? 32'd0 : model[a];
  endfunction

  initial begin
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk); we0 = 1; wa0 = AW'(i); wd0 = $urandom; model[i] = wd0;
    end
    @(negedge clk); we0 = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      we0 = $urandom_range(0, 1); wa0 = AW'($urandom); wd0 = $urandom;
      we1 = $urandom_range(0, 1); wa1 = AW'($urandom); wd1 = $urandom;
      if (we1 && we0 && wa1 == wa0) we1 = 0;
      ra = AW'($urandom); rb = AW'($urandom); rc = AW'($urandom);
      if (t % 5 == 0) ra[4:0] = 0;
      #1;
      checks += 3;
      if (da !== expv(ra)) begin failures++; $display("FAIL ra %0d", ra); end
      if (db !== expv(rb)) begin failures++; $display("FAIL rb %0d", rb); end
      if (dc !== expv(rc)) begin failures++; $display("FAIL rc %0d", rc); end
      @(posedge clk);
      if (we0) model[wa0] = wd0;
      if (we1) model[wa1] = wd1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10_000_000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
