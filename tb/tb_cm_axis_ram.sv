// tb_cm_axis_ram: self-checking test of cm_axis_ram (fast axis node RAM).
// Writes all N words, then reads random addresses on the three asynchronous
// ports at once (data valid in the same clock), including overwrites.
module tb_cm_axis_ram;
  localparam int N = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        we;
  logic [4:0]  waddr, ra, rb, rc;
  logic [31:0] wdata, da, db, dc;
  logic [31:0] model [N];

  cm_axis_ram dut (.clk, .we, .waddr, .wdata, .raddr_a(ra), .rdata_a(da),
                   .raddr_b(rb), .rdata_b(db), .raddr_c(rc), .rdata_c(dc));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; ra = 0; rb = 0; rc = 0;
    for (int a = 0; a < N; a++) begin
      @(negedge clk); we = 1'b1; waddr = 5'(a); wdata = $urandom; model[a] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (i % 7 == 0) begin
        we = 1'b1; waddr = 5'($urandom); wdata = $urandom;
      end else we = 1'b0;
      ra = 5'($urandom); rb = 5'($urandom); rc = rb + 1'b1;
      #1;
      checks += 3;
      if (da !== model[ra]) begin failures++; $display("FAIL port a %0d", ra); end
      if (db !== model[rb]) begin failures++; $display("FAIL port b %0d", rb); end
      if (dc !== model[rc]) begin failures++; $display("FAIL port c %0d", rc); end
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
