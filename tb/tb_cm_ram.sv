// tb_cm_ram: self-checking test of cm_ram (map node storage).
// Fills the whole array with address-dependent values, reads every word back
// (data one clock after the address), overwrites random words and re-reads
// them, and checks read-during-write returns the old word.
module tb_cm_ram;
  localparam int DEPTH = 32 + 32 + 32 * 32;
  localparam int AW = $clog2(DEPTH);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic          we;
  logic [AW-1:0] waddr, raddr;
  logic [31:0]   wdata, rdata;
  logic [31:0]   model [DEPTH];

  cm_ram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  function automatic logic [31:0] pat(input int a);
    return 32'(a) * 32'h9E37_79B9 ^ 32'h1234_5678;
  endfunction

  task automatic rd(input int a);
    @(negedge clk); raddr = AW'(a); we = 1'b0;
    @(negedge clk);
    checks++;
    if (rdata !== model[a]) begin failures++; $display("FAIL addr %0d: %h exp %h", a, rdata, model[a]); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1'b1; waddr = AW'(a); wdata = pat(a); model[a] = pat(a);
    end
    @(negedge clk); we = 1'b0;
    for (int a = 0; a < DEPTH; a++) rd(a);
    for (int i = 0; i < 500; i++) begin
      int a;
      a = int'($urandom_range(DEPTH - 1));
      @(negedge clk); we = 1'b1; waddr = AW'(a); wdata = $urandom; raddr = AW'(a);
      @(negedge clk); we = 1'b0;
      checks++;   // read during write gives the old word
      if (rdata !== model[a]) begin failures++; $display("FAIL read-during-write %0d", a); end
      model[a] = wdata;
      rd(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
