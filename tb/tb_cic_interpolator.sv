// tb_cic_interpolator: self-checking test of cic_interpolator at its default
// sizes (R = 400, N = 3, 16 -> 14 bit), one input every R clocks.
// Checks: a settled DC input d gives d/4 on every clock (the 16 -> 14 bit
// scaling), for several levels, with saturation at full scale; a step between
// levels is followed smoothly and monotonically, with new values on most clocks
// (the output runs at the full clock rate).
module tb_cic_interpolator;
  localparam int R = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic               iv;
  logic signed [15:0] din;
  logic signed [13:0] dout;

  cic_interpolator dut (.clk, .rst_n, .in_valid(iv), .in_data(din), .out_data(dout));

  // Hold level for n input periods; record outputs.
  task automatic hold(input int n, input int level, output int outs [$]);
    outs = {};
    for (int i = 0; i < n * R; i++) begin
      @(negedge clk);
      iv  = (i % R == 0);
      din = 16'(level);
      @(posedge clk); #1 outs.push_back(int'(dout));
    end
    @(negedge clk); iv = 1'b0;
  endtask

  task automatic check_dc(input int level, input int exp);
    int outs [$];
    hold(8, level, outs);
    for (int j = 1; j <= 2 * R; j++) begin
      checks++;
      if (outs[outs.size() - j] != exp) begin
        failures++;
        $display("FAIL level %0d: got %0d expected %0d", level, outs[outs.size() - j], exp);
        break;
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int outs [$];
    int between, changes;
    bit mono;
    iv = 0; din = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check_dc(16384, 4096);
    check_dc(-20000, -5000);
    check_dc(32767, 8191);      // 8191.75 saturates
    check_dc(-32768, -8192);
    check_dc(1000, 250);
    // step from 250 to 4096: monotonic and smooth
    hold(6, 16384, outs);
    between = 0; changes = 0; mono = 1'b1;
    for (int j = 1; j < outs.size(); j++) begin
      if (outs[j] < outs[j-1]) mono = 1'b0;
      if (outs[j] != outs[j-1]) changes++;
      if (outs[j] > 250 && outs[j] < 4096) between++;
    end
    checks += 3;
    if (!mono) begin failures++; $display("FAIL step not monotonic"); end
    if (between < R) begin failures++; $display("FAIL step too abrupt (%0d)", between); end
    if (changes < R) begin failures++; $display("FAIL output not at clock rate (%0d)", changes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
