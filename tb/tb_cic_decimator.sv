// tb_cic_decimator: self-checking test of cic_decimator at its default sizes
// (R = 400, N = 3, 14 -> 16 bit).
// Checks: the output rate is exactly one sample per R valid inputs (also with
// gaps in in_valid); a settled DC input d gives 4*d (the 14 -> 16 bit scaling)
// at several levels including both full-scale ends; an input alternating at
// half the input rate (a zero of the CIC response) gives exactly 0.
module tb_cic_decimator;
  localparam int R = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic               iv, ov;
  logic signed [13:0] din;
  logic signed [15:0] dout;
  int                 n_in, n_out;

  cic_decimator dut (.clk, .rst_n, .in_valid(iv), .in_data(din), .out_valid(ov), .out_data(dout));

  always @(posedge clk) if (rst_n) begin
    if (iv) n_in++;
    if (ov) n_out++;
  end

  // Feed n samples of a pattern; check the last k outputs against exp.
  task automatic feed(input int n, input int mode, input int level, input bit gaps,
                      input int k, input int exp);
    int outs [$];
    int sent, c;
    sent = 0; c = 0;
    while (sent < n) begin
      @(negedge clk);
      iv  = !(gaps && c[1]);
      din = 14'((mode == 1 && sent[0]) ? -level : level);
      if (iv) sent++;
      c++;
      @(posedge clk);
      #1 if (ov) outs.push_back(int'(dout));
    end
    @(negedge clk); iv = 1'b0;
    repeat (6) begin @(posedge clk); #1 if (ov) outs.push_back(int'(dout)); end
    for (int j = 0; j < k; j++) begin
      checks++;
      if (outs[outs.size() - 1 - j] != exp) begin
        failures++;
        $display("FAIL level %0d mode %0d: got %0d expected %0d", level, mode, outs[outs.size() - 1 - j], exp);
      end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iv = 0; din = 0; n_in = 0; n_out = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    feed(8 * R, 0, 1000, 1'b0, 3, 4000);
    feed(8 * R, 0, -8192, 1'b0, 3, -32768);
    feed(8 * R, 0, 8191, 1'b0, 3, 32764);
    feed(8 * R, 0, -777, 1'b1, 3, -3108);      // with gaps in in_valid
    feed(8 * R, 1, 3000, 1'b0, 3, 0);          // alternating: CIC zero
    feed(8 * R, 0, 0, 1'b0, 2, 0);
    checks++;
    if (n_out != n_in / R) begin
      failures++; $display("FAIL rate: %0d outputs for %0d inputs", n_out, n_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
