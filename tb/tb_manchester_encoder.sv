// tb_manchester_encoder: self-checking test of manchester_encoder.
// The line is recorded clock by clock and decoded here: idle low, a rising edge
// opens the start bit, and every bit must be H clocks of ~b followed by H clocks
// of b (IEEE 802.3 convention), MSB first, start bit 0. The 40 bits must equal
// {header, payload}; the busy time must be (41 + 1) bit periods, and a send
// while busy must be ignored.
module tb_manchester_encoder;
  localparam int H = 4;
  localparam int NB = 41;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        send, busy, tx;
  logic [7:0]  header;
  logic [31:0] payload;

  manchester_encoder dut (.clk, .rst_n, .send, .header, .payload, .busy, .tx);

  task automatic frame(input logic [7:0] hd, input logic [31:0] pl);
    logic line [$];
    int   t0, busy_clks;
    logic [40:0] exp_bits;
    @(negedge clk);
    send = 1'b1; header = hd; payload = pl;
    @(negedge clk);
    send = 1'b0;
    busy_clks = 0;
    // a second send while busy must be ignored
    send = 1'b1; header = ~hd; payload = ~pl;
    @(negedge clk); send = 1'b0;
    busy_clks = 1;
    line.push_back(tx);
    while (busy) begin
      @(negedge clk);
      line.push_back(tx);
      busy_clks++;
    end
    repeat (3 * H) begin @(negedge clk); line.push_back(tx); end
    checks++;
    if (busy_clks != (NB + 1) * 2 * H) begin
      failures++; $display("FAIL busy for %0d clocks, expected %0d", busy_clks, (NB + 1) * 2 * H);
    end
    t0 = -1;
    for (int i = 0; i < line.size(); i++) if (line[i] && t0 < 0) t0 = i;
    exp_bits = {1'b0, hd, pl};
    for (int k = 0; k < NB; k++) begin
      logic b;
      b = exp_bits[NB - 1 - k];
      checks++;
      for (int j = 0; j < H; j++) begin
        if (line[t0 + 2 * k * H + j] !== ~b || line[t0 + 2 * k * H + H + j] !== b) begin
          failures++;
          $display("FAIL bit %0d of frame %h_%h", k, hd, pl);
          break;
        end
      end
    end
    checks++;
    for (int i = t0 + 2 * NB * H; i < line.size(); i++)
      if (line[i]) begin failures++; $display("FAIL line not idle after frame"); break; end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    send = 0; header = 0; payload = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    checks++; if (tx || busy) begin failures++; $display("FAIL not idle after reset"); end
    frame(8'h01, 32'h8000_0001);
    frame(8'hA5, 32'hFFFF_FFFF);
    frame(8'h00, 32'h0000_0000);
    for (int i = 0; i < 30; i++) frame(8'($urandom), $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
