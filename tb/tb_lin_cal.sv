// tb_lin_cal: self-checking test of lin_cal (out = GCC*in + OCC).
// A random stream, one sample per clock, with changing constants, is compared
// two clocks later with the expected value: floor(in*GCC / 2^14) + OCC,
// saturated to 16 bits. Identity, pure offset and saturation cases included.
module tb_lin_cal;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic               iv, ov;
  logic signed [15:0] din, gcc, occ, dout;
  longint             expq [$];

  lin_cal dut (.clk, .rst_n, .in_valid(iv), .in_data(din), .gcc, .occ, .out_valid(ov), .out_data(dout));

  function automatic longint ref_cal(input longint x, input longint g, input longint o);
    longint p, r;
    p = x * g;
    r = (p >= 0) ? p / 16384 : -((-p + 16383) / 16384);   // floor division
    r = r + o;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: compare every output with the queue
  always @(posedge clk) begin
    if (rst_n && ov) begin
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        longint e;
        e = expq.pop_front();
        if (longint'(dout) != e) begin failures++; $display("FAIL got %0d exp %0d", dout, e); end
      end
    end
  end

  // a sample entered at clock k must appear at clock k+2
  int sent = 0, got_at2 = 0;
  logic v_d1, v_d2;
  always @(posedge clk) begin
    v_d1 <= iv; v_d2 <= v_d1;
  end

  task automatic send(input logic signed [15:0] x, input logic signed [15:0] g, input logic signed [15:0] o);
    @(negedge clk);
    iv = 1'b1; din = x; gcc = g; occ = o;
    expq.push_back(ref_cal(x, g, o));
    sent++;
  endtask

  initial begin
    iv = 0; din = 0; gcc = 16384; occ = 0;
    v_d1 = 0; v_d2 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    send(16'sd1234, 16'sd16384, 16'sd0);          // identity
    send(-16'sd1234, 16'sd16384, 16'sd0);
    send(16'sd1000, 16'sd16384, -16'sd37);         // offset only
    send(16'sd30000, 16'sd18022, 16'sd100);        // saturates high
    send(-16'sd30000, 16'sd18022, -16'sd100);      // saturates low
    send(16'sd8192, 16'sd16220, 16'sd12);
    for (int i = 0; i < 3000; i++)
      send(16'($urandom), 16'sd16384 + 16'($signed(12'($urandom))), 16'($signed(10'($urandom))));
    @(negedge clk); iv = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d outputs missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency: out_valid must equal in_valid delayed by two clocks
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (ov !== v_d2) begin failures++; $display("FAIL latency"); end
  end
endmodule
