// tb_manchester_decoder: self-checking test of manchester_decoder.
// The line is generated here (idle low, start bit 0, 40 bits MSB first, '0' =
// high/low, '1' = low/high, H = 4 clocks per half bit) with random idle gaps.
// Every frame must be reported once with the right header and payload and no
// code error; frames with a missing mid-bit transition must set code_err.
module tb_manchester_decoder;
  localparam int H = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        rx, fv, err;
  logic [7:0]  header;
  logic [31:0] payload;
  int          nframes;

  manchester_decoder dut (.clk, .rst_n, .rx, .frame_valid(fv), .header, .payload, .code_err(err));

  always @(posedge clk) if (rst_n && fv) nframes++;

  task automatic line_frame(input logic [39:0] f, input int bad);
    logic [40:0] bits;
    bits = {1'b0, f};
    for (int k = 0; k < 41; k++) begin
      logic b;
      b = bits[40 - k];
      repeat (H) begin @(negedge clk); rx = ~b; end
      repeat (H) begin @(negedge clk); rx = (k == bad) ? ~b : b; end
    end
    @(negedge clk); rx = 1'b0;
  endtask

  task automatic frame(input logic [7:0] hd, input logic [31:0] pl, input int bad);
    int n0;
    n0 = nframes;
    repeat (2 * H + int'($urandom_range(13))) @(negedge clk);
    line_frame({hd, pl}, bad);
    repeat (4 * H) @(negedge clk);
    checks++;
    if (nframes != n0 + 1) begin failures++; $display("FAIL %0d frames reported", nframes - n0); end
    checks++;
    if (bad < 0) begin
      if (err || header !== hd || payload !== pl) begin
        failures++; $display("FAIL frame %h_%h got %h_%h err %0d", hd, pl, header, payload, err);
      end
    end else if (!err) begin
      failures++; $display("FAIL code error at bit %0d not flagged", bad);
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
    rx = 0; nframes = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    frame(8'h01, 32'h8000_0001, -1);
    frame(8'hFF, 32'hFFFF_FFFF, -1);
    frame(8'h00, 32'h0000_0000, -1);
    for (int i = 0; i < 40; i++) frame(8'($urandom), $urandom, -1);
    frame(8'h12, 32'h3456_789A, 0);     // broken start bit
    frame(8'h12, 32'h3456_789A, 20);
    frame(8'h12, 32'h3456_789A, 40);
    frame(8'h5A, 32'hDEAD_BEEF, -1);    // recovers after errors
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
