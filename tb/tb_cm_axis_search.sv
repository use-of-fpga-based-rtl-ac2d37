// tb_cm_axis_search: self-checking test of cm_axis_search.
// Random ascending float node lists (non-equidistant, negative and positive)
// are held in a model RAM; random values, values equal to nodes and values
// outside the range are searched. The index must be the largest i <= N-2 with
// node[i] <= value (0 below the range), found by a linear scan here, and done
// must come exactly log2(N) = 5 clocks after start for every value.
module tb_cm_axis_search;
  import tb_f32_pkg::*;
  localparam int N = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        start, busy, done;
  logic [31:0] value, rdata;
  logic [4:0]  raddr, index;
  logic [31:0] nodes [N];
  real         rn [N];

  assign rdata = nodes[raddr];

  cm_axis_search dut (.clk, .rst_n, .start, .value, .raddr, .rdata, .busy, .done, .index);

  task automatic search(input real v);
    int exp, lat;
    exp = 0;
    for (int i = 0; i < N - 1; i++) if (rn[i] <= f2r(r2f(v))) exp = i;
    @(negedge clk); start = 1'b1; value = r2f(v);
    @(negedge clk); start = 1'b0; value = 32'h0;
    lat = 1;
    while (!done && lat < 100) begin @(negedge clk); lat++; end
    checks += 2;
    if (lat != 5) begin failures++; $display("FAIL latency %0d", lat); end
    if (int'(index) != exp) begin failures++; $display("FAIL value %f: index %0d expected %0d", v, index, exp); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real x;
    start = 0; value = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20; t++) begin
      x = -100.0 * $urandom_range(100) / 10.0;
      for (int i = 0; i < N; i++) begin
        x = x + 0.01 + $urandom_range(1000) / 100.0;
        nodes[i] = r2f(x);
        rn[i] = f2r(nodes[i]);
      end
      search(rn[0] - 1.0);
      search(rn[N-1] + 1.0);
      search(rn[N-1]);
      search(rn[0]);
      for (int i = 0; i < N; i++) search(rn[i]);
      for (int i = 0; i < 40; i++)
        search(rn[0] + (rn[N-1] - rn[0]) * $urandom_range(10000) / 10000.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
