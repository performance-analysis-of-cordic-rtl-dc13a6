// tb_cordic_folded: seven-iteration folded cores, 32-bit and 16-bit, run
// through random rotation-mode operations (|z0| < pi/2, sqrt(x0^2 + y0^2) within the
// gain headroom). Each result, read while done is high, is compared
// bit-exactly with the reference recurrence; done must come exactly 7 rising
// edges after (and counting) the edge that sampled start, and a start pulse
// while busy must not disturb the running operation.
module tb_cordic_folded;
  import cordic_ref_pkg::*;

  localparam int N = 7;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic rst_n, start;
  logic signed [31:0] x0, y0, z0, xn, yn, zn;
  logic signed [15:0] x0s, y0s, z0s, xns, yns, zns;
  logic busy, done, busys, dones;

  cordic_folded #(.WIDTH(32), .ITERATIONS(N)) dut32 (
    .clk, .rst_n, .start, .x0, .y0, .z0, .busy, .done, .xn, .yn, .zn);
  cordic_folded #(.WIDTH(16), .ITERATIONS(N)) dut16 (
    .clk, .rst_n, .start, .x0(x0s), .y0(y0s), .z0(z0s), .busy(busys), .done(dones),
    .xn(xns), .yn(yns), .zn(zns));

  function automatic vec_t rand_op(input int w);
    vec_t a;
    longint lim;
    lim = (longint'(1) << (w - 1)) * 42 / 100;
    a.x = longint'($urandom_range(0, 32'(2 * lim))) - lim;
    a.y = longint'($urandom_range(0, 32'(2 * lim))) - lim;
    a.z = longint'($urandom_range(0, 32'((longint'(1) << (w - 1)) - 2))) - ((longint'(1) << (w - 2)) - 1);
    return a;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t a, b, e, es;
    int edges;
    rst_n = 1'b1;
    #1 rst_n = 1'b0; start = 1'b0;
    x0 = '0; y0 = '0; z0 = '0; x0s = '0; y0s = '0; z0s = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      a = rand_op(32); b = rand_op(16);
      x0 = 32'(a.x); y0 = 32'(a.y); z0 = 32'(a.z);
      x0s = 16'(b.x); y0s = 16'(b.y); z0s = 16'(b.z);
      e = run(a, N, 1'b0, 32); es = run(b, N, 1'b0, 16);
      check(!busy && !done, "idle before start");
      start = 1'b1;
      @(posedge clk);                 // first edge: operands sampled
      edges = 1;
      #1;
      start = (n % 5 == 0);           // sometimes keep start high while busy
      if (n % 7 == 0) begin           // and sometimes change the inputs
        x0 = $urandom; y0 = $urandom; z0 = $urandom; x0s = 16'($urandom);
      end
      while (!done && edges < 3 * N) begin
        @(posedge clk);
        edges++;
        #1;
      end
      check(edges == N, "done after 7 edges");
      check(dones, "16-bit core finishes together");
      check(xn == 32'(e.x) && yn == 32'(e.y) && zn == 32'(e.z), "32-bit result");
      check(xns == 16'(es.x) && yns == 16'(es.y) && zns == 16'(es.z), "16-bit result");
      start = 1'b0;
      @(posedge clk);
      #1 check(!done && !busy, "one-cycle done, then idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
