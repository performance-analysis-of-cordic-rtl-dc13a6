// tb_cordic_unfolded: seven-stage arrays, 32-bit pipelined, 32-bit parallel
// and 16-bit pipelined, fed with random operations in both modes (rotation
// with |z0| < pi/2, vectoring with x0 > 0), sqrt(x0^2 + y0^2) kept within the
// gain headroom. Each result is compared bit-exactly with the reference recurrence.
// For the pipelined arrays every result must appear exactly 7 rising edges
// after (and counting) the edge that sampled its operands, and one operation
// is accepted every clock.
module tb_cordic_unfolded;
  import cordic_pkg::*;
  import cordic_ref_pkg::*;

  localparam int N = 7;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  longint edge_no = 0;
  always @(posedge clk) edge_no <= edge_no + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  typedef struct { vec_t e; bit vmode; longint edge_in; } exp_t;

  function automatic vec_t rand_op(input int w, input bit vmode);
    vec_t a;
    longint lim;
    lim = (longint'(1) << (w - 1)) * 42 / 100;
    a.x = longint'($urandom_range(0, 32'(2 * lim))) - lim;
    a.y = longint'($urandom_range(0, 32'(2 * lim))) - lim;
    a.z = longint'($urandom_range(0, 32'((longint'(1) << (w - 1)) - 2))) - ((longint'(1) << (w - 2)) - 1);
    if (vmode) begin
      a.x = longint'($urandom_range(1, 32'(lim)));
      a.z = longint'($urandom_range(0, 32'(lim))) - lim / 2;
    end
    return a;
  endfunction

  // ---------------- 32-bit pipelined and parallel (same operands) ---------
  logic rst_n;
  logic v_in;
  cordic_mode_e m_in;
  logic signed [31:0] x_in, y_in, z_in;
  logic v_q, v_p;
  cordic_mode_e m_q, m_p;
  logic signed [31:0] xq, yq, zq, xp, yp, zp;

  cordic_unfolded #(.WIDTH(32), .ITERATIONS(N), .PIPELINED(1'b1)) dut_q (
    .clk, .rst_n, .in_valid(v_in), .in_mode(m_in), .x0(x_in), .y0(y_in), .z0(z_in),
    .out_valid(v_q), .out_mode(m_q), .xn(xq), .yn(yq), .zn(zq));
  cordic_unfolded #(.WIDTH(32), .ITERATIONS(N), .PIPELINED(1'b0)) dut_p (
    .clk, .rst_n, .in_valid(v_in), .in_mode(m_in), .x0(x_in), .y0(y_in), .z0(z_in),
    .out_valid(v_p), .out_mode(m_p), .xn(xp), .yn(yp), .zn(zp));

  // ---------------- 16-bit pipelined ---------------------------------------
  logic v16_in;
  cordic_mode_e m16_in, m16;
  logic signed [15:0] x16_in, y16_in, z16_in, x16, y16, z16;
  logic v16;

  cordic_unfolded #(.WIDTH(16), .ITERATIONS(N), .PIPELINED(1'b1)) dut_16 (
    .clk, .rst_n, .in_valid(v16_in), .in_mode(m16_in), .x0(x16_in), .y0(y16_in), .z0(z16_in),
    .out_valid(v16), .out_mode(m16), .xn(x16), .yn(y16), .zn(z16));

  exp_t q32[$], q16[$];
  int n_out32 = 0, n_out16 = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drive a new operand set before each edge; record what the edge samples.
  initial begin
    vec_t a, b;
    bit vm, vm16;
    rst_n = 1'b1;
    #1 rst_n = 1'b0; v_in = 1'b0; v16_in = 1'b0; m_in = MODE_ROTATE; m16_in = MODE_ROTATE;
    x_in = '0; y_in = '0; z_in = '0; x16_in = '0; y16_in = '0; z16_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      vm = $urandom_range(0, 1); vm16 = $urandom_range(0, 1);
      a = rand_op(32, vm); b = rand_op(16, vm16);
      v_in = (n < 40) ? 1'b1 : ($urandom_range(0, 3) != 0);  // full rate first, then bubbles
      v16_in = $urandom_range(0, 1);
      m_in = vm ? MODE_VECTOR : MODE_ROTATE; m16_in = vm16 ? MODE_VECTOR : MODE_ROTATE;
      x_in = 32'(a.x); y_in = 32'(a.y); z_in = 32'(a.z);
      x16_in = 16'(b.x); y16_in = 16'(b.y); z16_in = 16'(b.z);
      #1;
      // Parallel array: combinational, check right away.
      begin
        vec_t e;
        e = run(a, N, vm, 32);
        check(xp == 32'(e.x) && yp == 32'(e.y) && zp == 32'(e.z) && m_p == m_in && v_p == v_in,
              "parallel result");
      end
      @(posedge clk);
      #1;
      if (v_in) q32.push_back('{run(a, N, vm, 32), vm, edge_no});
      if (v16_in) q16.push_back('{run(b, N, vm16, 16), vm16, edge_no});
    end
    v_in = 1'b0; v16_in = 1'b0;
    repeat (N + 3) @(posedge clk);
    check(q32.size() == 0 && q16.size() == 0, "all pipelined results delivered");
    check(n_out32 > 1000 && n_out16 > 1000, "enough pipelined results");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Check pipelined outputs between edges. edge_no counts edges seen so far.
  always @(negedge clk) if (rst_n) begin
    if (v_q) begin
      exp_t h;
      n_out32++;
      if (q32.size() == 0) check(1'b0, "unexpected 32-bit result");
      else begin
        h = q32.pop_front();
        check(xq == 32'(h.e.x) && yq == 32'(h.e.y) && zq == 32'(h.e.z), "32-bit pipelined result");
        check((m_q == MODE_VECTOR) == h.vmode, "32-bit mode follows data");
        check(edge_no - h.edge_in + 1 == N, "32-bit latency of 7 edges");
      end
    end
    if (v16) begin
      exp_t h;
      n_out16++;
      if (q16.size() == 0) check(1'b0, "unexpected 16-bit result");
      else begin
        h = q16.pop_front();
        check(x16 == 16'(h.e.x) && y16 == 16'(h.e.y) && z16 == 16'(h.e.z), "16-bit pipelined result");
        check((m16 == MODE_VECTOR) == h.vmode, "16-bit mode follows data");
        check(edge_no - h.edge_in + 1 == N, "16-bit latency of 7 edges");
      end
    end
  end
endmodule
