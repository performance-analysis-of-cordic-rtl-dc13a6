// tb_cordic_top: end-to-end test of the three cores at their default size
// (32-bit words, seven iterations), with no parameter overrides.
//
// Every round gives one rotation operation to all three cores at once; the
// folded, parallel and pipelined results must be identical to each other and
// to the bit-exact reference, and must agree with the ideal rotation by the
// angle actually turned within a small tolerance. While the folded core is
// busy, the parallel and pipelined cores get a stream of further random
// operations in both modes, and the folded core sees stray start pulses.
// Operands keep sqrt(x0^2 + y0^2) below 0.6 of full scale (gain headroom).
// Counted mechanisms (each must occur): folded operations, start ignored
// while busy, both rotation directions in one operation, parallel rotation
// and vectoring, pipeline completely full, pipeline bubbles, mode switch
// between consecutive pipelined operations, latency of 7 edges for both the
// folded and the pipelined core.
module tb_cordic_top;
  import cordic_ref_pkg::*;

  localparam int W = 32;
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

  logic rst_n;
  logic f_start, f_busy, f_done;
  logic signed [W-1:0] f_x0, f_y0, f_z0, f_xn, f_yn, f_zn;
  logic p_vectoring;
  logic signed [W-1:0] p_x0, p_y0, p_z0, p_xn, p_yn, p_zn;
  logic q_in_valid, q_vectoring, q_out_valid, q_out_vectoring;
  logic signed [W-1:0] q_x0, q_y0, q_z0, q_xn, q_yn, q_zn;

  cordic_top dut (.*);

  // Mechanism counters.
  int n_folded_ops = 0, n_start_ignored = 0, n_both_dirs = 0;
  int n_par_rot = 0, n_par_vec = 0;
  int n_pipe_full = 0, n_bubble = 0, n_mode_switch = 0;
  int n_pipe_latency = 0, n_folded_latency = 0, n_cross = 0;

  typedef struct { vec_t e; bit vmode; longint edge_in; } exp_t;
  exp_t pq[$];
  int run_len = 0;
  bit last_mode = 0, have_last = 0;

  function automatic vec_t rand_op(input bit vmode);
    vec_t a;
    longint lim;
    lim = (longint'(1) << (W - 1)) * 42 / 100;
    a.x = longint'($urandom_range(0, 32'(2 * lim))) - lim;
    a.y = longint'($urandom_range(0, 32'(2 * lim))) - lim;
    a.z = longint'($urandom_range(0, 32'((longint'(1) << (W - 1)) - 2))) - ((longint'(1) << (W - 2)) - 1);
    if (vmode) begin
      a.x = longint'($urandom_range(1, 32'(lim)));
      a.z = 0;
    end
    return a;
  endfunction

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Ideal results against the CORDIC output.
  task automatic check_ideal(input vec_t a, input vec_t r, input bit vmode, input string who);
    real k, th, ex, ey, mag, tol, err;
    k = gain(N);
    mag = $sqrt(real'(a.x) * a.x + real'(a.y) * a.y);
    tol = 2.0e-3 * k * mag + 64.0;
    if (!vmode) begin
      th = to_rad(a.z - r.z, W);                // angle actually rotated
      ex = k * (a.x * $cos(th) - a.y * $sin(th));
      ey = k * (a.y * $cos(th) + a.x * $sin(th));
      check(rabs(ex - real'(r.x)) < tol && rabs(ey - real'(r.y)) < tol, {who, " ideal rotation"});
      check(rabs(to_rad(r.z, W)) < $atan(2.0 ** (-(N - 1))) + 1.0e-6, {who, " residual angle"});
    end else begin
      err = to_rad(r.z, W) - $atan2(real'(a.y), real'(a.x));
      check(rabs(err) < 2.0 * $atan(2.0 ** (-(N - 1))), {who, " vectoring angle"});
      check(rabs(real'(r.x) - k * mag) < 0.02 * k * mag + 64.0, {who, " vectoring magnitude"});
    end
  endtask

  // Pipelined core: one operation (or bubble) per clock.
  task automatic drive_pipe(input bit valid, input vec_t a, input bit vmode);
    q_in_valid = valid; q_vectoring = vmode;
    q_x0 = W'(a.x); q_y0 = W'(a.y); q_z0 = W'(a.z);
  endtask

  // Record what the coming edge samples (called right after the edge).
  task automatic note_pipe(input vec_t a);
    if (q_in_valid) begin
      pq.push_back('{run(a, N, q_vectoring, W), q_vectoring, edge_no});
      run_len++;
      if (run_len >= N) n_pipe_full++;
      if (have_last && last_mode != q_vectoring) n_mode_switch++;
      last_mode = q_vectoring; have_last = 1;
    end else begin
      if (run_len > 0) n_bubble++;
      run_len = 0;
    end
  endtask

  // Parallel core: check combinationally.
  task automatic par_check(input vec_t a, input bit vmode);
    vec_t e, r;
    p_vectoring = vmode; p_x0 = W'(a.x); p_y0 = W'(a.y); p_z0 = W'(a.z);
    #1;
    e = run(a, N, vmode, W);
    r.x = p_xn; r.y = p_yn; r.z = p_zn;
    check(r.x == e.x && r.y == e.y && r.z == e.z, "parallel result");
    check_ideal(a, r, vmode, "parallel");
    if (vmode) n_par_vec++; else n_par_rot++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t a, b, ef, rf;
    bit   vm;
    int   edges;
    rst_n = 1'b1;
    #1 rst_n = 1'b0; f_start = 1'b0; q_in_valid = 1'b0; q_vectoring = 1'b0; p_vectoring = 1'b0;
    f_x0 = '0; f_y0 = '0; f_z0 = '0; p_x0 = '0; p_y0 = '0; p_z0 = '0;
    q_x0 = '0; q_y0 = '0; q_z0 = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      // Same rotation to all three cores.
      a = rand_op(1'b0);
      f_x0 = W'(a.x); f_y0 = W'(a.y); f_z0 = W'(a.z);
      f_start = 1'b1;
      drive_pipe(1'b1, a, 1'b0);
      par_check(a, 1'b0);
      ef = run(a, N, 1'b0, W);
      begin
        vec_t t;
        int signs;
        t = a; signs = 0;
        for (int i = 0; i < N; i++) begin
          signs |= (t.z < 0) ? 2 : 1;
          t = step(t, i, 1'b0, W);
        end
        if (signs == 3) n_both_dirs++;
      end
      @(posedge clk);
      #1;
      note_pipe(a);
      edges = 1;
      f_start = 1'b0;
      // While the folded core iterates, stream other work to the others.
      while (!f_done && edges < 3 * N) begin
        @(negedge clk);
        if ($urandom_range(0, 5) == 0) begin
          f_start = 1'b1;               // stray start, must be ignored
          f_x0 = $urandom; f_y0 = $urandom; f_z0 = $urandom;
          n_start_ignored++;
        end else f_start = 1'b0;
        vm = $urandom_range(0, 1);
        b = rand_op(vm);
        drive_pipe((n < 20) || ($urandom_range(0, 4) != 0), b, vm);
        par_check(rand_op(vm), vm);
        @(posedge clk);
        #1;
        note_pipe(b);
        edges++;
      end
      check(edges == N, "folded latency of 7 edges");
      if (edges == N) n_folded_latency++;
      rf.x = f_xn; rf.y = f_yn; rf.z = f_zn;
      check(rf.x == ef.x && rf.y == ef.y && rf.z == ef.z, "folded result");
      check_ideal(a, rf, 1'b0, "folded");
      n_folded_ops++;
      // One more clock while the folded core returns to idle.
      @(negedge clk);
      f_start = 1'b0;
      vm = $urandom_range(0, 1);
      b = rand_op(vm);
      drive_pipe($urandom_range(0, 1), b, vm);
      par_check(rand_op(vm), vm);
      @(posedge clk);
      #1;
      note_pipe(b);
    end
    @(negedge clk);
    q_in_valid = 1'b0;
    repeat (N + 2) @(posedge clk);
    #1;
    check(pq.size() == 0, "all pipelined results delivered");

    $display("mechanisms: folded_ops=%0d start_ignored=%0d both_directions=%0d", n_folded_ops, n_start_ignored, n_both_dirs);
    $display("mechanisms: parallel_rotate=%0d parallel_vector=%0d", n_par_rot, n_par_vec);
    $display("mechanisms: pipe_full=%0d bubbles=%0d mode_switch=%0d pipe_latency_ok=%0d folded_latency_ok=%0d cross_checked=%0d",
             n_pipe_full, n_bubble, n_mode_switch, n_pipe_latency, n_folded_latency, n_cross);
    check(n_folded_ops > 0, "folded operations happened");
    check(n_start_ignored > 0, "start while busy happened");
    check(n_both_dirs > 0, "both rotation directions happened");
    check(n_par_rot > 0 && n_par_vec > 0, "parallel rotation and vectoring happened");
    check(n_pipe_full > 0, "pipeline full happened");
    check(n_bubble > 0, "pipeline bubble happened");
    check(n_mode_switch > 0, "mode switch happened");
    check(n_pipe_latency > 0 && n_folded_latency > 0, "latencies observed");
    check(n_cross > 0, "folded and pipelined results cross-checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Pipelined results, checked between edges; also compared with the folded
  // core's output when the folded core finishes the same operation.
  always @(negedge clk) if (rst_n && q_out_valid) begin
    exp_t h;
    vec_t r;
    if (pq.size() == 0) check(1'b0, "unexpected pipelined result");
    else begin
      h = pq.pop_front();
      r.x = q_xn; r.y = q_yn; r.z = q_zn;
      check(r.x == h.e.x && r.y == h.e.y && r.z == h.e.z, "pipelined result");
      check(q_out_vectoring == h.vmode, "pipelined mode follows data");
      check(edge_no - h.edge_in + 1 == N, "pipelined latency of 7 edges");
      if (edge_no - h.edge_in + 1 == N) n_pipe_latency++;
      if (f_done && !h.vmode) begin
        check(f_xn == q_xn && f_yn == q_yn && f_zn == q_zn, "folded equals pipelined");
        n_cross++;
      end
    end
  end
endmodule
