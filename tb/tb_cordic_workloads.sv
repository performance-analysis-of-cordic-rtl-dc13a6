// tb_cordic_workloads: the two evaluated configurations, seven iterations on
// 16-bit and on 32-bit words, each pushing the same batch of M rotations
// through the folded and the pipelined core of a cordic_top and M mixed
// operations through the parallel core. Besides checking every result
// bit-exactly, it measures the clock cycles each structure needs for the
// batch: the folded core must take exactly M * (n + 1) cycles (one load
// cycle plus n iterations per result, starting each operation as soon as the
// core is idle), and the pipelined core M + n - 1 cycles from the first
// operand to the last result (one result per clock after an n-cycle fill).
module tb_cordic_workloads;
  import cordic_ref_pkg::*;

  localparam int N = 7;
  localparam int M = 64;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;   // 10-unit clock period, used to count cycles
  logic rst_n;
  bit   go = 0;   // set once reset has been released

  int done16 = 0, done32 = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    go = 1;
    wait (done16 == 1 && done32 == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 2; g++) begin : g_cfg
    localparam int W = (g == 0) ? 16 : 32;

    logic f_start, f_busy, f_done;
    logic signed [W-1:0] f_x0, f_y0, f_z0, f_xn, f_yn, f_zn;
    logic p_vectoring;
    logic signed [W-1:0] p_x0, p_y0, p_z0, p_xn, p_yn, p_zn;
    logic q_in_valid, q_vectoring, q_out_valid, q_out_vectoring;
    logic signed [W-1:0] q_x0, q_y0, q_z0, q_xn, q_yn, q_zn;

    cordic_top #(.WIDTH(W), .ITERATIONS(N)) dut (.*);

    vec_t ops [M];
    bit   fdone = 0, qdone = 0, pdone = 0;

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

    task automatic chk(input bit cond, input string what);
      checks++;
      if (!cond) begin failures++; $display("FAIL %0d-bit %s at %0t", W, what, $time); end
    endtask

    // Folded core: M operations back to back.
    initial begin
      int cycles, got;
      vec_t e;
      f_start = 1'b0; f_x0 = '0; f_y0 = '0; f_z0 = '0;
      for (int k = 0; k < M; k++) ops[k] = rand_op(1'b0);
      wait (go);
      @(negedge clk);
      cycles = 0; got = 0;
      for (int k = 0; k < M; k++) begin
        f_x0 = W'(ops[k].x); f_y0 = W'(ops[k].y); f_z0 = W'(ops[k].z);
        f_start = 1'b1;
        @(posedge clk); cycles++;
        #1 f_start = 1'b0;
        while (!f_done) begin @(posedge clk); cycles++; #1; end
        e = run(ops[k], N, 1'b0, W);
        chk(f_xn == W'(e.x) && f_yn == W'(e.y) && f_zn == W'(e.z), "folded result");
        got++;
        @(posedge clk); cycles++;        // core returns to idle
        @(negedge clk);
      end
      $display("%0d-bit folded: %0d results in %0d cycles", W, got, cycles);
      chk(cycles == M * (N + 1), "folded cycles per batch = M*(n+1)");
      fdone = 1;
    end

    // Pipelined core: the same M operations, one per clock.
    initial begin
      int got;
      time first_t, last_t, edge_t;
      vec_t e;
      q_in_valid = 1'b0; q_vectoring = 1'b0; q_x0 = '0; q_y0 = '0; q_z0 = '0;
      wait (go);
      #2;
      got = 0; first_t = 0; last_t = 0; edge_t = 0;
      fork
        begin
          for (int k = 0; k < M; k++) begin
            @(negedge clk);
            q_in_valid = 1'b1;
            q_x0 = W'(ops[k].x); q_y0 = W'(ops[k].y); q_z0 = W'(ops[k].z);
            @(posedge clk);
            if (k == 0) first_t = $time;
          end
          @(negedge clk) q_in_valid = 1'b0;
        end
        begin
          while (got < M) begin
            @(posedge clk);
            edge_t = $time;
            #1;
            if (q_out_valid) begin
              e = run(ops[got], N, 1'b0, W);
              chk(q_xn == W'(e.x) && q_yn == W'(e.y) && q_zn == W'(e.z), "pipelined result");
              got++;
              last_t = edge_t;
            end
          end
        end
      join
      $display("%0d-bit pipelined: %0d results in %0d cycles", W, got, int'((last_t - first_t) / 10) + 1);
      chk(int'((last_t - first_t) / 10) + 1 == M + N - 1, "pipelined cycles per batch = M+n-1");
      qdone = 1;
    end

    // Parallel core: M operations in alternating modes, checked as applied.
    initial begin
      vec_t a, e;
      bit vm;
      p_vectoring = 1'b0; p_x0 = '0; p_y0 = '0; p_z0 = '0;
      wait (go);
      for (int k = 0; k < M; k++) begin
        @(negedge clk);
        vm = k[0];
        a = rand_op(vm);
        p_vectoring = vm; p_x0 = W'(a.x); p_y0 = W'(a.y); p_z0 = W'(a.z);
        #1;
        e = run(a, N, vm, W);
        chk(p_xn == W'(e.x) && p_yn == W'(e.y) && p_zn == W'(e.z), "parallel result");
      end
      pdone = 1;
    end

    initial begin
      wait (fdone && qdone && pdone);
      if (g == 0) done16 = 1; else done32 = 1;
    end
  end
endmodule
