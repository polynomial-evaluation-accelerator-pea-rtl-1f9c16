// tb_pea_core_pipe2: self-checking testbench for pea_core_pipe2.
//
// Random polynomials of degree 0..10 with random coefficients are evaluated on
// random blocks of arguments and every result is compared with the term-by-term
// reference model. Half of the trials insert gaps on the input side and
// back-pressure on the output side; the other half run at full speed and check
// the core's cycle timing: a group of up to four arguments is
// started one edge after its last argument and computed in 2N+1 edges, so its
// first result is taken 2N+3 edges after that last argument (2 for N = 0), and
// the rest follow one per cycle. In longer blocks loading and unloading overlap
// the computation, so b arguments in m groups (g1 in the first, gm in the
// last) take g1 + m*(2N+1) + gm edges from first argument to last result
// when N >= 2 (below that, loading four arguments takes longer than computing).
module tb_pea_core_pipe2;
  import pea_pkg::*;
  import tb_pea_ref_pkg::*;

  localparam int NTRIALS = 300;
  localparam int MAXB    = 12;

  logic      clk = 1'b0;
  logic      rst_n;
  coef_vec_t coef;
  deg_t      degree;
  logic      in_valid, in_ready, in_last, out_valid, out_ready;
  data_t     in_x;
  res_t      out_result;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  pea_core_pipe2 dut (.*);

  int    n, b;
  bit    timed;
  data_t args  [MAXB];
  int    t_acc [MAXB];
  int    t_out [MAXB];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic drive();
    for (int i = 0; i < b; i++) begin
      if (!timed) begin
        int gap = $urandom_range(0, 2);
        if (gap > 0) begin
          @(negedge clk);
          in_valid = 1'b0;
          repeat (gap - 1) @(negedge clk);
        end
      end
      @(negedge clk);
      in_valid = 1'b1;
      in_x     = args[i];
      in_last  = (i == b - 1);
      #1;  // let out_ready settle: in_ready may depend on it
      while (!in_ready) begin
        @(negedge clk);
        #1;
      end
      t_acc[i] = int'(cyc) + 1;  // accepted at the coming edge
    end
    @(negedge clk);
    in_valid = 1'b0;
    in_last  = 1'b0;
  endtask

  task automatic collect();
    int k = 0;
    while (k < b) begin
      @(negedge clk);
      out_ready = timed ? 1'b1 : 1'($urandom_range(0, 2) != 0);
      if (out_valid && out_ready) begin
        int exp_v = poly_ref(coef, n, int'(args[k]));
        check(out_result == exp_v,
              $sformatf("trial deg %0d arg %0d x=%0d: got %0d expected %0d",
                        n, k, args[k], out_result, exp_v));
        t_out[k] = int'(cyc) + 1;
        k++;
      end
    end
    @(negedge clk);
    out_ready = 1'b0;
  endtask

  task automatic check_timing();
    int exp_l = (n == 0) ? 2 : 2 * n + 3;
    if (b <= 4) begin
      check(t_out[0] - t_acc[b-1] == exp_l,
            $sformatf("deg %0d: group latency %0d, expected %0d", n, t_out[0] - t_acc[b-1], exp_l));
      for (int i = 1; i < b; i++)
        check(t_out[i] == t_out[i-1] + 1, "results of a group not back to back");
      for (int i = 1; i < b; i++)
        check(t_acc[i] == t_acc[i-1] + 1, "arguments of a group not accepted back to back");
    end else if (n >= 2) begin
      // several groups: for N >= 2 loading (g+1 edges) and unloading (g edges)
      // hide behind the 2N+1 compute cycles
      int m, g1, gm, exp_t;
      m  = (b + 3) / 4;
      g1 = 4;
      gm = b - 4 * (m - 1);
      exp_t = g1 + m * (2 * n + 1) + gm;
      check(t_out[b-1] - t_acc[0] == exp_t,
            $sformatf("deg %0d, block %0d: %0d edges, expected %0d", n, b, t_out[b-1] - t_acc[0], exp_t));
    end
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_last = 1'b0; in_x = '0; out_ready = 1'b0;
    degree = '0;
    for (int i = 0; i < NUM_COEF; i++) coef[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < NTRIALS; trial++) begin
      timed  = trial[0];
      n      = (trial < 22) ? trial % 11 : $urandom_range(0, MAX_DEG);
      b      = timed ? $urandom_range(1, (trial % 4 == 1) ? 4 : MAXB) : $urandom_range(1, MAXB);
      degree = deg_t'(n);
      for (int i = 0; i < NUM_COEF; i++) coef[i] = rand_data();
      for (int i = 0; i < b; i++) args[i] = rand_data();
      fork
        drive();
        collect();
      join
      if (timed) check_timing();
      repeat (2) @(negedge clk);
      check(!out_valid && in_ready, "core not idle after a block");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
