// tb_pea_workload: block evaluation of a degree-10 polynomial on all three
// accelerator variants, with cycle counts.
//
// Each variant stores one random degree-10 polynomial and then runs EVB with
// block sizes 1, 4, 16 and 31 (31 is the largest the 5-bit operand allows).
// Arguments are supplied as fast as the data FIFO accepts them and results
// are drained at once, so the accelerator itself sets the pace. Every result
// is checked, and the cycles from the instruction fetch to the last result
// write are compared with what each variant's structure gives at N = 10:
//   Design 1  b*(N+2) + 1                 (N Horner steps + 2 hand-over cycles
//                                          per argument, 1 decode cycle)
//   Design 2  2 + g1 + m*(2N+1) + gm       (m groups of up to 4 arguments,
//                                          g1 and gm in the first and last;
//                                          loading and unloading overlap compute)
//   Design 3  b + 10                      (8 + b for the pipelined core,
//                                          2 cycles to decode)
// The cycle counts the design's reference analysis quotes (10b, 5b, 8 + b)
// count evaluation cycles only; they are printed alongside.
module tb_pea_workload;
  import pea_pkg::*;
  import tb_pea_ref_pkg::*;

  localparam int N = MAX_DEG;
  localparam int NB = 4;
  localparam int BLOCKS [NB] = '{1, 4, 16, 31};

  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] ctrl_wr, ctrl_full, data_wr, data_full, res_rd, res_empty, st_rd, st_empty;
  logic [2:0][INSTR_W-1:0]  ctrl_wdata;
  logic [2:0][DATA_W-1:0]   data_wdata;
  logic [2:0][RES_W-1:0]    res_rdata;
  logic [2:0][STATUS_W-1:0] st_rdata;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  logic [2:0] finished = '0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  pea_top dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int expected_cycles(int d, int b);
    case (d)
      0: return b * (N + 2) + 1;
      1: begin
        // first group loaded, then one 2N+1 compute per group, then the last unload
        int m, g1, gm;
        m  = (b + 3) / 4;
        g1 = (b > 4) ? 4 : b;
        gm = b - 4 * (m - 1);
        return 2 + g1 + m * (2 * N + 1) + gm;
      end
      default: return b + 10;
    endcase
  endfunction

  function automatic int paper_cycles(int d, int b);
    case (d)
      0: return 10 * b;
      1: return 5 * b;
      default: return 8 + b;
    endcase
  endfunction

  for (genvar d = 0; d < 3; d++) begin : g_run
    coef_vec_t c;
    data_t     xs [31];
    int        t_fetch, t_last, n_wr;

    // Cycle of the instruction fetch and of each result write.
    always @(posedge clk) if (rst_n) begin
      if (dut.g_design[d].u_pea.u_ctrl.ctrl_rd) begin
        t_fetch = int'(cyc);
        n_wr = 0;
      end
      if (dut.g_design[d].u_pea.u_ctrl.res_wr) begin
        t_last = int'(cyc);
        n_wr++;
      end
    end

    task automatic put_instr(logic [INSTR_W-1:0] w);
      @(negedge clk);
      ctrl_wr[d] = 1'b1;
      ctrl_wdata[d] = w;
      @(negedge clk);
      ctrl_wr[d] = 1'b0;
    endtask

    task automatic put_data(int count, const ref data_t v [31]);
      int i = 0;
      while (i < count) begin
        @(negedge clk);
        data_wr[d] = !data_full[d];
        data_wdata[d] = v[i];
        if (data_wr[d]) i++;
      end
      @(negedge clk);
      data_wr[d] = 1'b0;
    endtask

    task automatic take(int count, int b_for_exp);
      int i = 0;
      while (i < count) begin
        @(negedge clk);
        res_rd[d] = !res_empty[d];
        st_rd[d]  = !res_empty[d];
        if (res_rd[d]) begin
          if (b_for_exp > 0)
            check(int'(res_rdata[d]) == poly_ref(c, N, int'(xs[i])),
                  $sformatf("Design %0d: result %0d wrong", d + 1, i));
          check(st_rdata[d] == ST_OK, $sformatf("Design %0d: status %0d", d + 1, st_rdata[d]));
          i++;
        end
      end
      @(negedge clk);
      res_rd[d] = 1'b0;
      st_rd[d]  = 1'b0;
    endtask

    initial begin
      data_t cw [31];
      ctrl_wr[d] = 1'b0; data_wr[d] = 1'b0; res_rd[d] = 1'b0; st_rd[d] = 1'b0;
      ctrl_wdata[d] = '0; data_wdata[d] = '0;
      for (int i = 0; i < NUM_COEF; i++) begin
        c[i]  = rand_data();
        cw[i] = c[i];
      end
      for (int i = NUM_COEF; i < 31; i++) cw[i] = '0;
      @(posedge rst_n);
      put_instr(make_instr(OP_STP, 3'd5, operand_t'(N)));
      put_data(NUM_COEF, cw);
      take(1, 0);
      for (int k = 0; k < NB; k++) begin
        int b, got, expv;
        b = BLOCKS[k];
        for (int i = 0; i < b; i++) xs[i] = rand_data();
        put_instr(make_instr(OP_EVB, 3'd5, operand_t'(b)));
        fork
          put_data(b, xs);
          take(b, b);
        join
        got  = t_last - t_fetch;
        expv = expected_cycles(d, b);
        check(n_wr == b && got == expv,
              $sformatf("Design %0d, b = %0d: %0d cycles, expected %0d", d + 1, b, got, expv));
        $display("Design %0d  N = %0d  b = %2d: %4d cycles (%5.2f per argument); evaluation-only figure %0d",
                 d + 1, N, b, got, real'(got) / b, paper_cycles(d, b));
      end
      finished[d] = 1'b1;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (&finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
