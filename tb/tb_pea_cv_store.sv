// tb_pea_cv_store: self-checking testbench for pea_cv_store.
//
// A shadow model of the eight coefficient vectors follows random coefficient
// writes, valid-marking with a degree, and clear-all operations; after every
// operation the read port of a random CV is compared with the model, all
// coefficients, valid flag and degree. Clear-all and set_valid in the same
// cycle check that clearing wins.
module tb_pea_cv_store;
  import pea_pkg::*;
  import tb_pea_ref_pkg::*;

  logic      clk = 1'b0, rst_n;
  cv_addr_t  addr;
  logic      wr_en, set_valid, clear_all, rd_valid;
  deg_t      wr_idx, set_degree, rd_degree;
  data_t     wr_data;
  coef_vec_t rd_coef;
  int checks = 0, failures = 0;

  data_t m_coef  [NUM_CV][NUM_COEF];
  bit    m_valid [NUM_CV];
  int    m_deg   [NUM_CV];

  always #5 clk = ~clk;

  pea_cv_store dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic compare(int a);
    addr = cv_addr_t'(a);
    #1;
    check(rd_valid == m_valid[a], $sformatf("valid of CV %0d", a));
    if (m_valid[a]) check(int'(rd_degree) == m_deg[a], $sformatf("degree of CV %0d", a));
    for (int i = 0; i < NUM_COEF; i++)
      check(rd_coef[i] == m_coef[a][i], $sformatf("CV %0d coefficient %0d", a, i));
  endtask

  initial begin
    rst_n = 1'b0; wr_en = 1'b0; set_valid = 1'b0; clear_all = 1'b0;
    addr = '0; wr_idx = '0; wr_data = '0; set_degree = '0;
    for (int v = 0; v < NUM_CV; v++) begin
      m_valid[v] = 1'b0; m_deg[v] = 0;
      for (int i = 0; i < NUM_COEF; i++) m_coef[v][i] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < NUM_CV; v++) compare(v);
    for (int op = 0; op < 3000; op++) begin
      int a, kind;
      a    = $urandom_range(0, NUM_CV - 1);
      kind = $urandom_range(0, 19);
      @(negedge clk);
      addr = cv_addr_t'(a);
      if (kind < 14) begin
        int i;
        i = $urandom_range(0, MAX_DEG);
        wr_en = 1'b1; wr_idx = deg_t'(i); wr_data = rand_data();
        m_coef[a][i] = wr_data;
      end else if (kind < 19) begin
        int d;
        d = $urandom_range(0, MAX_DEG);
        set_valid = 1'b1; set_degree = deg_t'(d);
        m_valid[a] = 1'b1; m_deg[a] = d;
      end else begin
        clear_all = 1'b1;
        set_valid = $urandom_range(0, 1);  // clearing must win
        set_degree = '0;
        for (int v = 0; v < NUM_CV; v++) m_valid[v] = 1'b0;
      end
      @(negedge clk);
      wr_en = 1'b0; set_valid = 1'b0; clear_all = 1'b0;
      compare(a);
      compare($urandom_range(0, NUM_CV - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
