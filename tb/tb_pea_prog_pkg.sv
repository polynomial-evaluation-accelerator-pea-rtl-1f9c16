// tb_pea_prog_pkg: random instruction programs and their expected output for
// the accelerator's testbenches.
//
// pea_program builds a random sequence of STP, EVP, EVB and RST instructions,
// the data words they consume (coefficients and arguments) and, from an
// instruction-level model of the eight coefficient vectors, the result and
// status words the accelerator must produce. The program deliberately
// contains the three error cases (degree above 10, block size 0, evaluation
// of an empty CV); a failing instruction consumes no data and produces one
// result 0 with its status. RST produces no output.
package tb_pea_prog_pkg;
  import pea_pkg::*;
  import tb_pea_ref_pkg::*;

  class pea_program;
    logic [INSTR_W-1:0] instrs [$];
    data_t              data   [$];
    int                 exp_res[$];
    status_e            exp_st [$];
    int                 n_op   [4];   // instructions per opcode
    int                 n_err  [4];   // expected outputs per status code

    coef_vec_t m_coef  [NUM_CV];
    bit        m_valid [NUM_CV];
    int        m_deg   [NUM_CV];

    function new();
      for (int v = 0; v < NUM_CV; v++) m_valid[v] = 1'b0;
      for (int i = 0; i < 4; i++) begin n_op[i] = 0; n_err[i] = 0; end
    endfunction

    function void expect_out(int r, status_e s);
      exp_res.push_back(r);
      exp_st.push_back(s);
      n_err[int'(s)]++;
    endfunction

    function void add_stp(int a, int n);
      instrs.push_back(make_instr(OP_STP, cv_addr_t'(a), operand_t'(n)));
      n_op[0]++;
      if (n > MAX_DEG) begin
        expect_out(0, ST_ERR_DEGREE);
        return;
      end
      for (int i = 0; i <= n; i++) begin
        data_t c = rand_data();
        data.push_back(c);
        m_coef[a][i] = c;
      end
      for (int i = n + 1; i < NUM_COEF; i++) m_coef[a][i] = '0;
      m_valid[a] = 1'b1;
      m_deg[a]   = n;
      expect_out(0, ST_OK);
    endfunction

    function void add_evp(int a);
      instrs.push_back(make_instr(OP_EVP, cv_addr_t'(a), '0));
      n_op[1]++;
      if (!m_valid[a]) begin
        expect_out(0, ST_ERR_UNINIT);
        return;
      end
      begin
        data_t x = rand_data();
        data.push_back(x);
        expect_out(poly_ref(m_coef[a], m_deg[a], int'(x)), ST_OK);
      end
    endfunction

    function void add_evb(int a, int b);
      instrs.push_back(make_instr(OP_EVB, cv_addr_t'(a), operand_t'(b)));
      n_op[2]++;
      if (b == 0) begin
        expect_out(0, ST_ERR_BLOCK);
        return;
      end
      if (!m_valid[a]) begin
        expect_out(0, ST_ERR_UNINIT);
        return;
      end
      for (int i = 0; i < b; i++) begin
        data_t x = rand_data();
        data.push_back(x);
        expect_out(poly_ref(m_coef[a], m_deg[a], int'(x)), ST_OK);
      end
    endfunction

    function void add_rst();
      instrs.push_back(make_instr(OP_RST, '0, '0));
      n_op[3]++;
      for (int v = 0; v < NUM_CV; v++) m_valid[v] = 1'b0;
    endfunction

    // A random program of n instructions; max_b bounds the EVB block size.
    function void gen_random(int n, int max_b);
      for (int k = 0; k < n; k++) begin
        int a, pick;
        a    = $urandom_range(0, NUM_CV - 1);
        pick = $urandom_range(0, 99);
        if      (pick < 30) add_stp(a, $urandom_range(0, MAX_DEG));
        else if (pick < 34) add_stp(a, $urandom_range(MAX_DEG + 1, 31));
        else if (pick < 56) add_evp(a);
        else if (pick < 90) add_evb(a, $urandom_range(1, max_b));
        else if (pick < 94) add_evb(a, 0);
        else                add_rst();
      end
    endfunction
  endclass
endpackage
