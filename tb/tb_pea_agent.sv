// tb_pea_agent: drives one accelerator instance from the outside and checks
// everything it produces.
//
// The agent builds a program (a fixed opening that walks through every
// instruction and every error case, then N_INSTR random instructions), feeds
// instruction and data words into the input FIFOs at a random pace, and
// drains the result and status FIFOs, now and then pausing long enough for
// them to fill up so that the accelerator has to wait. Every result and
// status word is compared with the program's expected output; after the last
// one, no further output may appear. finished goes high when the program is
// done; checks and failures count the comparisons.
module tb_pea_agent
  import pea_pkg::*;
  import tb_pea_prog_pkg::*;
#(
  parameter int N_INSTR = 120,
  parameter int MAX_B   = 31
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               ctrl_wr,
  output logic [INSTR_W-1:0] ctrl_wdata,
  input  logic               ctrl_full,
  output logic               data_wr,
  output data_t              data_wdata,
  input  logic               data_full,
  output logic               res_rd,
  input  res_t               res_rdata,
  input  logic               res_empty,
  output logic               st_rd,
  input  logic [STATUS_W-1:0] st_rdata,
  input  logic               st_empty,
  output int                 checks,
  output int                 failures,
  output logic               finished,
  output int                 n_status [4]
);
  pea_program prog;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL (%m): %s", what); end
  endtask

  task automatic feed_ctrl();
    int i = 0;
    while (i < prog.instrs.size()) begin
      @(negedge clk);
      ctrl_wr = !ctrl_full && ($urandom_range(0, 3) != 0);
      ctrl_wdata = prog.instrs[i];
      if (ctrl_wr) i++;
    end
    @(negedge clk);
    ctrl_wr = 1'b0;
  endtask

  task automatic feed_data();
    int i = 0;
    int pause = 0;
    while (i < prog.data.size()) begin
      @(negedge clk);
      if (pause > 0) pause--;
      else if ($urandom_range(0, 59) == 0) pause = 30;  // starve the accelerator
      data_wr = (pause == 0) && !data_full && ($urandom_range(0, 4) != 0);
      data_wdata = prog.data[i];
      if (data_wr) i++;
    end
    @(negedge clk);
    data_wr = 1'b0;
  endtask

  task automatic drain();
    int i = 0;
    int pause = 0;
    while (i < prog.exp_res.size()) begin
      @(negedge clk);
      if (pause > 0) pause--;
      else if ($urandom_range(0, 99) == 0) pause = 80;  // let the output FIFOs fill
      res_rd = (pause == 0) && !res_empty && !st_empty && ($urandom_range(0, 2) != 0);
      st_rd  = res_rd;
      if (res_rd) begin
        check(res_rdata == prog.exp_res[i],
              $sformatf("output %0d: result %0d, expected %0d", i, res_rdata, prog.exp_res[i]));
        check(st_rdata == prog.exp_st[i],
              $sformatf("output %0d: status %0d, expected %0d", i, st_rdata, prog.exp_st[i]));
        n_status[int'(st_rdata) % 4]++;
        i++;
      end
    end
    @(negedge clk);
    res_rd = 1'b0;
    st_rd  = 1'b0;
  endtask

  initial begin
    ctrl_wr = 1'b0; ctrl_wdata = '0; data_wr = 1'b0; data_wdata = '0;
    res_rd = 1'b0; st_rd = 1'b0; checks = 0; failures = 0; finished = 1'b0;
    for (int s = 0; s < 4; s++) n_status[s] = 0;
    prog = new();
    // Opening: every instruction and every error case once.
    prog.add_evp(0);            // empty CV
    prog.add_stp(0, MAX_DEG);   // full-degree polynomial
    prog.add_evp(0);
    prog.add_evb(0, MAX_B);     // long block: output FIFOs fill up
    prog.add_stp(1, 0);         // constant polynomial
    prog.add_evb(1, 5);
    prog.add_stp(2, 20);        // degree out of range
    prog.add_evb(2, 3);         // still empty
    prog.add_evb(0, 0);         // block size 0
    prog.add_rst();
    prog.add_evp(0);            // cleared by RST
    prog.gen_random(N_INSTR, MAX_B);
    @(posedge rst_n);
    fork
      feed_ctrl();
      feed_data();
      drain();
    join
    repeat (60) @(negedge clk);
    check(res_empty && st_empty, "output after the end of the program");
    finished = 1'b1;
  end
endmodule
