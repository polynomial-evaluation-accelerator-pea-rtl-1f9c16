// tb_pea_top: end-to-end testbench of the three accelerator variants at
// their default sizes.
//
// Each of the three pea instances (Design 1, 2 and 3) gets its own
// tb_pea_agent, which runs a program of every instruction, every error case
// and random instructions with blocks of up to 31 arguments, and checks every
// result and status word. The testbench counts, per instance, how often each
// mechanism of the design happened and fails if one never did:
//   stall        actor idle because the instruction FIFO is empty
//   data wait    STP or EVB waiting for a data word
//   output wait  actor firing while an output FIFO is full
//   status k     each of the four status codes delivered (OK and 3 errors)
//   RST          all CVs cleared
//   core busy    Design 1 refusing an argument while it evaluates
//   part group   Design 2 starting a group of fewer than four arguments
//   full group   Design 2 starting a group of four arguments
//   pipe stall   Design 3 pipeline frozen by a result that cannot leave
//   streaming    Design 3 accepting arguments on consecutive cycles
module tb_pea_top;
  import pea_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] ctrl_wr, ctrl_full, data_wr, data_full, res_rd, res_empty, st_rd, st_empty;
  logic [2:0][INSTR_W-1:0]  ctrl_wdata;
  logic [2:0][DATA_W-1:0]   data_wdata;
  logic [2:0][RES_W-1:0]    res_rdata;
  logic [2:0][STATUS_W-1:0] st_rdata;
  int   checks [3], failures [3], n_status [3][4];
  logic [2:0] finished;

  always #5 clk = ~clk;

  pea_top dut (.*);

  for (genvar d = 0; d < 3; d++) begin : g_agent
    data_t dw;
    assign data_wdata[d] = dw;
    tb_pea_agent #(.N_INSTR(200)) agent (
      .clk, .rst_n, .ctrl_wr(ctrl_wr[d]), .ctrl_wdata(ctrl_wdata[d]), .ctrl_full(ctrl_full[d]),
      .data_wr(data_wr[d]), .data_wdata(dw), .data_full(data_full[d]),
      .res_rd(res_rd[d]), .res_rdata(res_rdata[d]), .res_empty(res_empty[d]),
      .st_rd(st_rd[d]), .st_rdata(st_rdata[d]), .st_empty(st_empty[d]),
      .checks(checks[d]), .failures(failures[d]), .finished(finished[d]),
      .n_status(n_status[d]));
  end

  // Mechanism counters, per instance.
  int stalls [3], data_waits [3], out_waits [3], rsts [3];
  int busy_refusals = 0, part_groups = 0, full_groups = 0, pipe_stalls = 0, streaming = 0;
  logic d3_prev_accept = 1'b0;
  int   d2_in_group = 0;

  initial for (int d = 0; d < 3; d++) begin
    stalls[d] = 0; data_waits[d] = 0; out_waits[d] = 0; rsts[d] = 0;
  end

  `define PEA_MECH(D, P) \
    always @(posedge clk) if (rst_n) begin \
      if (!P.u_firing.firing && P.ctrl_empty) stalls[D]++; \
      if (P.u_firing.firing && (P.res_full || P.st_full)) out_waits[D]++; \
      if (P.u_firing.firing && P.data_empty && P.u_ctrl.cnt < P.u_ctrl.n_words && \
          (P.u_ctrl.state.name() == "STP_LOAD" || P.u_ctrl.state.name() == "EVB_EXEC")) \
        data_waits[D]++; \
      if (P.cv_clear_all) rsts[D]++; \
    end

  `PEA_MECH(0, dut.g_design[0].u_pea)
  `PEA_MECH(1, dut.g_design[1].u_pea)
  `PEA_MECH(2, dut.g_design[2].u_pea)

  always @(posedge clk) if (rst_n) begin
    logic d3_accept;
    if (dut.g_design[0].u_pea.core_in_valid && !dut.g_design[0].u_pea.core_in_ready)
      busy_refusals++;
    if (dut.g_design[1].u_pea.core_in_valid && dut.g_design[1].u_pea.core_in_ready) begin
      // Design 2 groups: four arguments, or fewer ended by the block's last
      if (d2_in_group == 3) begin
        full_groups++;
        d2_in_group <= 0;
      end else if (dut.g_design[1].u_pea.core_in_last) begin
        part_groups++;
        d2_in_group <= 0;
      end else begin
        d2_in_group <= d2_in_group + 1;
      end
    end
    if (dut.g_design[2].u_pea.core_out_valid && !dut.g_design[2].u_pea.core_out_ready)
      pipe_stalls++;
    d3_accept = dut.g_design[2].u_pea.core_in_valid && dut.g_design[2].u_pea.core_in_ready;
    if (d3_accept && d3_prev_accept) streaming++;
    d3_prev_accept <= d3_accept;
  end

  int all_checks, all_fail;
  task automatic require(int count, string what);
    all_checks++;
    $display("  %-28s %0d", what, count);
    if (count == 0) begin
      all_fail++;
      $display("FAIL: %s never happened", what);
    end
  endtask

  initial begin
    all_checks = 0;
    all_fail   = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (&finished);
    for (int d = 0; d < 3; d++) begin
      $display("Design %0d: %0d output checks, %0d failures", d + 1, checks[d], failures[d]);
      all_checks += checks[d];
      all_fail   += failures[d];
      require(stalls[d],     "stall (no instruction)");
      require(data_waits[d], "data wait");
      require(out_waits[d],  "output wait (FIFO full)");
      require(rsts[d],       "RST");
      for (int s = 0; s < 4; s++) require(n_status[d][s], $sformatf("status %0d", s));
    end
    require(busy_refusals, "Design 1 core busy");
    require(part_groups,   "Design 2 partial group");
    require(full_groups,   "Design 2 full group");
    require(pipe_stalls,   "Design 3 pipeline stall");
    require(streaming,     "Design 3 back-to-back");
    $display("TB_RESULT checks=%0d failures=%0d", all_checks, all_fail);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2], 1);
    $finish;
  end
endmodule
