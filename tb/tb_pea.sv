// tb_pea: end-to-end testbench of one accelerator (pea at its default
// configuration, Design 2's pipelined Horner core).
//
// tb_pea_agent runs a program of every instruction and error case plus random
// instructions through the FIFO ports and checks every output word. The
// testbench also requires that the actor stalled with an empty instruction
// FIFO, waited for data, and waited on full output FIFOs at least once.
module tb_pea;
  import pea_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ctrl_wr, ctrl_full, data_wr, data_full, res_rd, res_empty, st_rd, st_empty;
  logic [INSTR_W-1:0] ctrl_wdata;
  data_t   data_wdata;
  res_t    res_rdata;
  status_e st_rdata;
  int checks, failures, n_status [4];
  logic finished;
  int stalls = 0, data_waits = 0, out_waits = 0, extra_fail = 0;

  always #5 clk = ~clk;

  pea dut (.*);

  tb_pea_agent #(.N_INSTR(150)) agent (
    .clk, .rst_n, .ctrl_wr, .ctrl_wdata, .ctrl_full, .data_wr, .data_wdata, .data_full,
    .res_rd, .res_rdata, .res_empty, .st_rd, .st_rdata, .st_empty,
    .checks, .failures, .finished, .n_status);

  always @(posedge clk) if (rst_n) begin
    if (!dut.u_firing.firing && dut.ctrl_empty) stalls++;
    if (dut.u_firing.firing && (dut.res_full || dut.st_full)) out_waits++;
    if (dut.u_firing.firing && dut.data_empty &&
        (dut.u_ctrl.state.name() == "STP_LOAD" || dut.u_ctrl.state.name() == "EVB_EXEC") &&
        dut.u_ctrl.cnt < dut.u_ctrl.n_words) data_waits++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (finished);
    $display("stalls %0d, data waits %0d, output waits %0d, status counts %0d %0d %0d %0d",
             stalls, data_waits, out_waits, n_status[0], n_status[1], n_status[2], n_status[3]);
    if (stalls == 0 || data_waits == 0 || out_waits == 0) begin
      extra_fail++;
      $display("FAIL: a stall, data wait or output wait never happened");
    end
    for (int s = 0; s < 4; s++) if (n_status[s] == 0) begin
      extra_fail++;
      $display("FAIL: status %0d never produced", s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + 5, failures + extra_fail);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
