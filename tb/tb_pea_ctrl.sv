// tb_pea_ctrl: self-checking testbench for the control FSM pea_ctrl.
//
// The controller is surrounded by real FIFOs, the CV store and the
// direct-evaluation core (so EVB streams through a pipelined core), and is
// fired by the testbench itself, one invoke per waiting instruction, the way
// the outer firing FSM does. tb_pea_agent supplies a program and checks every
// output word. On top of that, every clock edge is checked against the
// state-transition table: FETCH always goes to DECODE, DECODE goes to the
// state of the latched opcode or to OUTPUT on an error, RST_EXEC returns to
// IDLE writing nothing, OUTPUT leaves only when both output FIFOs have space,
// the instruction FIFO is read only in FETCH, and one done is given per
// instruction.
module tb_pea_ctrl;
  import pea_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ctrl_wr, ctrl_full, data_wr, data_full, res_rd, res_empty, st_rd, st_empty;
  logic [INSTR_W-1:0] ctrl_wdata, ctrl_rdata;
  data_t   data_wdata, data_rdata;
  res_t    res_rdata, res_wdata;
  status_e st_wdata, st_rdata;
  logic [STATUS_W-1:0] st_rdata_raw;
  int checks, failures, n_status [4];
  logic finished;

  logic ctrl_empty, ctrl_rd, data_empty, data_rd, res_full, res_wr, st_full, st_wr;
  logic invoke, done;
  cv_addr_t cv_addr;
  logic cv_wr_en, cv_set_valid, cv_clear_all, cv_valid;
  deg_t cv_wr_idx, cv_set_degree, cv_degree;
  data_t cv_wr_data;
  coef_vec_t cv_coef;
  logic core_in_valid, core_in_ready, core_in_last, core_out_valid, core_out_ready;
  data_t core_in_x;
  res_t core_out_result;
  logic [4:0] c0, c1, c2, c3;

  always #5 clk = ~clk;

  sync_fifo #(.WIDTH(INSTR_W), .DEPTH(16)) u_cf (.clk, .rst_n, .wr_en(ctrl_wr), .wr_data(ctrl_wdata),
    .full(ctrl_full), .rd_en(ctrl_rd), .rd_data(ctrl_rdata), .empty(ctrl_empty), .count(c0));
  sync_fifo #(.WIDTH(DATA_W), .DEPTH(16)) u_df (.clk, .rst_n, .wr_en(data_wr), .wr_data(data_wdata),
    .full(data_full), .rd_en(data_rd), .rd_data(data_rdata), .empty(data_empty), .count(c1));
  sync_fifo #(.WIDTH(RES_W), .DEPTH(16)) u_rf (.clk, .rst_n, .wr_en(res_wr), .wr_data(res_wdata),
    .full(res_full), .rd_en(res_rd), .rd_data(res_rdata), .empty(res_empty), .count(c2));
  sync_fifo #(.WIDTH(STATUS_W), .DEPTH(16)) u_sf (.clk, .rst_n, .wr_en(st_wr), .wr_data(st_wdata),
    .full(st_full), .rd_en(st_rd), .rd_data(st_rdata_raw), .empty(st_empty), .count(c3));
  assign st_rdata = status_e'(st_rdata_raw);

  pea_ctrl dut (.*);

  pea_cv_store u_cv (.clk, .rst_n, .addr(cv_addr), .wr_en(cv_wr_en), .wr_idx(cv_wr_idx),
    .wr_data(cv_wr_data), .set_valid(cv_set_valid), .set_degree(cv_set_degree),
    .clear_all(cv_clear_all), .rd_coef(cv_coef), .rd_valid(cv_valid), .rd_degree(cv_degree));

  pea_core_direct u_core (.clk, .rst_n, .coef(cv_coef), .degree(cv_degree),
    .in_valid(core_in_valid), .in_ready(core_in_ready), .in_x(core_in_x), .in_last(core_in_last),
    .out_valid(core_out_valid), .out_ready(core_out_ready), .out_result(core_out_result));

  tb_pea_agent #(.N_INSTR(150)) agent (
    .clk, .rst_n, .ctrl_wr, .ctrl_wdata, .ctrl_full, .data_wr, .data_wdata, .data_full,
    .res_rd, .res_rdata, .res_empty, .st_rd, .st_rdata(st_rdata_raw), .st_empty,
    .checks, .failures, .finished, .n_status);

  // Testbench-side firing: invoke whenever the controller is idle and an
  // instruction is waiting, like pea_firing_fsm.
  logic firing;
  assign invoke = !firing && !ctrl_empty;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) firing <= 1'b0;
    else if (invoke) firing <= 1'b1;
    else if (done) firing <= 1'b0;
  end

  int fsm_checks = 0, fsm_fail = 0, n_done = 0, n_fetch = 0;
  string prev;
  opcode_e prev_op;
  logic prev_space, prev_res_wr;
  initial prev = "IDLE";

  task automatic fcheck(bit ok, string what);
    fsm_checks++;
    if (!ok) begin fsm_fail++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    string cur;
    #1;  // state after the edge
    cur = dut.state.name();
    if (prev == "FETCH") fcheck(cur == "DECODE", "FETCH did not go to DECODE");
    if (prev == "DECODE") begin
      unique case (prev_op)
        OP_STP: fcheck(cur == "STP_LOAD" || cur == "OUTPUT", "STP decoded wrong");
        OP_EVP: fcheck(cur == "EVP_EXEC" || cur == "OUTPUT", "EVP decoded wrong");
        OP_EVB: fcheck(cur == "EVB_EXEC" || cur == "OUTPUT", "EVB decoded wrong");
        OP_RST: fcheck(cur == "RST_EXEC", "RST decoded wrong");
      endcase
    end
    if (prev == "RST_EXEC") fcheck(cur == "IDLE" && !prev_res_wr, "RST_EXEC wrote output or stayed");
    if (prev == "OUTPUT") fcheck((cur == "IDLE") == prev_space, "OUTPUT left without space or stayed");
    prev = cur;
  end

  always @(negedge clk) if (rst_n) begin
    prev_op     = dut.instr.opcode;
    prev_space  = !res_full && !st_full;
    prev_res_wr = res_wr;
    if (ctrl_rd) begin
      n_fetch++;
      fcheck(dut.state.name() == "FETCH", "instruction FIFO read outside FETCH");
    end
    if (done) n_done++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (finished);
    fcheck(n_done == n_fetch && n_done > 0, $sformatf("%0d done for %0d instructions", n_done, n_fetch));
    $display("instructions %0d, transition checks %0d", n_fetch, fsm_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks + fsm_checks, failures + fsm_fail);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + fsm_checks, failures + fsm_fail + 1);
    $finish;
  end
endmodule
