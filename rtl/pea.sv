// pea: one Polynomial Evaluation Accelerator, a dataflow actor that stores up
// to eight polynomials and evaluates them on streams of arguments.
//
// Inside are the four FIFOs through which the actor talks to its graph
// (instructions in, data in, results out, status out), the outer firing FSM
// (pea_firing_fsm), the control FSM (pea_ctrl), the coefficient-vector store
// (pea_cv_store) and one evaluation core, chosen by CORE:
//   CORE = 1  pea_core_horner  sequential Horner, smallest      (Design 1)
//   CORE = 2  pea_core_pipe2   two-stage pipelined Horner       (Design 2)
//   CORE = 3  pea_core_direct  power chain, 19 multipliers      (Design 3)
// All three give bit-identical results; they differ in speed and size. The
// default is Design 2, which the accelerator's evaluation recommends for
// general use (highest clock frequency at moderate cost).
//
// Interface: the producer side writes instruction words (ctrl_*) and data
// words (coefficients for STP, arguments for EVP/EVB) into the input FIFOs;
// the consumer side reads one 32-bit result and one status word for every
// STP, EVP and failed instruction, and b of each for an EVB. RST produces
// nothing. Each FIFO shows full/empty; writes into a full FIFO and reads from
// an empty one are ignored. The FIFO depth (FIFO_DEPTH) is this design's
// choice. Reset is active-low and asynchronous.
module pea
  import pea_pkg::*;
#(
  parameter int unsigned CORE       = 2,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ctrl_wr,
  input  logic [INSTR_W-1:0] ctrl_wdata,
  output logic               ctrl_full,
  input  logic               data_wr,
  input  data_t              data_wdata,
  output logic               data_full,
  input  logic               res_rd,
  output res_t               res_rdata,
  output logic               res_empty,
  input  logic               st_rd,
  output status_e            st_rdata,
  output logic               st_empty
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;

  // FIFO-side nets
  logic               ctrl_empty, ctrl_rd, data_empty, data_rd;
  logic [INSTR_W-1:0] ctrl_rdata;
  data_t              data_rdata;
  logic               res_full, res_wr, st_full, st_wr;
  res_t               res_wdata;
  status_e            st_wdata;
  logic [STATUS_W-1:0] st_rdata_raw;
  logic [CW-1:0]      ctrl_count, data_count, res_count, st_count;

  // actor control
  logic invoke, fire_done, firing;

  // CV store
  cv_addr_t  cv_addr;
  logic      cv_wr_en, cv_set_valid, cv_clear_all, cv_valid;
  deg_t      cv_wr_idx, cv_set_degree, cv_degree;
  data_t     cv_wr_data;
  coef_vec_t cv_coef;

  // core
  logic  core_in_valid, core_in_ready, core_in_last, core_out_valid, core_out_ready;
  data_t core_in_x;
  res_t  core_out_result;

  sync_fifo #(.WIDTH(INSTR_W), .DEPTH(FIFO_DEPTH)) u_ctrl_fifo (
    .clk, .rst_n, .wr_en(ctrl_wr), .wr_data(ctrl_wdata), .full(ctrl_full),
    .rd_en(ctrl_rd), .rd_data(ctrl_rdata), .empty(ctrl_empty), .count(ctrl_count));

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_data_fifo (
    .clk, .rst_n, .wr_en(data_wr), .wr_data(data_wdata), .full(data_full),
    .rd_en(data_rd), .rd_data(data_rdata), .empty(data_empty), .count(data_count));

  sync_fifo #(.WIDTH(RES_W), .DEPTH(FIFO_DEPTH)) u_res_fifo (
    .clk, .rst_n, .wr_en(res_wr), .wr_data(res_wdata), .full(res_full),
    .rd_en(res_rd), .rd_data(res_rdata), .empty(res_empty), .count(res_count));

  sync_fifo #(.WIDTH(STATUS_W), .DEPTH(FIFO_DEPTH)) u_st_fifo (
    .clk, .rst_n, .wr_en(st_wr), .wr_data(st_wdata), .full(st_full),
    .rd_en(st_rd), .rd_data(st_rdata_raw), .empty(st_empty), .count(st_count));

  assign st_rdata = status_e'(st_rdata_raw);

  // The actor is enabled whenever an instruction is waiting.
  pea_firing_fsm u_firing (
    .clk, .rst_n, .enable(!ctrl_empty), .fire_done, .invoke, .firing);

  pea_ctrl u_ctrl (
    .clk, .rst_n, .invoke, .done(fire_done),
    .ctrl_empty, .ctrl_rdata, .ctrl_rd,
    .data_empty, .data_rdata, .data_rd,
    .res_full, .res_wr, .res_wdata, .st_full, .st_wr, .st_wdata,
    .cv_addr, .cv_wr_en, .cv_wr_idx, .cv_wr_data, .cv_set_valid, .cv_set_degree,
    .cv_clear_all, .cv_valid,
    .core_in_valid, .core_in_ready, .core_in_x, .core_in_last,
    .core_out_valid, .core_out_ready, .core_out_result);

  pea_cv_store u_cv_store (
    .clk, .rst_n, .addr(cv_addr), .wr_en(cv_wr_en), .wr_idx(cv_wr_idx),
    .wr_data(cv_wr_data), .set_valid(cv_set_valid), .set_degree(cv_set_degree),
    .clear_all(cv_clear_all), .rd_coef(cv_coef), .rd_valid(cv_valid),
    .rd_degree(cv_degree));

  generate
    if (CORE == 1) begin : g_core
      pea_core_horner u_core (
        .clk, .rst_n, .coef(cv_coef), .degree(cv_degree),
        .in_valid(core_in_valid), .in_ready(core_in_ready), .in_x(core_in_x),
        .in_last(core_in_last), .out_valid(core_out_valid),
        .out_ready(core_out_ready), .out_result(core_out_result));
    end else if (CORE == 2) begin : g_core
      pea_core_pipe2 u_core (
        .clk, .rst_n, .coef(cv_coef), .degree(cv_degree),
        .in_valid(core_in_valid), .in_ready(core_in_ready), .in_x(core_in_x),
        .in_last(core_in_last), .out_valid(core_out_valid),
        .out_ready(core_out_ready), .out_result(core_out_result));
    end else begin : g_core
      pea_core_direct u_core (
        .clk, .rst_n, .coef(cv_coef), .degree(cv_degree),
        .in_valid(core_in_valid), .in_ready(core_in_ready), .in_x(core_in_x),
        .in_last(core_in_last), .out_valid(core_out_valid),
        .out_ready(core_out_ready), .out_result(core_out_result));
    end
  endgenerate

  // Occupancy counts are kept for observation only.
  logic unused;
  assign unused = ^{ctrl_count, data_count, res_count, st_count, firing};

  initial assert (CORE >= 1 && CORE <= 3) else $error("pea: CORE must be 1, 2 or 3");
endmodule
