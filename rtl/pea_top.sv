// pea_top: the three Pareto-optimal variants of the Polynomial Evaluation
// Accelerator side by side.
//
// The accelerator comes in three designs that trade hardware for speed:
// Design 1 (sequential Horner, one multiply-accumulate unit), Design 2
// (two-stage pipelined Horner with two multipliers) and Design 3 (direct
// evaluation, power chain, 19 multipliers). This top holds one pea instance
// of each, index 0, 1 and 2 of every port array, each with its own FIFO
// ports, so that all three can be built and compared together. They share
// only clock and reset. Instantiate pea directly to build one variant alone.
//
// Interface: for instance i, ctrl_wr[i]/ctrl_wdata[i]/ctrl_full[i] feed its
// instruction FIFO, data_*[i] its data FIFO; res_*[i] and st_*[i] drain its
// result and status FIFOs. See pea for the meaning and timing of each.
module pea_top
  import pea_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [2:0]                  ctrl_wr,
  input  logic [2:0][INSTR_W-1:0]     ctrl_wdata,
  output logic [2:0]                  ctrl_full,
  input  logic [2:0]                  data_wr,
  input  logic [2:0][DATA_W-1:0]      data_wdata,
  output logic [2:0]                  data_full,
  input  logic [2:0]                  res_rd,
  output logic [2:0][RES_W-1:0]       res_rdata,
  output logic [2:0]                  res_empty,
  input  logic [2:0]                  st_rd,
  output logic [2:0][STATUS_W-1:0]    st_rdata,
  output logic [2:0]                  st_empty
);
  for (genvar d = 0; d < 3; d++) begin : g_design
    status_e st;
    pea #(.CORE(d + 1), .FIFO_DEPTH(FIFO_DEPTH)) u_pea (
      .clk, .rst_n,
      .ctrl_wr(ctrl_wr[d]), .ctrl_wdata(ctrl_wdata[d]), .ctrl_full(ctrl_full[d]),
      .data_wr(data_wr[d]), .data_wdata(data_wdata[d]), .data_full(data_full[d]),
      .res_rd(res_rd[d]), .res_rdata(res_rdata[d]), .res_empty(res_empty[d]),
      .st_rd(st_rd[d]), .st_rdata(st), .st_empty(st_empty[d]));
    assign st_rdata[d] = st;
  end
endmodule
