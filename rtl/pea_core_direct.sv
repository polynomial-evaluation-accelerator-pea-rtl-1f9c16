// pea_core_direct: evaluation core of Design 3, direct evaluation with a
// power chain, the fastest PEA variant for large blocks.
//
// Instead of Horner's rule the core forms every term c[i]*x^i. Nine "chain"
// multipliers compute x^2 ... x^10, each from the previous power and x, and
// ten "term" multipliers form c[1]*x ... c[10]*x^10; the terms are summed on
// the way. The chain is pipelined: stage k (k = 1..9) holds x, x^(k+1) and the
// partial sum c[0] + ... + c[k]*x^k, and the last term is added at the output.
// A new argument can enter every cycle, so a block streams through at one
// result per cycle after the pipeline has filled. Coefficients above the
// stored degree are masked to zero.
//
// The 19 multipliers (9 in the power chain, 10 for the terms), direct
// evaluation and the "8 + b" cycle count follow Design 3 of the accelerator;
// how the terms are spread over the pipeline stages is this design's choice.
//
// Interface: the same as pea_core_horner; in_last is not needed. The whole
// pipeline stalls while a result waits for out_ready.
// Timing: an argument accepted at clock edge t gives out_valid after edge
// t+8 and can be taken at edge t+9; with no stall, a block of b arguments
// accepted from edge t0 on is fully delivered at edge t0+8+b.
module pea_core_direct
  import pea_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  coef_vec_t coef,
  input  deg_t      degree,
  input  logic      in_valid,
  output logic      in_ready,
  input  data_t     in_x,
  input  logic      in_last,
  output logic      out_valid,
  input  logic      out_ready,
  output res_t      out_result
);
  localparam int unsigned STAGES = MAX_DEG - 1;  // 9 registered stages

  logic  v   [1:STAGES];
  data_t xs  [1:STAGES];
  res_t  pw  [1:STAGES];  // stage k: x^(k+1)
  res_t  sum [1:STAGES];  // stage k: c[0] + ... + c[k]*x^k
  res_t  ce  [NUM_COEF];  // coefficients, zero above the degree
  logic  advance;

  always_comb begin
    for (int i = 0; i < NUM_COEF; i++)
      ce[i] = (deg_t'(i) <= degree) ? res_t'(coef[i]) : '0;
  end

  assign out_valid  = v[STAGES];
  assign advance    = !out_valid || out_ready;
  assign in_ready   = advance;
  assign out_result = sum[STAGES] + res_t'(ce[MAX_DEG] * pw[STAGES]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k <= STAGES; k++) begin
        v[k]   <= 1'b0;
        xs[k]  <= '0;
        pw[k]  <= '0;
        sum[k] <= '0;
      end
    end else if (advance) begin
      v[1]   <= in_valid;
      xs[1]  <= in_x;
      pw[1]  <= res_t'(res_t'(in_x) * res_t'(in_x));
      sum[1] <= ce[0] + res_t'(ce[1] * res_t'(in_x));
      for (int k = 2; k <= STAGES; k++) begin
        v[k]   <= v[k-1];
        xs[k]  <= xs[k-1];
        pw[k]  <= res_t'(pw[k-1] * res_t'(xs[k-1]));
        sum[k] <= sum[k-1] + res_t'(ce[k] * pw[k-1]);
      end
    end
  end

  logic unused_last;
  assign unused_last = in_last;

  a_degree_range: assert property (@(posedge clk) disable iff (!rst_n)
                                   in_valid && in_ready |-> degree <= deg_t'(MAX_DEG))
    else $error("pea_core_direct: degree out of range");
endmodule
