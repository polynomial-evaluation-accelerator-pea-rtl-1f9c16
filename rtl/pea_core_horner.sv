// pea_core_horner: evaluation core of Design 1, the smallest PEA variant.
//
// One multiply-accumulate unit applies Horner's rule sequentially:
//   acc = c[N];  then for k = N-1 down to 0:  acc = acc * x + c[k]
// one step per clock cycle, so a degree-N polynomial takes N cycles. This is
// the structure the accelerator's Design 1 prescribes. Arithmetic is 32-bit
// two's complement and wraps.
//
// Interface (shared by all three cores): coef/degree describe the polynomial
// and must stay stable while an argument is being evaluated. An argument is
// accepted when in_valid && in_ready; in_last marks the last argument of a
// block and is not needed by this core. The result is held on out_result while
// out_valid is high, until out_ready takes it.
// Timing: in_ready is high only when the core is empty. An argument accepted
// at clock edge t gives out_valid after edge t+N; the earliest next argument
// is accepted at the edge that takes the result, so a block of b arguments of
// degree N needs b*(N+2) cycles including the hand-over cycles.
module pea_core_horner
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
  logic  busy;
  deg_t  k;      // Horner steps still to do
  res_t  acc;
  data_t xr;

  assign in_ready   = !busy;
  assign out_valid  = busy && (k == '0);
  assign out_result = acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      k    <= '0;
      acc  <= '0;
      xr   <= '0;
    end else if (!busy) begin
      if (in_valid) begin
        busy <= 1'b1;
        k    <= degree;
        acc  <= res_t'(coef[degree]);
        xr   <= in_x;
      end
    end else if (k != '0) begin
      acc <= res_t'(acc * res_t'(xr)) + res_t'(coef[k - 1'b1]);
      k   <= k - 1'b1;
    end else if (out_ready) begin
      busy <= 1'b0;
    end
  end

  // in_last carries no information for a core that evaluates one argument at a time.
  logic unused_last;
  assign unused_last = in_last;

  a_degree_range: assert property (@(posedge clk) disable iff (!rst_n)
                                   in_valid && in_ready |-> degree <= deg_t'(MAX_DEG))
    else $error("pea_core_horner: degree out of range");
endmodule
