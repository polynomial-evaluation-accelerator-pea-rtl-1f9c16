// pea_core_pipe2: evaluation core of Design 2, Horner's rule on a two-stage
// pipeline with two multipliers.
//
// Each of the two lanes owns one multiplier and splits a Horner step in two
// pipeline stages: stage 1 multiplies an accumulator by its argument and
// registers the product (prod), stage 2 adds the next coefficient to the
// registered product. The register between the stages shortens the critical
// path, which is the point of this variant. A single argument cannot use the
// pipeline on every cycle because each step needs the previous step's sum, so
// each lane interleaves two arguments (phase 0 and phase 1): while one
// argument's product is in stage 2 the other argument is multiplied. The two
// lanes therefore work on a group of up to four arguments at once, and a
// degree-N polynomial is done for the whole group after 2N+1 cycles, about
// N/2 cycles per argument (5 per argument for N = 10).
//
// To keep the lanes busy, the next group is collected in a load buffer while
// the current one is computed, and finished results wait in a result buffer
// while the lanes start on the next group. In a long block a group of four
// therefore costs 2N+1 cycles.
//
// The two stages, the two multipliers and the N/2-cycles-per-argument rate
// (the "5b cycles" of a block of b at degree 10) follow Design 2 of the
// accelerator. Interleaving two arguments per lane, the groups and the load
// and result buffers are this design's own reading of how these go together.
//
// Interface: the same as pea_core_horner. Arguments are accepted one per
// cycle (in_ready high) into the load buffer; a group is complete when it
// holds four or in_last is seen. Results leave in argument order, one per
// cycle under out_valid/out_ready.
// Timing: a complete group starts at the next edge if the lanes are free;
// compute takes 2N+1 edges (the last one writes the result buffer), so the
// first result of a group whose last argument was accepted at edge t, with
// the lanes free, is taken at edge t+2N+3 (t+2 for N = 0). While one group
// computes, the next is loaded and the previous one unloaded.
module pea_core_pipe2
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
  localparam int unsigned LANES  = 2;
  localparam int unsigned PHASES = 2;
  localparam int unsigned GROUP  = LANES * PHASES;
  localparam int unsigned TW     = $clog2(2 * MAX_DEG + 1);

  // load buffer: the next group
  data_t         nxq  [LANES][PHASES];
  logic [2:0]    n_next;      // arguments in it
  logic          next_full;   // group complete
  // lanes: the group being computed
  logic          busy;
  data_t         xq   [LANES][PHASES];
  res_t          acc  [LANES][PHASES];
  res_t          prod [LANES];
  logic [TW-1:0] t;           // compute cycle, 0 .. 2N
  logic [2:0]    n_cur;
  // result buffer: the group being unloaded
  res_t          rbuf [LANES][PHASES];
  logic [2:0]    n_res;       // results in it
  logic [1:0]    r_idx;       // next result to leave

  logic [TW-1:0] two_n;
  logic          finish, start, rbuf_free;

  assign two_n      = TW'(degree) << 1;
  assign in_ready   = !next_full;
  assign out_valid  = (n_res != '0);
  assign out_result = rbuf[r_idx[0]][r_idx[1]];
  assign rbuf_free  = (n_res == '0);
  // The lanes finish a group at t = 2N, once the result buffer is free.
  assign finish     = busy && (t == two_n) && rbuf_free;
  // A complete group enters the lanes when they are free or finishing.
  // With N = 0 the group goes straight to the result buffer, which must be free.
  assign start      = next_full && (!busy || finish) && (degree != '0 || rbuf_free);

  // Coefficient used by the stage-2 adders this cycle.
  // Phase 0 adds on odd cycles t, finishing step t/2: c[N-1-t/2].
  // Phase 1 adds on even cycles t >= 2, one cycle later: c[N-t/2].
  logic [TW-1:0] half_t;
  data_t         c_ph0, c_ph1;
  always_comb begin
    half_t = t >> 1;
    c_ph0  = '0;
    c_ph1  = '0;
    for (int i = 0; i < NUM_COEF; i++) begin
      if (TW'(i) + half_t + 1'b1 == TW'(degree)) c_ph0 = coef[i];
      if (TW'(i) + half_t == TW'(degree))        c_ph1 = coef[i];
    end
  end

  // Stage 1 of each lane: one multiplier, its operands picked by the phase.
  res_t  mul_acc [LANES];
  data_t mul_x   [LANES];
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      mul_acc[l] = t[0] ? acc[l][1] : acc[l][0];
      mul_x[l]   = t[0] ? xq[l][1]  : xq[l][0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_next    <= '0;
      next_full <= 1'b0;
      busy      <= 1'b0;
      t         <= '0;
      n_cur     <= '0;
      n_res     <= '0;
      r_idx     <= '0;
      for (int l = 0; l < LANES; l++) begin
        prod[l] <= '0;
        for (int p = 0; p < PHASES; p++) begin
          nxq[l][p]  <= '0;
          xq[l][p]   <= '0;
          acc[l][p]  <= '0;
          rbuf[l][p] <= '0;
        end
      end
    end else begin
      // load buffer
      if (in_valid && in_ready) begin
        nxq[n_next[0]][n_next[1]] <= in_x;
        n_next <= n_next + 1'b1;
        if (in_last || n_next == 3'(GROUP - 1)) next_full <= 1'b1;
      end

      // result buffer
      if (out_valid && out_ready) begin
        r_idx <= r_idx + 1'b1;
        if (3'(r_idx) + 1'b1 == n_res) begin
          r_idx <= '0;
          n_res <= '0;
        end
      end

      // lanes
      if (busy && !(t == two_n)) begin
        for (int l = 0; l < LANES; l++) begin
          if (t < two_n)        prod[l]   <= res_t'(mul_acc[l] * res_t'(mul_x[l]));
          if (t[0])             acc[l][0] <= prod[l] + res_t'(c_ph0);
          if (!t[0] && t != '0) acc[l][1] <= prod[l] + res_t'(c_ph1);
        end
        t <= t + 1'b1;
      end
      if (finish) begin
        // last phase-1 add goes straight into the result buffer
        for (int l = 0; l < LANES; l++) begin
          rbuf[l][0] <= acc[l][0];
          rbuf[l][1] <= prod[l] + res_t'(c_ph1);
        end
        n_res <= n_cur;
        busy  <= 1'b0;
      end
      if (start) begin
        next_full <= 1'b0;
        n_next    <= '0;
        t         <= '0;
        if (degree == '0) begin
          // nothing to compute: P(x) = c[0]
          for (int l = 0; l < LANES; l++)
            for (int p = 0; p < PHASES; p++) rbuf[l][p] <= res_t'(coef[0]);
          n_res <= n_next;
        end else begin
          for (int l = 0; l < LANES; l++)
            for (int p = 0; p < PHASES; p++) begin
              xq[l][p]  <= nxq[l][p];
              acc[l][p] <= res_t'(coef[degree]);
            end
          n_cur <= n_next;
          busy  <= 1'b1;
        end
      end
    end
  end

  a_degree_range: assert property (@(posedge clk) disable iff (!rst_n)
                                   in_valid && in_ready |-> degree <= deg_t'(MAX_DEG))
    else $error("pea_core_pipe2: degree out of range");
  a_no_result_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                        finish |-> n_res == '0)
    else $error("pea_core_pipe2: result buffer overwritten");
endmodule
