// pea_cv_store: the eight coefficient vectors (CVs) of the accelerator.
//
// Each CV holds up to MAX_DEG+1 = 11 signed 16-bit coefficients c[0..10],
// the degree N of the polynomial it holds and a valid flag. STP writes the
// N+1 coefficients one by one and then marks the CV valid with its degree;
// RST clears every valid flag, leaving all CVs empty. The whole selected
// vector is read in parallel because the direct-evaluation core uses all its
// coefficients in the same cycle.
//
// The eight vectors, the degree limit of 10 and the clearing of all valid
// flags by RST follow the accelerator's definition. Building the store from
// registers, with one write port and one combinational read port that share
// the address, is this design's choice. Coefficients above a CV's degree keep
// whatever they held; users of the store must ignore them.
//
// Interface: addr selects the CV for both ports. wr_en writes wr_data to
// coefficient wr_idx at the clock edge; set_valid marks the CV valid with
// degree set_degree; clear_all (RST) drops all valid flags and wins over
// set_valid. rd_coef, rd_valid and rd_degree show the selected CV in the same
// cycle. Reset (active-low, asynchronous) empties all CVs.
module pea_cv_store
  import pea_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  cv_addr_t  addr,
  input  logic      wr_en,
  input  deg_t      wr_idx,
  input  data_t     wr_data,
  input  logic      set_valid,
  input  deg_t      set_degree,
  input  logic      clear_all,
  output coef_vec_t rd_coef,
  output logic      rd_valid,
  output deg_t      rd_degree
);
  data_t coefs  [NUM_CV][NUM_COEF];
  logic  valid  [NUM_CV];
  deg_t  degree [NUM_CV];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NUM_CV; v++) begin
        valid[v]  <= 1'b0;
        degree[v] <= '0;
        for (int i = 0; i < NUM_COEF; i++) coefs[v][i] <= '0;
      end
    end else begin
      if (wr_en) coefs[addr][wr_idx] <= wr_data;
      if (clear_all) begin
        for (int v = 0; v < NUM_CV; v++) valid[v] <= 1'b0;
      end else if (set_valid) begin
        valid[addr]  <= 1'b1;
        degree[addr] <= set_degree;
      end
    end
  end

  assign rd_coef   = coefs[addr];
  assign rd_valid  = valid[addr];
  assign rd_degree = degree[addr];

  a_idx_range: assert property (@(posedge clk) disable iff (!rst_n)
                                wr_en |-> wr_idx <= deg_t'(MAX_DEG))
    else $error("pea_cv_store: coefficient index out of range");
  a_deg_range: assert property (@(posedge clk) disable iff (!rst_n)
                                set_valid |-> set_degree <= deg_t'(MAX_DEG))
    else $error("pea_cv_store: degree out of range");
endmodule
