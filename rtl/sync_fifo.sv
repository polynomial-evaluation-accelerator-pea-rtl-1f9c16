// sync_fifo: single-clock first-in first-out buffer.
//
// The accelerator talks to the rest of a dataflow graph only through FIFOs:
// an instruction (control) FIFO and a data FIFO on the input side, a result
// FIFO and a status FIFO on the output side. This module is the one buffer
// used for all four. It is a circular buffer of DEPTH words with a read and a
// write pointer and an occupancy counter.
//
// Interface: wr_en writes wr_data at the clock edge if the FIFO is not full;
// rd_data always shows the oldest word (first-word fall-through) and rd_en
// removes it at the clock edge if the FIFO is not empty. Writing and reading
// in the same cycle is allowed, also when full or empty is asserted only
// because of the other side: a write while full or a read while empty is
// ignored and flagged by an assertion. Reset (active-low, asynchronous)
// empties the FIFO. DEPTH must be a power of two. The depth is this design's
// choice; the FIFOs are named by the accelerator's definition, not sized.
module sync_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rd_ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // Storage needs no reset: a word is only read after it was written.
  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  initial assert (DEPTH >= 2 && (1 << AW) == DEPTH)
    else $error("sync_fifo: DEPTH must be a power of two, at least 2");

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full))
    else $error("sync_fifo: write while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty))
    else $error("sync_fifo: read while empty");
endmodule
