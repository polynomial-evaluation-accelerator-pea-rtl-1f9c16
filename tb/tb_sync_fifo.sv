// tb_sync_fifo: self-checking testbench for sync_fifo.
//
// Random writes and reads (never into a full or out of an empty FIFO, as the
// accelerator's users guarantee) are mirrored in a queue; every read word,
// the full and empty flags and the occupancy count are compared with it each
// cycle. Phases that mostly write and mostly read drive the FIFO to full and
// back to empty several times; both conditions are counted and required.
module tb_sync_fifo;
  localparam int W = 16;
  localparam int D = 8;

  logic clk = 1'b0, rst_n;
  logic wr_en, rd_en, full, empty;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  logic [W-1:0] model [$];

  always #5 clk = ~clk;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 1'b0; wr_en = 1'b0; rd_en = 1'b0; wr_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int bias;
      bias = ((cyc / 200) % 2 == 0) ? 3 : 1;  // write-heavy, then read-heavy
      @(negedge clk);
      check(full == (model.size() == D), "full flag");
      check(empty == (model.size() == 0), "empty flag");
      check(int'(count) == model.size(), "count");
      if (full) n_full++;
      if (empty) n_empty++;
      if (!empty) check(rd_data == model[0], $sformatf("read data %h expected %h", rd_data, model[0]));
      wr_en   = !full && ($urandom_range(0, 3) < bias);
      rd_en   = !empty && ($urandom_range(0, 3) >= bias);
      wr_data = W'($urandom);
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    check(n_full > 0, "FIFO never became full");
    check(n_empty > 0, "FIFO never became empty");
    $display("full seen %0d cycles, empty seen %0d cycles", n_full, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
