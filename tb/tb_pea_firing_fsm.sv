// tb_pea_firing_fsm: self-checking testbench for pea_firing_fsm.
//
// Checks, cycle by cycle against a model, that the actor stays idle while not
// enabled (stall), fires exactly once per enable seen in IDLE with a one-cycle
// invoke pulse, and waits in FIRING_WAIT for a done pulse that comes after a
// random number of cycles.
module tb_pea_firing_fsm;
  logic clk = 1'b0, rst_n;
  logic enable, fire_done, invoke, firing;
  int checks = 0, failures = 0, stalls = 0, firings = 0;

  always #5 clk = ~clk;

  pea_firing_fsm dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 1'b0; enable = 1'b0; fire_done = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      int idle_cycles, work;
      idle_cycles = $urandom_range(0, 3);
      work        = $urandom_range(1, 5);
      // idle, not enabled: must stall
      enable = 1'b0;
      repeat (idle_cycles) begin
        @(negedge clk);
        check(!invoke && !firing, "fired while not enabled");
        stalls++;
      end
      enable = 1'b1;
      @(negedge clk);              // enable sampled at the edge before
      check(invoke && firing, "no invoke one cycle after enable");
      firings++;
      enable = $urandom_range(0, 1);  // a firing must not restart
      repeat (work) begin
        @(negedge clk);
        check(!invoke && firing, "not waiting for done");
      end
      fire_done = 1'b1;
      @(negedge clk);
      fire_done = 1'b0;
      enable = 1'b0;
      check(!invoke && !firing, "not idle after done");
    end
    check(stalls > 0 && firings == 200, "stall or firing count");
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
