// tb_rcall_master: self-checking test of CPU-1's remote call unit.
// The testbench plays CPU-2 (raises CALLS, lowers it a random time after
// RETURNS) and CPU-1's handler (pulses svc_done a random time after the
// trap). It checks, cycle by cycle against a reference of the expected
// sequence: trap_entry exactly once per CALLS, trap high from the cycle after
// CALLS until svc_done, RETURNS from the cycle after svc_done until the cycle
// after CALLS falls, and never RETURNS without CALLS.
module tb_rcall_master;
  logic clk = 1'b0, rst = 1'b1;
  logic svc_done = 1'b0, trap_entry, trap, calls = 1'b0, returns;
  int checks = 0, failures = 0;
  int n_entry = 0;

  rcall_master dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL at %0t: %s got %b expected %b", $time, what, got, exp);
    end
  endtask

  always @(posedge clk) if (!rst && trap_entry) n_entry++;
  // RETURNS may only rise in answer to a CALLS seen the cycle before.
  logic calls_q = 1'b0, returns_q = 1'b0;
  always @(posedge clk) begin
    if (!rst && returns && !returns_q) begin
      checks++;
      if (!calls_q) begin failures++; $display("FAIL RETURNS without CALLS"); end
    end
    calls_q <= calls;
    returns_q <= returns;
  end

  initial begin
    @(posedge clk); @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    #1 expect_eq(returns, 1'b0, "idle RETURNS");
    expect_eq(trap, 1'b0, "idle trap");
    for (int k = 0; k < 100; k++) begin
      int d;
      calls <= 1'b1;
      #1 expect_eq(trap_entry, 1'b1, "trap_entry on CALLS");
      expect_eq(trap, 1'b0, "trap before the clock");
      @(posedge clk);
      #1 expect_eq(trap_entry, 1'b0, "trap_entry is one cycle");
      d = $urandom_range(0, 6);
      repeat (d) begin
        expect_eq(trap, 1'b1, "trap while servicing");
        expect_eq(returns, 1'b0, "RETURNS while servicing");
        @(posedge clk); #1;
      end
      svc_done <= 1'b1;
      @(posedge clk);
      svc_done <= 1'b0;
      #1 expect_eq(trap, 1'b0, "trap after svc_done");
      expect_eq(returns, 1'b1, "RETURNS after svc_done");
      d = $urandom_range(0, 6);
      repeat (d) begin
        @(posedge clk); #1;
        expect_eq(returns, 1'b1, "RETURNS held while CALLS");
      end
      calls <= 1'b0;
      @(posedge clk);
      #1 expect_eq(returns, 1'b0, "RETURNS falls after CALLS");
      repeat ($urandom_range(0, 3)) begin
        @(posedge clk); #1;
        expect_eq(trap_entry, 1'b0, "no trap without CALLS");
      end
    end
    checks++;
    if (n_entry != 100) begin failures++; $display("FAIL trap_entry count %0d", n_entry); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
