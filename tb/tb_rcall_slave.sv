// tb_rcall_slave: self-checking test of CPU-2's remote call sequencer.
// The testbench plays CPU-1 (grant follows request one clock later, unless
// CPU-1 is randomly busy; RETURNS rises a random time after CALLS and falls
// one clock after CALLS falls) and CPU-2's core (pushes for a random number
// of cycles once it owns the stack, then pulses args_done; pops likewise).
// Every cycle it checks the protocol: CALLS rises only after the stack was
// given back; no request while waiting for RETURNS; CALLS falls only after
// RETURNS; stack_owned only with grant and only in a push/pop phase. Each
// call must complete with call_done, and the phases must appear in order.
// Plain stack requests between calls are also checked.
module tb_rcall_slave;
  logic clk = 1'b0, rst = 1'b1;
  logic call_start = 1'b0, args_done = 1'b0, results_done = 1'b0, stack_req = 1'b0;
  logic stack_owned, busy, call_done, grant = 1'b0, returns = 1'b0, request, calls;
  int checks = 0, failures = 0;
  int n_calls = 0, n_done = 0, n_plain = 0, owned_phase = 0;
  logic calls_q = 1'b0, request_q = 1'b0, returns_seen = 1'b0;
  int ret_delay = 0;
  logic m_busy = 1'b0;

  rcall_slave dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // CPU-1 behaviour
  always_ff @(posedge clk) begin
    if (rst) begin
      grant <= 1'b0; returns <= 1'b0; ret_delay <= 0; m_busy <= 1'b0;
    end else begin
      m_busy <= ($urandom_range(0, 2) == 0);
      if (!grant) grant <= request && !m_busy;
      else        grant <= request;
      if (calls && !returns) begin
        if (ret_delay == 0) ret_delay <= $urandom_range(1, 8);
        else if (ret_delay == 1) begin returns <= 1'b1; ret_delay <= 0; end
        else ret_delay <= ret_delay - 1;
      end
      if (returns && !calls) returns <= 1'b0;
    end
  end

  // protocol monitor
  always @(posedge clk) if (!rst) begin
    if (calls && !calls_q) expect_true(!grant && !request_q, "CALLS raised while the stack is still held");
    if (calls && !returns && calls_q) expect_true(!request, "REQUEST while waiting for RETURNS");
    if (!calls && calls_q) expect_true(returns, "CALLS dropped before RETURNS");
    if (returns) returns_seen <= 1'b1;
    if (stack_owned) expect_true(grant, "stack_owned without grant");
    if (call_done) begin n_done++; expect_true(!grant && !calls && !returns, "call_done with signals up"); end
    calls_q <= calls;
    request_q <= request;
  end

  task automatic wait_owned(output int cycles);
    cycles = 0;
    while (!stack_owned) begin @(posedge clk); #1; cycles++; end
  endtask

  initial begin
    int c;
    @(posedge clk); @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    #1;
    for (int k = 0; k < 60; k++) begin
      if (k % 3 == 2) begin
        // plain access to the stack outside a call
        stack_req <= 1'b1;
        #1 wait_owned(c);
        expect_true(!calls && !busy, "plain request treated as a call");
        repeat ($urandom_range(1, 4)) begin @(posedge clk); #1; end
        stack_req <= 1'b0;
        n_plain++;
        begin @(posedge clk); #1; end
        while (grant) begin @(posedge clk); #1; end
        continue;
      end
      call_start <= 1'b1;
      begin @(posedge clk); #1; end
      call_start <= 1'b0;
      n_calls++;
      #1 expect_true(busy && request && !calls, "call did not start with REQUEST");
      wait_owned(c);
      expect_true(!calls, "owned for arguments while CALLS is up");
      owned_phase++;
      repeat ($urandom_range(0, 5)) begin @(posedge clk); #1; end
      args_done <= 1'b1;
      begin @(posedge clk); #1; end
      args_done <= 1'b0;
      #1 wait_owned(c);
      expect_true(calls && returns, "owned for results before RETURNS");
      owned_phase++;
      repeat ($urandom_range(0, 5)) begin @(posedge clk); #1; end
      results_done <= 1'b1;
      begin @(posedge clk); #1; end
      results_done <= 1'b0;
      while (busy) begin @(posedge clk); #1; end
    end
    repeat (3) begin @(posedge clk); #1; end
    checks++;
    if (n_done != n_calls || owned_phase != 2 * n_calls || n_plain == 0) begin
      failures++;
      $display("FAIL calls=%0d done=%0d phases=%0d plain=%0d", n_calls, n_done, owned_phase, n_plain);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
