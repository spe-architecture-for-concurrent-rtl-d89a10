// tb_stack_arbiter: self-checking test of CPU-1's REQUEST/GRANT control.
// CPU-2's request and CPU-1's use of the stack (pointer port, memory port,
// lock) are driven at random, with CPU-1 keeping off the stack whenever it
// sees grant. A reference model of stack ownership, written from the rules
// (grant when requested and CPU-1 is idle; keep it until request falls),
// gives the expected grant, s_wait and refused every cycle. Grants,
// refusals and releases must each happen.
module tb_stack_arbiter;
  logic clk = 1'b0, rst = 1'b1;
  logic request = 1'b0, m_sp_en = 1'b0, m_stk_en = 1'b0, m_lock = 1'b0;
  logic grant, m_blocked, s_wait, refused;
  logic model_grant;
  int checks = 0, failures = 0;
  int n_grant = 0, n_refused = 0, n_release = 0;

  stack_arbiter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, exp, input string what, input int cyc);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL cycle %0d %s: got %b expected %b", cyc, what, got, exp);
    end
  endtask

  initial begin
    @(posedge clk); @(posedge clk);
    rst <= 1'b0;
    model_grant = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      logic busy;
      @(posedge clk);
      #1;
      // request is held for stretches, as CPU-2 would
      if ($urandom_range(0, 3) == 0) request = ~request;
      if (!grant) begin
        m_sp_en  = ($urandom_range(0, 3) == 0);
        m_stk_en = ($urandom_range(0, 3) == 0);
        m_lock   = ($urandom_range(0, 5) == 0);
      end else begin
        m_sp_en = 1'b0; m_stk_en = 1'b0; m_lock = 1'b0;
      end
      #1;
      busy = m_sp_en || m_stk_en || m_lock;
      check(grant, model_grant, "grant", i);
      check(m_blocked, model_grant, "m_blocked", i);
      check(s_wait, request && !model_grant, "s_wait", i);
      check(refused, request && !model_grant && busy, "refused", i);
      if (request && !model_grant && busy) n_refused++;
      if (!model_grant && request && !busy) begin model_grant = 1'b1; n_grant++; end
      else if (model_grant && !request) begin model_grant = 1'b0; n_release++; end
    end
    checks++;
    if (n_grant == 0 || n_refused == 0 || n_release == 0) begin
      failures++;
      $display("FAIL coverage grant=%0d refused=%0d release=%0d", n_grant, n_refused, n_release);
    end
    $display("grants=%0d refusals=%0d releases=%0d", n_grant, n_refused, n_release);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
