// tb_mc_cpu: end-to-end test of the MC-CPU inter-processor fabric at its
// default parameters. The testbench plays both CPU cores:
//   CPU-1 (kernel) keeps words of its own on the shared stack during the
//   first two calls (the 32-word call needs the whole stack), services
//   remote calls (pops the service code and the parameters, pushes one
//   return value) and raises remote interrupts;
//   CPU-2 (user code) makes remote calls with 1, 8 and 32 words on the
//   stack (the service code plus 0, 7 and 31 parameters), checks the return
//   value, serves remote interrupts and makes a plain stack request while
//   CPU-1 holds the stack, so that it is refused and has to wait.
// The service code sits on top of the stack; its low 16 bits give the
// number of parameters below it. The return value is the service number
// plus the sum of the parameters, computed independently on both sides.
// Checked: every return value, every interrupt vector, the stack pointer
// after each operation, CPU-1's own words surviving the calls, and the
// handshake cycle count of a call that passes only the service code
// (at most 20 clocks, the figure quoted for such a remote trap).
// Each mechanism (grant, refusal, remote call, RETURNS, remote interrupt,
// SERVICED, interrupt during a call, pointer writes by each CPU) must occur.
module tb_mc_cpu;
  import spe_pkg::*;

  logic clk = 1'b0, rst = 1'b1;

  sstack_port_t m_stk = '0, s_stk = '0;
  logic m_lock = 1'b0, m_blocked, m_svc_done = 1'b0, m_trap_entry, m_trap;
  logic m_int_raise = 1'b0, m_int_busy, m_int_done;
  intscode_t m_int_code = '0;
  logic s_stack_req = 1'b0, s_stack_owned, s_wait;
  logic s_call_start = 1'b0, s_args_done = 1'b0, s_results_done = 1'b0, s_call_busy, s_call_done;
  logic s_irq_done = 1'b0, s_irq_take, s_in_service;
  word_t s_irq_vector, sp, stk_rdata;
  logic stk_refused;
  ipc_t ipc;

  mc_cpu dut (.*);

  always #20 clk = ~clk;  // 25 MHz

  int checks = 0, failures = 0;
  int n_grant = 0, n_refused = 0, n_wait_cycles = 0, n_calls = 0, n_returns = 0;
  int n_ints = 0, n_serviced = 0, n_int_in_call = 0, n_m_spw = 0, n_s_spw = 0;
  int call_cycles [3];
  logic done_all = 1'b0;

  task automatic check(input longint got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL at %0t: %s got %0h expected %0h", $time, what, got, exp);
    end
  endtask

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters
  logic grant_q = 1'b0, ints_q = 1'b0, serv_q = 1'b0, ret_q = 1'b0;
  always @(posedge clk) if (!rst) begin
    if (ipc.grant && !grant_q) n_grant++;
    if (stk_refused) n_refused++;
    if (s_wait) n_wait_cycles++;
    if (ipc.returns && !ret_q) n_returns++;
    if (ipc.ints && !ints_q) begin n_ints++; if (ipc.calls) n_int_in_call++; end
    if (ipc.serviced && !serv_q) n_serviced++;
    if (!ipc.grant && m_stk.sp_en && m_stk.sp_wr) n_m_spw++;
    if (ipc.grant && s_stk.sp_en && s_stk.sp_wr) n_s_spw++;
    grant_q <= ipc.grant; ints_q <= ipc.ints; serv_q <= ipc.serviced; ret_q <= ipc.returns;
  end

  // ---------------- stack access helpers (push writes at sp, pop reads sp-1)
  function automatic sstack_port_t push_op(word_t cur, word_t data);
    sstack_port_t p;
    p = '0;
    p.sp_en = 1'b1; p.sp_wr = 1'b1; p.sp_wdata = cur + 1;
    p.stk_en = 1'b1; p.stk_wr = 1'b1; p.stk_addr = cur[STACK_AW-1:0]; p.stk_wdata = data;
    return p;
  endfunction

  function automatic sstack_port_t pop_op(word_t cur);
    sstack_port_t p;
    p = '0;
    p.sp_en = 1'b1; p.sp_wr = 1'b1; p.sp_wdata = cur - 1;
    p.stk_en = 1'b1; p.stk_wr = 1'b0; p.stk_addr = 5'(cur - 1);
    return p;
  endfunction

  task automatic m_push(input word_t d);
    while (m_blocked) tick();
    m_stk = push_op(sp, d);
    tick();
    m_stk = '0;
  endtask

  task automatic m_pop(output word_t d);
    while (m_blocked) tick();
    m_stk = pop_op(sp);
    tick();
    m_stk = '0;
    d = stk_rdata;
  endtask

  task automatic s_push(input word_t d);
    s_stk = push_op(sp, d);
    tick();
    s_stk = '0;
  endtask

  task automatic s_pop(output word_t d);
    s_stk = pop_op(sp);
    tick();
    s_stk = '0;
    d = stk_rdata;
  endtask

  function automatic word_t param_val(int call_id, int k);
    return word_t'(32'h1000 * (call_id + 1) + k * 3 + 1);
  endfunction

  // ---------------- CPU-1: kernel
  word_t m_own [3] = '{32'hA5A5_0001, 32'hA5A5_0002, 32'hA5A5_0003};
  logic m_ready = 1'b0, kernel_clear = 1'b0;

  task automatic m_service_call();
    word_t code, d, sum;
    int nparam;
    m_lock = 1'b1;          // keep the stack for the whole handler
    m_pop(code);
    nparam = int'(code[15:0]);
    sum = word_t'(code[31:16]);
    for (int k = 0; k < nparam; k++) begin
      m_pop(d);
      sum += d;
    end
    m_push(sum);
    m_lock = 1'b0;
    m_svc_done = 1'b1;
    tick();
    m_svc_done = 1'b0;
  endtask

  task automatic m_raise(input intscode_t c);
    while (m_int_busy) tick();
    m_int_code = c;
    m_int_raise = 1'b1;
    tick();
    m_int_raise = 1'b0;
  endtask

  initial begin : cpu1
    word_t d;
    wait (!rst);
    tick();
    // kernel words that must survive everything CPU-2 does
    foreach (m_own[i]) m_push(m_own[i]);
    check(longint'(sp), longint'(3), "sp after kernel pushes");
    m_ready = 1'b1;
    // serve the three remote calls; raise a remote interrupt during the second
    for (int c = 0; c < 3; c++) begin
      while (!m_trap) tick();
      if (c == 1) m_raise(8'h21);
      m_service_call();
      if (c == 1) begin
        // a 32-word call needs the whole stack: the kernel takes its words
        // back once the second call has completed
        while (n_calls < 2) tick();
        for (int i = 2; i >= 0; i--) begin
          m_pop(d);
          check(longint'(d), longint'(m_own[i]), "kernel word kept");
        end
        check(longint'(sp), longint'(0), "stack empty before the 32-word call");
        kernel_clear = 1'b1;
      end
    end
    // hold the stack with a lock while CPU-2 asks for it (refusal and wait)
    while (n_calls < 3) tick();
    m_lock = 1'b1;
    repeat (6) tick();
    m_lock = 1'b0;
    // two more remote interrupts, back to back
    m_raise(8'h05);
    m_raise(8'hFF);
    while (m_int_busy) tick();
  end

  // ---------------- CPU-2: user code and remote interrupt handler
  int irq_seen = 0;
  intscode_t irq_codes [$];
  initial begin : cpu2_irq
    wait (!rst);
    forever begin
      tick();
      if (s_irq_take) begin
        intscode_t c;
        c = irq_codes.pop_front();
        check(longint'(s_irq_vector), longint'(word_t'(c) * 4), "remote interrupt vector");
        irq_seen++;
        repeat (3) tick();       // handler body
        s_irq_done = 1'b1;
        tick();
        s_irq_done = 1'b0;
      end
    end
  end

  initial begin : cpu2
    static int sizes [3] = '{1, 8, 32};
    word_t d, exp;
    int t0;
    irq_codes.push_back(8'h21);
    irq_codes.push_back(8'h05);
    irq_codes.push_back(8'hFF);
    @(negedge rst);
    wait (m_ready);
    tick();
    for (int c = 0; c < 3; c++) begin
      int nparam;
      word_t code, base;
      if (c == 2) while (!kernel_clear) tick();
      base = sp;
      nparam = sizes[c] - 1;
      code = {16'(c + 7), 16'(nparam)};
      exp = word_t'(c + 7);
      t0 = 0;
      s_call_start = 1'b1;
      tick();
      s_call_start = 1'b0;
      t0++;
      while (!s_stack_owned) begin tick(); t0++; end
      for (int k = 0; k < nparam; k++) begin
        s_push(param_val(c, k)); t0++;
        exp += param_val(c, k);
      end
      s_push(code); t0++;
      check(longint'(sp), longint'(base) + longint'(sizes[c]), "sp with the call on the stack");
      s_args_done = 1'b1;
      tick(); t0++;
      s_args_done = 1'b0;
      while (!s_stack_owned) begin tick(); t0++; end
      check(longint'(sp), longint'(base) + 1, "sp with the return value on the stack");
      s_pop(d); t0++;
      check(longint'(d), longint'(exp), $sformatf("return value of call %0d", c));
      s_results_done = 1'b1;
      tick(); t0++;
      s_results_done = 1'b0;
      while (!s_call_done) begin tick(); t0++; end
      tick(); t0++;
      call_cycles[c] = t0;
      n_calls++;
      $display("remote call with %0d stack words: %0d clocks (CPU-1 handler included)", sizes[c], t0);
    end
    // plain request while CPU-1 holds the stack
    while (!m_lock) tick();
    s_stack_req = 1'b1;
    tick();
    check(longint'(s_wait), longint'(1), "CPU-2 waits while CPU-1 holds the stack");
    while (!s_stack_owned) tick();
    s_push(32'h5EED_0001);
    s_pop(d);
    check(longint'(d), longint'(32'h5EED_0001), "plain access word");
    s_stack_req = 1'b0;
    tick();
    while (irq_seen < 3) tick();
    done_all = 1'b1;
  end

  // ---------------- end of test
  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    wait (done_all);
    repeat (40) tick();
    check(longint'(sp), longint'(0), "final sp");
    check(longint'(irq_seen), longint'(3), "remote interrupts served");
    checks++;
    if (call_cycles[0] > 20) begin
      failures++;
      $display("FAIL remote call with only the service code took %0d clocks", call_cycles[0]);
    end
    $display("mechanisms: grants=%0d refusals=%0d wait_cycles=%0d calls=%0d returns=%0d ints=%0d serviced=%0d int_during_call=%0d sp_writes m=%0d s=%0d",
             n_grant, n_refused, n_wait_cycles, n_calls, n_returns, n_ints, n_serviced, n_int_in_call, n_m_spw, n_s_spw);
    checks++;
    if (n_grant == 0 || n_refused == 0 || n_wait_cycles == 0 || n_calls != 3 || n_returns != 3 ||
        n_ints != 3 || n_serviced != 3 || n_int_in_call == 0 || n_m_spw == 0 || n_s_spw == 0) begin
      failures++;
      $display("FAIL a mechanism did not occur");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
