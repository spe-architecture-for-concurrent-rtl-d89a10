// tb_shared_stack: self-checking test of the shared stack (pointer, memory
// and port multiplexers). CPU-1 pushes a sequence, the selection is switched
// to CPU-2, which pops part of it and pushes its own words while CPU-1's port
// is driven with conflicting accesses that must be ignored; CPU-1 then pops
// everything back. A reference stack model gives the expected words and
// pointer. Pushes write at sp and increment it; pops decrement sp and read
// the word at the new sp, which arrives one cycle later.
module tb_shared_stack;
  import spe_pkg::*;

  logic clk = 1'b0, rst = 1'b1, sel_slave = 1'b0;
  sstack_port_t m_port, s_port;
  word_t sp, rdata;
  word_t model [$];
  int checks = 0, failures = 0;

  shared_stack dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input word_t got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic sstack_port_t push_req(word_t cur_sp, word_t data);
    sstack_port_t p;
    p.sp_en = 1'b1; p.sp_wr = 1'b1; p.sp_wdata = cur_sp + 1;
    p.stk_en = 1'b1; p.stk_wr = 1'b1; p.stk_addr = cur_sp[STACK_AW-1:0]; p.stk_wdata = data;
    return p;
  endfunction

  function automatic sstack_port_t pop_req(word_t cur_sp);
    sstack_port_t p;
    p.sp_en = 1'b1; p.sp_wr = 1'b1; p.sp_wdata = cur_sp - 1;
    p.stk_en = 1'b1; p.stk_wr = 1'b0; p.stk_addr = 5'(cur_sp - 1); p.stk_wdata = '0;
    return p;
  endfunction

  // Push on the selected side; the other side drives a disturbing push.
  task automatic push(input bit slave, input word_t data);
    if (slave) begin s_port <= push_req(sp, data); m_port <= push_req(sp + 7, ~data); end
    else       begin m_port <= push_req(sp, data); s_port <= push_req(sp + 5, ~data); end
    model.push_back(data);
    @(posedge clk);
    m_port <= '0; s_port <= '0;
    #1 check(sp, word_t'(model.size()), "sp after push");
  endtask

  task automatic pop(input bit slave);
    word_t exp;
    exp = model.pop_back();
    if (slave) begin s_port <= pop_req(sp); m_port <= push_req(sp, 32'hBAD0_0000); end
    else       begin m_port <= pop_req(sp); s_port <= push_req(sp, 32'hBAD1_0000); end
    @(posedge clk);
    m_port <= '0; s_port <= '0;
    #1 check(rdata, exp, "popped word");
    check(sp, word_t'(model.size()), "sp after pop");
  endtask

  initial begin
    m_port = '0; s_port = '0;
    @(posedge clk); @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < 20; i++) push(1'b0, $urandom());
    sel_slave <= 1'b1;
    for (int i = 0; i < 5; i++) pop(1'b1);
    for (int i = 0; i < 17; i++) push(1'b1, $urandom());  // stack now full
    check(sp, 32'd32, "stack full");
    sel_slave <= 1'b0;
    while (model.size() > 0) pop(1'b0);
    check(sp, 32'd0, "stack empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
