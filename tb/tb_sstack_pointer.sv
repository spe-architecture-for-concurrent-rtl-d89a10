// tb_sstack_pointer: self-checking test of the shared stack pointer.
// Drives both write ports with random enables, write strobes, data and port
// selection for many cycles and compares the pointer with a reference model;
// checks the reset value and that the unselected port never writes.
module tb_sstack_pointer;
  logic clk = 1'b0, rst = 1'b1;
  logic sel_slave = 1'b0;
  logic m_en = 1'b0, m_wr = 1'b0, s_en = 1'b0, s_wr = 1'b0;
  logic [31:0] m_wdata = '0, s_wdata = '0, sp;
  logic [31:0] model;
  int checks = 0, failures = 0;
  int m_writes = 0, s_writes = 0, blocked = 0;

  sstack_pointer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    @(posedge clk);
    rst <= 1'b0;
    #1 checks++;
    if (sp !== 32'd0) begin failures++; $display("FAIL reset value %h", sp); end
    model = 32'd0;
    for (int i = 0; i < 2000; i++) begin
      sel_slave <= 1'($urandom_range(0, 1));
      m_en <= 1'($urandom_range(0, 1)); m_wr <= 1'($urandom_range(0, 1)); m_wdata <= $urandom();
      s_en <= 1'($urandom_range(0, 1)); s_wr <= 1'($urandom_range(0, 1)); s_wdata <= $urandom();
      #1;
      if (sel_slave) begin
        if (s_en && s_wr) begin model = s_wdata; s_writes++; end
        if (m_en && m_wr) blocked++;
      end else begin
        if (m_en && m_wr) begin model = m_wdata; m_writes++; end
        if (s_en && s_wr) blocked++;
      end
      @(posedge clk);
      #1 checks++;
      if (sp !== model) begin
        failures++;
        $display("FAIL cycle %0d: sp %h expected %h", i, sp, model);
      end
    end
    checks++;
    if (m_writes == 0 || s_writes == 0 || blocked == 0) begin
      failures++;
      $display("FAIL coverage m=%0d s=%0d blocked=%0d", m_writes, s_writes, blocked);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
