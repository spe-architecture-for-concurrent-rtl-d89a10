// tb_rint_slave: self-checking test of CPU-2's remote interrupt unit.
// The testbench plays CPU-1 (raises INTS with a random INTSCODE, lowers it
// the clock after SERVICED) and CPU-2's core (pulses irq_done a random time
// after irq_take). It checks irq_take comes one clock after INTS is raised, exactly
// once, with irq_vector = base + code * stride (worked out here with a
// non-zero base), that SERVICED rises the clock after irq_done and falls the
// clock after INTS falls, and that a code change during service is ignored.
module tb_rint_slave;
  import spe_pkg::*;
  localparam word_t BASE   = 32'h0000_4000;
  localparam word_t STRIDE = 32'd8;

  logic clk = 1'b0, rst = 1'b1;
  logic irq_done = 1'b0, irq_take, in_service, ints = 1'b0, serviced;
  word_t irq_vector;
  intscode_t intscode = '0;
  int checks = 0, failures = 0, n_take = 0;

  rint_slave #(.VEC_BASE(BASE), .VEC_STRIDE(STRIDE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input longint got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL at %0t: %s got %0h expected %0h", $time, what, got, exp);
    end
  endtask

  always @(posedge clk) if (!rst && irq_take) n_take++;

  initial begin
    @(posedge clk); @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    #1;
    for (int k = 0; k < 100; k++) begin
      intscode_t c;
      int code_int;
      c = intscode_t'($urandom());
      code_int = int'(c);
      ints <= 1'b1; intscode <= c;
      #1 expect_eq(longint'(irq_take), longint'(0), "no take before the clock");
      @(posedge clk);
      intscode <= ~c;  // must not matter once latched
      #1 expect_eq(longint'(irq_take), longint'(1), "irq_take one clock after INTS");
      expect_eq(longint'(irq_vector), longint'(32'h4000) + longint'(code_int) * 8, "irq_vector");
      repeat ($urandom_range(1, 6)) begin
        @(posedge clk); #1;
        expect_eq(longint'(irq_take), longint'(0), "irq_take one cycle");
        expect_eq(longint'(serviced), longint'(0), "SERVICED early");
        expect_eq(longint'(in_service), longint'(1), "in_service");
      end
      irq_done <= 1'b1;
      @(posedge clk);
      irq_done <= 1'b0;
      #1 expect_eq(longint'(serviced), longint'(1), "SERVICED after irq_done");
      repeat ($urandom_range(0, 3)) begin
        @(posedge clk); #1;
        expect_eq(longint'(serviced), longint'(1), "SERVICED held while INTS");
      end
      ints <= 1'b0;
      @(posedge clk);
      #1 expect_eq(longint'(serviced), longint'(0), "SERVICED falls after INTS");
      expect_eq(longint'(in_service), longint'(0), "idle");
      repeat ($urandom_range(0, 3)) begin @(posedge clk); #1; end
    end
    expect_eq(longint'(n_take), longint'(100), "take count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
