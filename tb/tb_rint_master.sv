// tb_rint_master: self-checking test of CPU-1's remote interrupt unit.
// The testbench raises interrupts with random codes (some while the unit is
// busy, which must be ignored) and plays CPU-2, answering SERVICED a random
// time after INTS and dropping it a random time after INTS falls. It checks
// INTS rises the clock after raise with the raised code on INTSCODE, the
// code stays put, INTS falls the clock after SERVICED with a done pulse, and
// the unit stays busy until SERVICED falls.
module tb_rint_master;
  import spe_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic raise = 1'b0, busy, done, serviced = 1'b0, ints;
  intscode_t code = '0, intscode;
  int checks = 0, failures = 0, n_done = 0, n_ignored = 0;

  rint_master dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input int got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL at %0t: %s got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  always @(posedge clk) if (!rst && done) n_done++;

  initial begin
    @(posedge clk); @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    #1 expect_eq(int'(ints), int'(0), "INTS idle");
    for (int k = 0; k < 100; k++) begin
      intscode_t c;
      c = intscode_t'($urandom());
      raise <= 1'b1; code <= c;
      @(posedge clk);
      raise <= 1'b0;
      #1 expect_eq(int'(ints), int'(1), "INTS after raise");
      expect_eq(int'(intscode), int'(c), "INTSCODE");
      expect_eq(int'(busy), int'(1), "busy");
      repeat ($urandom_range(0, 5)) begin
        // a second raise while busy is ignored
        raise <= 1'b1; code <= ~c; n_ignored++;
        @(posedge clk);
        raise <= 1'b0;
        #1 expect_eq(int'(ints), int'(1), "INTS held");
        expect_eq(int'(intscode), int'(c), "INTSCODE held");
      end
      serviced <= 1'b1;
      #1 expect_eq(int'(done), int'(1), "done on SERVICED");
      @(posedge clk);
      #1 expect_eq(int'(ints), int'(0), "INTS drops after SERVICED");
      expect_eq(int'(done), int'(0), "done is one cycle");
      repeat ($urandom_range(0, 3)) begin
        raise <= 1'b1; code <= ~c; n_ignored++;
        @(posedge clk);
        raise <= 1'b0;
        #1 expect_eq(int'(busy), int'(1), "busy until SERVICED falls");
        expect_eq(int'(ints), int'(0), "no new INTS before SERVICED falls");
      end
      serviced <= 1'b0;
      @(posedge clk);
      #1 expect_eq(int'(busy), int'(0), "idle again");
    end
    expect_eq(int'(n_done), int'(100), "done count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
