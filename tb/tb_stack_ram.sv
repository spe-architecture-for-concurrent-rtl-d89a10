// tb_stack_ram: self-checking test of the 32 x 32 single-port stack memory.
// Writes every word with a pseudo-random value, reads them back in a
// scrambled order against a reference array, checks the one-cycle read
// latency, that a write leaves the read data alone and that a cycle without
// enable changes nothing.
module tb_stack_ram;
  localparam int DEPTH = 32;
  localparam int WIDTH = 32;

  logic clk = 1'b0, rst = 1'b1;
  logic en = 1'b0, wr = 1'b0;
  logic [4:0] addr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  stack_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [WIDTH-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    @(posedge clk); @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    check(rdata, '0, "rdata after reset");
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      ref_mem[i] = $urandom();
      en <= 1'b1; wr <= 1'b1; addr <= 5'(i); wdata <= ref_mem[i];
      @(posedge clk);
    end
    en <= 1'b0; wr <= 1'b0;
    @(posedge clk);
    // read back in scrambled order, one read per cycle, latency 1
    for (int k = 0; k < DEPTH; k++) begin
      int a;
      a = (k * 7 + 3) % DEPTH;
      en <= 1'b1; wr <= 1'b0; addr <= 5'(a);
      @(posedge clk);
      en <= 1'b0;
      #1 check(rdata, ref_mem[a], $sformatf("read word %0d", a));
    end
    // read then write elsewhere: rdata holds
    en <= 1'b1; wr <= 1'b0; addr <= 5'd9;
    @(posedge clk);
    en <= 1'b1; wr <= 1'b1; addr <= 5'd10; wdata <= 32'hDEAD_BEEF; ref_mem[10] = 32'hDEAD_BEEF;
    @(posedge clk);
    en <= 1'b0; wr <= 1'b0;
    #1 check(rdata, ref_mem[9], "rdata held over a write");
    // no enable: no write, no read
    wr <= 1'b1; addr <= 5'd10; wdata <= 32'h1234_5678;
    @(posedge clk);
    wr <= 1'b0;
    en <= 1'b1; addr <= 5'd10;
    @(posedge clk);
    en <= 1'b0;
    #1 check(rdata, 32'hDEAD_BEEF, "write without enable ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
