// stack_ram: the single-port shared stack memory, DEPTH words of WIDTH bits
// (32 x 32 = 1024 bits by default, as the design specifies).
//
// One access per cycle through one port: with en high, wr high writes wdata
// at addr; wr low reads the word at addr. Reads are synchronous: rdata shows
// the word one clock after the read and holds it until the next read, as an
// FPGA block RAM does (the registered read is this design's choice; the
// source only calls the memory a single-port RAM). A write leaves rdata
// unchanged. The memory contents are not reset; rdata resets to zero.
module stack_ram #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic             wr,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en && wr) mem[addr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst)             rdata <= '0;
    else if (en && !wr)  rdata <= mem[addr];
  end

endmodule
