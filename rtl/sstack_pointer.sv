// sstack_pointer: the 32-bit shared stack pointer (SSTACK POINTER) with the
// two input multiplexers that let either CPU write it.
//
// Its value is supplied to both CPUs at all times (sp). Only one CPU may
// modify it at a time: sel_slave, driven by GRANT, picks CPU-2's port,
// otherwise CPU-1's port is used. The selected port writes its data when both
// its enable (SStackpointerEn) and write (SStackpointerWr) are high; the
// write takes effect at the next clock edge. The value after reset is
// RESET_VALUE (zero by default; the source does not give one).
module sstack_pointer #(
  parameter int unsigned          WIDTH       = 32,
  parameter logic [WIDTH-1:0]     RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             sel_slave,
  // CPU-1 (master) pointer port
  input  logic             m_en,
  input  logic             m_wr,
  input  logic [WIDTH-1:0] m_wdata,
  // CPU-2 (slave) pointer port
  input  logic             s_en,
  input  logic             s_wr,
  input  logic [WIDTH-1:0] s_wdata,
  output logic [WIDTH-1:0] sp
);

  logic             we;
  logic [WIDTH-1:0] wdata;

  always_comb begin
    if (sel_slave) begin
      we    = s_en && s_wr;
      wdata = s_wdata;
    end else begin
      we    = m_en && m_wr;
      wdata = m_wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (rst)     sp <= RESET_VALUE;
    else if (we) sp <= wdata;
  end

endmodule
