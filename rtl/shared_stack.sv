// shared_stack: the shared stack of the MC-CPU, i.e. the stack memory, the
// shared stack pointer and the multiplexers in front of both.
//
// Each CPU drives a full port (spe_pkg::sstack_port_t). sel_slave (GRANT)
// chooses which port reaches the pointer and the memory: CPU-1 when low,
// CPU-2 when high. The port of the CPU that is not selected is ignored. The
// pointer value (sp) and the word read from the stack (rdata) go to both CPUs.
// Timing: pointer writes and stack writes take effect at the next clock edge;
// a read returns its word on rdata one clock later (see stack_ram).
// The structure follows the block diagram of the MC-CPU; the registered read
// is this design's choice.
module shared_stack
  import spe_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         sel_slave,
  input  sstack_port_t m_port,
  input  sstack_port_t s_port,
  output word_t        sp,
  output word_t        rdata
);

  logic   mem_en, mem_wr;
  saddr_t mem_addr;
  word_t  mem_wdata;

  // Memory port multiplexers; the pointer has its own inside sstack_pointer.
  always_comb begin
    if (sel_slave) begin
      mem_en    = s_port.stk_en;
      mem_wr    = s_port.stk_wr;
      mem_addr  = s_port.stk_addr;
      mem_wdata = s_port.stk_wdata;
    end else begin
      mem_en    = m_port.stk_en;
      mem_wr    = m_port.stk_wr;
      mem_addr  = m_port.stk_addr;
      mem_wdata = m_port.stk_wdata;
    end
  end

  sstack_pointer #(.WIDTH(DATA_W)) u_sp (
    .clk       (clk),
    .rst       (rst),
    .sel_slave (sel_slave),
    .m_en      (m_port.sp_en),
    .m_wr      (m_port.sp_wr),
    .m_wdata   (m_port.sp_wdata),
    .s_en      (s_port.sp_en),
    .s_wr      (s_port.sp_wr),
    .s_wdata   (s_port.sp_wdata),
    .sp        (sp)
  );

  stack_ram #(.DEPTH(STACK_DEPTH), .WIDTH(DATA_W)) u_ram (
    .clk   (clk),
    .rst   (rst),
    .en    (mem_en),
    .wr    (mem_wr),
    .addr  (mem_addr),
    .wdata (mem_wdata),
    .rdata (rdata)
  );

endmodule
