// mc_cpu: the inter-processor fabric of the SPE (Simultaneous Process
// Execution) processor, which joins a master CPU (CPU-1, running the
// operating system kernel) and a slave CPU (CPU-2, running user code).
//
// It holds everything between the two CPUs of the MC-CPU block diagram:
//   - the shared stack (32 x 32-bit memory and 32-bit pointer) with its port
//     multiplexers, through which the CPUs pass service codes, parameters and
//     return values;
//   - CPU-1's REQUEST/GRANT control of that stack;
//   - the remote call link (CALLS / RETURNS), by which user code on CPU-2
//     traps into the kernel on CPU-1 without a context switch;
//   - the remote interrupt link (INTS / INTSCODE / SERVICED), by which the
//     kernel directs CPU-2 (memory management, context switching, process
//     clean-up).
// The two CPU cores themselves are not part of this module: their side of
// every unit is a port (m_* for CPU-1, s_* for CPU-2). The inter-processor
// signals are also brought out on ipc for observation.
// Timing: every handshake signal changes one clock after the event that
// causes it; stack reads return data one clock after the read. See the
// modules below for the exact sequences.
// The partition and the protocols follow the SPE design; the core-side
// handshakes, m_lock, the registered stack read and the interrupt table
// layout are this design's choices. With the default table layout, 24 bits
// of s_irq_vector are constant zero.
module mc_cpu
  import spe_pkg::*;
#(
  parameter word_t VEC_BASE   = 32'h0000_0000,
  parameter word_t VEC_STRIDE = 32'd4
) (
  input  logic         clk,
  input  logic         rst,

  // ---- CPU-1 (master) core side
  input  sstack_port_t m_stk,          // CPU-1 shared stack port
  input  logic         m_lock,         // CPU-1 keeps the stack for several cycles
  output logic         m_blocked,      // stack is CPU-2's; CPU-1 must keep off
  input  logic         m_svc_done,     // remote call handler finished
  output logic         m_trap_entry,   // a remote call has just arrived
  output logic         m_trap,         // a remote call is being serviced
  input  logic         m_int_raise,    // raise a remote interrupt
  input  intscode_t    m_int_code,     // its type
  output logic         m_int_busy,
  output logic         m_int_done,     // CPU-2 reported it serviced

  // ---- CPU-2 (slave) core side
  input  sstack_port_t s_stk,          // CPU-2 shared stack port
  input  logic         s_stack_req,    // plain request for the stack
  output logic         s_stack_owned,  // CPU-2 may use the stack now
  output logic         s_wait,         // CPU-2 blocked waiting for the stack
  input  logic         s_call_start,   // start a remote call
  input  logic         s_args_done,    // service code and parameters pushed
  input  logic         s_results_done, // return values popped
  output logic         s_call_busy,
  output logic         s_call_done,
  input  logic         s_irq_done,     // remote interrupt handler finished
  output logic         s_irq_take,     // jump to s_irq_vector now
  output word_t        s_irq_vector,
  output logic         s_in_service,

  // ---- shared
  output word_t        sp,             // shared stack pointer, seen by both CPUs
  output word_t        stk_rdata,      // shared stack read data, seen by both CPUs
  output logic         stk_refused,    // a CPU-2 request was turned down this cycle
  output ipc_t         ipc             // inter-processor signals
);

  shared_stack u_stack (
    .clk       (clk),
    .rst       (rst),
    .sel_slave (ipc.grant),
    .m_port    (m_stk),
    .s_port    (s_stk),
    .sp        (sp),
    .rdata     (stk_rdata)
  );

  stack_arbiter u_arb (
    .clk       (clk),
    .rst       (rst),
    .request   (ipc.request),
    .m_sp_en   (m_stk.sp_en),
    .m_stk_en  (m_stk.stk_en),
    .m_lock    (m_lock),
    .grant     (ipc.grant),
    .m_blocked (m_blocked),
    .s_wait    (s_wait),
    .refused   (stk_refused)
  );

  rcall_slave u_rcall_s (
    .clk          (clk),
    .rst          (rst),
    .call_start   (s_call_start),
    .args_done    (s_args_done),
    .results_done (s_results_done),
    .stack_req    (s_stack_req),
    .stack_owned  (s_stack_owned),
    .busy         (s_call_busy),
    .call_done    (s_call_done),
    .grant        (ipc.grant),
    .returns      (ipc.returns),
    .request      (ipc.request),
    .calls        (ipc.calls)
  );

  rcall_master u_rcall_m (
    .clk        (clk),
    .rst        (rst),
    .svc_done   (m_svc_done),
    .trap_entry (m_trap_entry),
    .trap       (m_trap),
    .calls      (ipc.calls),
    .returns    (ipc.returns)
  );

  rint_master u_rint_m (
    .clk      (clk),
    .rst      (rst),
    .raise    (m_int_raise),
    .code     (m_int_code),
    .busy     (m_int_busy),
    .done     (m_int_done),
    .serviced (ipc.serviced),
    .ints     (ipc.ints),
    .intscode (ipc.intscode)
  );

  rint_slave #(.VEC_BASE(VEC_BASE), .VEC_STRIDE(VEC_STRIDE)) u_rint_s (
    .clk        (clk),
    .rst        (rst),
    .irq_done   (s_irq_done),
    .irq_take   (s_irq_take),
    .irq_vector (s_irq_vector),
    .in_service (s_in_service),
    .ints       (ipc.ints),
    .intscode   (ipc.intscode),
    .serviced   (ipc.serviced)
  );

endmodule
