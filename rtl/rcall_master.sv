// rcall_master: CPU-1's side of a remote call.
//
// When CALLS rises, the unit reports a trap to CPU-1 (trap_entry for one
// cycle, then trap high while the call is being serviced); CPU-1 runs its
// remote call handler, which pops the service code and parameters from the
// shared stack, checks them, calls the operating system function and pushes
// the return values. The handler then pulses svc_done and the unit raises
// RETURNS. RETURNS stays high until CPU-2 lowers CALLS, after which the unit
// is idle again.
// States: IDLE -> SERVICE (CALLS seen) -> RETURN (svc_done) -> IDLE (CALLS
// low). trap_entry is combinational on CALLS in IDLE; RETURNS is decoded
// from the state register. The order of events is the source's; the
// trap_entry/svc_done core interface is this design's.
module rcall_master (
  input  logic clk,
  input  logic rst,
  // CPU-1 core side
  input  logic svc_done,
  output logic trap_entry,
  output logic trap,
  // inter-processor signals
  input  logic calls,
  output logic returns
);

  typedef enum logic [1:0] {IDLE, SERVICE, RETURN} state_e;

  state_e state, state_next;

  always_comb begin
    state_next = state;
    unique case (state)
      IDLE:    if (calls)    state_next = SERVICE;
      SERVICE: if (svc_done) state_next = RETURN;
      RETURN:  if (!calls)   state_next = IDLE;
      default:               state_next = IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= IDLE;
    else     state <= state_next;
  end

  assign trap_entry = (state == IDLE) && calls;
  assign trap       = (state == SERVICE);
  assign returns    = (state == RETURN);

  // RETURNS is only ever an answer to a pending CALLS.
  a_returns_needs_calls: assert property (@(posedge clk) disable iff (rst)
    $rose(returns) |-> $past(calls));

endmodule
