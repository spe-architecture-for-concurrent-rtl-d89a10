// rcall_slave: CPU-2's side of a remote call (a trap into the kernel running
// on CPU-1), plus CPU-2's plain requests for the shared stack.
//
// A call is started by a one-cycle call_start pulse and runs through these
// phases, following the remote call protocol:
//   ARG_REQ   raise REQUEST, wait for GRANT
//   ARG_PUSH  CPU-2 owns the stack (stack_owned) and pushes the 32-bit
//             service code and any parameters; it pulses args_done
//   ARG_REL   lower REQUEST, wait until GRANT falls
//   CALL_WAIT raise CALLS, wait for RETURNS
//   RES_REQ   keep CALLS, raise REQUEST, wait for GRANT
//   RES_POP   CPU-2 owns the stack and pops the return values; it pulses
//             results_done
//   FINISH    lower CALLS and REQUEST together, wait until GRANT and RETURNS
//             have both fallen, then pulse call_done
// Outside a call, stack_req asks for the stack directly: REQUEST follows it
// and stack_owned shows when the stack is CPU-2's.
// All outputs are decoded from the state register and the inputs, so a phase
// change is seen one clock after the event that causes it. The phase split
// is this design's; the order of events is the source's.
module rcall_slave (
  input  logic clk,
  input  logic rst,
  // CPU-2 core side
  input  logic call_start,
  input  logic args_done,
  input  logic results_done,
  input  logic stack_req,
  output logic stack_owned,
  output logic busy,
  output logic call_done,
  // inter-processor signals
  input  logic grant,
  input  logic returns,
  output logic request,
  output logic calls
);

  typedef enum logic [2:0] {
    IDLE, ARG_REQ, ARG_PUSH, ARG_REL, CALL_WAIT, RES_REQ, RES_POP, FINISH
  } state_e;

  state_e state, state_next;

  always_comb begin
    state_next = state;
    unique case (state)
      IDLE:      if (call_start)   state_next = ARG_REQ;
      ARG_REQ:   if (grant)        state_next = ARG_PUSH;
      ARG_PUSH:  if (args_done)    state_next = ARG_REL;
      ARG_REL:   if (!grant)       state_next = CALL_WAIT;
      CALL_WAIT: if (returns)      state_next = RES_REQ;
      RES_REQ:   if (grant)        state_next = RES_POP;
      RES_POP:   if (results_done) state_next = FINISH;
      FINISH:    if (!grant && !returns) state_next = IDLE;
      default:                     state_next = IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= IDLE;
    else     state <= state_next;
  end

  always_comb begin
    unique case (state)
      IDLE:                        request = stack_req && !call_start;
      ARG_REQ, ARG_PUSH:           request = 1'b1;
      RES_REQ, RES_POP:            request = 1'b1;
      default:                     request = 1'b0;
    endcase
  end

  assign calls       = (state == CALL_WAIT) || (state == RES_REQ) || (state == RES_POP);
  assign stack_owned = grant && (((state == IDLE) && stack_req) ||
                                 (state == ARG_PUSH) || (state == RES_POP));
  assign busy        = (state != IDLE);
  assign call_done   = (state == FINISH) && !grant && !returns;

  // CALLS is raised only once CPU-2 has given the stack back.
  a_calls_without_grant: assert property (@(posedge clk) disable iff (rst)
    $rose(calls) |-> !grant);

endmodule
