// rint_master: CPU-1's side of a remote interrupt.
//
// The operating system on CPU-1 raises a remote interrupt with a one-cycle
// raise pulse and the interrupt type on code. The unit latches the code,
// drives it on INTSCODE and raises INTS at the next clock edge. When CPU-2
// answers with SERVICED, the unit treats the work as done: it lowers INTS
// and pulses done. It then waits for SERVICED to fall before it accepts the
// next raise (busy is high from raise until then; a raise while busy is
// ignored). INTSCODE holds its value while INTS is high.
// The handshake is the source's; the raise/busy/done core interface and
// the wait for SERVICED to fall are this design's.
module rint_master
  import spe_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  // CPU-1 core side
  input  logic      raise,
  input  intscode_t code,
  output logic      busy,
  output logic      done,
  // inter-processor signals
  input  logic      serviced,
  output logic      ints,
  output intscode_t intscode
);

  typedef enum logic [1:0] {IDLE, ASSERTED, CLEARING} state_e;

  state_e state, state_next;

  always_comb begin
    state_next = state;
    unique case (state)
      IDLE:     if (raise)     state_next = ASSERTED;
      ASSERTED: if (serviced)  state_next = CLEARING;
      CLEARING: if (!serviced) state_next = IDLE;
      default:                 state_next = IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= IDLE;
      intscode <= '0;
    end else begin
      state <= state_next;
      if (state == IDLE && raise) intscode <= code;
    end
  end

  assign ints = (state == ASSERTED);
  assign busy = (state != IDLE);
  assign done = (state == ASSERTED) && serviced;

  a_code_stable: assert property (@(posedge clk) disable iff (rst)
    (ints && $past(ints)) |-> $stable(intscode));

endmodule
