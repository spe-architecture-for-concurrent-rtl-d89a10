// rint_slave: CPU-2's side of a remote interrupt.
//
// CPU-2 has no ordinary interrupt line; the only interrupts it serves are the
// remote interrupts (INTS) raised by CPU-1. When INTS is seen high, the unit
// latches INTSCODE and, one clock later, pulses irq_take for one cycle with
// irq_vector pointing at the entry for that code in CPU-2's interrupt vector
// table: VEC_BASE + INTSCODE * VEC_STRIDE. The table and the handlers are
// placed in CPU-2's memory by CPU-1. CPU-2 jumps there at once, runs the
// handler and pulses irq_done; the unit then raises SERVICED and holds it
// until CPU-1 lowers INTS. in_service is high from the take until then.
// States: IDLE -> TAKE (1 cycle) -> SERVE -> ACK -> IDLE.
// The handshake is the source's; the table base, the stride and the core
// interface are this design's. With the default base of 0 and stride of 4,
// irq_vector bits 1:0 and 31:10 are constant zero; synthesis reports them as
// constant outputs, which is expected.
module rint_slave
  import spe_pkg::*;
#(
  parameter word_t VEC_BASE   = 32'h0000_0000,
  parameter word_t VEC_STRIDE = 32'd4
) (
  input  logic      clk,
  input  logic      rst,
  // CPU-2 core side
  input  logic      irq_done,
  output logic      irq_take,
  output word_t     irq_vector,
  output logic      in_service,
  // inter-processor signals
  input  logic      ints,
  input  intscode_t intscode,
  output logic      serviced
);

  typedef enum logic [1:0] {IDLE, TAKE, SERVE, ACK} state_e;

  state_e    state, state_next;
  intscode_t code_q;

  always_comb begin
    state_next = state;
    unique case (state)
      IDLE:  if (ints)     state_next = TAKE;
      TAKE:                state_next = SERVE;
      SERVE: if (irq_done) state_next = ACK;
      ACK:   if (!ints)    state_next = IDLE;
      default:             state_next = IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= IDLE;
      code_q <= '0;
    end else begin
      state <= state_next;
      if (state == IDLE && ints) code_q <= intscode;
    end
  end

  assign irq_take   = (state == TAKE);
  assign irq_vector = VEC_BASE + word_t'(code_q) * VEC_STRIDE;
  assign in_service = (state != IDLE);
  assign serviced   = (state == ACK);

endmodule
