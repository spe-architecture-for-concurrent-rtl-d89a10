// stack_arbiter: CPU-1's control of the shared stack (REQUEST / GRANT).
//
// CPU-1 owns the shared stack after reset. CPU-2 asks for it by raising
// request. The arbiter refuses while CPU-1 is using the stack itself, that is
// while it drives its pointer port or memory port enable, or holds m_lock
// (m_lock lets CPU-1 keep the stack across several cycles, for example
// through a remote call handler; it is this design's addition). In any other
// cycle with request high, grant rises at the next clock edge. Once granted,
// CPU-2 keeps the stack until it lowers request; grant then falls at the next
// edge and CPU-1 has the stack back.
//
// s_wait is high while CPU-2 is blocked (request without grant); refused
// marks a cycle in which a pending request was turned down because CPU-1 was
// busy. m_blocked (equal to grant) tells CPU-1 it must not touch the stack.
module stack_arbiter (
  input  logic clk,
  input  logic rst,
  input  logic request,
  input  logic m_sp_en,
  input  logic m_stk_en,
  input  logic m_lock,
  output logic grant,
  output logic m_blocked,
  output logic s_wait,
  output logic refused
);

  typedef enum logic {OWNER_MASTER, OWNER_SLAVE} owner_e;

  owner_e owner, owner_next;
  logic   m_busy;

  assign m_busy = m_sp_en || m_stk_en || m_lock;

  always_comb begin
    owner_next = owner;
    unique case (owner)
      OWNER_MASTER: if (request && !m_busy) owner_next = OWNER_SLAVE;
      OWNER_SLAVE:  if (!request)           owner_next = OWNER_MASTER;
      default:                              owner_next = OWNER_MASTER;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) owner <= OWNER_MASTER;
    else     owner <= owner_next;
  end

  assign grant     = (owner == OWNER_SLAVE);
  assign m_blocked = grant;
  assign s_wait    = request && !grant;
  assign refused   = request && !grant && m_busy;

  // Grant is only ever given to a CPU-2 that asked for it.
  a_grant_needs_request: assert property (@(posedge clk) disable iff (rst)
    $rose(grant) |-> $past(request));

  // While CPU-2 holds the stack, CPU-1 keeps off both stack ports.
  a_master_off_when_granted: assert property (@(posedge clk) disable iff (rst)
    grant |-> !(m_sp_en || m_stk_en));

endmodule
