# SPE: an operating-system kernel and user code on two tightly coupled CPUs

On an ordinary processor, every system call made by user code costs a context
switch into the kernel and another one back out. In a microkernel, where
services talk to each other by inter-process communication (IPC), each
message costs several. The SPE (Simultaneous Process Execution) processor
avoids this by giving the kernel a CPU of its own:

- **CPU-1, the master**, runs only the operating system. It alone has the
  privileged instructions, the I/O devices and the external interrupt line.
- **CPU-2, the slave**, runs user code. It has only the non-privileged
  instructions, no I/O and no ordinary interrupt line.

A system call made by user code is a *remote call*: CPU-2 leaves a service
code and its parameters on a small stack that both CPUs share, then signals
CPU-1. The kernel, which is never preempted, services the call as a normal
function call and leaves the results on the same stack. It never saves or
restores a register file. In the other direction, the kernel steers CPU-2
with *remote interrupts*, for example for memory management, context
switches or process clean-up.

This repository holds the hardware between the two CPUs, named MC-CPU after
the processor's block diagram. It is the part of SPE that is new:

| module | what it is |
|---|---|
| `shared_stack` | the 32 × 32-bit shared stack memory, the 32-bit shared stack pointer, and the multiplexers that connect one CPU at a time to them |
| `stack_ram`, `sstack_pointer` | the memory and the pointer register inside it |
| `stack_arbiter` | CPU-1's REQUEST/GRANT control of the shared stack |
| `rcall_slave`, `rcall_master` | the two ends of the remote call (CALLS / RETURNS) |
| `rint_master`, `rint_slave` | the two ends of the remote interrupt (INTS / INTSCODE / SERVICED) |
| `mc_cpu` | the top: all of the above wired together |
| `spe_pkg` | widths, the per-CPU stack port struct `sstack_port_t` and the struct `ipc_t` of inter-processor signals |

The two CPU cores are **not** included. The MC-CPU instruction set is
described only as a 32-bit RISC set with a privileged part, so no core could
be written without inventing its instruction set. Each unit therefore has a
small handshake towards its core, and these handshakes are ports of `mc_cpu`
(`m_*` for CPU-1, `s_*` for CPU-2). A core, or a testbench standing in for
one, drives them. The peripherals of the original FPGA system are not
included either: memory, I/O multiplexers, VGA, keyboard, interrupt
controller, seven-segment and LED drivers. They are only named in the
design, without any description of their logic.

```
 CPU-1 core side                                              CPU-2 core side
 (kernel)                                                     (user code)

 m_stk ─────────────────►┌──────────────────────┐◄──────────────────── s_stk
                         │ shared_stack         │
 sp, stk_rdata ◄─────────┤ pointer + 32x32 RAM  ├──────────► sp, stk_rdata
                         │ + port multiplexers  │
                         └──────────▲───────────┘
                                    │ GRANT selects CPU-2's port
 m_lock ──────────►┌──────────────┐ │    REQUEST  ┌─────────────┐◄── s_call_start,
 m_blocked ◄───────┤ stack_arbiter├─┴────────────►│             │    s_args_done,
                   │              │◄──────────────┤ rcall_slave │    s_results_done,
                   └──────────────┘               │             │    s_stack_req
 m_svc_done ──────►┌──────────────┐    CALLS      │             │
 m_trap ◄──────────┤ rcall_master │◄──────────────┤             │
                   │              ├──────────────►│             │
                   └──────────────┘    RETURNS    └─────────────┘
 m_int_raise/code ►┌──────────────┐ INTS,INTSCODE ┌─────────────┐◄── s_irq_done
 m_int_done ◄──────┤ rint_master  ├──────────────►│ rint_slave  ├──► s_irq_take,
                   │              │◄──────────────┤             │    s_irq_vector
                   └──────────────┘   SERVICED    └─────────────┘
```

## Who owns the shared stack

This is the part that needs the most care. Only one CPU may change the stack
or its pointer at a time, and the GRANT signal decides which one:

- After reset, CPU-1 owns the stack and may push, pop or move the pointer at
  any time.
- CPU-2 may never touch the stack until it has been granted. To get it,
  CPU-2 raises REQUEST. While REQUEST is high and GRANT is low, CPU-2 is
  stalled (`s_wait`).
- In a cycle where REQUEST is high and CPU-1 is not using the stack, GRANT
  rises at the next clock edge. "Using" means driving its pointer enable,
  its memory enable or `m_lock`. A cycle in which CPU-1 is using the stack
  turns the request down (`stk_refused`), and CPU-2 keeps waiting.
- While GRANT is high, the multiplexers connect CPU-2's port to the pointer
  and the memory, and ignore CPU-1's port. `m_blocked` tells CPU-1 to keep
  off. An assertion in `stack_arbiter` checks that it does.
- CPU-2 keeps the stack as long as it holds REQUEST. GRANT falls one clock
  after REQUEST falls, and CPU-1 owns the stack again.

`m_lock` is this design's addition. A kernel handler that pops several
parameters and pushes results can hold the stack for the whole handler, so
that CPU-2 cannot slip in between two of its accesses.

The pointer value and the memory's read data go to both CPUs at all times.
The memory has a single port and a registered read: a read issued in one
cycle returns its word on `stk_rdata` in the next, and the word stays there
until the next read. The hardware does not fix which way the stack grows.
The testbenches push by writing at `sp` and incrementing it in the same
cycle, and pop by decrementing `sp` and reading at the new value. The
address is the low 5 bits of the word index, so a 33rd word wraps around
onto the first.

## The remote call

A call made by CPU-2 passes through the phases of `rcall_slave`. Each phase
change is seen one clock after its cause:

| phase | REQUEST | CALLS | leaves the phase when |
|---|---|---|---|
| ARG_REQ | 1 | 0 | GRANT is high |
| ARG_PUSH | 1 | 0 | the core pulses `s_args_done`, after pushing the parameters and then the 32-bit service code, so that the code is on top |
| ARG_REL | 0 | 0 | GRANT has fallen |
| CALL_WAIT | 0 | 1 | RETURNS is high |
| RES_REQ | 1 | 1 | GRANT is high |
| RES_POP | 1 | 1 | the core pulses `s_results_done`, after popping the return values |
| FINISH | 0 | 0 | GRANT and RETURNS are both low; `s_call_done` pulses |

On CPU-1's side, `rcall_master` pulses `m_trap_entry` when CALLS rises and
then holds `m_trap`. The kernel's remote call handler pops the service code
and parameters, checks them, runs the service and pushes the results. It
then pulses `m_svc_done`, and RETURNS rises one clock later. RETURNS falls
one clock after CALLS falls.

With a CPU model that pushes or pops one word per clock, and a kernel handler
that answers at once, a call that passes only the service code and gets one
word back takes 18 clocks from `s_call_start` to the cycle after
`s_call_done`. Calls with 8 and 32 stack words take 33 and 80 clocks. The
SPE processor on its FPGA was reported at 20 clocks for the service-code-only
trap, against about 450 for the same system call with a context switch on a
single processor. A 32-word call uses the entire stack, so it works only when
the kernel keeps nothing else on the stack at the time.

## The remote interrupt

The kernel raises a remote interrupt through `rint_master` with a one-clock
`m_int_raise` and an 8-bit `m_int_code`. INTS rises one clock later, and
INTSCODE holds the code for as long as INTS is high. `rint_slave` latches the
code. One clock after INTS, it pulses `s_irq_take` with
`s_irq_vector = VEC_BASE + INTSCODE × VEC_STRIDE`, the entry for this code in
an interrupt table that the kernel has placed in CPU-2's memory. The core
jumps there, runs the handler and pulses `s_irq_done`. SERVICED then rises,
and CPU-1 lowers INTS and pulses `m_int_done`. SERVICED falls one clock after
INTS, and only then will `rint_master` accept the next interrupt. A remote
interrupt may arrive in the middle of a remote call. The two links are
independent, and the top-level test does exactly this.

## Parameters and fixed sizes

| name | default | from |
|---|---|---|
| `spe_pkg::DATA_W` | 32 | design: 32-bit pointer and stack words |
| `spe_pkg::STACK_DEPTH` | 32 | design: 1024-bit single-port RAM, 32 × 32 |
| `spe_pkg::INTSCODE_W` | 8 | own choice |
| `mc_cpu.VEC_BASE` | 0 | own choice |
| `mc_cpu.VEC_STRIDE` | 4 | own choice (one 32-bit entry per code) |

Synthesized, the whole fabric is about 60 flip-flops, 1024 memory bits and a
little over a hundred word-level cells.

## Where this RTL departs from, or adds to, the design

- The order of events in both protocols follows the design. The design does
  not say when RETURNS and SERVICED fall, so this RTL drops each one clock
  after its partner signal falls.
- The design says that CPU-2 "deasserts REQUEST to indicate that the shared
  stack is now free" and that the master then takes the stack back. GRANT
  falls on REQUEST falling.
- The following are this design's own choices, since the design leaves them
  open: the registered memory read, the pointer's reset value of 0, the
  write rule for the pointer (write when both En and Wr are high), the
  INTSCODE width, the table layout, `m_lock`, and all core-side handshake
  signals.
- Reset is synchronous and active high. It returns every handshake to idle,
  gives the stack to CPU-1 and clears the pointer. The stack contents are
  not cleared.
- One clock drives both CPUs.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog. For
example, with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv rtl/spe_pkg.sv \
          tb/tb_mc_cpu.sv --top-module tb_mc_cpu -o sim
./obj_dir/sim
```

`tb_mc_cpu` runs the top at its default parameters and plays both cores. The
kernel keeps words of its own on the stack and services three remote calls,
with 1, 8 and 32 stack words. The user side checks each return value. A
remote interrupt is raised during the second call, and two more are raised
back to back. The user side also makes a plain stack request while the
kernel holds the lock, so the request is refused and CPU-2 waits. The test
counts grants, refusals, wait cycles, calls, RETURNS, interrupts, SERVICED,
and pointer writes by each CPU, and it fails if any of them never happened.
It also fails if the service-code-only call takes more than 20 clocks. The
unit testbenches compare each block with an independent reference model or
with the expected handshake sequence, cycle by cycle, under random delays.
Each of them was also run against a deliberately broken copy of its block,
and each one caught the fault.
