// spe_pkg: widths, sizes and shared types of the SPE inter-processor fabric.
//
// The shared stack pointer and the stack words are 32 bits wide and the stack
// memory holds 32 words (1024 bits), as the design specifies. The width of the
// remote interrupt code (INTSCODE) is not specified; 8 bits is this design's
// choice. The stack address is the low log2(32) = 5 bits of a word index.
//
// sstack_port_t bundles the signals one CPU drives into the shared stack:
// the pointer port (SStackpointerEn, SStackpointerWr, SStackpointerin) and the
// memory port (SStackEn, SStackWr, SStackaddr, SStackdatain).
package spe_pkg;

  localparam int unsigned DATA_W      = 32;  // stack word and pointer width
  localparam int unsigned STACK_DEPTH = 32;  // stack memory words
  localparam int unsigned STACK_AW    = $clog2(STACK_DEPTH);
  localparam int unsigned INTSCODE_W  = 8;   // remote interrupt code width (assumed)

  typedef logic [DATA_W-1:0]     word_t;
  typedef logic [STACK_AW-1:0]   saddr_t;
  typedef logic [INTSCODE_W-1:0] intscode_t;

  typedef struct packed {
    logic   sp_en;     // pointer port selected
    logic   sp_wr;     // write sp_wdata into the pointer
    word_t  sp_wdata;  // new pointer value
    logic   stk_en;    // stack memory access
    logic   stk_wr;    // 1 = write (push), 0 = read (pop)
    saddr_t stk_addr;  // stack word address
    word_t  stk_wdata; // word to write
  } sstack_port_t;

  // The inter-processor signals of the MC-CPU, as seen between the two CPUs.
  typedef struct packed {
    logic      request;  // CPU-2 asks for the shared stack
    logic      grant;    // CPU-1 hands the shared stack to CPU-2
    logic      calls;    // CPU-2 traps to the kernel on CPU-1
    logic      returns;  // CPU-1 has placed the results of a remote call
    logic      ints;     // CPU-1 raises a remote interrupt on CPU-2
    intscode_t intscode; // type of the remote interrupt
    logic      serviced; // CPU-2 has serviced the remote interrupt
  } ipc_t;

endpackage
