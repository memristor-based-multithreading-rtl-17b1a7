// cfmt_pkg: types and constants shared by the continuous-flow multithreading
// (CFMT) pipeline. The state of one instruction held in a pipeline register is
// a valid bit, its program counter and one data word (the instruction word
// before execution, its result after it). The 32-bit word size is this
// design's own choice; the architecture does not depend on it.
package cfmt_pkg;
  localparam int unsigned XLEN = 32;

  typedef struct packed {
    logic            valid;
    logic [XLEN-1:0] pc;
    logic [XLEN-1:0] data;
  } stage_t;

  // Width of a thread number; at least one bit so that a single-thread
  // build still has a legal port.
  function automatic int unsigned tid_w(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction
endpackage
