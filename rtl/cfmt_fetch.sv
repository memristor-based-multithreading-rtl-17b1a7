// cfmt_fetch: fetch stage of the CFMT pipeline. It keeps one program counter
// per thread and fetches for the active thread: the PC goes out to the
// instruction memory with the thread number, the instruction word comes back
// in the same cycle, and the pair leaves as a valid stage state. When the
// pipeline advances, the active thread's PC steps by 4 (byte addresses of
// 32-bit words). All PCs start at start_pc on reset, each thread seeing its
// own instruction memory space. Only the existence of a fetch stage comes from
// the architecture; sequential fetch without branches is this design's own
// simplification, since no instruction set is defined.
module cfmt_fetch
  import cfmt_pkg::*;
#(
  parameter int unsigned N_THREADS = 16,
  localparam int unsigned TW       = tid_w(N_THREADS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [XLEN-1:0] start_pc,
  input  logic [TW-1:0]   thread,
  input  logic            advance,
  output logic [TW-1:0]   imem_thread,
  output logic [XLEN-1:0] imem_pc,
  input  logic [XLEN-1:0] imem_instr,
  output stage_t          out
);
  logic [XLEN-1:0] pc [N_THREADS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned t = 0; t < N_THREADS; t++) pc[t] <= start_pc;
    end else if (advance) begin
      pc[thread] <= pc[thread] + XLEN'(4);
    end
  end

  assign imem_thread = thread;
  assign imem_pc     = pc[thread];
  assign out         = '{valid: 1'b1, pc: pc[thread], data: imem_instr};
endmodule
