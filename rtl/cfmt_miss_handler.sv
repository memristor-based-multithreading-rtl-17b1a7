// cfmt_miss_handler: background handling of long-latency instructions.
// When the active thread's instruction misses in execution (miss), the thread
// is marked blocked, its PC is kept, and a request goes to the memory system
// the next cycle (req_*). The thread is then switched out by the thread
// manager. When the fill for that thread arrives (fill_*), the result is kept
// until the write port of the MPR after execution is free (bg_ready low during
// an MPR save), then written into that thread's memristor layer as a
// completed instruction {valid, pc, result} (bg_*). From the next cycle the
// thread is ready again; when it is switched back in, that instruction retires
// first. Completed results are written one per cycle, lowest thread first.
// Writing the result straight into the MPR in the background follows the
// architecture; the request/fill interface and the one-entry-per-thread
// buffering are this design's own choices.
module cfmt_miss_handler
  import cfmt_pkg::*;
#(
  parameter int unsigned N_THREADS = 16,
  localparam int unsigned TW       = tid_w(N_THREADS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // miss from execution
  input  logic                 miss,
  input  logic [TW-1:0]        miss_thread,
  input  logic [XLEN-1:0]      miss_pc,
  input  logic [XLEN-1:0]      miss_instr,
  // request to the memory system
  output logic                 req_valid,
  output logic [TW-1:0]        req_thread,
  output logic [XLEN-1:0]      req_pc,
  output logic [XLEN-1:0]      req_instr,
  // fill from the memory system
  input  logic                 fill_valid,
  input  logic [TW-1:0]        fill_thread,
  input  logic [XLEN-1:0]      fill_data,
  // background write into the MPR after execution
  output logic                 bg_we,
  output logic [TW-1:0]        bg_thread,
  output stage_t               bg_data,
  input  logic                 bg_ready,
  // thread status
  output logic [N_THREADS-1:0] ready
);
  logic [N_THREADS-1:0] blocked, filled;
  logic [XLEN-1:0]      pc_q   [N_THREADS];
  logic [XLEN-1:0]      data_q [N_THREADS];

  // pick the lowest filled thread for the write port
  always_comb begin
    bg_we     = 1'b0;
    bg_thread = '0;
    for (int unsigned t = 0; t < N_THREADS; t++) begin
      if (!bg_we && filled[t]) begin
        bg_we     = 1'b1;
        bg_thread = TW'(t);
      end
    end
  end
  assign bg_data = '{valid: 1'b1, pc: pc_q[bg_thread], data: data_q[bg_thread]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      blocked   <= '0;
      filled    <= '0;
      req_valid <= 1'b0;
      req_thread <= '0;
      req_pc    <= '0;
      req_instr <= '0;
      for (int unsigned t = 0; t < N_THREADS; t++) begin
        pc_q[t]   <= '0;
        data_q[t] <= '0;
      end
    end else begin
      req_valid  <= miss;
      req_thread <= miss_thread;
      req_pc     <= miss_pc;
      req_instr  <= miss_instr;
      if (miss) begin
        blocked[miss_thread] <= 1'b1;
        pc_q[miss_thread]    <= miss_pc;
      end
      if (fill_valid) begin
        filled[fill_thread] <= 1'b1;
        data_q[fill_thread] <= fill_data;
      end
      if (bg_we && bg_ready) begin
        filled[bg_thread]  <= 1'b0;
        blocked[bg_thread] <= 1'b0;
      end
    end
  end

  assign ready = ~blocked;

  // a fill only answers an outstanding miss; a thread has one miss at a time
  a_fill_outstanding: assert property (@(posedge clk) disable iff (!rst_n)
    fill_valid |-> (blocked[fill_thread] && !filled[fill_thread]));
  a_miss_unblocked: assert property (@(posedge clk) disable iff (!rst_n)
    miss |-> !blocked[miss_thread]);
endmodule
