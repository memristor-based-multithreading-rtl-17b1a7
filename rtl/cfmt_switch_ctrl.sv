// cfmt_switch_ctrl: thread manager of the continuous-flow multithreading
// pipeline. It owns the number of the active thread and the common control
// signals of all MPRs.
//
// States
//  RUN   the pipeline advances (advance = 1). A stall event (a long-latency
//        instruction in execution) moves to SAVE.
//  SAVE  one cycle: every MPR copies the active thread's state out (save). If
//        another thread is ready, the read of its state starts in the same
//        cycle (load) and it becomes active.
//  WAIT  no thread is ready: the pipeline idles until one is, then loads it.
//        This is also the state after reset, with nothing to save.
//  LOAD  the remaining T_M - 1 cycles of the MPR read.
// A switch to a ready thread therefore stalls the pipeline for exactly T_M
// cycles after the event cycle, no flush and no refill. Candidates are taken
// round-robin, starting after the thread that was active. thread_en selects
// which threads take part; ready comes from the long-latency tracker. The
// switch-on-event policy and the T_M penalty follow the architecture; the
// state encoding and the round-robin choice are this design's own.
module cfmt_switch_ctrl #(
  parameter int unsigned N_THREADS = 16,
  parameter int unsigned T_M       = 1,
  localparam int unsigned TW       = cfmt_pkg::tid_w(N_THREADS),
  localparam int unsigned CW       = (T_M > 2) ? $clog2(T_M) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_THREADS-1:0] thread_en,
  input  logic [N_THREADS-1:0] ready,
  input  logic                 event_i,
  output logic [TW-1:0]        active,
  output logic                 advance,
  output logic                 save,
  output logic [TW-1:0]        save_thread,
  output logic                 load,
  output logic [TW-1:0]        load_thread,
  output logic                 waiting
);
  typedef enum logic [1:0] {RUN, SAVE, WAIT, LOAD} state_e;
  state_e        state;
  logic [CW-1:0] cnt;

  logic [N_THREADS-1:0] cand;
  logic                 found;
  logic [TW-1:0]        pick;

  assign cand = thread_en & ready;

  // round-robin search, the active thread itself last
  always_comb begin
    found = 1'b0;
    pick  = active;
    for (int unsigned i = 1; i <= N_THREADS; i++) begin
      if (!found && cand[(32'(active) + i) % N_THREADS]) begin
        found = 1'b1;
        pick  = TW'((32'(active) + i) % N_THREADS);
      end
    end
  end

  assign advance     = (state == RUN);
  assign save        = (state == SAVE);
  assign save_thread = active;
  assign load        = (state == SAVE || state == WAIT) && found;
  assign load_thread = pick;
  assign waiting     = (state == WAIT) && !found;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= WAIT;
      active <= '0;
      cnt    <= '0;
    end else begin
      unique case (state)
        RUN:  if (event_i) state <= SAVE;
        SAVE, WAIT: begin
          if (found) begin
            active <= pick;
            if (T_M > 1) begin
              state <= LOAD;
              cnt   <= CW'(T_M - 2);
            end else begin
              state <= RUN;
            end
          end else begin
            state <= WAIT;
          end
        end
        LOAD: begin
          if (cnt == '0) state <= RUN;
          else           cnt   <= cnt - 1'b1;
        end
        default: state <= WAIT;
      endcase
    end
  end

  // the running thread is always one that may run
  a_active_ready: assert property (@(posedge clk) disable iff (!rst_n)
    (state == RUN) |-> thread_en[active]);
endmodule
