// cfmt_pipeline: a switch-on-event multithreaded pipeline with continuous
// flow. Every pipeline register is a multistate pipeline register (MPR) that
// holds one instruction state per thread: the active thread's in a CMOS
// register, the others in memristor layers. When an instruction in execution
// hits a long-latency event (an L1 miss, reported by the execution unit on
// ex_miss), the younger instructions of that thread are not flushed: all MPRs
// save them into the thread's layers while the next ready thread's state is
// read back, and the pipeline resumes after the MPR read time T_M. The miss
// is served in the background and its result written into the stalled
// thread's layer of the register after execution, so it retires as soon as the
// thread runs again.
//
// Structure: fetch -> N_STAGES MPRs -> execution (outside, through ex_*) ->
// one MPR -> retire. The logic between the intermediate MPRs is not defined by
// the architecture and is left empty: instruction state passes unchanged.
// The execution unit, the instruction memory and the cache/memory that serve
// a miss are outside this module and connect through the imem_*, ex_*, req_*
// and fill_* ports. Ports use plain signals; timing:
//   imem_* and ex_* are combinational round trips within a cycle;
//   an instruction on ex_* executes in a cycle with advance high;
//   req_* is raised the cycle after the miss; a fill may come any later cycle;
//   retire_* shows each instruction as it leaves the last MPR;
//   mpr_active is high in cycles where any memristor layer is powered
//   (switches and background writes); otherwise only CMOS registers work.
module cfmt_pipeline
  import cfmt_pkg::*;
#(
  parameter int unsigned N_THREADS = 16,
  parameter int unsigned T_M       = 1,
  parameter int unsigned N_STAGES  = 3,
  localparam int unsigned TW       = tid_w(N_THREADS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_THREADS-1:0] thread_en,
  input  logic [XLEN-1:0]      start_pc,
  // instruction memory
  output logic [TW-1:0]        imem_thread,
  output logic [XLEN-1:0]      imem_pc,
  input  logic [XLEN-1:0]      imem_instr,
  // execution unit
  output logic                 ex_valid,
  output logic [TW-1:0]        ex_thread,
  output logic [XLEN-1:0]      ex_pc,
  output logic [XLEN-1:0]      ex_instr,
  input  logic [XLEN-1:0]      ex_result,
  input  logic                 ex_miss,
  // long-latency request and completion
  output logic                 req_valid,
  output logic [TW-1:0]        req_thread,
  output logic [XLEN-1:0]      req_pc,
  output logic [XLEN-1:0]      req_instr,
  input  logic                 fill_valid,
  input  logic [TW-1:0]        fill_thread,
  input  logic [XLEN-1:0]      fill_data,
  // retirement
  output logic                 retire_valid,
  output logic [TW-1:0]        retire_thread,
  output logic [XLEN-1:0]      retire_pc,
  output logic [XLEN-1:0]      retire_result,
  // status
  output logic [TW-1:0]        active_thread,
  output logic                 advance,
  output logic                 switch_save,
  output logic                 switch_load,
  output logic                 idle_wait,
  output logic                 mpr_active
);
  logic          save, load, waiting;
  logic [TW-1:0] active, save_thread, load_thread;
  logic          ev;
  logic [N_THREADS-1:0] ready;

  stage_t fetch_out;
  stage_t stage_q [N_STAGES + 1];   // N_STAGES before execution, one after
  stage_t stage_d [N_STAGES + 1];

  logic   bg_we, bg_ready;
  logic [TW-1:0] bg_thread;
  stage_t bg_data;
  logic [N_STAGES:0] layer_act;

  cfmt_switch_ctrl #(.N_THREADS(N_THREADS), .T_M(T_M)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .thread_en   (thread_en),
    .ready       (ready),
    .event_i     (ev),
    .active      (active),
    .advance     (advance),
    .save        (save),
    .save_thread (save_thread),
    .load        (load),
    .load_thread (load_thread),
    .waiting     (waiting)
  );

  cfmt_fetch #(.N_THREADS(N_THREADS)) u_fetch (
    .clk         (clk),
    .rst_n       (rst_n),
    .start_pc    (start_pc),
    .thread      (active),
    .advance     (advance),
    .imem_thread (imem_thread),
    .imem_pc     (imem_pc),
    .imem_instr  (imem_instr),
    .out         (fetch_out)
  );

  // execution, outside this module
  stage_t ex_in;
  assign ex_in     = stage_q[N_STAGES-1];
  assign ex_valid  = ex_in.valid;
  assign ex_thread = active;
  assign ex_pc     = ex_in.pc;
  assign ex_instr  = ex_in.data;
  assign ev        = advance && ex_in.valid && ex_miss;

  // state entering each MPR
  always_comb begin
    stage_d[0] = fetch_out;
    for (int unsigned s = 1; s < N_STAGES; s++) stage_d[s] = stage_q[s-1];
    // after execution: the result, or a bubble in place of the instruction
    // that missed (its result arrives later by background write)
    stage_d[N_STAGES] = '{valid: ex_in.valid && !ex_miss, pc: ex_in.pc, data: ex_result};
  end

  for (genvar s = 0; s <= N_STAGES; s++) begin : g_mpr
    logic load_busy, load_done, bg_rdy, act;
    logic s_bg_we;
    assign s_bg_we = (s == N_STAGES) ? bg_we : 1'b0;
    mpr #(.N_THREADS(N_THREADS), .WIDTH($bits(stage_t)), .T_M(T_M)) u_mpr (
      .clk         (clk),
      .rst_n       (rst_n),
      .en          (advance),
      .d           (stage_d[s]),
      .q           (stage_q[s]),
      .save        (save),
      .save_thread (save_thread),
      .load        (load),
      .load_thread (load_thread),
      .load_busy   (load_busy),
      .load_done   (load_done),
      .bg_we       (s_bg_we),
      .bg_thread   (bg_thread),
      .bg_data     (bg_data),
      .bg_ready    (bg_rdy),
      .layers_active (act)
    );
    assign layer_act[s] = act;
    if (s == N_STAGES) begin : g_wb
      assign bg_ready = bg_rdy;
    end
    // all MPRs switch in step: no advance while state is being read in, and
    // the write port is taken by a save in the same cycles everywhere
    a_load_stalls: assert property (@(posedge clk) disable iff (!rst_n)
      (load_busy || load_done) |-> !advance);
    a_bg_port: assert property (@(posedge clk) disable iff (!rst_n) bg_rdy == !save);
  end

  cfmt_miss_handler #(.N_THREADS(N_THREADS)) u_miss (
    .clk         (clk),
    .rst_n       (rst_n),
    .miss        (ev),
    .miss_thread (active),
    .miss_pc     (ex_in.pc),
    .miss_instr  (ex_in.data),
    .req_valid   (req_valid),
    .req_thread  (req_thread),
    .req_pc      (req_pc),
    .req_instr   (req_instr),
    .fill_valid  (fill_valid),
    .fill_thread (fill_thread),
    .fill_data   (fill_data),
    .bg_we       (bg_we),
    .bg_thread   (bg_thread),
    .bg_data     (bg_data),
    .bg_ready    (bg_ready),
    .ready       (ready)
  );

  assign retire_valid  = advance && stage_q[N_STAGES].valid;
  assign retire_thread = active;
  assign retire_pc     = stage_q[N_STAGES].pc;
  assign retire_result = stage_q[N_STAGES].data;

  assign active_thread = active;
  assign switch_save   = save;
  assign switch_load   = load;
  assign idle_wait     = waiting;
  assign mpr_active    = |layer_act;
endmodule
