// cfmt_env: test environment around cfmt_pipeline. It models the parts the
// pipeline leaves outside and checks what retires:
//  * instruction memory: each thread has its own program; the word at (t, pc)
//    is instr_of(t, pc), a fixed mixing function.
//  * execution unit: the result of an instruction is instr ^ pc ^ 0x5A5A5A5A.
//    One instruction in MISS_PERIOD misses (word index mod MISS_PERIOD equals
//    MISS_PERIOD-1), standing for r_m * MR = 1/MISS_PERIOD.
//  * memory behind the L1: a miss request is answered P_M cycles after it is
//    raised, plus a random 0..jitter cycles when jitter is not 0, with ~instr
//    as the loaded value, at most one fill per cycle.
//  * checker: per thread, instructions must retire in program order, each
//    exactly once, with the right result (missed ones with their fill data).
// It also counts the mechanisms: switches, idle waits, background writes,
// background writes held back by a save, and the stall length of each
// switch, which must equal T_M; the memristor layers must be idle in every
// cycle where the pipeline simply advances.
module cfmt_env #(
  parameter int unsigned N_THREADS   = 16,
  parameter int unsigned T_M         = 1,
  parameter int unsigned N_STAGES    = 3,
  parameter int unsigned P_M         = 200,
  parameter int unsigned MISS_PERIOD = 16,
  parameter bit          DEFAULTS    = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_THREADS-1:0] thread_en,
  input  int unsigned          jitter,
  output int unsigned          checks,
  output int unsigned          failures,
  output int unsigned          retired,
  output int unsigned          cycles,
  output int unsigned          n_switch,
  output int unsigned          n_wait,
  output int unsigned          n_bg,
  output int unsigned          n_bg_held,
  output int unsigned          n_miss,
  output int unsigned          n_active
);
  import cfmt_pkg::*;
  localparam int unsigned TW = tid_w(N_THREADS);
  localparam logic [XLEN-1:0] START_PC = 32'h0000_1000;

  function automatic logic [XLEN-1:0] instr_of(int unsigned t, logic [XLEN-1:0] pc);
    logic [XLEN-1:0] x;
    x = pc * 32'h9E37_79B1 + t * 32'h85EB_CA6B;
    return x ^ (x >> 13);
  endfunction

  function automatic bit misses(logic [XLEN-1:0] pc);
    return ((pc >> 2) % MISS_PERIOD) == (MISS_PERIOD - 1);
  endfunction

  logic [TW-1:0]   imem_thread, ex_thread, req_thread, retire_thread, active_thread;
  logic [XLEN-1:0] imem_pc, imem_instr, ex_pc, ex_instr, ex_result;
  logic [XLEN-1:0] req_pc, req_instr, retire_pc, retire_result;
  logic            ex_valid, ex_miss, req_valid, retire_valid;
  logic            advance, switch_save, switch_load, idle_wait, mpr_active;
  logic            fill_valid;
  logic [TW-1:0]   fill_thread;
  logic [XLEN-1:0] fill_data;

  assign imem_instr = instr_of(32'(imem_thread), imem_pc);
  assign ex_miss    = ex_valid && misses(ex_pc);
  assign ex_result  = ex_instr ^ ex_pc ^ 32'h5A5A_5A5A;

  if (DEFAULTS) begin : g_dut
    cfmt_pipeline dut (.*, .start_pc(START_PC));
  end else begin : g_dut
    cfmt_pipeline #(.N_THREADS(N_THREADS), .T_M(T_M), .N_STAGES(N_STAGES)) dut (.*, .start_pc(START_PC));
  end

  // memory model: a queue of pending requests with their due cycle
  typedef struct { int unsigned due; logic [TW-1:0] t; logic [XLEN-1:0] data; } req_t;
  req_t q[$];
  logic [XLEN-1:0] exp_pc [N_THREADS];
  int unsigned ev_cycle;
  bit          ev_pending;

  always_ff @(posedge clk) begin : model
    int unsigned c, f;
    c = 0;
    f = 0;
    if (!rst_n) begin
      q.delete();
      fill_valid  <= 1'b0;
      fill_thread <= '0;
      fill_data   <= '0;
      checks <= 0; failures <= 0; retired <= 0; cycles <= 0;
      n_switch <= 0; n_wait <= 0; n_bg <= 0; n_bg_held <= 0; n_miss <= 0; n_active <= 0;
      ev_pending <= 1'b0;
      for (int unsigned t = 0; t < N_THREADS; t++) exp_pc[t] <= START_PC;
    end else begin
      cycles <= cycles + 1;
      // requests: due P_M cycles after the request cycle
      if (req_valid) begin
        q.push_back('{due: cycles + P_M + ((jitter > 0) ? $urandom_range(jitter) : 0), t: req_thread, data: ~req_instr});
        n_miss <= n_miss + 1;
        c++;
        if (req_instr != instr_of(32'(req_thread), req_pc) || !misses(req_pc)) begin
          f++;
          $display("FAIL miss request t%0d pc %h", req_thread, req_pc);
        end
      end
      fill_valid <= 1'b0;
      if (q.size() > 0) begin : pop
        int unsigned k;
        k = 0;
        for (int unsigned i = 1; i < q.size(); i++) if (q[i].due < q[k].due) k = i;
        if (q[k].due <= cycles + 1) begin
        fill_valid  <= 1'b1;
        fill_thread <= q[k].t;
        fill_data   <= q[k].data;
        q.delete(k);
        end
      end
      // retirement check
      if (retire_valid) begin
        automatic logic [XLEN-1:0] ins = instr_of(32'(retire_thread), retire_pc);
        automatic logic [XLEN-1:0] exp_res = misses(retire_pc) ? ~ins : (ins ^ retire_pc ^ 32'h5A5A_5A5A);
        retired <= retired + 1;
        c++;
        exp_pc[retire_thread] <= retire_pc + 4;
        if (retire_pc != exp_pc[retire_thread] || retire_result != exp_res) begin
          f++;
          $display("FAIL retire t%0d pc %h (exp %h) result %h (exp %h)", retire_thread,
                   retire_pc, exp_pc[retire_thread], retire_result, exp_res);
        end
      end
      // a disabled thread never retires
      if (retire_valid && !thread_en[retire_thread]) f++;
      // mechanism counts and switch stall length
      if (switch_save && switch_load) n_switch <= n_switch + 1;
      // memristor layers are powered only for switches and background writes
      if (mpr_active) n_active <= n_active + 1;
      if (advance && !g_dut.dut.bg_we) begin
        c++;
        if (mpr_active) begin
          f++;
          $display("FAIL memristor layers active in a plain pipeline cycle");
        end
      end
      if (idle_wait && !$past(idle_wait)) n_wait <= n_wait + 1;
      if (g_dut.dut.bg_we && g_dut.dut.bg_ready) n_bg <= n_bg + 1;
      if (g_dut.dut.bg_we && !g_dut.dut.bg_ready) n_bg_held <= n_bg_held + 1;
      if (advance && ex_valid && ex_miss) begin
        ev_cycle   <= cycles;
        ev_pending <= 1'b1;
      end
      if (ev_pending && switch_save && !switch_load) ev_pending <= 1'b0; // had to wait
      if (ev_pending && advance) begin
        ev_pending <= 1'b0;
        c++;
        if (cycles - ev_cycle != T_M + 1) begin
          f++;
          $display("FAIL switch stall %0d cycles, expected %0d", cycles - ev_cycle - 1, T_M);
        end
      end
      checks   <= checks + c;
      failures <= failures + f;
    end
  end
endmodule
