// tb_cfmt_pipeline: end-to-end test of cfmt_pipeline at its default
// parameters (16 threads, T_M = 1, 3 stages before execution), with a miss
// penalty P_M = 200 and one miss in 16 instructions.
// Phase 1 runs a single thread: after each miss no other thread is ready, so
// the pipeline waits for the background fill and switches back to the same
// thread. Phase 2 runs all 16 threads, enough to hide P_M, and checks the
// saturated throughput 16 / (16 + T_M) instructions per cycle against the
// analytic model CPI = CPI_ideal + P_s * r_m * MR with P_s = T_M. Phase 3 runs
// 3 threads (unsaturated) and checks CPI against (CPI_ideal + P_m*r_m*MR)/n.
// Phase 4 repeats phase 2 with a miss penalty that varies by a few cycles, so
// that completed misses meet switches and their background write is held.
// Every retired instruction is checked by cfmt_env.
module tb_cfmt_pipeline;
  localparam int unsigned N = 16, T_M = 1, P_M = 200, PER = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] thread_en = '0;
  int unsigned jitter = 0;
  int unsigned checks, failures, retired, cycles, n_switch, n_wait, n_bg, n_bg_held, n_miss, n_active;
  int unsigned my_checks = 0, my_fail = 0;
  int unsigned tot_sw = 0, tot_wait = 0, tot_bg = 0, tot_held = 0, tot_checks = 0, tot_fail = 0;

  always #5 clk = ~clk;

  cfmt_env #(.N_THREADS(N), .T_M(T_M), .P_M(P_M), .MISS_PERIOD(PER), .DEFAULTS(1'b1)) env (.*);

  task automatic phase(input logic [N-1:0] en, input int unsigned warm, input int unsigned win,
                       input real exp_ipc, input real tol, input string name,
                       input int unsigned jit = 0);
    int unsigned r0, c0;
    real ipc;
    rst_n = 1'b0; thread_en = en; jitter = jit;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (warm) @(posedge clk);
    r0 = retired; c0 = cycles;
    repeat (win) @(posedge clk);
    ipc = real'(retired - r0) / real'(cycles - c0);
    my_checks++;
    if (ipc < exp_ipc * (1.0 - tol) || ipc > exp_ipc * (1.0 + tol)) begin
      my_fail++;
      $display("FAIL %s: IPC %f, model %f", name, ipc, exp_ipc);
    end else $display("%s: IPC %f, model %f", name, ipc, exp_ipc);
    $display("  switches %0d waits %0d bg writes %0d held %0d misses %0d retired %0d",
             n_switch, n_wait, n_bg, n_bg_held, n_miss, retired);
    $display("  memristor layers active in %0d of %0d cycles", n_active, cycles);
    tot_sw += n_switch; tot_wait += n_wait; tot_bg += n_bg; tot_held += n_bg_held;
    tot_checks += checks; tot_fail += failures;
  endtask

  initial begin
    // 1 thread: CPI = (1 + P_M/PER) / 1
    phase(N'(1), 500, 8000, 1.0 / (1.0 + real'(P_M) / PER), 0.10, "1 thread");
    // 16 threads, saturated: CPI = 1 + T_M / PER
    phase('1, 2000, 8000, 1.0 / (1.0 + real'(T_M) / PER), 0.02, "16 threads");
    // 3 threads, unsaturated: CPI = (1 + P_M/PER) / 3
    phase(N'(3'b111) << 5, 1000, 8000, 3.0 / (1.0 + real'(P_M) / PER), 0.10, "3 threads");
    // 16 threads with the miss penalty varying by up to 7 cycles, so that
    // fills collide with saves and background writes must wait
    phase('1, 2000, 8000, 1.0 / (1.0 + real'(T_M) / PER), 0.02, "16 threads, jitter", 7);
    my_checks += 4;
    if (tot_sw == 0)   begin my_fail++; $display("FAIL no thread switch"); end
    if (tot_wait == 0) begin my_fail++; $display("FAIL no idle wait"); end
    if (tot_bg == 0)   begin my_fail++; $display("FAIL no background write"); end
    if (tot_held == 0) begin my_fail++; $display("FAIL no background write held by a save"); end
    $display("TB_RESULT checks=%0d failures=%0d", tot_checks + my_checks, tot_fail + my_fail);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", tot_checks + my_checks, tot_fail + my_fail + 1);
    $finish;
  end
endmodule
