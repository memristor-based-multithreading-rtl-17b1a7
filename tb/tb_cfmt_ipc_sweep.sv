// tb_cfmt_ipc_sweep: throughput against thread count, for two MPR read times.
// Two pipelines run side by side, both built with 20 thread contexts (the
// default is 16), one with T_M = 1 and one with T_M = 3, with a miss penalty
// of 200 cycles and one miss per 16 instructions (r_m = 0.25 memory
// instructions, miss rate 0.25). For n = 1 to 20 running threads the measured IPC is compared with the analytic model
//   unsaturated: IPC = n / (CPI_ideal + P_m * r_m * MR)
//   saturated:   IPC = 1 / (CPI_ideal + P_s * r_m * MR), P_s = T_M
// taking the smaller of the two, with CPI_ideal = 1. Points within two
// threads of the knee, where the model's sharp corner does not hold, get a
// wider tolerance. It also prints the ratio to a conventional switch-on-event
// pipeline that flushes with P_s = 20 (computed from the same model).
module tb_cfmt_ipc_sweep;
  localparam int unsigned N = 20, P_M = 200, PER = 16;
  localparam real RM_MR = 1.0 / PER;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] thread_en = '0;
  int unsigned jitter = 0;
  int unsigned c1, f1, r1, y1, s1, w1, b1, h1, m1;
  int unsigned c3, f3, r3, y3, s3, w3, b3, h3, m3;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cfmt_env #(.N_THREADS(N), .T_M(1), .P_M(P_M), .MISS_PERIOD(PER)) env1 (
    .clk, .rst_n, .thread_en, .jitter, .checks(c1), .failures(f1), .retired(r1), .cycles(y1),
    .n_switch(s1), .n_wait(w1), .n_bg(b1), .n_bg_held(h1), .n_miss(m1), .n_active());
  cfmt_env #(.N_THREADS(N), .T_M(3), .P_M(P_M), .MISS_PERIOD(PER)) env3 (
    .clk, .rst_n, .thread_en, .jitter, .checks(c3), .failures(f3), .retired(r3), .cycles(y3),
    .n_switch(s3), .n_wait(w3), .n_bg(b3), .n_bg_held(h3), .n_miss(m3), .n_active());

  function automatic real model(input int n, input int tm);
    real u, s;
    u = real'(n) / (1.0 + P_M * RM_MR);
    s = 1.0 / (1.0 + tm * RM_MR);
    return (u < s) ? u : s;
  endfunction

  task automatic judge(input int n, input int tm, input real ipc);
    real m, tol, knee;
    m    = model(n, tm);
    knee = (1.0 + P_M * RM_MR) / (1.0 + tm * RM_MR);
    tol  = (real'(n) > knee - 2.0 && real'(n) < knee + 2.0) ? 0.12 : 0.06;
    checks++;
    if (ipc < m * (1.0 - tol) || ipc > m * (1.0 + tol)) begin
      failures++;
      $display("FAIL n=%0d T_M=%0d IPC %f model %f", n, tm, ipc, m);
    end
  endtask

  initial begin
    real ipc1, ipc3, conv;
    $display(" n   IPC(T_M=1) model   IPC(T_M=3) model   conventional P_s=20");
    for (int n = 1; n <= N; n++) begin
      int unsigned ra, rb, ya;
      rst_n = 1'b0; thread_en = N'((1 << n) - 1);
      repeat (3) @(posedge clk);
      rst_n = 1'b1;
      repeat (1500) @(posedge clk);
      ra = r1; rb = r3; ya = y1;
      repeat (6000) @(posedge clk);
      ipc1 = real'(r1 - ra) / real'(y1 - ya);
      ipc3 = real'(r3 - rb) / real'(y1 - ya);
      conv = model(n, 20);
      $display("%2d   %f   %f   %f   %f   %f", n, ipc1, model(n, 1), ipc3, model(n, 3), conv);
      judge(n, 1, ipc1);
      judge(n, 3, ipc3);
      if (n == N) $display("saturated speedup over conventional: %f (T_M=1), %f (T_M=3)",
                           ipc1 / conv, ipc3 / conv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + c1 + c3, failures + f1 + f3);
    $finish;
  end

  initial begin
    repeat (180000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks + c1 + c3, failures + f1 + f3 + 1);
    $finish;
  end
endmodule
