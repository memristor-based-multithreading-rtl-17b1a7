// tb_cfmt_switch_ctrl: a 4-thread controller with T_M = 3 driven by a model of
// the rest of the pipeline: random stall events while running, a thread is
// blocked from the cycle after its event and released at random later. For
// every switch it checks: the save comes the cycle after the event and names
// the active thread; the loaded thread is the next enabled, ready thread in
// round-robin order after the active one; the pipeline is stalled for exactly
// T_M cycles when a thread was ready, and otherwise waits (waiting high) until
// one is; a disabled thread is never chosen.
module tb_cfmt_switch_ctrl;
  localparam int unsigned N = 4, T_M = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] thread_en = 4'b1011, ready = '1;
  logic event_i = 0;
  logic [1:0] active, save_thread, load_thread;
  logic advance, save, load, waiting;
  int checks = 0, failures = 0, n_sw = 0, n_wait = 0;

  always #5 clk = ~clk;

  cfmt_switch_ctrl #(.N_THREADS(N), .T_M(T_M)) dut (.*);

  function automatic int rr(input int from, input logic [N-1:0] c);
    for (int i = 1; i <= N; i++) if (c[(from + i) % N]) return (from + i) % N;
    return -1;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int unblock_at [N];
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int t = 0; t < N; t++) if (!ready[t] && cyc >= unblock_at[t]) ready[t] <= 1'b1;
  end

  initial begin
    int exp, stall, old;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // after reset: load of the first candidate, then T_M cycles to run
    #1 check(load && load_thread == rr(0, thread_en & ready), "first load");
    for (int i = 0; i < 300; i++) begin
      // wait until running
      stall = 0;
      while (!advance) begin @(negedge clk); #1; stall++; end
      check(thread_en[active], "active enabled");
      // run a few cycles, then an event
      repeat ($urandom_range(4)) @(negedge clk);
      event_i = 1; old = active;
      @(negedge clk); event_i = 0;
      // the handler blocks the thread from now on for a random time
      ready[old] = 1'b0; unblock_at[old] = cyc + $urandom_range(25);
      #1;
      check(save && save_thread == old && !advance, "save after event");
      exp = rr(old, thread_en & ready);
      if (exp >= 0) begin
        n_sw++;
        check(load && load_thread == exp, "round-robin pick");
        stall = 1;
        @(negedge clk); #1;
        while (!advance) begin stall++; @(negedge clk); #1; end
        check(stall == T_M, $sformatf("stall %0d cycles", stall));
        check(active == exp, "active after switch");
      end else begin
        n_wait++;
        check(!load, "no load without candidate");
        @(negedge clk); #1;
        while (!load) begin check(waiting && !advance, "waiting"); @(negedge clk); #1; end
        check(load_thread == rr(old, thread_en & ready), "pick after wait");
      end
    end
    check(n_sw > 0 && n_wait > 0, "both paths taken");
    $display("switches %0d waits %0d", n_sw, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
