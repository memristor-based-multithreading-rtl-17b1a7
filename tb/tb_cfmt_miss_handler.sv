// tb_cfmt_miss_handler: 4 threads. Misses are raised for random unblocked
// threads; a memory model answers each request after a random delay. Checks:
// the request follows the miss by one cycle with its thread, PC and
// instruction; the thread is not ready from the cycle after the miss until the
// cycle after its background write; the background write carries
// {valid, pc, fill data} for that thread; no background write is taken while
// bg_ready is low, and a held write is taken later.
module tb_cfmt_miss_handler;
  import cfmt_pkg::*;
  localparam int unsigned N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic miss = 0, req_valid, fill_valid = 0, bg_we, bg_ready = 1;
  logic [1:0] miss_thread = 0, req_thread, fill_thread = 0, bg_thread;
  logic [XLEN-1:0] miss_pc = 0, miss_instr = 0, req_pc, req_instr, fill_data = 0;
  stage_t bg_data;
  logic [N-1:0] ready;
  int checks = 0, failures = 0, n_bg = 0, n_held = 0;

  always #5 clk = ~clk;

  cfmt_miss_handler #(.N_THREADS(N)) dut (.*);

  // testbench view of each thread
  bit              m_blocked [N];
  bit              m_filled  [N];
  logic [XLEN-1:0] m_pc [N], m_data [N];
  int              due [N];
  int              cyc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // stimulus and checks at the falling edge, state updates at the rising one
  logic           last_miss = 0;
  logic [1:0]     last_t;
  logic [XLEN-1:0] last_pc, last_instr;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      cyc++;
      // outputs of the previous edge
      check(req_valid == last_miss, "request timing");
      if (last_miss) check(req_thread == last_t && req_pc == last_pc && req_instr == last_instr, "request contents");
      for (int t = 0; t < N; t++) check(ready[t] == !m_blocked[t], $sformatf("ready[%0d]", t));
      // drive this cycle
      miss = 0; fill_valid = 0;
      bg_ready = ($urandom_range(4) != 0);
      begin
        int t; t = $urandom_range(N - 1);
        if (!m_blocked[t] && $urandom_range(2) == 0) begin
          miss = 1; miss_thread = 2'(t); miss_pc = $urandom; miss_instr = $urandom;
        end
      end
      for (int t = 0; t < N; t++)
        if (m_blocked[t] && !m_filled[t] && due[t] <= cyc && !fill_valid) begin
          fill_valid = 1; fill_thread = 2'(t); fill_data = $urandom;
        end
      #1;
      if (bg_we) begin
        check(m_filled[bg_thread], "background write only for a filled thread");
        check(bg_data.valid && bg_data.pc == m_pc[bg_thread] && bg_data.data == m_data[bg_thread],
              "background write contents");
        if (bg_ready) n_bg++; else n_held++;
      end
      // model update for the coming edge
      last_miss = miss; last_t = miss_thread; last_pc = miss_pc; last_instr = miss_instr;
      if (bg_we && bg_ready) begin m_blocked[bg_thread] = 0; m_filled[bg_thread] = 0; end
      if (miss) begin
        m_blocked[miss_thread] = 1; m_pc[miss_thread] = miss_pc;
        due[miss_thread] = cyc + 2 + $urandom_range(6);
      end
      if (fill_valid) begin m_filled[fill_thread] = 1; m_data[fill_thread] = fill_data; end
    end
    check(n_bg > 0 && n_held > 0, "background writes taken and held");
    $display("bg writes %0d held %0d", n_bg, n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
