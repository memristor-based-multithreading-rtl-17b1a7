// tb_mpr: a 4-thread, 8-bit MPR with read time T_M = 2 under random traffic:
// pipeline writes, thread switches (save of the active thread together with
// the read of another), switches into a thread whose state is then updated by
// background writes, and background writes offered during saves. A reference
// model of the CMOS register and the layers, kept in the testbench, is
// compared with q every cycle; the switch latency, bg_ready and the layer
// enable (on only for a save, a read or a background write) are checked.
module tb_mpr;
  localparam int unsigned N = 4, W = 8, T_M = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 0, save = 0, load = 0, bg_we = 0;
  logic [W-1:0] d = 0, bg_data = 0, q;
  logic [1:0] save_thread = 0, load_thread = 0, bg_thread = 0;
  logic load_busy, load_done, bg_ready, layers_active;
  int checks = 0, failures = 0, switches = 0, bg_writes = 0, bg_held = 0;

  logic [W-1:0] m_cmos, m_layer [N];
  int           m_cnt;
  logic [1:0]   m_thr, active;

  always #5 clk = ~clk;

  mpr #(.N_THREADS(N), .WIDTH(W), .T_M(T_M)) dut (.*);

  // reference model
  always @(posedge clk) begin
    if (!rst_n) begin
      m_cmos <= '0; m_cnt <= -1;
      for (int t = 0; t < N; t++) m_layer[t] <= '0;
    end else begin
      if (save) m_layer[save_thread] <= m_cmos;
      else if (bg_we) m_layer[bg_thread] <= bg_data;
      if (load) begin m_cnt <= T_M - 1; m_thr <= load_thread; end
      else if (m_cnt >= 0) m_cnt <= m_cnt - 1;
      if ((load && T_M == 1) || (!load && m_cnt == 1)) m_cmos <= m_layer[load ? load_thread : m_thr];
      else if (en) m_cmos <= d;
    end
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (q !== m_cmos) begin failures++; $display("FAIL q %h expected %h", q, m_cmos); end
    checks++;
    if (bg_ready !== !save) begin failures++; $display("FAIL bg_ready"); end
    checks++;
    if (layers_active !== (save || bg_we || load || m_cnt >= 1)) begin
      failures++; $display("FAIL layers_active %b", layers_active);
    end
  end

  initial begin
    active = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      en = 0; save = 0; load = 0; bg_we = 0;
      // a background write to some inactive thread, at any time
      if ($urandom_range(3) == 0) begin
        bg_we = 1; bg_data = W'($urandom);
        do bg_thread = 2'($urandom); while (bg_thread == active);
      end
      if ($urandom_range(7) == 0) begin
        // thread switch: save active, read another, stall T_M cycles
        int c0;
        logic [1:0] nt;
        do nt = 2'($urandom); while (nt == active);
        save = 1; save_thread = active; load = 1; load_thread = nt;
        if (bg_we && bg_thread == nt) bg_we = 0;   // never write the layer being read
        if (bg_we) bg_held++;
        switches++;
        c0 = 0;
        while (1) begin
          #1;
          if (load_done) break;
          @(negedge clk);
          save = 0; load = 0; bg_we = 0; c0++;
        end
        checks++;
        if (c0 != T_M - 1) begin failures++; $display("FAIL load_done after %0d cycles", c0); end
        active = nt;
      end else begin
        en = $urandom_range(1); d = W'($urandom);
        if (bg_we) bg_writes++;
      end
    end
    checks++;
    if (switches == 0 || bg_writes == 0 || bg_held == 0) failures++;
    $display("switches %0d bg writes %0d held %0d", switches, bg_writes, bg_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
