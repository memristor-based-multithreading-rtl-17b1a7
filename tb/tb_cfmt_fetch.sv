// tb_cfmt_fetch: 4 threads, random active thread and advance. Checks that the
// PC sent to instruction memory is the active thread's own PC, that only the
// active thread's PC steps by 4 on advance, and that the output state carries
// valid, that PC and the returned instruction word.
module tb_cfmt_fetch;
  import cfmt_pkg::*;
  localparam int unsigned N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [XLEN-1:0] start_pc = 32'h0000_0400, imem_pc, imem_instr;
  logic [1:0] thread = 0, imem_thread;
  logic advance = 0;
  stage_t out;
  logic [XLEN-1:0] m_pc [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  assign imem_instr = imem_pc ^ {30'(imem_thread) * 30'h1357, 2'b01};

  cfmt_fetch #(.N_THREADS(N)) dut (.*);

  initial begin
    foreach (m_pc[t]) m_pc[t] = start_pc;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      thread = 2'($urandom); advance = $urandom_range(1);
      #1;
      checks++;
      if (imem_thread != thread || imem_pc != m_pc[thread] || !out.valid || out.pc != m_pc[thread]
          || out.data != (m_pc[thread] ^ {30'(thread) * 30'h1357, 2'b01})) begin
        failures++;
        $display("FAIL t%0d pc %h expected %h", thread, imem_pc, m_pc[thread]);
      end
      if (advance) m_pc[thread] += 4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
