// tb_memristor_layers: random one-hot and idle write patterns into an
// 8-thread, 16-bit array with the array enable toggled at random, compared
// each cycle with a reference copy kept in the testbench: a disabled array
// takes no write and reads as zeros, and keeps its contents. Also checks that
// reset clears every layer.
module tb_memristor_layers;
  localparam int unsigned N = 8, W = 16;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1;
  logic [N-1:0] layer_we = '0;
  logic [W-1:0] layer_wdata = '0;
  logic [W-1:0] layers [N];
  logic [W-1:0] ref_mem [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  memristor_layers #(.N_THREADS(N), .WIDTH(W)) dut (.*);

  task automatic compare();
    for (int t = 0; t < N; t++) begin
      checks++;
      if (layers[t] !== (en ? ref_mem[t] : '0)) begin
        failures++;
        $display("FAIL layer %0d = %h, expected %h", t, layers[t], ref_mem[t]);
      end
    end
  endtask

  initial begin
    foreach (ref_mem[t]) ref_mem[t] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    compare();
    for (int i = 0; i < 300; i++) begin
      int t;
      t = $urandom_range(N);            // N means no write
      layer_we    = (t < N) ? N'(1) << t : '0;
      layer_wdata = W'($urandom);
      en          = ($urandom_range(3) != 0);
      #1 compare();
      @(posedge clk);
      if (t < N && en) ref_mem[t] = layer_wdata;
      #1 compare();
    end
    rst_n = 1'b0; en = 1'b1;
    @(posedge clk);
    #1 foreach (ref_mem[t]) ref_mem[t] = '0;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
