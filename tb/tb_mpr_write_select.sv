// tb_mpr_write_select: drives every thread number (including unused codes of a
// 6-thread build) with and without a write request and random data; checks
// that exactly the selected layer, and only a valid one, is enabled and that
// the data reaches the layers unchanged.
module tb_mpr_write_select;
  localparam int unsigned N = 6, W = 12, TW = 3;
  logic          we;
  logic [TW-1:0] thread;
  logic [W-1:0]  data, layer_wdata;
  logic [N-1:0]  layer_we;
  int checks = 0, failures = 0;

  mpr_write_select #(.N_THREADS(N), .WIDTH(W)) dut (.*);

  initial begin
    for (int rep = 0; rep < 4; rep++)
      for (int t = 0; t < (1 << TW); t++)
        for (int w = 0; w < 2; w++) begin
          logic [N-1:0] exp;
          we = w[0]; thread = TW'(t); data = W'($urandom);
          #1;
          exp = '0;
          if (w == 1 && t < N) exp[t] = 1'b1;
          checks++;
          if (layer_we !== exp || layer_wdata !== data) begin
            failures++;
            $display("FAIL we=%0d t=%0d: layer_we %b exp %b", w, t, layer_we, exp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
