// tb_mpr_sense_read: two instances, read time T_M = 1 and T_M = 3, reading
// random layers of a 4-thread, 8-bit array. Checks that valid comes exactly
// T_M cycles after the start (counting the start cycle), only then, with the
// selected layer's data, and that a start while busy is ignored.
module tb_mpr_sense_read;
  localparam int unsigned N = 4, W = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] layers [N];
  logic start1 = 0, start3 = 0;
  logic [1:0] th1 = 0, th3 = 0;
  logic busy1, valid1, busy3, valid3;
  logic [W-1:0] data1, data3;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mpr_sense_read #(.N_THREADS(N), .WIDTH(W), .T_M(1)) u1 (
    .clk, .rst_n, .start(start1), .thread(th1), .layers, .busy(busy1), .valid(valid1), .data(data1));
  mpr_sense_read #(.N_THREADS(N), .WIDTH(W), .T_M(3)) u3 (
    .clk, .rst_n, .start(start3), .thread(th3), .layers, .busy(busy3), .valid(valid3), .data(data3));

  task automatic read(input int tm, input logic [1:0] t);
    int seen;
    seen = -1;
    @(negedge clk);
    if (tm == 1) begin start1 = 1; th1 = t; end else begin start3 = 1; th3 = t; end
    for (int c = 0; c < 6; c++) begin
      #1;
      if ((tm == 1 ? valid1 : valid3) && seen < 0) begin
        seen = c;
        checks++;
        if ((tm == 1 ? data1 : data3) !== layers[t]) begin
          failures++;
          $display("FAIL T_M=%0d data %h expected %h", tm, tm == 1 ? data1 : data3, layers[t]);
        end
      end
      @(negedge clk);
      start1 = 0; start3 = 0;
      // a second start while busy must not restart the read
      if (tm == 3 && c == 0) begin start3 = 1; th3 = t + 1; end
    end
    start3 = 0;
    checks++;
    if (seen != tm - 1) begin
      failures++;
      $display("FAIL T_M=%0d valid %0d cycles after start, expected %0d", tm, seen, tm - 1);
    end
  endtask

  initial begin
    foreach (layers[t]) layers[t] = W'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      foreach (layers[t]) layers[t] = W'($urandom);
      read(1, 2'($urandom));
      read(3, 2'($urandom));
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
