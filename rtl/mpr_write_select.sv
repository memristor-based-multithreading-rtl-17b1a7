// mpr_write_select: the "select thread and write to memristors" block of a
// memristor-based multistate pipeline register (MPR). It turns a write request
// and a log2(n)-bit thread number into a one-hot write enable for the memristor
// layer of that thread and drives the m data bits to all layers.
// Purely combinational. Thread numbers at or above N_THREADS select no layer.
module mpr_write_select #(
  parameter int unsigned N_THREADS = 16,
  parameter int unsigned WIDTH     = 1,
  localparam int unsigned TW       = cfmt_pkg::tid_w(N_THREADS)
) (
  input  logic                 we,
  input  logic [TW-1:0]        thread,
  input  logic [WIDTH-1:0]     data,
  output logic [N_THREADS-1:0] layer_we,
  output logic [WIDTH-1:0]     layer_wdata
);
  always_comb begin
    layer_we = '0;
    for (int unsigned t = 0; t < N_THREADS; t++)
      layer_we[t] = we && (thread == TW'(t));
  end

  assign layer_wdata = data;
endmodule
