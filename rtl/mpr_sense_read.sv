// mpr_sense_read: the "sense and read" mechanism of a memristor-based MPR.
// A one-cycle `start` with a thread number begins sensing that thread's layer;
// the data is delivered with `valid` high T_M cycles later counting the start
// cycle as the first (T_M = 1: valid in the start cycle itself, T_M = 3: two
// cycles after it). T_M is the memristor read time, which sets the thread
// switch penalty. `busy` is high while a read of more than one cycle is under
// way; a start while busy is ignored. The delay is modelled with a counter and
// the data is taken from the selected layer in the valid cycle; the layer must
// not be written between start and valid.
module mpr_sense_read #(
  parameter int unsigned N_THREADS = 16,
  parameter int unsigned WIDTH     = 1,
  parameter int unsigned T_M       = 1,
  localparam int unsigned TW       = cfmt_pkg::tid_w(N_THREADS),
  localparam int unsigned CW       = (T_M > 2) ? $clog2(T_M) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [TW-1:0]    thread,
  input  logic [WIDTH-1:0] layers [N_THREADS],
  output logic             busy,
  output logic             valid,
  output logic [WIDTH-1:0] data
);
  logic [TW-1:0] sel;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      sel  <= '0;
    end else if (!busy) begin
      if (start && T_M > 1) begin
        busy <= 1'b1;
        cnt  <= CW'(T_M - 2);
        sel  <= thread;
      end
    end else if (cnt == '0) begin
      busy <= 1'b0;
    end else begin
      cnt <= cnt - 1'b1;
    end
  end

  logic [TW-1:0] rd_thread;
  assign rd_thread = busy ? sel : thread;
  assign valid     = busy ? (cnt == '0) : (start && T_M <= 1);
  assign data      = (32'(rd_thread) < N_THREADS) ? layers[rd_thread] : '0;
endmodule
