// memristor_layers: the per-thread storage of a set of memristor-based MPRs.
// There is one layer of WIDTH bits for each of N_THREADS threads; in silicon
// each bit is one memristor stacked above the CMOS pipeline register. Here a
// layer is a row of a register array: a layer is written at the clock edge when
// its write enable is high, and every layer is presented on `layers` for the
// sense mechanism to choose from.
// `en` powers the array: when it is low the layers keep their contents (they
// are nonvolatile) but take no write and present zeros, standing for a sense
// path that is switched off. The owner raises it only while a layer is written
// or read, so in normal pipeline operation the layers are idle.
// The device is nonvolatile; the synchronous clear on reset is this design's
// own addition, so that a thread that has never run reads as an empty pipeline
// stage rather than as leftover contents.
module memristor_layers #(
  parameter int unsigned N_THREADS = 16,
  parameter int unsigned WIDTH     = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [N_THREADS-1:0] layer_we,
  input  logic [WIDTH-1:0]     layer_wdata,
  output logic [WIDTH-1:0]     layers [N_THREADS]
);
  logic [WIDTH-1:0] mem [N_THREADS];

  always_ff @(posedge clk) begin
    for (int unsigned t = 0; t < N_THREADS; t++) begin
      if (!rst_n)           mem[t] <= '0;
      else if (en && layer_we[t]) mem[t] <= layer_wdata;
    end
  end

  always_comb
    for (int unsigned t = 0; t < N_THREADS; t++) layers[t] = en ? mem[t] : '0;
endmodule
