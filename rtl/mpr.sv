// mpr: a multistate pipeline register built from memristor layers.
// It replaces an ordinary WIDTH-bit pipeline register and holds the state of
// one instruction for each of N_THREADS threads, of which one (the active
// thread) lives in an ordinary CMOS register; the others sit in one memristor
// layer each. With WIDTH = 1 this is one MPR cell; a whole pipeline stage is
// one instance with WIDTH set to the stage's state width, which is the same as
// WIDTH one-bit MPRs sharing their control signals.
//
// Operation
//  * en:      the CMOS layer loads d, as a plain pipeline register (q shows it).
//  * save:    the CMOS contents are copied into the layer of save_thread
//             (the thread being switched out) at the clock edge.
//  * load:    sensing of load_thread's layer starts; T_M cycles later, counting
//             the load cycle, the sensed state is written into the CMOS layer
//             (load_done high in that cycle) and appears on q the cycle after.
//             save and load may be given in the same cycle, which is how a
//             switch normally runs: the copy out overlaps the read in, so the
//             switch costs the read time T_M only.
//  * bg_we:   a background write of bg_data into the layer of bg_thread, used
//             to deposit the result of a long-latency instruction while its
//             thread is switched out. The save has the single write port first;
//             bg_ready is low in a save cycle and bg_we is then ignored.
// The memristor layers are enabled (layers_active) only in cycles with a
// save, a read or a background write; in plain pipeline operation only the
// CMOS register is active.
// The copy-out, the separate thread numbers for writing and for reading, and
// the sense read time follow the memristor MPR structure; splitting the
// switching enable into save and load and the background-write port are this
// design's own choices.
module mpr #(
  parameter int unsigned N_THREADS = 16,
  parameter int unsigned WIDTH     = 1,
  parameter int unsigned T_M       = 1,
  localparam int unsigned TW       = cfmt_pkg::tid_w(N_THREADS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // pipeline side (CMOS layer)
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  // thread switching
  input  logic             save,
  input  logic [TW-1:0]    save_thread,
  input  logic             load,
  input  logic [TW-1:0]    load_thread,
  output logic             load_busy,
  output logic             load_done,
  // background write
  input  logic             bg_we,
  input  logic [TW-1:0]    bg_thread,
  input  logic [WIDTH-1:0] bg_data,
  output logic             bg_ready,
  output logic             layers_active
);
  logic [WIDTH-1:0]     cmos_q;
  logic [N_THREADS-1:0] layer_we;
  logic [WIDTH-1:0]     layer_wdata;
  logic [WIDTH-1:0]     layers [N_THREADS];
  logic [WIDTH-1:0]     sensed;

  assign bg_ready      = !save;
  assign layers_active = save || bg_we || load || load_busy;

  mpr_write_select #(.N_THREADS(N_THREADS), .WIDTH(WIDTH)) u_wsel (
    .we          (save || bg_we),
    .thread      (save ? save_thread : bg_thread),
    .data        (save ? cmos_q : bg_data),
    .layer_we    (layer_we),
    .layer_wdata (layer_wdata)
  );

  memristor_layers #(.N_THREADS(N_THREADS), .WIDTH(WIDTH)) u_layers (
    .clk         (clk),
    .rst_n       (rst_n),
    .en          (layers_active),
    .layer_we    (layer_we),
    .layer_wdata (layer_wdata),
    .layers      (layers)
  );

  mpr_sense_read #(.N_THREADS(N_THREADS), .WIDTH(WIDTH), .T_M(T_M)) u_sense (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (load),
    .thread (load_thread),
    .layers (layers),
    .busy   (load_busy),
    .valid  (load_done),
    .data   (sensed)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)         cmos_q <= '0;
    else if (load_done) cmos_q <= sensed;
    else if (en)        cmos_q <= d;
  end

  assign q = cmos_q;

  // A thread is never switched out and in at once, and the pipeline does not
  // advance while a switch is reading state in.
  a_no_self_swap: assert property (@(posedge clk) disable iff (!rst_n)
    (save && load) |-> (save_thread != load_thread));
  a_no_en_in_load: assert property (@(posedge clk) disable iff (!rst_n)
    (load_busy || load) |-> !en);
endmodule
