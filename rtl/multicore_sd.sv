// multicore_sd: M staggered sphere decoders sharing one stream of tones.
//
// An OFDM symbol carries many tones, each a separate 4x4 vector symbol, and
// one sphere decoder with a variable run time cannot keep up with all of
// them.  This block places M staggered_sd cores side by side and hands every
// incoming tone to a core that is idle: the lowest-numbered idle core takes
// it (a fixed-priority dispatcher, this design's choice; the source only
// shows the cores working on different tones).  Each core remembers the tone
// index it was given and returns it with its estimate, so results may come
// back out of order and the consumer reorders them by tone.
//
// Interface: in_valid/in_ready with in_rows, in_mf and in_tone; in_ready is
// high while any core is idle.  Per core k: out_valid[k] pulses with
// out_tone[k], out_s[k] and out_d[k] (the outputs of all cores side by side;
// several may be valid in the same clock).  Timing per tone is that of
// staggered_sd (n + 6 clock edges from acceptance to out_valid, n = root
// children visited); the dispatcher adds no delay.  Block early termination
// (a cycle budget per tone) is not part of this block.
module multicore_sd
  import mimo_pkg::*;
#(
  parameter int unsigned M  = 10,   // number of cores (largest m evaluated)
  parameter int unsigned TW = 9     // tone index width (L = 500 tones)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  row_t [NT:1]                in_rows,
  input  mf_e                        in_mf,
  input  logic [TW-1:0]              in_tone,
  output logic [M-1:0]               out_valid,
  output logic [M-1:0][TW-1:0]       out_tone,
  output sym_t [M-1:0][NT:1]         out_s,
  output logic [M-1:0][MW-1:0]       out_d
);

  logic [M-1:0] core_ready, core_sel;

  // Lowest-numbered idle core.
  always_comb begin
    core_sel = '0;
    for (int k = M - 1; k >= 0; k--)
      if (core_ready[k]) core_sel = M'(1) << k;
  end
  assign in_ready = (core_ready != '0);

  for (genvar k = 0; k < M; k++) begin : g_core
    logic [6:0] nodes;
    logic [8:0] cycles;

    staggered_sd u_sd (
      .clk, .rst_n,
      .in_valid  (in_valid && core_sel[k]), .in_ready (core_ready[k]),
      .in_rows, .in_mf,
      .est_valid (out_valid[k]), .est_s (out_s[k]), .est_d (out_d[k]),
      .est_nodes (nodes), .est_cycles (cycles)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                             out_tone[k] <= '0;
      else if (in_valid && core_sel[k])       out_tone[k] <= in_tone;
    end
  end

endmodule
