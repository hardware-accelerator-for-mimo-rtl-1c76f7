// mimo_accel_top: MIMO detection accelerator, top level.
//
// Places the detector cores of this design side by side, each with its own
// ports; they share nothing but the clock and reset:
//   hd_*  hard_detector  - configurable hard-output detector (QPSK/16/64-QAM,
//                          2x2/3x3/4x4), one vector symbol per eta clocks
//   sd_*  soft_detector  - low-complexity soft-output detector (4x4 64-QAM),
//                          24 clipped max-log LLRs per 64 clocks, with node
//                          pruning
//   ld_*  lord_detector  - configurable soft-output detector (layered
//                          orthogonal lattice detection with metric
//                          recycling, QPSK/16/64-QAM, 4x4), log2(eta)/eta
//                          LLRs per clock
//   sp_*  staggered_sd   - staggered sphere decoder (hard output, QPSK/16/
//                          64-QAM, 4x4) with radius reduction and early
//                          termination; variable run time
//   mc_*  multicore_sd   - MC_M staggered sphere decoders fed from one stream
//                          of OFDM tones, each tone to the first idle core;
//                          results tagged with their tone index
// The QR decomposition that produces y_hat and R, the memory that holds them
// and the channel decoder that takes the LLRs are outside this design; their
// interfaces are the in_* and llr/est ports.  See each core for timing.
module mimo_accel_top
  import mimo_pkg::*;
#(
  parameter int unsigned SD_LW   = 8,
  parameter int unsigned SD_CLIP = 3,
  parameter int unsigned LD_LW   = MW + 1,
  parameter int unsigned LD_CLIP = (1 << MW) - 2,
  parameter int unsigned MC_M    = 10,
  parameter int unsigned MC_TW   = 9
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // hard detector
  input  logic                    hd_in_valid,
  output logic                    hd_in_ready,
  input  row_t [NT:1]             hd_in_rows,
  input  mf_e                     hd_in_mf,
  input  logic [1:0]              hd_in_na,
  output logic                    hd_endbit,
  output logic                    hd_est_valid,
  output sym_t [NT:1]             hd_est_s,
  output logic [MW-1:0]           hd_est_d,
  output mf_e                     hd_est_mf,
  // low-complexity soft detector
  input  logic                    sd_in_valid,
  output logic                    sd_in_ready,
  input  row_t [NT:1]             sd_in_rows,
  output logic                    sd_endbit,
  output logic                    sd_llr_valid,
  output logic signed [SD_LW-1:0] sd_llr,
  output logic [2:0]              sd_llr_ant,
  output logic [2:0]              sd_llr_bit,
  output logic                    sd_llr_last,
  output logic [NT:1]             sd_pruned,
  // configurable LORD soft detector
  input  logic                    ld_in_valid,
  output logic                    ld_in_ready,
  input  row_t [3:0][NT:1]        ld_in_rows,
  input  mf_e                     ld_in_mf,
  output logic                    ld_endbit,
  output logic                    ld_stall,
  output logic                    ld_llr_valid,
  output logic signed [LD_LW-1:0] ld_llr,
  output logic [2:0]              ld_llr_ant,
  output logic [2:0]              ld_llr_bit,
  output logic                    ld_llr_last,
  // staggered sphere decoder
  input  logic                    sp_in_valid,
  output logic                    sp_in_ready,
  input  row_t [NT:1]             sp_in_rows,
  input  mf_e                     sp_in_mf,
  output logic                    sp_est_valid,
  output sym_t [NT:1]             sp_est_s,
  output logic [MW-1:0]           sp_est_d,
  output logic [6:0]              sp_est_nodes,
  output logic [8:0]              sp_est_cycles,
  // multicore sphere decoder
  input  logic                    mc_in_valid,
  output logic                    mc_in_ready,
  input  row_t [NT:1]             mc_in_rows,
  input  mf_e                     mc_in_mf,
  input  logic [MC_TW-1:0]        mc_in_tone,
  output logic [MC_M-1:0]         mc_out_valid,
  output logic [MC_M-1:0][MC_TW-1:0] mc_out_tone,
  output sym_t [MC_M-1:0][NT:1]   mc_out_s,
  output logic [MC_M-1:0][MW-1:0] mc_out_d
);

  hard_detector u_hard (
    .clk, .rst_n,
    .in_valid (hd_in_valid), .in_ready (hd_in_ready), .in_rows (hd_in_rows),
    .in_mf    (hd_in_mf),    .in_na    (hd_in_na),    .endbit  (hd_endbit),
    .est_valid(hd_est_valid), .est_s   (hd_est_s),    .est_d   (hd_est_d),
    .est_mf   (hd_est_mf)
  );

  soft_detector #(.LW(SD_LW), .CLIP(SD_CLIP)) u_soft (
    .clk, .rst_n,
    .in_valid (sd_in_valid), .in_ready (sd_in_ready), .in_rows (sd_in_rows),
    .endbit   (sd_endbit),
    .llr_valid(sd_llr_valid), .llr    (sd_llr),       .llr_ant (sd_llr_ant),
    .llr_bit  (sd_llr_bit),  .llr_last(sd_llr_last), .pruned(sd_pruned)
  );

  lord_detector #(.LW(LD_LW), .CLIP(LD_CLIP)) u_lord (
    .clk, .rst_n,
    .in_valid (ld_in_valid), .in_ready (ld_in_ready), .in_rows (ld_in_rows),
    .in_mf    (ld_in_mf),    .endbit   (ld_endbit),   .stall   (ld_stall),
    .llr_valid(ld_llr_valid), .llr     (ld_llr),      .llr_ant (ld_llr_ant),
    .llr_bit  (ld_llr_bit),  .llr_last (ld_llr_last)
  );

  staggered_sd u_sphere (
    .clk, .rst_n,
    .in_valid  (sp_in_valid),  .in_ready  (sp_in_ready), .in_rows (sp_in_rows),
    .in_mf     (sp_in_mf),     .est_valid (sp_est_valid), .est_s  (sp_est_s),
    .est_d     (sp_est_d),     .est_nodes (sp_est_nodes), .est_cycles(sp_est_cycles)
  );

  multicore_sd #(.M(MC_M), .TW(MC_TW)) u_multi (
    .clk, .rst_n,
    .in_valid  (mc_in_valid),  .in_ready (mc_in_ready), .in_rows (mc_in_rows),
    .in_mf     (mc_in_mf),     .in_tone  (mc_in_tone),
    .out_valid (mc_out_valid), .out_tone (mc_out_tone), .out_s   (mc_out_s),
    .out_d     (mc_out_d)
  );

endmodule
