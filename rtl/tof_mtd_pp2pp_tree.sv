// tof_mtd_pp2pp_tree: the TOF / MTD / PP2PP branch of the STAR trigger DSM
// tree, from the detector front ends to the output sent to the last DSM
// (LD301) or TCU.
//
// Structure:
//   TOF:    six layer-0 boards (TF001..TF006), one per 2-hour slice of the
//           barrel, each summing 20 tray multiplicities; their 10-bit sums go
//           to TF101 channels 0..5, which forms the total multiplicity and
//           six sector threshold bits; TF101's 32-bit output goes to TF201
//           channels 2:3.
//   MTD:    the MT001 QT board output (already swapped onto MT101 channels
//           0 and 1, as cabled) goes to MT101, whose MTD bit goes to TF201
//           channel 0.
//   PP2PP:  the 16 good-hit bits of the PP001 QT board go to TF201
//           channel 4.
// The two QT boards themselves are not part of this RTL: their outputs are
// ports.
//
// Timing: every board step is one clock of the 4xRHIC FPGA clock. The TOF
// path takes 8 + 8 = 16 clocks to reach TF201, MT101 takes 4. In the
// experiment the data of one bunch crossing arrives at TF201 on all channels
// at once. Here the MT101 input is delayed by MT_ALIGN clocks and the PP001
// bits by PP_ALIGN clocks, standing in for QT board latency and cable
// timing, so that data for one crossing presented to all inputs on the same
// clock meets in TF201. The output for that crossing appears 20 clocks later
// (TREE_LATENCY). Unused channels of every board are driven with zero.
module tof_mtd_pp2pp_tree
  import dsm_pkg::*;
#(
  parameter int unsigned MT_ALIGN = L0_LATENCY + L1_LATENCY - MT_LATENCY,
  parameter int unsigned PP_ALIGN = L0_LATENCY + L1_LATENCY
) (
  input  logic                                    clk,
  input  logic                                    rst,
  // TOF trays: channels 0..7 of TF001..TF006
  input  logic [TOF_SECTORS-1:0][NUM_CH-1:0][CH_W-1:0] tf001_ch_in,
  input  logic [TOF_SECTORS-1:0][TOF_TRAYS-1:0]   tf001_tray_enable, // LUT masks
  // MT001 QT board output as it arrives on MT101 channels 0 and 1
  input  logic [1:0][CH_W-1:0]                    mt101_ch_in,
  // PP001 QT board good-hit bits
  input  logic [CH_W-1:0]                         pp001_hits,
  // registers
  input  logic [L0_MULT_W-1:0]                    tf101_r0_sector_th,
  input  logic [TACX_W-1:0]                       mt101_r0_diff_min,
  input  logic [TACX_W-1:0]                       mt101_r1_diff_max,
  input  logic [TACX_W-1:0]                       mt101_r2_sum_min,
  input  logic [TACX_W-1:0]                       mt101_r3_sum_max,
  input  logic [L1_MULT_W-1:0]                    tf201_r0_mult_th,
  // results
  output logic [CH_W-1:0]                         ld301_out,
  output logic [CH_W-1:0]                         tf201_scalers,
  output logic [2*CH_W-1:0]                       tf101_out,   // TF101 -> TF201
  output logic [CH_W-1:0]                         mt101_out    // MT101 -> TF201
);

  localparam int unsigned TREE_LATENCY = L0_LATENCY + L1_LATENCY + L2_LATENCY;

  // ---- TOF layer 0 -------------------------------------------------------
  dsm_chan_t [TOF_SECTORS-1:0] l0_out;

  for (genvar b = 0; b < int'(TOF_SECTORS); b++) begin : g_tf001
    tof_l0_dsm u_tf00x (
      .clk,
      .rst,
      .ch_in       (tf001_ch_in[b]),
      .tray_enable (tf001_tray_enable[b]),
      .out         (l0_out[b])
    );
  end

  // ---- TOF layer 1 -------------------------------------------------------
  dsm_in_t tf101_in;
  always_comb begin
    tf101_in = '0;
    for (int b = 0; b < int'(TOF_SECTORS); b++) tf101_in[b] = l0_out[b];
  end

  tof_l1_dsm u_tf101 (
    .clk,
    .rst,
    .ch_in        (tf101_in),
    .r0_sector_th (tf101_r0_sector_th),
    .out          (tf101_out)
  );

  // ---- MTD layer 1 -------------------------------------------------------
  logic [2*CH_W-1:0] mt_aligned;
  dsm_in_t           mt101_in;

  dsm_delay #(.WIDTH(2*CH_W), .DEPTH(MT_ALIGN)) u_mt_align (
    .clk, .rst, .d({mt101_ch_in[1], mt101_ch_in[0]}), .q(mt_aligned)
  );

  always_comb begin
    mt101_in    = '0;
    mt101_in[0] = mt_aligned[CH_W-1:0];
    mt101_in[1] = mt_aligned[2*CH_W-1:CH_W];
  end

  mtd_l1_dsm u_mt101 (
    .clk,
    .rst,
    .ch_in       (mt101_in),
    .r0_diff_min (mt101_r0_diff_min),
    .r1_diff_max (mt101_r1_diff_max),
    .r2_sum_min  (mt101_r2_sum_min),
    .r3_sum_max  (mt101_r3_sum_max),
    .out         (mt101_out)
  );

  // ---- PP2PP alignment ---------------------------------------------------
  dsm_chan_t pp_aligned;
  dsm_delay #(.WIDTH(CH_W), .DEPTH(PP_ALIGN)) u_pp_align (
    .clk, .rst, .d(pp001_hits), .q(pp_aligned)
  );

  // ---- layer 2 -----------------------------------------------------------
  dsm_in_t tf201_in;
  always_comb begin
    tf201_in    = '0;
    tf201_in[0] = mt101_out;
    tf201_in[2] = tf101_out[CH_W-1:0];
    tf201_in[3] = tf101_out[2*CH_W-1:CH_W];
    tf201_in[4] = pp_aligned;
  end

  tof_l2_dsm u_tf201 (
    .clk,
    .rst,
    .ch_in      (tf201_in),
    .r0_mult_th (tf201_r0_mult_th),
    .out        (ld301_out),
    .scalers    (tf201_scalers)
  );

  // The three paths must meet in TF201 on the same clock.
  initial begin
    assert (MT_ALIGN + MT_LATENCY == L0_LATENCY + L1_LATENCY)
      else $error("MT_ALIGN does not align MT101 with the TOF path");
    assert (PP_ALIGN == L0_LATENCY + L1_LATENCY)
      else $error("PP_ALIGN does not align PP001 with the TOF path");
    assert (TREE_LATENCY == 20);
  end

endmodule
