// tof_l0_dsm: TOF layer-0 DSM board algorithm (boards TF001..TF006).
//
// Each board sees one 2-hour pie slice of the Time-of-Flight barrel: 20 tray
// multiplicities of 5 bits, packed three per channel on channels 0..5
// (tray 3k+j in bits 5j+4:5j of channel k) and two on channel 6 (bits 0:9).
// Bit 15 of each channel and all of channel 7 are unused. The board adds the
// 20 values into one 10-bit multiplicity (at most 20*31 = 620, so no clamp
// is needed).
//
// The sum is spread over several steps so that few adders work in parallel:
//   step 1  latch inputs
//   step 2  input LUT (1-to-1, with masked trays forced to 0), then sums of
//           trays 0:2, 3:5, 6:8, 9:11, 12:14, 15:17 and 18:19
//   step 3  pair sums 0:5, 6:11, 12:17; 18:19 delayed
//   step 4  sums 0:11 and 12:19
//   step 5  final sum 0:19
//   step 6, 7  delay
//   step 8  latch outputs
// Each step is one register stage on the 4xRHIC FPGA clock, so the result for
// an input presented before clock edge n is on `out` after edge n+7 (latency 8
// clocks) and a new input is accepted every clock.
//
// The 2009 algorithm description gives the channel map, the step schedule
// and that the LUT is 1-to-1 with noisy, dead and uninstrumented channels
// zeroed. This design's own choices: the LUT's zeroing is a per-tray enable
// vector (`tray_enable`, a static configuration input applied in step 2),
// and a synchronous active-high reset clears the pipeline.
//
// Output (to TF101): bits 0:9 TOF multiplicity, 10:15 zero.
module tof_l0_dsm
  import dsm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  dsm_in_t              ch_in,        // channels 0..7
  input  logic [TOF_TRAYS-1:0] tray_enable,  // LUT: 0 zeroes that tray
  output dsm_chan_t            out
);

  // step 1: input latch
  dsm_in_t in_q;

  // step 2: LUT and group sums of three (max 93) and of the last two (max 62)
  logic [TRAY_W-1:0] tray [TOF_TRAYS];
  logic [6:0]        s3_q [6];
  logic [5:0]        s2_q;

  // step 3
  logic [7:0]        s6_q [3];
  logic [5:0]        s2_d;

  // step 4
  logic [8:0]        s12_q, s8_q;

  // step 5..7
  logic [L0_MULT_W-1:0] sum_q, sum_d1, sum_d2;

  // step 8
  dsm_chan_t out_q;

  always_comb begin
    for (int i = 0; i < int'(TOF_TRAYS); i++) begin
      tray[i] = tray_enable[i] ? in_q[i/3][TRAY_W*(i%3) +: TRAY_W] : '0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      in_q   <= '0;
      s3_q   <= '{default: '0};
      s2_q   <= '0;
      s6_q   <= '{default: '0};
      s2_d   <= '0;
      s12_q  <= '0;
      s8_q   <= '0;
      sum_q  <= '0;
      sum_d1 <= '0;
      sum_d2 <= '0;
      out_q  <= '0;
    end else begin
      in_q <= ch_in;
      for (int g = 0; g < 6; g++) begin
        s3_q[g] <= 7'(tray[3*g]) + 7'(tray[3*g+1]) + 7'(tray[3*g+2]);
      end
      s2_q <= 6'(tray[18]) + 6'(tray[19]);
      for (int p = 0; p < 3; p++) begin
        s6_q[p] <= 8'(s3_q[2*p]) + 8'(s3_q[2*p+1]);
      end
      s2_d   <= s2_q;
      s12_q  <= 9'(s6_q[0]) + 9'(s6_q[1]);
      s8_q   <= 9'(s6_q[2]) + 9'(s2_d);
      sum_q  <= L0_MULT_W'(s12_q) + L0_MULT_W'(s8_q);
      sum_d1 <= sum_q;
      sum_d2 <= sum_d1;
      out_q  <= CH_W'(sum_d2);
    end
  end

  assign out = out_q;

endmodule
