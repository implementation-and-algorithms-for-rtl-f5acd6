// mtd_l1_dsm: MTD layer-1 DSM board algorithm (board MT101, version c).
//
// The MT001 QT board sends two 12-bit "good TAC" values, one per end of the
// Muon Telescope Detector. Its two output cables are swapped at MT101, so the
// 32 input bits {ch1, ch0} hold:
//   bits  0:7   TAC-W[11:4]   (8 MSB of the west TAC)
//   bits  8:15  unused
//   bits 16:27  TAC-E[11:0]
//   bits 28:31  TAC-W[3:0]    (4 LSB of the west TAC)
// The board forms the TAC difference 4096 + TAC-W - TAC-E (13 bits, always
// positive) and the TAC sum TAC-W + TAC-E (13 bits), and fires
//   MTD = (TAC-E > 0) and (TAC-W > 0)
//         and (R0 < diff < R1) and not (R2 < sum < R3)
// i.e. the difference must be inside its window and the sum outside its own.
//
//   step 1  latch inputs
//   step 2  difference, sum, good-TAC flags
//   step 3  window compares and final MTD bit
//   step 4  latch output
// One register stage per step on the FPGA clock: latency 4 clocks.
//
// Output (to TF201): bit 0 MTD, 1:15 zero.
//
// The bit map, formulas, strict comparisons and schedule follow the 2009
// algorithm description of the board.
// This design's own choices: registers R0..R3 are static configuration inputs;
// synchronous active-high reset. The PP2PP logic that the version-c firmware
// still carries is left out, since that input is no longer connected.
module mtd_l1_dsm
  import dsm_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  dsm_in_t           ch_in,
  input  logic [TACX_W-1:0] r0_diff_min,  // R0: MTD-TACdiff-Min
  input  logic [TACX_W-1:0] r1_diff_max,  // R1: MTD-TACdiff-Max
  input  logic [TACX_W-1:0] r2_sum_min,   // R2: MTD-TACsum-Min
  input  logic [TACX_W-1:0] r3_sum_max,   // R3: MTD-TACsum-Max
  output dsm_chan_t         out
);

  localparam logic [TACX_W-1:0] DIFF_OFFSET = TACX_W'(4096);

  logic [2*CH_W-1:0] in_q;        // step 1, {ch1, ch0}
  logic [TAC_W-1:0]  tac_w, tac_e;
  logic [TACX_W-1:0] diff_q, sum_q; // step 2
  logic              good_e_q, good_w_q;
  logic              mtd_q;       // step 3
  dsm_chan_t         out_q;       // step 4

  assign tac_w = {in_q[7:0], in_q[31:28]};
  assign tac_e = in_q[27:16];

  always_ff @(posedge clk) begin
    if (rst) begin
      in_q     <= '0;
      diff_q   <= '0;
      sum_q    <= '0;
      good_e_q <= 1'b0;
      good_w_q <= 1'b0;
      mtd_q    <= 1'b0;
      out_q    <= '0;
    end else begin
      in_q     <= {ch_in[1], ch_in[0]};
      diff_q   <= DIFF_OFFSET + TACX_W'(tac_w) - TACX_W'(tac_e);
      sum_q    <= TACX_W'(tac_w) + TACX_W'(tac_e);
      good_e_q <= tac_e != '0;
      good_w_q <= tac_w != '0;
      mtd_q    <= good_e_q && good_w_q
                  && (diff_q > r0_diff_min) && (diff_q < r1_diff_max)
                  && !((sum_q > r2_sum_min) && (sum_q < r3_sum_max));
      out_q    <= CH_W'(mtd_q);
    end
  end

  assign out = out_q;

endmodule
