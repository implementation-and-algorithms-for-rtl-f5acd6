// tof_l1_dsm: TOF layer-1 DSM board algorithm (board TF101).
//
// Collects the 10-bit multiplicities of the six layer-0 boards (TF001..TF006
// on channels 0..5, bits 0:9) and, in parallel, (a) sums them into a 13-bit
// total multiplicity and (b) compares each sector to the threshold register
// R0 (TOF-sector-th, 10 bits), giving one bit per sector.
//
//   step 1  latch inputs
//   step 2  sums of channels 0:1, 2:3, 4:5; six sector threshold compares
//   step 3  sum 0:3; sum 4:5 delayed; threshold bits start their delay
//   step 4  final total 0:5
//   step 5..7  total and threshold bits delayed
//   step 8  latch outputs
// One register stage per step on the 4xRHIC FPGA clock: latency 8 clocks,
// a new input every clock.
//
// Output (to TF201, 32 bits over two channels):
//   bits 0:12 total multiplicity, 16:21 sector threshold bits, rest zero.
//
// The step schedule, widths and output map follow the 2009 algorithm
// description of the board. This design's own choices: a sector bit is set
// when the multiplicity is strictly greater than R0 (the description only
// says "compared to a threshold"); the registers are static configuration
// inputs; synchronous active-high reset.
module tof_l1_dsm
  import dsm_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst,
  input  dsm_in_t                   ch_in,
  input  logic [L0_MULT_W-1:0]      r0_sector_th,  // R0: TOF-sector-th
  output logic [2*CH_W-1:0]         out
);

  localparam int unsigned TOT_DELAY = 3;  // steps 5..7 hold the total
  localparam int unsigned THR_DELAY = 5;  // steps 3..7 hold the threshold bits

  dsm_in_t                ch_q;              // step 1
  logic [L0_MULT_W-1:0]   sect [TOF_SECTORS];
  logic [L0_MULT_W:0]     s2_q [3];          // step 2 pair sums (max 2046)
  logic [TOF_SECTORS-1:0] thr_q;             // step 2 compares
  logic [L0_MULT_W+1:0]   s4_q;              // step 3 sum 0:3 (max 4092)
  logic [L0_MULT_W:0]     s45_d;             // step 3 delayed sum 4:5
  logic [L1_MULT_W-1:0]   tot_q;             // step 4 total (max 6138)
  logic [L1_MULT_W-1:0]   tot_d;             // after steps 5..7
  logic [TOF_SECTORS-1:0] thr_d;             // after steps 3..7
  logic [2*CH_W-1:0]      out_q;             // step 8

  always_comb begin
    for (int i = 0; i < int'(TOF_SECTORS); i++) sect[i] = ch_q[i][L0_MULT_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ch_q  <= '0;
      s2_q  <= '{default: '0};
      thr_q <= '0;
      s4_q  <= '0;
      s45_d <= '0;
      tot_q <= '0;
      out_q <= '0;
    end else begin
      ch_q <= ch_in;
      for (int p = 0; p < 3; p++) begin
        s2_q[p] <= (L0_MULT_W+1)'(sect[2*p]) + (L0_MULT_W+1)'(sect[2*p+1]);
      end
      for (int i = 0; i < int'(TOF_SECTORS); i++) begin
        thr_q[i] <= sect[i] > r0_sector_th;
      end
      s4_q  <= (L0_MULT_W+2)'(s2_q[0]) + (L0_MULT_W+2)'(s2_q[1]);
      s45_d <= s2_q[2];
      tot_q <= L1_MULT_W'(s4_q) + L1_MULT_W'(s45_d);
      out_q <= {(2*CH_W-CH_W-TOF_SECTORS)'(0), thr_d,
                (CH_W-L1_MULT_W)'(0), tot_d};
    end
  end

  dsm_delay #(.WIDTH(L1_MULT_W), .DEPTH(TOT_DELAY)) u_tot_dly (
    .clk, .rst, .d(tot_q), .q(tot_d)
  );
  dsm_delay #(.WIDTH(TOF_SECTORS), .DEPTH(THR_DELAY)) u_thr_dly (
    .clk, .rst, .d(thr_q), .q(thr_d)
  );

  assign out = out_q;

endmodule
