// tof_l2_dsm: TOF layer-2 DSM board algorithm (board L1-TF201, version b).
//
// Brings together the three detectors of this branch of the tree:
//   ch 0     MT101: bit 0 = MTD
//   ch 2:3   TF101: bits 0:12 total TOF multiplicity, bits 16:21 sector bits
//   ch 4     PP001 QT board: 16 PP2PP good-hit bits, one per PMT
//   ch 1, 5:7 unused
// The MTD bit and the six sector bits pass straight through. The total TOF
// multiplicity is compared to R0 (TOF-Mult-th, 13 bits). The PP2PP hits are
// ORed in pairs into eight Roman Pot (RP) bits (E/W side, Vertical Up/Down,
// Horizontal Outer/Inner), which make ten trigger components:
//   EA = WVU&EVD  EB = WVD&EVU  EC = WHO&EHI  ED = WHI&EHO
//   EOR = EVU|EVD|EHO|EHI       WOR = WVU|WVD|WHO|WHI
//   EVF = EVU&EVD  EHF = EHI&EHO  WVF = WVU&WVD  WHF = WHI&WHO
// and from those the elastic (ET) and east/west inelastic (ITE, ITW)
// triggers, each a raw condition without its veto:
//   ET  = (EA|EB|EC|ED) & ~(WVF|WHF|EVF|EHF)
//   ITE = EOR & ~(EVF|EHF)        ITW = WOR & ~(WVF|WHF)
//
//   step 1  latch inputs
//   step 2  TOF threshold compare, RP bits and components; MTD and sector
//           bits start their delay
//   step 3  ET / ITE / ITW; everything else delayed
//   step 4  latch outputs
// One register stage per step on the FPGA clock: latency 4 clocks.
//
// Output (to LD301 / TCU): 0 MTD, 1 ET, 2 ITE, 3 ITW, 4 TOF multiplicity
// threshold bit, 5:10 sector bits, 11:15 zero.
// Scalers: 0..9 EA, EB, EC, ED, EOR, WOR, EVF, EHF, WVF, WHF; 10 MTD;
// 11 TOF multiplicity threshold bit; 12:15 zero.
//
// Maps, equations and schedule follow the 2009 algorithm description of the
// board. This design's own choices: the
// multiplicity bit is set when the total is strictly greater than R0; the
// scaler bits are latched on the same step as the outputs; R0 is a static
// configuration input; synchronous active-high reset.
module tof_l2_dsm
  import dsm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  dsm_in_t              ch_in,
  input  logic [L1_MULT_W-1:0] r0_mult_th,   // R0: TOF-Mult-th
  output dsm_chan_t            out,
  output dsm_chan_t            scalers
);

  dsm_in_t                ch_q;                  // step 1
  logic [TOF_SECTORS-1:0] sect_q, sect_d;        // steps 2, 3
  logic                   mtd_q, mtd_d;
  logic                   tof_q, tof_d;          // steps 2, 3
  pp_comp_t               comp_q, comp_d;        // steps 2, 3
  logic                   et_q, ite_q, itw_q;    // step 3
  dsm_chan_t              out_q, scal_q;         // step 4

  // step 2 combinational: Roman Pot bits and trigger components
  dsm_chan_t hit;
  logic      evu, evd, wvu, wvd, eho, ehi, who, whi;
  pp_comp_t  comp;

  assign hit = ch_q[4];
  assign evu = hit[RPEVU1] | hit[RPEVU2];
  assign evd = hit[RPEVD1] | hit[RPEVD2];
  assign wvu = hit[RPWVU1] | hit[RPWVU2];
  assign wvd = hit[RPWVD1] | hit[RPWVD2];
  assign eho = hit[RPEHO1] | hit[RPEHO2];
  assign ehi = hit[RPEHI1] | hit[RPEHI2];
  assign who = hit[RPWHO1] | hit[RPWHO2];
  assign whi = hit[RPWHI1] | hit[RPWHI2];

  always_comb begin
    comp.ea   = wvu & evd;
    comp.eb   = wvd & evu;
    comp.ec   = who & ehi;
    comp.ed   = whi & eho;
    comp.eor_ = evu | evd | eho | ehi;
    comp.wor_ = wvu | wvd | who | whi;
    comp.evf  = evu & evd;
    comp.ehf  = ehi & eho;
    comp.wvf  = wvu & wvd;
    comp.whf  = whi & who;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ch_q   <= '0;
      sect_q <= '0;
      sect_d <= '0;
      mtd_q  <= 1'b0;
      mtd_d  <= 1'b0;
      tof_q  <= 1'b0;
      tof_d  <= 1'b0;
      comp_q <= '0;
      comp_d <= '0;
      et_q   <= 1'b0;
      ite_q  <= 1'b0;
      itw_q  <= 1'b0;
      out_q  <= '0;
      scal_q <= '0;
    end else begin
      // step 1
      ch_q   <= ch_in;
      // step 2
      mtd_q  <= ch_q[0][0];
      sect_q <= ch_q[3][TOF_SECTORS-1:0];
      tof_q  <= ch_q[2][L1_MULT_W-1:0] > r0_mult_th;
      comp_q <= comp;
      // step 3
      mtd_d  <= mtd_q;
      sect_d <= sect_q;
      tof_d  <= tof_q;
      comp_d <= comp_q;
      et_q   <= (comp_q.ea | comp_q.eb | comp_q.ec | comp_q.ed)
                & ~(comp_q.wvf | comp_q.whf | comp_q.evf | comp_q.ehf);
      ite_q  <= comp_q.eor_ & ~(comp_q.evf | comp_q.ehf);
      itw_q  <= comp_q.wor_ & ~(comp_q.wvf | comp_q.whf);
      // step 4
      out_q  <= {5'b0, sect_d, tof_d, itw_q, ite_q, et_q, mtd_d};
      scal_q <= {4'b0, tof_d, mtd_d, comp_d};
    end
  end

  assign out     = out_q;
  assign scalers = scal_q;

endmodule
