// tb_tof_mtd_pp2pp_tree: end-to-end testbench for the TOF / MTD / PP2PP
// branch of the DSM tree, at the default parameters.
//
// In the first half of the run every clock carries a new bunch crossing; in
// the second half each crossing is held for four clocks, the RHIC crossing
// rate on the 4xRHIC FPGA clock. A crossing is 120 TOF tray multiplicities (six
// boards of 20, some trays masked in the layer-0 LUTs), an MTD west/east TAC
// pair packed as cabled onto MT101 channels 0:1, and 16 PP2PP good-hit
// bits, all applied on the same clock. A reference model written from the
// board algorithms predicts the TF101 word (16 clocks later), the MT101 bit
// (16 clocks later, after the alignment delay) and the TF201 output and
// scaler words (20 clocks later); all are compared every clock.
//
// Crossings are drawn from a few event classes (quiet, busy TOF, MTD pair
// near the difference window, PP2PP elastic-like hits) so that each
// mechanism of the tree occurs: LUT masking of a hit tray, sector and total
// multiplicity thresholds both passing and failing (including equality),
// the MTD difference window, the MTD sum veto, a zero TAC, and ET / ITE /
// ITW firing and being vetoed. A mechanism that never occurred counts as a
// failure.
module tb_tof_mtd_pp2pp_tree;
  import dsm_pkg::*;

  localparam int LAT  = 20;   // TF001 8 + TF101 8 + TF201 4
  localparam int LAT1 = 16;   // to the TF101 / MT101 outputs
  localparam int NCYC = 4000;

  logic clk = 1'b0;
  logic rst;
  logic [5:0][7:0][15:0] tf001_ch_in;
  logic [5:0][19:0]      tf001_tray_enable;
  logic [1:0][15:0]      mt101_ch_in;
  logic [15:0]           pp001_hits;
  logic [9:0]            sec_th;
  logic [12:0]           d_min, d_max, s_min, s_max, mult_th;
  logic [15:0]           ld301_out, tf201_scalers, mt101_out;
  logic [31:0]           tf101_out;

  tof_mtd_pp2pp_tree dut (
    .clk, .rst, .tf001_ch_in, .tf001_tray_enable, .mt101_ch_in, .pp001_hits,
    .tf101_r0_sector_th(sec_th), .mt101_r0_diff_min(d_min), .mt101_r1_diff_max(d_max),
    .mt101_r2_sum_min(s_min), .mt101_r3_sum_max(s_max), .tf201_r0_mult_th(mult_th),
    .ld301_out, .tf201_scalers, .tf101_out, .mt101_out
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] exp_l1  [NCYC];
  logic [15:0] exp_mt  [NCYC];
  logic [15:0] exp_out [NCYC];
  logic [15:0] exp_scl [NCYC];

  // mechanism counters
  typedef enum int {
    M_MASKED, M_SECT_PASS, M_SECT_FAIL, M_SECT_EQ, M_TOT_PASS, M_TOT_FAIL, M_TOT_EQ,
    M_MTD_FIRE, M_MTD_DIFF_OUT, M_MTD_SUM_VETO, M_MTD_ZERO,
    M_ET, M_ET_VETO, M_ITE, M_ITE_VETO, M_ITW, M_ITW_VETO, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"LUT-masked hit tray", "sector bit set", "sector bit clear",
    "sector equal to threshold", "total bit set", "total bit clear", "total equal to threshold",
    "MTD fired", "MTD diff outside window", "MTD sum vetoed", "MTD zero TAC",
    "ET fired", "ET vetoed", "ITE fired", "ITE vetoed", "ITW fired", "ITW vetoed"};

  initial begin
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- stimulus for one crossing ----------------------------------------
  int cls;
  int tray_v [6][20];
  int tac_w, tac_e;

  task automatic make_crossing(int c);
    cls = $urandom_range(0, 3);
    for (int b = 0; b < 6; b++) begin
      tf001_ch_in[b] = {$urandom, $urandom, $urandom, $urandom};  // junk in unused bits
      for (int t = 0; t < 20; t++) begin
        tray_v[b][t] = (cls == 0) ? $urandom_range(0, 3) : $urandom_range(0, 31);
        tf001_ch_in[b][t/3][5*(t%3) +: 5] = 5'(tray_v[b][t]);
      end
    end
    // a sector and a total exactly at their thresholds now and then
    if (c % 50 == 7) begin
      for (int t = 0; t < 20; t++) begin
        tray_v[0][t] = (t < 11) ? 30 : 0;   // 330 unmasked (trays 0..10)
        tf001_ch_in[0][t/3][5*(t%3) +: 5] = 5'(tray_v[0][t]);
      end
    end
    // MTD
    tac_w = $urandom_range(1, 4095);
    case ($urandom_range(0, 3))
      0: tac_e = $urandom_range(0, 4095);
      1: tac_e = 0;
      default: tac_e = tac_w + $urandom_range(0, 400) - 200;
    endcase
    if (tac_e < 0) tac_e = 0;
    if (tac_e > 4095) tac_e = 4095;
    begin
      logic [31:0] w = $urandom;
      w[7:0] = 8'(tac_w >> 4);
      w[31:28] = 4'(tac_w);
      w[27:16] = 12'(tac_e);
      mt101_ch_in[0] = w[15:0];
      mt101_ch_in[1] = w[31:16];
    end
    // PP2PP
    pp001_hits = (cls == 3) ? 16'($urandom & $urandom) : 16'($urandom & $urandom & $urandom);
  endtask

  // ---- reference model ---------------------------------------------------
  task automatic model(int c);
    int sect [6];
    int tot = 0;
    logic [5:0] sbits;
    logic tofb, mtd;
    int diff, sum;
    logic [15:0] h = pp001_hits;
    logic EVU, EVD, WVU, WVD, EHO, EHI, WHO, WHI;
    logic EA, EB, EC, ED, EOR, WOR, EVF, EHF, WVF, WHF, ET, ITE, ITW;
    logic et_raw, et_veto, ite_veto, itw_veto;
    for (int b = 0; b < 6; b++) begin
      sect[b] = 0;
      for (int t = 0; t < 20; t++) begin
        if (tf001_tray_enable[b][t]) sect[b] += tray_v[b][t];
        else if (tray_v[b][t] != 0) mech[M_MASKED]++;
      end
      tot += sect[b];
      sbits[b] = sect[b] > int'(sec_th);
      mech[M_SECT_EQ] += int'(sect[b] == int'(sec_th));
      if (sbits[b]) mech[M_SECT_PASS]++; else mech[M_SECT_FAIL]++;
    end
    tofb = tot > int'(mult_th);
    mech[M_TOT_EQ] += int'(tot == int'(mult_th));
    if (tofb) mech[M_TOT_PASS]++; else mech[M_TOT_FAIL]++;
    exp_l1[c] = {10'b0, sbits, 3'b0, 13'(tot)};

    diff = 4096 + tac_w - tac_e;
    sum  = tac_w + tac_e;
    mtd = (tac_e > 0) && (tac_w > 0) && (diff > int'(d_min)) && (diff < int'(d_max))
          && !((sum > int'(s_min)) && (sum < int'(s_max)));
    mech[M_MTD_FIRE] += int'(mtd);
    mech[M_MTD_ZERO] += int'(tac_e == 0);
    mech[M_MTD_DIFF_OUT] += int'(tac_e > 0 && !((diff > int'(d_min)) && (diff < int'(d_max))));
    mech[M_MTD_SUM_VETO] += int'(tac_e > 0 && (diff > int'(d_min)) && (diff < int'(d_max))
                                 && (sum > int'(s_min)) && (sum < int'(s_max)));
    exp_mt[c] = 16'(mtd);

    EVU = h[0] | h[1];   EVD = h[2] | h[3];   WVU = h[4] | h[5];   WVD = h[6] | h[7];
    EHO = h[8] | h[9];   EHI = h[10] | h[11]; WHO = h[12] | h[13]; WHI = h[14] | h[15];
    EA = WVU & EVD;  EB = WVD & EVU;  EC = WHO & EHI;  ED = WHI & EHO;
    EOR = EVU | EVD | EHO | EHI;  WOR = WVU | WVD | WHO | WHI;
    EVF = EVU & EVD;  EHF = EHI & EHO;  WVF = WVU & WVD;  WHF = WHI & WHO;
    et_raw = EA | EB | EC | ED;  et_veto = WVF | WHF | EVF | EHF;
    ite_veto = EVF | EHF;  itw_veto = WVF | WHF;
    ET = et_raw & ~et_veto;  ITE = EOR & ~ite_veto;  ITW = WOR & ~itw_veto;
    mech[M_ET] += int'(ET);   mech[M_ET_VETO]  += int'(1'(et_raw & et_veto));
    mech[M_ITE] += int'(ITE); mech[M_ITE_VETO] += int'(1'(EOR & ite_veto));
    mech[M_ITW] += int'(ITW); mech[M_ITW_VETO] += int'(1'(WOR & itw_veto));

    exp_out[c] = {5'b0, sbits, tofb, ITW, ITE, ET, mtd};
    exp_scl[c] = {4'b0, tofb, mtd, WHF, WVF, EHF, EVF, WOR, EOR, ED, EC, EB, EA};
  endtask

  initial begin
    foreach (mech[i]) mech[i] = 0;
    rst = 1'b1;
    tf001_ch_in = '0;
    mt101_ch_in = '0;
    pp001_hits  = '0;
    // static configuration: a few dead/noisy trays masked on each board
    for (int b = 0; b < 6; b++) begin
      tf001_tray_enable[b] = '1;
      tf001_tray_enable[b][11 + b] = 1'b0;
      tf001_tray_enable[b][19 - b] = 1'b0;
    end
    sec_th  = 10'd330;
    mult_th = 13'd1800;
    d_min = 13'd3996; d_max = 13'd4196;   // |W - E| < 100
    s_min = 13'd1000; s_max = 13'd3000;   // veto sums 1001..2999
    repeat (4) @(negedge clk);
    checks++;
    if (ld301_out !== '0 || tf201_scalers !== '0) begin
      failures++; $display("outputs not cleared by reset");
    end
    rst = 1'b0;
    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      if (c >= LAT1) begin
        checks += 2;
        if (tf101_out !== exp_l1[c-LAT1]) begin
          failures++;
          if (failures < 10) $display("cycle %0d TF101 %h expected %h", c, tf101_out, exp_l1[c-LAT1]);
        end
        if (mt101_out !== exp_mt[c-LAT1]) begin
          failures++;
          if (failures < 10) $display("cycle %0d MT101 %h expected %h", c, mt101_out, exp_mt[c-LAT1]);
        end
      end
      if (c >= LAT) begin
        checks += 2;
        if (ld301_out !== exp_out[c-LAT] || tf201_scalers !== exp_scl[c-LAT]) begin
          failures++;
          if (failures < 10)
            $display("cycle %0d TF201 %h/%h expected %h/%h", c, ld301_out, tf201_scalers,
                     exp_out[c-LAT], exp_scl[c-LAT]);
        end
      end
      // first half: a new crossing every clock; second half: the RHIC rate,
      // one crossing held for four FPGA clocks
      if (c < NCYC / 2 || c % 4 == 0) make_crossing(c);
      model(c);
    end
    for (int i = 0; i < M_NUM; i++) begin
      $display("%-28s %0d", mech_name[i], mech[i]);
      checks++;
      if (mech[i] == 0) begin failures++; $display("  never occurred"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
