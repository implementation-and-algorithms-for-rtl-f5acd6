// tb_tof_l2_dsm: self-checking testbench for the TOF layer-2 DSM algorithm.
//
// Each clock applies a random MTD bit, TOF total multiplicity (near the
// threshold, sometimes equal to it), sector bits and 16 PP2PP good-hit bits
// (each set with probability 1/4 so that single-pot, elastic and vetoed
// patterns all occur), plus junk on the unused bits and channels. The
// reference works out the Roman Pot bits, trigger components, ET/ITE/ITW,
// the output word and the scaler word from the trigger equations. Results
// must appear exactly 4 clocks after their input. The testbench also counts
// that ET, ITE, ITW each fired and were vetoed at least once.
module tb_tof_l2_dsm;
  import dsm_pkg::*;

  localparam int LAT  = 4;
  localparam int NCYC = 4000;

  logic        clk = 1'b0;
  logic        rst;
  dsm_in_t     ch_in;
  logic [12:0] th;
  dsm_chan_t   out, scalers;

  int checks = 0, failures = 0;
  int n_et = 0, n_ite = 0, n_itw = 0, n_et_veto = 0, n_ite_veto = 0, n_itw_veto = 0;
  int n_tof_eq = 0;
  dsm_chan_t exp_out [NCYC];
  dsm_chan_t exp_scl [NCYC];

  tof_l2_dsm dut (.clk, .rst, .ch_in, .r0_mult_th(th), .out, .scalers);

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model(input dsm_in_t c, output dsm_chan_t o, output dsm_chan_t s);
    logic [15:0] h = c[4];
    logic EVU = h[0]  | h[1],  EVD = h[2]  | h[3];
    logic WVU = h[4]  | h[5],  WVD = h[6]  | h[7];
    logic EHO = h[8]  | h[9],  EHI = h[10] | h[11];
    logic WHO = h[12] | h[13], WHI = h[14] | h[15];
    logic EA = WVU & EVD, EB = WVD & EVU, EC = WHO & EHI, ED = WHI & EHO;
    logic EOR = EVU | EVD | EHO | EHI, WOR = WVU | WVD | WHO | WHI;
    logic EVF = EVU & EVD, EHF = EHI & EHO, WVF = WVU & WVD, WHF = WHI & WHO;
    logic et_raw = EA | EB | EC | ED, et_veto = WVF | WHF | EVF | EHF;
    logic ite_veto = EVF | EHF, itw_veto = WVF | WHF;
    logic ET = et_raw & ~et_veto, ITE = EOR & ~ite_veto, ITW = WOR & ~itw_veto;
    logic mtd = c[0][0];
    logic tofb = c[2][12:0] > th;
    o = '0;
    o[0] = mtd; o[1] = ET; o[2] = ITE; o[3] = ITW; o[4] = tofb;
    o[10:5] = c[3][5:0];
    s = '0;
    s[0] = EA; s[1] = EB; s[2] = EC; s[3] = ED; s[4] = EOR; s[5] = WOR;
    s[6] = EVF; s[7] = EHF; s[8] = WVF; s[9] = WHF; s[10] = mtd; s[11] = tofb;
    n_et += int'(ET);  n_ite += int'(ITE);  n_itw += int'(ITW);
    n_et_veto  += int'(1'(et_raw & et_veto));
    n_ite_veto += int'(1'(EOR & ite_veto));
    n_itw_veto += int'(1'(WOR & itw_veto));
    n_tof_eq   += int'(c[2][12:0] == th);
  endtask

  initial begin
    rst = 1'b1;
    ch_in = '0;
    th = 13'd3000;
    repeat (3) @(negedge clk);
    checks++;
    if (out !== '0 || scalers !== '0) begin failures++; $display("not cleared by reset"); end
    rst = 1'b0;
    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      if (c >= LAT) begin
        checks += 2;
        if (out !== exp_out[c-LAT] || scalers !== exp_scl[c-LAT]) begin
          failures++;
          if (failures < 10)
            $display("cycle %0d: out=%h/%h expected %h/%h", c, out, scalers,
                     exp_out[c-LAT], exp_scl[c-LAT]);
        end
      end
      for (int k = 0; k < NUM_CH; k++) ch_in[k] = dsm_chan_t'($urandom);
      ch_in[2][12:0] = 13'(2900 + $urandom_range(0, 200));
      ch_in[4] = dsm_chan_t'($urandom & $urandom);
      model(ch_in, exp_out[c], exp_scl[c]);
    end
    $display("ET=%0d ITE=%0d ITW=%0d vetoed ET=%0d ITE=%0d ITW=%0d tof_at_th=%0d",
             n_et, n_ite, n_itw, n_et_veto, n_ite_veto, n_itw_veto, n_tof_eq);
    checks++;
    if (n_et == 0 || n_ite == 0 || n_itw == 0 || n_et_veto == 0 || n_ite_veto == 0
        || n_itw_veto == 0 || n_tof_eq == 0) begin
      failures++; $display("a trigger case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
