// tb_tof_l0_dsm: self-checking testbench for the TOF layer-0 DSM algorithm.
//
// A new random input word is applied every clock (tray values 0..31, random
// tray masks, random junk in the unused bits 15, channel 6 bits 10:15 and
// channel 7). The reference is the plain sum of the enabled trays, computed
// here from the channel map. Each result must appear exactly 8 clocks after
// its input, so the latency is checked along with the value. The mask is
// applied in step 2, so the reference pairs the data of one clock with the
// mask of the next. Directed cases: all trays at 31 (maximum, 620) and all
// trays masked.
module tb_tof_l0_dsm;
  import dsm_pkg::*;

  localparam int LAT  = 8;
  localparam int NCYC = 3000;

  logic                 clk = 1'b0;
  logic                 rst;
  dsm_in_t              ch_in;
  logic [TOF_TRAYS-1:0] tray_enable;
  dsm_chan_t            out;

  int checks = 0, failures = 0;
  dsm_chan_t exp_q   [NCYC];
  dsm_in_t   ch_hist [NCYC];

  tof_l0_dsm dut (.clk, .rst, .ch_in, .tray_enable, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic dsm_chan_t ref_sum(dsm_in_t c, logic [TOF_TRAYS-1:0] en);
    int s = 0;
    for (int t = 0; t < TOF_TRAYS; t++)
      if (en[t]) s += int'(c[t/3][5*(t%3) +: 5]);
    return dsm_chan_t'(s);
  endfunction

  initial begin
    rst = 1'b1;
    ch_in = '0;
    tray_enable = '1;
    repeat (3) @(negedge clk);
    checks++;
    if (out !== '0) begin failures++; $display("out not cleared by reset"); end
    rst = 1'b0;
    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      if (c >= LAT + 1) begin
        checks++;
        if (out !== exp_q[c-LAT]) begin
          failures++;
          if (failures < 10)
            $display("cycle %0d: out=%0d expected %0d", c, out, exp_q[c-LAT]);
        end
      end
      for (int k = 0; k < NUM_CH; k++) ch_in[k] = dsm_chan_t'($urandom);
      tray_enable = ($urandom_range(0, 3) == 0) ? TOF_TRAYS'($urandom) : '1;
      if (c == 10) for (int k = 0; k < NUM_CH; k++) ch_in[k] = 16'hffff;
      if (c == 11) tray_enable = '1;   // every tray at its maximum: 620
      if (c == 12) tray_enable = '0;   // every tray masked: 0
      ch_hist[c] = ch_in;
      if (c > 0) exp_q[c-1] = ref_sum(ch_hist[c-1], tray_enable);
      if (c == 11 && exp_q[10] != 16'd620) begin
        failures++; $display("reference model error");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
