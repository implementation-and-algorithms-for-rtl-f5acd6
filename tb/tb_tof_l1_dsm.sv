// tb_tof_l1_dsm: self-checking testbench for the TOF layer-1 DSM algorithm.
//
// Random 10-bit sector multiplicities (with junk in bits 10:15 and channels
// 6:7) each clock against a static threshold of 500 (the register is a
// configuration value); every seventh clock one sector equals the threshold,
// which must not set its bit. The
// reference computes the 13-bit total and the strict "greater than" bits.
// Every result must appear exactly 8 clocks after its input.
module tb_tof_l1_dsm;
  import dsm_pkg::*;

  localparam int LAT  = 8;
  localparam int NCYC = 3000;

  logic                 clk = 1'b0;
  logic                 rst;
  dsm_in_t              ch_in;
  logic [9:0]           th;
  logic [31:0]          out;

  int checks = 0, failures = 0;
  int n_eq = 0;
  logic [31:0] exp_q [NCYC];

  tof_l1_dsm dut (.clk, .rst, .ch_in, .r0_sector_th(th), .out);

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_out(dsm_in_t c, logic [9:0] t);
    int s = 0;
    logic [31:0] r = '0;
    for (int i = 0; i < 6; i++) begin
      s += int'(c[i][9:0]);
      r[16+i] = c[i][9:0] > t;
    end
    r[12:0] = 13'(s);
    return r;
  endfunction

  initial begin
    rst = 1'b1;
    ch_in = '0;
    th = '0;
    repeat (3) @(negedge clk);
    checks++;
    if (out !== '0) begin failures++; $display("out not cleared by reset"); end
    rst = 1'b0;
    th = 10'd500;
    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      if (c >= LAT) begin
        checks++;
        if (out !== exp_q[c-LAT]) begin
          failures++;
          if (failures < 10)
            $display("cycle %0d: out=%h expected %h", c, out, exp_q[c-LAT]);
        end
      end
      for (int k = 0; k < NUM_CH; k++) ch_in[k] = dsm_chan_t'($urandom);
      if (c % 7 == 3) ch_in[2][9:0] = th;  // equality must not fire
      if (c == 20) for (int k = 0; k < 6; k++) ch_in[k][9:0] = 10'h3ff;  // max total 6138
      exp_q[c] = ref_out(ch_in, th);
      if (c % 7 == 3) n_eq++;
    end
    $display("equal-to-threshold cases: %0d", n_eq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
