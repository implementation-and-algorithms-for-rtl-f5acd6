// tb_mtd_l1_dsm: self-checking testbench for the MTD layer-1 DSM algorithm.
//
// Random west/east TAC pairs are packed into the swapped-cable bit map
// (TAC-W MSBs in bits 0:7, LSBs in bits 28:31, TAC-E in bits 16:27, junk in
// bits 8:15 and channels 2:7) and applied one per clock. Pairs are drawn so
// that the difference window, the sum veto window, zero TACs and the exact
// window edges all occur. Two register sets are run. The reference evaluates
//   MTD = TAC-E>0 & TAC-W>0 & R0<diff<R1 & !(R2<sum<R3), diff = 4096+W-E
// and every result must appear exactly 4 clocks after its input.
module tb_mtd_l1_dsm;
  import dsm_pkg::*;

  localparam int LAT  = 4;
  localparam int NCYC = 3000;

  logic        clk = 1'b0;
  logic        rst;
  dsm_in_t     ch_in;
  logic [12:0] r0, r1, r2, r3;
  dsm_chan_t   out;

  int checks = 0, failures = 0;
  int n_fire = 0, n_edge = 0, n_sumveto = 0, n_zero = 0;
  dsm_chan_t exp_q [NCYC];

  mtd_l1_dsm dut (.clk, .rst, .ch_in, .r0_diff_min(r0), .r1_diff_max(r1),
                  .r2_sum_min(r2), .r3_sum_max(r3), .out);

  always #5 clk = ~clk;

  initial begin
    repeat (2 * NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic dsm_in_t pack(int tw, int te);
    logic [31:0] w = $urandom;           // junk in bits 8:15
    dsm_in_t c;
    w[7:0]   = 8'(tw >> 4);
    w[31:28] = 4'(tw);
    w[27:16] = 12'(te);
    for (int k = 2; k < NUM_CH; k++) c[k] = dsm_chan_t'($urandom);
    c[0] = w[15:0];
    c[1] = w[31:16];
    return c;
  endfunction

  task automatic run_phase();
    int tw, te, diff, sum;
    bit fire;
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
      tw = $urandom_range(0, 4095);
      case ($urandom_range(0, 5))
        0: te = $urandom_range(0, 4095);
        1: te = 0;
        2: te = tw - (int'(r0) - 4096);          // diff exactly at R0
        default: te = tw + $urandom_range(0, 600) - 300;
      endcase
      if ($urandom_range(0, 19) == 0) tw = 0;
      if (te < 0) te = 0;
      if (te > 4095) te = 4095;
      ch_in = pack(tw, te);
      diff = 4096 + tw - te;
      sum  = tw + te;
      fire = (te > 0) && (tw > 0) && (diff > int'(r0)) && (diff < int'(r1))
             && !((sum > int'(r2)) && (sum < int'(r3)));
      exp_q[c] = dsm_chan_t'(fire);
      n_fire    += int'(fire);
      n_edge    += int'(diff == int'(r0));
      n_zero    += int'(te == 0 || tw == 0);
      n_sumveto += int'((te > 0) && (tw > 0) && (diff > int'(r0)) && (diff < int'(r1))
                        && (sum > int'(r2)) && (sum < int'(r3)));
    end
  endtask

  initial begin
    rst = 1'b1;
    ch_in = '0;
    r0 = 13'd3896; r1 = 13'd4296; r2 = 13'd2000; r3 = 13'd5000;
    repeat (3) @(negedge clk);
    checks++;
    if (out !== '0) begin failures++; $display("out not cleared by reset"); end
    rst = 1'b0;
    run_phase();
    // second register set: wider difference window, narrow sum veto
    rst = 1'b1;
    r0 = 13'd3500; r1 = 13'd4700; r2 = 13'd3000; r3 = 13'd3500;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    run_phase();
    $display("fired=%0d at_R0_edge=%0d sum_vetoed=%0d zero_tac=%0d",
             n_fire, n_edge, n_sumveto, n_zero);
    checks++;
    if (n_fire == 0 || n_edge == 0 || n_sumveto == 0 || n_zero == 0) begin
      failures++; $display("a case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
