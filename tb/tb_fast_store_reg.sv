// tb_fast_store_reg - random test of the fast storage register and the
// Same comparison against a reference copy kept in the bench.
//
// Each cycle the bench applies random control and subdevice polarities and
// random load and external-reset requests. The reference copy is updated by
// the rules: load takes all ten bits, the external reset clears only the
// three subdevice bits (and wins over a load for them). `match` must equal
// the comparison of the live control polarity with the stored control bits,
// and is exercised both ways by re-applying a stored value.
`timescale 1ns / 1ps
module tb_fast_store_reg;
  import sm_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n, p0, ext_reset;
  logic [N_CTRL-1:0] ctrl_pol;
  logic [N_SD-1:0]   sd_pol;
  command_t          cmd_q;
  logic              match;
  int                checks = 0, failures = 0;
  int                n_match = 0, n_ext = 0;

  logic [N_CTRL-1:0] ref_ctrl;
  logic [N_SD-1:0]   ref_sd;

  fast_store_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; p0 = 1'b0; ext_reset = 1'b0; ctrl_pol = '0; sd_pol = '0;
    ref_ctrl = '0; ref_sd = '0;
    @(posedge clk); @(posedge clk); #1;
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      p0        = ($urandom_range(0, 3) == 0);
      ext_reset = ($urandom_range(0, 7) == 0);
      ctrl_pol  = ($urandom_range(0, 1) == 0) ? ref_ctrl : N_CTRL'($urandom);
      sd_pol    = N_SD'($urandom);
      #1;
      checks++;
      if (match != (ctrl_pol == ref_ctrl)) begin
        failures++;
        $display("FAIL: match=%b live=%b stored=%b", match, ctrl_pol, ref_ctrl);
      end
      if (match) n_match++;
      @(posedge clk);
      if (p0) ref_ctrl = ctrl_pol;
      if (ext_reset) begin
        ref_sd = '0;
        if (ref_sd != sd_pol || !p0) n_ext++;
      end else if (p0) ref_sd = sd_pol;
      #1;
      checks++;
      if (cmd_q.ctrl != ref_ctrl || cmd_q.sd != ref_sd) begin
        failures++;
        $display("FAIL: stored %b/%b expected %b/%b", cmd_q.ctrl, cmd_q.sd, ref_ctrl, ref_sd);
      end
    end
    checks++;
    if (n_match == 0 || n_ext == 0) begin
      failures++;
      $display("FAIL: match or external reset never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
