// tb_output_drivers - exhaustive test of the decoder relay drive gating.
//
// For every stored command and both states of D, each pair must have exactly
// one driver on while D is high (the one matching the stored bit) and both
// off while D is low.
`timescale 1ns / 1ps
module tb_output_drivers;
  import sm_pkg::*;

  logic              d;
  logic [N_CTRL-1:0] cmd_ctrl, drv_t, drv_r;
  int                checks = 0, failures = 0;

  output_drivers dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      d        = v[7];
      cmd_ctrl = v[6:0];
      #1;
      for (int i = 0; i < N_CTRL; i++) begin
        checks++;
        if (d) begin
          if (drv_t[i] != cmd_ctrl[i] || drv_r[i] == cmd_ctrl[i]) begin
            failures++;
            $display("FAIL: pair %0d d=1 cmd=%b t=%b r=%b", i, cmd_ctrl, drv_t, drv_r);
          end
        end else if (drv_t[i] || drv_r[i]) begin
          failures++;
          $display("FAIL: pair %0d driven without D", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
