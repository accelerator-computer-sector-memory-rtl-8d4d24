// fast_store_reg - fast storage register of the sector memory, with the
// Same comparison.
//
// While the load pulse P0 is high the register takes the polarity of the
// seven looped control pairs and of the three subdevice pairs (one flip-flop
// per pair). The polarity of each of the seven looped pairs is compared
// continuously with its stored bit; `match` is high when all seven agree.
// The Same signal proper (match qualified by S) is formed in sector_control.
// The subdevice flip-flops have an extra external reset input, `ext_reset`,
// which clears them without touching the control bits. The polarity on the
// inputs is only meaningful when the pair is correctly coded; loading is
// gated by P0 = S.F upstream, so only checked commands are stored.
// Timing: load and reset act on the rising clock edge; `match` and the
// stored command are valid from the following cycle. Synchronous,
// active-low reset clears all bits (this design's choice).
module fast_store_reg
  import sm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              p0,         // load pulse
  input  logic              ext_reset,  // clears the subdevice flip-flops
  input  logic [N_CTRL-1:0] ctrl_pol,   // live polarity, CP and PrA..PrF
  input  logic [N_SD-1:0]   sd_pol,     // live polarity, SD0..SD2
  output command_t          cmd_q,      // stored command
  output logic              match       // live control polarity == stored
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cmd_q <= '0;
    end else begin
      if (p0) begin
        cmd_q.ctrl <= ctrl_pol;
      end
      if (ext_reset) begin
        cmd_q.sd <= '0;
      end else if (p0) begin
        cmd_q.sd <= sd_pol;
      end
    end
  end

  // Comparison circuits: one per looped pair, all must agree.
  assign match = (ctrl_pol == cmd_q.ctrl);

endmodule
