// one_shot - retriggerable (rechargeable) delay one-shot.
//
// A pulse on `trig` loads the down counter with `len` clock cycles and
// `active` goes high on the next cycle for exactly `len` cycles. While the
// one-shot is active, `hold` reloads it every cycle, so the output stays on
// for as long as `hold` is present and then for a further `len` cycles; this
// is the rechargeable behaviour of the execute one-shot. A `trig` while
// active restarts the full period. `expire` is high in the last active
// cycle unless `hold` reloads it (it does not look at `trig`, so that a
// trigger derived from `expire` of the same or another one-shot forms no
// combinational loop), and `active_next` tells whether the
// output will be on in the next cycle, so that neighbouring timers can be
// chained without a gap. A `len` of zero produces no pulse. The original
// uses RC one-shots; counting clock cycles is this design's choice. Synchronous,
// active-low reset to the idle state.
module one_shot #(
  parameter int unsigned CNT_W = 20   // counter width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             trig,        // start / restart
  input  logic             hold,        // reload while active
  input  logic [CNT_W-1:0] len,         // period in clock cycles
  output logic             active,      // one-shot output
  output logic             expire,      // last cycle of the period
  output logic             active_next  // output in the next cycle
);

  logic [CNT_W-1:0] cnt;
  logic             reload;

  always_comb begin
    active      = (cnt != '0);
    reload      = trig | (active & hold);
    expire      = active & (cnt == CNT_W'(1)) & ~hold;
    active_next = reload ? (len != '0) : (cnt > CNT_W'(1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0;
    end else if (reload) begin
      cnt <= len;
    end else if (active) begin
      cnt <= cnt - CNT_W'(1);
    end
  end

endmodule
