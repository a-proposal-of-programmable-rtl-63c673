// lb_out_stage: output flip-flops of the logic block.
//
// Each LUT output feeds a flip-flop and, in parallel, a bypass path; a
// selector per output drives either the flip-flop (use_ff = 1) or the LUT
// output itself (use_ff = 0) onto the logic block output.
//
// Timing: the flip-flops load on every rising clock edge and clear to 0 on a
// synchronous, active-high reset. A registered output shows the LUT value one
// cycle later; a bypassed one shows it in the same cycle.
//
// The flip-flop plus bypass selector per output follows the drawing of the
// logic block; the select coming from a context bit, and the reset value,
// are this design's choice.
module lb_out_stage #(
  parameter int unsigned NOUT = 3
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [NOUT-1:0] d,
  input  logic [NOUT-1:0] use_ff,
  output logic [NOUT-1:0] q
);

  logic [NOUT-1:0] ff_q;

  always_ff @(posedge clk) begin
    if (rst) ff_q <= '0;
    else     ff_q <= d;
  end

  always_comb begin
    for (int j = 0; j < int'(NOUT); j++)
      q[j] = use_ff[j] ? ff_q[j] : d[j];
  end

endmodule
