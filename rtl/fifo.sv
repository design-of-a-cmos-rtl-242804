// fifo: self-timed input queue of the router, a chain of DEPTH register
// modules (reg_stage).
//
// Each stage passes a byte on to the next as soon as the next one is empty,
// so a byte entering an empty queue ripples to the output, and up to DEPTH
// bytes wait when the output is not acknowledged. There is no central control
// and no pointer logic: each stage's rout/aout is the next stage's rin/ain.
// The queue built from register modules follows the router description; the
// depth is not stated there and DEPTH = 4 is this design's choice.
//
// Timing: a byte reaches the output DEPTH*3 cycles after entering an empty
// queue (three cycles per stage, see reg_stage).
module fifo #(
  parameter int unsigned W     = router_pkg::FLIT_W,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rin,
  output logic         ain,
  input  logic [W-1:0] din,
  output logic         rout,
  input  logic         aout,
  output logic [W-1:0] dout
);

  logic         r [DEPTH+1];
  logic         a [DEPTH+1];
  logic [W-1:0] d [DEPTH+1];

  assign r[0]    = rin;
  assign ain     = a[0];
  assign d[0]    = din;
  assign rout    = r[DEPTH];
  assign a[DEPTH] = aout;
  assign dout    = d[DEPTH];

  for (genvar i = 0; i < DEPTH; i++) begin : g_stage
    reg_stage #(.W(W)) u_stage (
      .clk, .rst_n,
      .rin(r[i]),   .ain(a[i]),   .din(d[i]),
      .rout(r[i+1]), .aout(a[i+1]), .dout(d[i+1])
    );
  end

endmodule
