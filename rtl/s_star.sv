// s_star: modified Sequence module (S*) of the input state machine.
//
// On a request rin it first produces a clock pulse phi on link 1 (with its
// complement phi_n), then runs a request/acknowledge cycle on link 2, and
// acknowledges rin with link 2's acknowledge. The pulse width is set by a
// delay register, the same timing loop as in the register module: phi rises
// with rin while the delay register is empty, the delay register is loaded by
// phi, and its output ends the pulse and starts link 2. The delay register is
// cleared when rin falls, which ends the link 2 request.
//   rin+ -> phi+ -> done+ -> phi- -> r2+ -> a2+ -> ain+
//   rin- -> done- -> r2- -> a2- -> ain-
// Pulse on link 1 and cycle on link 2 follow the design; taking the link 2
// request directly from the delay register output is this design's choice.
//
// Timing (clocked emulation): phi is high for exactly one cycle, the cycle in
// which rin is first seen; r2 rises one cycle later.
module s_star (
  input  logic clk,
  input  logic rst_n,
  input  logic rin,
  output logic ain,
  output logic phi,
  output logic phi_n,
  output logic r2,
  input  logic a2
);

  logic done;

  assign phi   = rin & ~done;
  assign phi_n = ~phi;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   done <= 1'b0;
    else if (!rin) done <= 1'b0;
    else if (phi) done <= 1'b1;
  end

  assign r2  = done;
  assign ain = a2;

endmodule
