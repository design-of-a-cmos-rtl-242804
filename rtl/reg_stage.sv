// reg_stage: self-timed register module, one stage of an input FIFO.
//
// A data register loads din while LOAD is high and holds it while HOLD is
// high. A one-bit delay register, loaded with a constant 1 by the same LOAD,
// raises DONE once the load has had time to complete. The stage controller
// sequences the four-phase handshakes on the input link (rin/ain) and the
// output link (rout/aout) exactly as the signal transition graph of the design
// prescribes:
//   rin+ (with rout low) -> x+ -> HOLD- -> LOAD+ -> DONE+ -> HOLD+ -> LOAD-
//   DONE+ and LOAD- -> ain+ ;  DONE+ and aout- -> rout+
//   rin- (with rout high) -> x- -> DONE- -> ain- ;  DONE- and aout+ -> rout-
// HOLD is dropped before LOAD is raised, so the stage never drives back into
// the preceding one, and ain is raised only after LOAD is low again, so the
// input data may change as soon as ain is seen. Consecutive stages can hold
// data without a master/slave register.
//
// x and rout are C-elements; x combines rin with the inverted rout, rout
// combines DONE with the inverted aout. The data register is a flip-flop bank
// here where the chip uses pseudo-static pass-transistor latches, and the
// matched delay of the delay register becomes one clock cycle.
//
// Timing (clocked emulation, one gate delay per cycle): rin seen high at edge
// k with rout low gives x at k+1, data and DONE at k+2 (ain high in the same
// cycle), rout at k+3 if aout is low.
module reg_stage #(
  parameter int unsigned W = router_pkg::FLIT_W
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

  logic x;     // C-element of rin and not rout
  logic hold;  // feedback pass gates of the register cells on
  logic load;  // input pass gates of the register cells on
  logic done;  // delay register output

  c_element u_cx (.clk, .rst_n, .a(rin), .b(~rout), .c(x));

  // HOLD falls when x is up and the delay register has not yet fired; LOAD is
  // its complement, produced after it.
  assign hold = ~(x & ~done);
  assign load = ~hold;

  // Delay register: loaded with 1 by LOAD, pulled down once x has fallen.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    done <= 1'b0;
    else if (!x)   done <= 1'b0;
    else if (load) done <= 1'b1;
  end

  // Data register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    dout <= '0;
    else if (load) dout <= din;
  end

  assign ain = done & ~load;

  c_element u_cout (.clk, .rst_n, .a(done), .b(~aout), .c(rout));

  // Four-phase rules on the input link: once raised, a request and its data
  // stay until acknowledged.
  a_rin_held : assert property (@(posedge clk) disable iff (!rst_n)
                                (rin && !ain) |=> rin);
  a_din_stable : assert property (@(posedge clk) disable iff (!rst_n)
                                  (rin && !ain) |=> $stable(din));

endmodule
