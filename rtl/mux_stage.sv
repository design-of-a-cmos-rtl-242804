// mux_stage: self-timed multiplexor module at each output port of the router.
//
// A register module with a two-way input multiplexer. The system controller
// selects the source with the dual-rail pair c0/c1 (never both high): c0 loads
// d0 (the upper FIFO), c1 loads d1 (the lower FIFO). Each rail has its own
// C-element x0/x1 and its own HOLD/LOAD pair, and one shared delay register
// gives DONE. When the byte is loaded, ack tells the system controller and
// rout offers the byte downstream. The handshake follows the register module:
//   ci+ (with rout low) -> xi+ -> HOLDi- -> LOADi+ -> DONE+ -> LOADi- -> ack+
//   DONE+ and aout- -> rout+
//   ci- (with rout high) -> xi- ; both x low -> DONE- -> ack- ;
//   DONE- and aout+ -> rout-
// The split into two C-elements, two load rails and one delay register follows
// the design; the gate-level form of ack (DONE with neither LOAD high) is this
// design's reading of the register module it is modified from.
//
// Timing (clocked emulation): ci seen at edge k gives the byte and ack at k+2
// and rout at k+3 when aout is low.
module mux_stage #(
  parameter int unsigned W = router_pkg::FLIT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         c0,
  input  logic         c1,
  output logic         ack,
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  output logic         rout,
  input  logic         aout,
  output logic [W-1:0] dout
);

  logic x0, x1;
  logic hold0, hold1, load0, load1;
  logic done;

  c_element u_cx0 (.clk, .rst_n, .a(c0), .b(~rout), .c(x0));
  c_element u_cx1 (.clk, .rst_n, .a(c1), .b(~rout), .c(x1));

  assign hold0 = ~(x0 & ~done);
  assign hold1 = ~(x1 & ~done);
  assign load0 = ~hold0;
  assign load1 = ~hold1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             done <= 1'b0;
    else if (!x0 && !x1)    done <= 1'b0;
    else if (load0 || load1) done <= 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     dout <= '0;
    else if (load0) dout <= d0;
    else if (load1) dout <= d1;
  end

  assign ack = done & ~load0 & ~load1;

  c_element u_cout (.clk, .rst_n, .a(done), .b(~aout), .c(rout));

  // c0 and c1 form a dual-rail select: never both high.
  a_dual_rail : assert property (@(posedge clk) disable iff (!rst_n) !(c0 && c1));

endmodule
