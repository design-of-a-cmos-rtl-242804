// fsm: finite state machine of one router input.
//
// For every byte that the input FIFO offers (rin, with the byte's address bit
// d0_in and Last-Byte bit lb_in), the S* module pulses phi, which loads the
// master register, and then runs a cycle on its second link, steered by a
// D-module: to ru (the upper output's controller) when dir = 0, to rd (the
// lower output's) when dir = 1. The acknowledge from that controller
// acknowledges the FIFO.
//
// The master holds three predicates for the current byte (fb and lb go out
// to both distributed structures, dir only steers this module's D-module):
//   fb  = 1 only on the first byte of a packet,
//   lb  = 1 only on the last byte,
//   dir = the address bit, sampled on the first byte and recycled for the rest.
// The slave, loaded from the master while phi is low, holds the next-state
// values: fb' is the previous byte's lb (a byte is a first byte exactly when
// the byte before it was a last byte), dir' is the previous dir. A multiplexer
// controlled by fb' picks d0_in (first byte) or dir' (other bytes) for dir.
// This structure follows the design. The reset values (fb' = 1, so the first
// byte after reset is an address byte) are this design's choice.
//
// A packet must be at least two bytes long: the controller engages the output
// arbiter on the first byte and releases it on the last, and the two cannot
// happen on one byte. An assertion flags a one-byte packet.
//
// Timing (clocked emulation): the master loads at the edge where rin is first
// seen; ru/rd rise one cycle later.
module fsm (
  input  logic clk,
  input  logic rst_n,
  // link from the input FIFO
  input  logic rin,
  output logic ain,
  input  logic d0_in,
  input  logic lb_in,
  // predicates for the distributed structures
  output logic fb,
  output logic lb,
  // request to the upper output's controller (dir = 0)
  output logic ru_req,
  input  logic ru_ack,
  // request to the lower output's controller (dir = 1)
  output logic rd_req,
  input  logic rd_ack
);

  logic phi, phi_n;
  logic r2, a2;
  logic fb_s, dir_s;  // slave: fb', dir'
  logic dir_next;
  logic dir;          // master: address bit, steers the D-module only

  s_star u_sstar (.clk, .rst_n, .rin, .ain, .phi, .phi_n, .r2, .a2);

  assign dir_next = fb_s ? d0_in : dir_s;

  // Master: loaded by phi.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fb  <= 1'b1;
      lb  <= 1'b1;
      dir <= 1'b0;
    end else if (phi) begin
      fb  <= fb_s;
      lb  <= lb_in;
      dir <= dir_next;
    end
  end

  // Slave: loaded by the complement of phi.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fb_s  <= 1'b1;
      dir_s <= 1'b0;
    end else if (phi_n) begin
      fb_s  <= lb;
      dir_s <= dir;
    end
  end

  decision #(.TWO_WAY(1'b1), .DOMINO(1'b0)) u_dir (
    .clk, .rst_n, .e(1'b1), .p(dir),
    .req(r2), .ack(a2),
    .t_req(rd_req), .t_ack(rd_ack),
    .f_req(ru_req), .f_ack(ru_ack)
  );

  a_min_two_bytes : assert property (@(posedge clk) disable iff (!rst_n)
                                     phi |-> !(fb_s && lb_in));

endmodule
