// switch_element: radix-2 self-routing multicast switching element.
//
// Two input controllers each compute C(U,L) for their cell with the RPHOR
// logic and offer the cell, with the matching header half, to the upper
// output controller (C(U)=1), the lower one (C(L)=1), both (copy) or neither.
// Each output controller picks one of the two offers for its link.
//
// Interface: in0/in1 carry cells of H header bits plus CELL_BITS body bits.
// out0 is the upper link, out1 the lower; each carries H/2 header bits plus
// the body. The first outgoing bit leaves H+2 clocks after the first incoming
// bit. collision[k] pulses when both inputs wanted out<k> in one slot.
// The structure follows the paper's switching-element diagram; the latency
// is a consequence of this design's packet controller.
module switch_element
  import rphor_pkg::*;
#(
  parameter int unsigned H         = 16,
  parameter int unsigned CELL_BITS = ATM_CELL_BITS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  link_t      in0,
  input  link_t      in1,
  output link_t      out0,
  output link_t      out1,
  output logic [1:0] collision,
  output logic [1:0] c_u,        // C(U) of input controller 0 and 1
  output logic [1:0] c_l         // C(L) of input controller 0 and 1
);

  link_t up0, lo0, up1, lo1;

  input_controller #(.H(H), .CELL_BITS(CELL_BITS)) u_ic0 (
    .clk(clk), .rst_n(rst_n), .in(in0), .up(up0), .lo(lo0),
    .c_u(c_u[0]), .c_l(c_l[0])
  );

  input_controller #(.H(H), .CELL_BITS(CELL_BITS)) u_ic1 (
    .clk(clk), .rst_n(rst_n), .in(in1), .up(up1), .lo(lo1),
    .c_u(c_u[1]), .c_l(c_l[1])
  );

  output_controller #(.FRAME(H / 2 + CELL_BITS)) u_oc0 (
    .clk(clk), .rst_n(rst_n), .req0(up0), .req1(up1),
    .out(out0), .collision(collision[0])
  );

  output_controller #(.FRAME(H / 2 + CELL_BITS)) u_oc1 (
    .clk(clk), .rst_n(rst_n), .req0(lo0), .req1(lo1),
    .out(out1), .collision(collision[1])
  );

endmodule
