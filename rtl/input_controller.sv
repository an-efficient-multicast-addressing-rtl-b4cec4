// input_controller: one input side of a radix-2 switching element.
//
// Holds the RPHOR logic, which works out C(U,L) from the header on the fly,
// and the packet controller, which splits the header and copies the cell to
// the links that C(U,L) selects. A bit counter produces the strobes that the
// RPHOR logic needs: the accumulator restart at the first bit of each header
// half, the C(U) capture after the first half and the C(L) capture after the
// second half. The strobes are registered so that they line up with the
// RPHOR logic's input flip-flop.
//
// Interface: in is the incoming serial link, cells H+CELL_BITS long with an
// H-bit header. up/lo are the requests towards the two output controllers,
// each H/2+CELL_BITS long, starting H+1 clocks after the cell's first bit.
// c_u/c_l are the control bits of the last cell, brought out for observation.
// The counter and the strobe placement are this design's reading of the
// timing diagram that accompanies the RPHOR logic.
module input_controller
  import rphor_pkg::*;
#(
  parameter int unsigned H         = 16,
  parameter int unsigned CELL_BITS = ATM_CELL_BITS
) (
  input  logic  clk,
  input  logic  rst_n,
  input  link_t in,
  output link_t up,
  output link_t lo,
  output logic  c_u,
  output logic  c_l
);

  localparam int unsigned HH    = H / 2;
  localparam int unsigned FRAME = H + CELL_BITS;
  localparam int unsigned CW    = $clog2(FRAME + 1);

  logic [CW-1:0] idx;      // index of the bit now on the input
  logic          clr_q, cnt0_q, cnt1_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx    <= '0;
      clr_q  <= 1'b0;
      cnt0_q <= 1'b0;
      cnt1_q <= 1'b0;
    end else begin
      if (!in.vld)                     idx <= '0;
      else if (idx == CW'(FRAME - 1))  idx <= '0;
      else                             idx <= idx + 1'b1;
      clr_q  <= in.vld && (idx == '0 || idx == CW'(HH));
      cnt0_q <= in.vld && (idx == CW'(HH - 1));
      cnt1_q <= in.vld && (idx == CW'(H - 1));
    end
  end

  rphor_logic u_rphor (
    .clk     (clk),
    .rst_n   (rst_n),
    .hdr_bit (in.dat),
    .clr     (clr_q),
    .cnt0    (cnt0_q),
    .cnt1    (cnt1_q),
    .c_u     (c_u),
    .c_l     (c_l)
  );

  packet_controller #(.H(H), .CELL_BITS(CELL_BITS)) u_pc (
    .clk   (clk),
    .rst_n (rst_n),
    .in    (in),
    .c_u   (c_u),
    .c_l   (c_l),
    .up    (up),
    .lo    (lo)
  );

endmodule
