// packet_controller: header splitting and cell replication for one input.
//
// A cell arrives with an H-bit header (the destination bitmap of the
// sub-network below this switching element) followed by CELL_BITS of body.
// The cell goes to the upper link as "first header half + body" when C(U) is
// set, and to the lower link as "second header half + body" when C(L) is set,
// or to both (copy), or to neither (discarded).
//
// The control bits are known only after the whole header has passed, so the
// cell runs through a delay line of T = H+1 stages. Both outgoing frames are
// taken from one tap D = T-H/2 clocks behind the input: seen there, the input
// frame's bits from H/2 onwards are exactly the lower frame, and the same
// clocks also carry the body of the upper frame. During the first H/2 clocks
// of the upper frame its header half is taken from the end of the delay line,
// H/2 clocks further back, where the first header half still is.
//
// Interface: in is the incoming link; c_u/c_l come from rphor_logic and must
// be stable from clock H+1 after the first header bit for the whole outgoing
// frame. up/lo are combinational requests to the output controllers: vld
// high for H/2+CELL_BITS clocks, starting H+1 clocks after the cell's first
// bit entered. The delay line, the tap positions and the latency are this
// design's own choices; the paper gives only what the PC must do.
module packet_controller
  import rphor_pkg::*;
#(
  parameter int unsigned H         = 16,
  parameter int unsigned CELL_BITS = ATM_CELL_BITS
) (
  input  logic  clk,
  input  logic  rst_n,
  input  link_t in,
  input  logic  c_u,
  input  logic  c_l,
  output link_t up,
  output link_t lo
);

  localparam int unsigned HH     = H / 2;            // header bits per half
  localparam int unsigned T      = H + 1;            // delay-line length
  localparam int unsigned TAP    = T - HH - 1;       // index of the body tap
  localparam int unsigned FRAME  = H + CELL_BITS;    // incoming cell length
  localparam int unsigned CW     = $clog2(FRAME + 1);

  link_t          dly [T];     // dly[k] = input delayed by k+1 clocks
  logic [CW-1:0]  pos;         // bit index of the cell seen at the tap
  link_t          tap;
  logic           out_frame;   // tapped bit belongs to the outgoing frame
  logic           hdr_phase;   // first HH clocks of the outgoing frame

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(T); k++) dly[k] <= '0;
    end else begin
      dly[0] <= in;
      for (int k = 1; k < int'(T); k++) dly[k] <= dly[k-1];
    end
  end

  assign tap = dly[TAP];

  // Bit position of the tapped cell; counts modulo the cell length so that
  // back-to-back cells are separated without an idle clock.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= '0;
    end else if (!tap.vld) begin
      pos <= '0;
    end else if (pos == CW'(FRAME - 1)) begin
      pos <= '0;
    end else begin
      pos <= pos + 1'b1;
    end
  end

  assign out_frame = tap.vld && (pos >= CW'(HH));
  assign hdr_phase = (pos < CW'(H));

  always_comb begin
    up.vld = out_frame & c_u;
    up.dat = up.vld & (hdr_phase ? dly[T-1].dat : tap.dat);
    lo.vld = out_frame & c_l;
    lo.dat = lo.vld & tap.dat;
  end

endmodule
