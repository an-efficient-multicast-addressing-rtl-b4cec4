// rphor_copy_network: N x N self-routing multicast copy network using the
// Recursive Partial Header ORing (RPHOR) addressing scheme.
//
// Each cell carries an N-bit header, one bit per output port (P0 for port 0,
// sent first): a 1 asks for a copy at that port. The network has log2(N)
// stages of N/2 radix-2 switching elements. A stage-s element sees an
// N/2^s-bit header covering the outputs still reachable from it; it sends the
// cell with the first header half to its upper link if any bit of that half
// is set, with the second half to its lower link if any bit of that half is
// set, or to both. One pass therefore delivers a copy to every requested
// output, and each output receives its cell with a 1-bit residual header (its
// own P bit, always 1) followed by the CELL_BITS body.
//
// Wiring: inputs enter stage 0 through a perfect shuffle (input i to line
// i rotated left by one bit). After stage s the lines of every block of
// N/2^s lines are unshuffled: the upper links of the block's elements go to
// its top half and the lower links to its bottom half (a baseline network),
// so upper always leads to the lower-numbered half of the reachable outputs.
// The last stage's element j drives outputs 2j and 2j+1.
//
// Timing: inputs must be slot aligned (all cells start in the same clock).
// The first bit of a copy leaves (2N-2) + 2*log2(N) clocks after the first
// header bit entered; outputs are registered. collision[s][k] pulses when
// two cells competed for output link k of stage s; the loser is discarded.
// ctrl[s][l] is the C(U,L) pair, C(U) in bit 1, that the input controller on
// line l of stage s computed for its last cell.
// The multistage banyan structure, the header format and the halving rule are
// the paper's; the exact interstage wiring on the input side, the cell
// framing and the contention handling are this design's choices.
module rphor_copy_network
  import rphor_pkg::*;
#(
  parameter int unsigned N         = 16,
  parameter int unsigned CELL_BITS = ATM_CELL_BITS
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  link_t                             in_link  [N],
  output link_t                             out_link [N],
  output logic [$clog2(N)-1:0][N-1:0]       collision,
  output logic [$clog2(N)-1:0][N-1:0][1:0]  ctrl
);

  localparam int unsigned STAGES = $clog2(N);

  link_t se_in  [STAGES][N];   // lines entering each stage's elements
  link_t se_out [STAGES][N];   // lines leaving each stage's elements

  // Perfect shuffle in front of stage 0.
  for (genvar i = 0; i < int'(N); i++) begin : g_in
    localparam int unsigned P = ((i << 1) | (i >> (STAGES - 1))) & (N - 1);
    assign se_in[0][P] = in_link[i];
  end

  for (genvar s = 0; s < int'(STAGES); s++) begin : g_stage
    localparam int unsigned HS = N >> s;   // header bits at this stage

    for (genvar j = 0; j < int'(N / 2); j++) begin : g_se
      logic [1:0] cu, cl;
      assign ctrl[s][2*j]   = {cu[0], cl[0]};
      assign ctrl[s][2*j+1] = {cu[1], cl[1]};
      switch_element #(.H(HS), .CELL_BITS(CELL_BITS)) u_se (
        .clk       (clk),
        .rst_n     (rst_n),
        .in0       (se_in[s][2*j]),
        .in1       (se_in[s][2*j+1]),
        .out0      (se_out[s][2*j]),
        .out1      (se_out[s][2*j+1]),
        .collision (collision[s][2*j+1:2*j]),
        .c_u       (cu),
        .c_l       (cl)
      );
    end

    if (s < int'(STAGES) - 1) begin : g_link
      // Unshuffle within blocks of HS lines.
      for (genvar l = 0; l < int'(N); l++) begin : g_line
        localparam int unsigned BASE = (l / HS) * HS;
        localparam int unsigned LOC  = l % HS;
        localparam int unsigned DST  = BASE + (LOC % 2) * (HS / 2) + LOC / 2;
        assign se_in[s+1][DST] = se_out[s][l];
      end
    end else begin : g_last
      for (genvar l = 0; l < int'(N); l++) begin : g_line
        assign out_link[l] = se_out[s][l];
      end
    end
  end

endmodule
