// output_controller: arbiter and driver for one outgoing link of a switching
// element.
//
// Both input controllers of the element may request the link in the same
// cell slot. At the first clock of a slot the controller grants the link to
// the only requester, or, when both request, to the one whose turn it is;
// the turn then passes to the other input (round robin). The grant holds for
// the whole outgoing frame of FRAME bits. The losing copy is discarded and
// collision pulses for one clock. The output is registered, adding one clock.
//
// Cells are assumed slot aligned: both inputs' frames, when present, start in
// the same clock. The paper says only that the output controllers arbitrate
// the requests; the round-robin rule, the discard of the loser and the
// collision flag are this design's choices.
module output_controller
  import rphor_pkg::*;
#(
  parameter int unsigned FRAME = 8 + ATM_CELL_BITS
) (
  input  logic  clk,
  input  logic  rst_n,
  input  link_t req0,       // from input controller 0
  input  link_t req1,       // from input controller 1
  output link_t out,
  output logic  collision
);

  localparam int unsigned CW = $clog2(FRAME + 1);

  logic [CW-1:0] pos;
  logic          busy;
  logic          first;     // first clock of a slot
  logic          sel_q;     // granted input for the current slot
  logic          sel;
  logic          turn_q;    // input favoured at the next collision

  assign busy  = req0.vld | req1.vld;
  assign first = busy && (pos == '0);

  always_comb begin
    if (first) sel = (req0.vld && req1.vld) ? turn_q : req1.vld;
    else       sel = sel_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos       <= '0;
      sel_q     <= 1'b0;
      turn_q    <= 1'b0;
      out       <= '0;
      collision <= 1'b0;
    end else begin
      if (!busy)                       pos <= '0;
      else if (pos == CW'(FRAME - 1))  pos <= '0;
      else                             pos <= pos + 1'b1;
      sel_q     <= sel;
      collision <= first && req0.vld && req1.vld;
      if (first && req0.vld && req1.vld) turn_q <= ~turn_q;
      out       <= sel ? req1 : req0;
    end
  end

endmodule
