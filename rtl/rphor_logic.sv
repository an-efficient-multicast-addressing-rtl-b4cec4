// rphor_logic: bit-serial Recursive Partial Header ORing.
//
// The header bits of the cell entering a switching element stream in on
// hdr_bit, one per clock. The block ORs the first half of them into C(U) and
// the second half into C(L): C(U)=1 means some destination lies behind the
// upper output link, C(L)=1 the same for the lower link.
//
// It is the five-flip-flop circuit of the paper's RPHOR logic: an input
// flip-flop, an accumulator that feeds back through the single OR gate, a
// capture flip-flop for C(U), a second C(U) flip-flop and a C(L) flip-flop.
// The two gated captures (the transmission gates Count0 and Count1) become
// clock enables here, and the asynchronous accumulator reset becomes the
// synchronous strobe clr that makes the OR ignore the accumulator. All
// flip-flops run on the one bit clock; these single-clock strobes stand in for
// the separate clocks CLK0..CLK2 of the original circuit.
//
// Timing (strobes refer to the bit held in the input flip-flop, i.e. they are
// one clock behind hdr_bit):
//   clr   : the held bit is the first bit of a header half
//   cnt0  : the held bit is the last bit of the first half  -> C(U) captured
//   cnt1  : the held bit is the last bit of the header      -> C(L) captured,
//           C(U) moved to its output flip-flop
// c_u and c_l change together one clock after cnt1 and then hold until the
// next cell's cnt1.
module rphor_logic (
  input  logic clk,
  input  logic rst_n,
  input  logic hdr_bit,   // serial header bit, P0 first
  input  logic clr,       // restart the OR for a new header half
  input  logic cnt0,      // capture the first-half OR
  input  logic cnt1,      // capture the second-half OR and present both
  output logic c_u,       // C(U)
  output logic c_l        // C(L)
);

  logic in_q;    // input flip-flop
  logic acc_q;   // running OR
  logic u_q;     // first capture of C(U)
  logic or_out;

  assign or_out = in_q | (acc_q & ~clr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_q  <= 1'b0;
      acc_q <= 1'b0;
      u_q   <= 1'b0;
      c_u   <= 1'b0;
      c_l   <= 1'b0;
    end else begin
      in_q  <= hdr_bit;
      acc_q <= or_out;
      if (cnt0) u_q <= or_out;
      if (cnt1) begin
        c_l <= or_out;
        c_u <= u_q;
      end
    end
  end

endmodule
