// rphor_net_exerciser: drives one copy network of a given size with
// single-source multicast cells and checks every output.
//
// Used by testbenches that run the network at the port counts of the
// header-size comparison (32 to 1024 ports). One cell at a time enters on a
// random input with a random destination bitmap (the first ones: broadcast,
// a single port, and every other port). A copy must appear exactly at the
// requested ports, (2N-2)+2*log2(N) clocks after the first header bit, with
// the residual header bit set and the body unchanged. done rises after
// NCELL cells; checks and failures count the comparisons.
module rphor_net_exerciser
  import rphor_pkg::*;
#(
  parameter int N     = 32,
  parameter int CELL  = ATM_CELL_BITS,
  parameter int NCELL = 6
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int STAGES    = $clog2(N);
  localparam int FRAME_IN  = N + CELL;
  localparam int FRAME_OUT = 1 + CELL;
  localparam int LAT       = (2 * N - 2) + 2 * STAGES;

  link_t in_link [N];
  link_t out_link [N];
  logic [STAGES-1:0][N-1:0]      collision;
  logic [STAGES-1:0][N-1:0][1:0] ctrl;

  rphor_copy_network #(.N(N), .CELL_BITS(CELL)) dut (
    .clk(clk), .rst_n(rst_n), .in_link(in_link), .out_link(out_link),
    .collision(collision), .ctrl(ctrl)
  );

  logic [N-1:0]         hdr;
  logic [CELL-1:0]      body;
  logic [FRAME_OUT-1:0] cap     [N];
  logic [FRAME_OUT-1:0] cap_vld [N];

  initial begin
    done = 0; checks = 0; failures = 0;
    for (int p = 0; p < N; p++) in_link[p] = '0;
    @(posedge rst_n);
    repeat (2) @(negedge clk);
    for (int k = 0; k < NCELL; k++) begin
      automatic int src = $urandom_range(N - 1);
      for (int w = 0; w < N; w += 32) hdr[w +: 32] = $urandom;
      if (k == 0) hdr = '1;
      if (k == 1) hdr = N'(1) << (N - 1);
      if (k == 2) for (int p = 0; p < N; p++) hdr[p] = p[0];
      for (int w = 0; w < CELL; w += 32) body[w +: 32] = $urandom;
      // drive the cell, then wait for its copies, sampling every port
      for (int c = 0; c < LAT + FRAME_OUT; c++) begin
        for (int p = 0; p < N; p++) begin
          in_link[p].vld = (p == src) && (c < FRAME_IN);
          in_link[p].dat = (p == src) && (c < FRAME_IN) &&
                           ((c < N) ? hdr[c] : body[c - N]);
        end
        if (c >= LAT)
          for (int p = 0; p < N; p++) begin
            cap[p][c - LAT]     = out_link[p].dat;
            cap_vld[p][c - LAT] = out_link[p].vld;
          end
        @(negedge clk);
      end
      for (int p = 0; p < N; p++) begin
        checks++;
        if (hdr[p]) begin
          if (cap_vld[p] != '1 || cap[p] != {body, 1'b1}) begin
            failures++;
            $display("FAIL N=%0d cell %0d port %0d: copy missing or wrong", N, k, p);
          end
        end else if (cap_vld[p] != '0) begin
          failures++;
          $display("FAIL N=%0d cell %0d port %0d: unexpected copy", N, k, p);
        end
      end
      for (int c = 0; c < 4; c++) @(negedge clk);
      // nothing may still be in flight
      for (int p = 0; p < N; p++) begin
        checks++;
        if (out_link[p].vld) failures++;
      end
    end
    done = 1;
  end

endmodule
