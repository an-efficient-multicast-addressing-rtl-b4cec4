// tb_rphor_examples: the two 8-port multicast examples, run on an 8x8
// copy network with 424-bit cell bodies.
//
//   header 1 0 1 0 1 1 0 1 (P0..P7): ports {0,2,4,5,7}. The expected
//     C(U,L) pairs per stage are stage 0: 11; stage 1: 11, 11;
//     stage 2: 10, 10, 11, 01.
//   header 1 1 0 1 1 0 0 1: ports {0,1,3,4,7}; pairs worked out by hand:
//     stage 0: 11; stage 1: 11, 11; stage 2: 11, 01, 10, 01.
// Each example runs right after a reset, so control pairs of lines the cell
// does not reach are 00 and the pairs seen per stage can be counted exactly.
// Copies are checked at every port, with their timing.
module tb_rphor_examples;
  import rphor_pkg::*;

  localparam int N         = 8;
  localparam int CELL      = ATM_CELL_BITS;
  localparam int STAGES    = 3;
  localparam int FRAME_IN  = N + CELL;
  localparam int FRAME_OUT = 1 + CELL;
  localparam int LAT       = (2 * N - 2) + 2 * STAGES;

  logic clk = 1'b0;
  logic rst_n;
  link_t in_link [N];
  link_t out_link [N];
  logic [STAGES-1:0][N-1:0]      collision;
  logic [STAGES-1:0][N-1:0][1:0] ctrl;

  rphor_copy_network #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .in_link(in_link), .out_link(out_link),
    .collision(collision), .ctrl(ctrl)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // want_cnt[stage][code]: how many lines must show C(U,L) = code
  task automatic run(input int src, input logic [0:N-1] hdr_p0_first,
                     input int want_cnt [STAGES][4], input string name);
    logic [CELL-1:0]      body;
    logic [FRAME_OUT-1:0] cap [N];
    logic [FRAME_OUT-1:0] vld [N];
    int                   cnt [STAGES][4];
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int w = 0; w < CELL; w += 32) body[w +: 32] = $urandom;
    for (int c = 0; c < LAT + FRAME_OUT; c++) begin
      for (int p = 0; p < N; p++) begin
        in_link[p].vld = (p == src) && (c < FRAME_IN);
        in_link[p].dat = (p == src) && (c < FRAME_IN) &&
                         ((c < N) ? hdr_p0_first[c] : body[c - N]);
      end
      if (c >= LAT)
        for (int p = 0; p < N; p++) begin
          cap[p][c - LAT] = out_link[p].dat;
          vld[p][c - LAT] = out_link[p].vld;
        end
      @(negedge clk);
    end
    for (int i = 0; i < STAGES; i++) begin
      for (int k = 0; k < 4; k++) cnt[i][k] = 0;
      for (int l = 0; l < N; l++) cnt[i][ctrl[i][l]]++;
      for (int k = 1; k < 4; k++)
        check(cnt[i][k] == want_cnt[i][k],
              $sformatf("%s stage %0d: %0d pairs %0d%0d, want %0d",
                        name, i, cnt[i][k], k / 2, k % 2, want_cnt[i][k]));
    end
    for (int p = 0; p < N; p++)
      if (hdr_p0_first[p])
        check(vld[p] == '1 && cap[p] == {body, 1'b1},
              $sformatf("%s port %0d: copy missing or wrong", name, p));
      else
        check(vld[p] == '0, $sformatf("%s port %0d: unexpected copy", name, p));
  endtask

  // code index: 1 = 01, 2 = 10, 3 = 11
  int ex_a [STAGES][4] = '{'{0, 0, 0, 1}, '{0, 0, 0, 2}, '{0, 1, 2, 1}};
  int ex_b [STAGES][4] = '{'{0, 0, 0, 1}, '{0, 0, 0, 2}, '{0, 2, 1, 1}};

  initial begin
    for (int p = 0; p < N; p++) in_link[p] = '0;
    run(0, 8'b1010_1101, ex_a, "ports {0,2,4,5,7}");
    run(3, 8'b1101_1001, ex_b, "ports {0,1,3,4,7}");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
