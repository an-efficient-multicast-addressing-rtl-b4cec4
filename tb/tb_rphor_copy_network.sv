// tb_rphor_copy_network: end-to-end test of the multicast copy network at its
// default size (16 ports, 424-bit cell bodies).
//
// Cells are driven bit-serially, header bit P0 first, and every output port
// is sampled at the expected clock: first output bit (2N-2)+2*log2(N) clocks
// after the first input bit. Expected results come from a reference model of
// the RPHOR tree written here: a copy must appear exactly at the ports whose
// header bit is set, with a residual header bit of 1 and the body unchanged.
// Phases:
//   A  the 16-port example: input 0 to ports {2,3,4,5,9,11,15}; the C(U,L)
//      pairs seen per stage are compared with the values printed for it
//   B  single-source cells with random headers (including none and all
//      ports), some slots back to back without an idle clock
//   C  several sources per slot; contention must be flagged, every delivered
//      copy must belong to a source that asked for that port, and a slot
//      without collisions must deliver every requested copy
// Each mechanism (copy, upper only, lower only, discard, collision, back to
// back cells) is counted and must occur at least once.
module tb_rphor_copy_network;
  import rphor_pkg::*;

  localparam int N         = 16;           // the network's default size
  localparam int CELL      = ATM_CELL_BITS;
  localparam int STAGES    = $clog2(N);
  localparam int FRAME_IN  = N + CELL;
  localparam int FRAME_OUT = 1 + CELL;
  localparam int LAT       = (2 * N - 2) + 2 * STAGES;
  localparam int NSLOT     = 40;

  logic clk = 1'b0;
  logic rst_n;
  link_t in_link [N];
  link_t out_link [N];
  logic [STAGES-1:0][N-1:0]      collision;
  logic [STAGES-1:0][N-1:0][1:0] ctrl;

  rphor_copy_network dut (
    .clk(clk), .rst_n(rst_n), .in_link(in_link), .out_link(out_link),
    .collision(collision), .ctrl(ctrl)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(negedge clk) cyc <= cyc + 1;

  // Slot descriptions.
  logic [N-1:0]    hdr     [NSLOT][N];   // hdr[s][src][p] = P_p
  logic [CELL-1:0] body    [NSLOT][N];
  logic            active  [NSLOT][N];
  int              start   [NSLOT];
  int              phase   [NSLOT];
  int              nslots;

  // Captured output frames.
  logic [FRAME_OUT-1:0] cap     [N];
  logic [FRAME_OUT-1:0] cap_vld [N];

  // Mechanism counters.
  int n_copy = 0, n_upper = 0, n_lower = 0, n_discard = 0;
  int n_collision = 0, n_b2b = 0;
  int coll_window = 0;

  always @(posedge clk) begin
    for (int s = 0; s < STAGES; s++)
      for (int l = 0; l < N; l++)
        if (collision[s][l]) begin
          n_collision++;
          coll_window++;
        end
  end

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  // OR of header bits [lo, lo+len).
  function automatic bit or_range(input logic [N-1:0] h, input int lo, input int len);
    bit r = 0;
    for (int k = lo; k < lo + len; k++) r |= h[k];
    return r;
  endfunction

  // Reference RPHOR tree: count node kinds along the multicast tree of h, and
  // return the multiset of C(U,L) codes per stage for nodes the cell reaches.
  function automatic void tree_counts(input logic [N-1:0] h,
                                      output int cnt [STAGES][4]);
    for (int i = 0; i < STAGES; i++) begin
      int sz = N >> i;
      for (int c = 0; c < 4; c++) cnt[i][c] = 0;
      for (int j = 0; j < (1 << i); j++) begin
        bit reached = (i == 0) ? 1'b1 : or_range(h, j * sz, sz);
        if (reached) begin
          int code = {or_range(h, j * sz, sz / 2), or_range(h, j * sz + sz / 2, sz / 2)};
          cnt[i][code]++;
        end
      end
    end
  endfunction

  // Drive all slots.
  initial begin
    for (int p = 0; p < N; p++) in_link[p] = '0;
    wait (nslots > 0);
    for (int s = 0; s < nslots; s++) begin
      while (cyc < start[s]) @(negedge clk);
      for (int b = 0; b < FRAME_IN; b++) begin
        for (int p = 0; p < N; p++) begin
          in_link[p].vld = active[s][p];
          in_link[p].dat = active[s][p] &&
                           ((b < N) ? hdr[s][p][b] : body[s][p][b - N]);
        end
        @(negedge clk);
      end
      for (int p = 0; p < N; p++) in_link[p] = '0;
    end
  end

  task automatic capture_and_check(input int s);
    logic [N-1:0] want;
    int got_cnt [STAGES][4];
    int exp_cnt [STAGES][4];
    while (cyc < start[s]) @(negedge clk);
    coll_window = 0;
    while (cyc < start[s] + LAT) @(negedge clk);
    for (int b = 0; b < FRAME_OUT; b++) begin
      for (int p = 0; p < N; p++) begin
        cap[p][b]     = out_link[p].dat;
        cap_vld[p][b] = out_link[p].vld;
      end
      if (b == 0) begin
        // control pairs: by now every stage has computed this slot's values
        for (int i = 0; i < STAGES; i++) begin
          for (int c = 0; c < 4; c++) got_cnt[i][c] = 0;
          for (int l = 0; l < N; l++) got_cnt[i][ctrl[i][l]]++;
        end
      end
      @(negedge clk);
    end
    want = '0;
    for (int src = 0; src < N; src++) if (active[s][src]) want |= hdr[s][src];

    if (phase[s] != 3) begin
      int src = -1;
      for (int k = 0; k < N; k++) if (active[s][k]) src = k;
      // exact delivery
      for (int p = 0; p < N; p++) begin
        if (want[p]) begin
          check(cap_vld[p] == '1, $sformatf("slot %0d port %0d: copy missing or late", s, p));
          check(cap[p][0] == 1'b1, $sformatf("slot %0d port %0d: residual header", s, p));
          check(cap[p][FRAME_OUT-1:1] == body[s][src],
                $sformatf("slot %0d port %0d: body corrupted", s, p));
        end else begin
          check(cap_vld[p] == '0, $sformatf("slot %0d port %0d: unexpected copy", s, p));
        end
      end
      // C(U,L) pairs per stage. Lines that a cell does not reach keep the
      // pair of their previous cell, so the multiset is exact only for the
      // first slot after reset.
      if (s == 0) begin
        tree_counts(hdr[s][src], exp_cnt);
        for (int i = 0; i < STAGES; i++) begin
          int reached = 0;
          for (int c = 1; c < 4; c++) reached += exp_cnt[i][c];
          for (int c = 1; c < 4; c++)
            check(got_cnt[i][c] == exp_cnt[i][c],
                  $sformatf("slot %0d stage %0d: %0d nodes with C=%0d%0d, want %0d",
                            s, i, got_cnt[i][c], c[1], c[0], exp_cnt[i][c]));
        end
      end
      tree_counts(hdr[s][src], exp_cnt);
      for (int i = 0; i < STAGES; i++) begin
        n_copy    += exp_cnt[i][3];
        n_upper   += exp_cnt[i][2];
        n_lower   += exp_cnt[i][1];
        n_discard += exp_cnt[i][0];
      end
    end else begin
      // contention slot
      for (int p = 0; p < N; p++) begin
        if (cap_vld[p][0]) begin
          bit found = 0;
          check(cap_vld[p] == '1, $sformatf("slot %0d port %0d: broken frame", s, p));
          for (int k = 0; k < N; k++)
            if (active[s][k] && hdr[s][k][p] && cap[p][FRAME_OUT-1:1] == body[s][k])
              found = 1;
          check(found && cap[p][0], $sformatf("slot %0d port %0d: copy from no requester", s, p));
        end else begin
          check(cap_vld[p] == '0, $sformatf("slot %0d port %0d: stray bits", s, p));
          if (coll_window == 0)
            check(!want[p], $sformatf("slot %0d port %0d: copy lost without collision", s, p));
        end
      end
    end
  endtask

  // Published values for the 16-port example, C(U,L) of the reached nodes
  // per stage for input 0 to
  // {2,3,4,5,9,11,15}: stage 0: 11; stage 1: 11 11; stage 2: 01 10 11 01;
  // stage 3: 00 11 11 00 01 01 00 01 (00 entries are nodes not reached).
  int ex16_cnt [STAGES][4] = '{'{0, 0, 0, 1}, '{0, 0, 0, 2}, '{0, 2, 1, 1}, '{0, 3, 0, 2}};

  initial begin
    int t;
    rst_n = 1'b0;
    nslots = 0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    for (int s = 0; s < NSLOT; s++)
      for (int p = 0; p < N; p++) begin
        active[s][p] = 0;
        hdr[s][p]    = '0;
        for (int w = 0; w < CELL; w += 32) body[s][p][w +: 32] = $urandom;
      end

    t = cyc + 4;
    // Phase A: the 16x16 example.
    active[0][0] = 1;
    foreach (hdr[0][0][p]) hdr[0][0][p] = (p inside {2, 3, 4, 5, 9, 11, 15});
    start[0] = t; phase[0] = 1;
    t += FRAME_IN + LAT + FRAME_OUT + 4;
    // Phase B: single sources, random headers.
    for (int s = 1; s < 28; s++) begin
      automatic int src = $urandom_range(N - 1);
      active[s][src] = 1;
      case (s)
        1: hdr[s][src] = '0;           // nothing requested: discard
        2: hdr[s][src] = '1;           // broadcast
        3: hdr[s][src] = N'(1);        // unicast to port 0
        default: hdr[s][src] = N'($urandom);
      endcase
      start[s] = t;
      // every fourth slot follows the previous one without an idle clock
      if (s % 4 == 0) begin
        phase[s] = 2;
        start[s] = start[s-1] + FRAME_IN;
        n_b2b++;
      end else begin
        phase[s] = 1;
      end
      t = start[s] + FRAME_IN + LAT + FRAME_OUT + 4;
      if (s % 4 == 3) t = start[s] + FRAME_IN;  // next slot starts back to back
    end
    // Fix slot phases: a slot followed back to back is still checked
    // exactly; the control-pair check needs the slot to be alone in flight.
    for (int s = 1; s < 28; s++) if (s % 4 == 3) phase[s] = 2;
    // Phase C: contention.
    for (int s = 28; s < NSLOT; s++) begin
      automatic int nsrc = $urandom_range(2, 6);
      for (int k = 0; k < nsrc; k++) begin
        automatic int src = $urandom_range(N - 1);
        active[s][src] = 1;
        hdr[s][src] = N'($urandom) & N'($urandom);
      end
      if (s == 28) begin   // two sources asking for the same single port
        for (int p = 0; p < N; p++) active[s][p] = 0;
        active[s][0] = 1; active[s][5] = 1;
        hdr[s][0] = N'(1 << 7); hdr[s][5] = N'(1 << 7);
      end
      start[s] = t; phase[s] = 3;
      t += FRAME_IN + LAT + FRAME_OUT + 4;
    end
    nslots = NSLOT;

    for (int s = 0; s < NSLOT; s++) begin
      capture_and_check(s);
      if (s == 0) begin
        int got [STAGES][4];
        tree_counts(hdr[0][0], got);
        for (int i = 0; i < STAGES; i++)
          for (int c = 1; c < 4; c++)
            check(got[i][c] == ex16_cnt[i][c],
                  $sformatf("example tree stage %0d code %0d", i, c));
      end
    end

    $display("mechanisms: copy=%0d upper=%0d lower=%0d discard=%0d collision=%0d back_to_back=%0d",
             n_copy, n_upper, n_lower, n_discard, n_collision, n_b2b);
    check(n_copy > 0,      "copy never happened");
    check(n_upper > 0,     "upper-only never happened");
    check(n_lower > 0,     "lower-only never happened");
    check(n_discard > 0,   "discard never happened");
    check(n_collision > 0, "collision never happened");
    check(n_b2b > 0,       "back-to-back cells never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
