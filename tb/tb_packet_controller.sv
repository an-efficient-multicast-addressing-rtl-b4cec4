// tb_packet_controller: checks header splitting and cell replication.
//
// Default size (16-bit header, 424-bit body). The testbench supplies C(U)
// and C(L) itself, changing them H+1 clocks after each cell's first bit as
// the RPHOR logic would, and builds the expected upper and lower streams
// clock by clock: upper = first header half + body, lower = second header
// half + body, each starting H+1 clocks after the cell's first bit, present
// only when its control bit is set. Some cells follow back to back.
module tb_packet_controller;
  import rphor_pkg::*;

  localparam int H     = 16;
  localparam int HH    = H / 2;
  localparam int CELL  = ATM_CELL_BITS;
  localparam int FIN   = H + CELL;
  localparam int FOUT  = HH + CELL;
  localparam int NCELL = 24;
  localparam int LEN   = NCELL * (FIN + 40) + 2 * FIN;

  logic clk = 1'b0;
  logic rst_n;
  link_t in, up, lo;
  logic c_u, c_l;

  packet_controller dut (
    .clk(clk), .rst_n(rst_n), .in(in), .c_u(c_u), .c_l(c_l), .up(up), .lo(lo)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Per-clock stimulus and expectation.
  link_t stim   [LEN];
  logic  set_c  [LEN];
  logic  cu_at  [LEN];
  logic  cl_at  [LEN];
  link_t exp_up [LEN];
  link_t exp_lo [LEN];

  int n_copy = 0, n_up = 0, n_lo = 0, n_none = 0;

  initial begin
    int t;
    for (int c = 0; c < LEN; c++) begin
      stim[c] = '0; set_c[c] = 0; cu_at[c] = 0; cl_at[c] = 0;
      exp_up[c] = '0; exp_lo[c] = '0;
    end
    t = 4;
    for (int k = 0; k < NCELL; k++) begin
      automatic logic [H-1:0]    hdr  = H'($urandom);
      automatic logic [CELL-1:0] body;
      automatic logic cu = (k % 4 == 0) || (k % 4 == 1);
      automatic logic cl = (k % 4 == 0) || (k % 4 == 2);
      for (int w = 0; w < CELL; w += 32) body[w +: 32] = $urandom;
      for (int i = 0; i < FIN; i++) begin
        stim[t+i].vld = 1;
        stim[t+i].dat = (i < H) ? hdr[i] : body[i-H];
      end
      set_c[t+H+1] = 1; cu_at[t+H+1] = cu; cl_at[t+H+1] = cl;
      for (int m = 0; m < FOUT; m++) begin
        if (cu) exp_up[t+H+1+m] = '{vld: 1'b1, dat: (m < HH) ? hdr[m] : body[m-HH]};
        if (cl) exp_lo[t+H+1+m] = '{vld: 1'b1, dat: (m < HH) ? hdr[HH+m] : body[m-HH]};
      end
      if (cu && cl) n_copy++; else if (cu) n_up++; else if (cl) n_lo++; else n_none++;
      // cells 5..8 and 13..16 follow back to back
      t += ((k % 8) inside {5, 6, 7}) ? FIN : FIN + $urandom_range(1, 30);
    end
  end

  initial begin
    rst_n = 0; in = '0; c_u = 0; c_l = 0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < LEN; c++) begin
      in = stim[c];
      if (set_c[c]) begin c_u = cu_at[c]; c_l = cl_at[c]; end
      #1;
      checks++;
      if (up !== exp_up[c] || lo !== exp_lo[c]) begin
        failures++;
        if (failures < 10)
          $display("FAIL clock %0d: up=%b lo=%b want up=%b lo=%b", c, up, lo, exp_up[c], exp_lo[c]);
      end
      @(negedge clk);
    end
    if (n_copy == 0 || n_up == 0 || n_lo == 0 || n_none == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (LEN + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
