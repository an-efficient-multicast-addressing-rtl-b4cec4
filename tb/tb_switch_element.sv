// tb_switch_element: checks one radix-2 switching element at the default
// size (16-bit header, 424-bit body).
//
// Slot-aligned cells with random headers enter on one or both inputs, some
// slots back to back. For each output link the testbench works out which
// inputs want it (C(U) = OR of the first header half for the upper link,
// C(L) = OR of the second half for the lower link), applies the round-robin
// rule for contended slots, and expects the winner's header half and body,
// starting H+2 clocks after the slot's first bit. Outputs are compared clock
// by clock; collision flags and the control bits are checked too.
module tb_switch_element;
  import rphor_pkg::*;

  localparam int H     = 16;
  localparam int HH    = H / 2;
  localparam int CELL  = ATM_CELL_BITS;
  localparam int FIN   = H + CELL;
  localparam int FOUT  = HH + CELL;
  localparam int NSLOT = 40;
  localparam int LEN   = NSLOT * (FIN + 30) + 2 * FIN;

  logic clk = 1'b0;
  logic rst_n;
  link_t in0, in1, out0, out1;
  logic [1:0] collision, c_u, c_l;

  switch_element dut (
    .clk(clk), .rst_n(rst_n), .in0(in0), .in1(in1), .out0(out0), .out1(out1),
    .collision(collision), .c_u(c_u), .c_l(c_l)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  link_t      st    [LEN][2];
  link_t      eo    [LEN][2];
  logic [1:0] ecol  [LEN];
  logic [1:0] ecu   [LEN];
  logic [1:0] ecl   [LEN];
  logic [1:0] chk_c [LEN];
  int n_copy = 0, n_col = 0, n_b2b = 0;

  initial begin
    int t;
    bit turn [2];
    turn[0] = 0; turn[1] = 0;
    for (int c = 0; c < LEN; c++) begin
      st[c][0] = '0; st[c][1] = '0; eo[c][0] = '0; eo[c][1] = '0; ecol[c] = '0;
      ecu[c] = '0; ecl[c] = '0; chk_c[c] = '0;
    end
    t = 4;
    for (int k = 0; k < NSLOT; k++) begin
      automatic logic [H-1:0]    hdr  [2];
      automatic logic [CELL-1:0] body [2];
      automatic bit              act  [2];
      automatic bit              want [2][2];   // want[input][link]
      act[0] = (k % 3 != 1);
      act[1] = (k % 3 != 0);
      for (int i = 0; i < 2; i++) begin
        hdr[i] = H'($urandom) & H'($urandom);
        if (k % 7 == 3) hdr[i] = '1;   // both inputs broadcast
        for (int w = 0; w < CELL; w += 32) body[i][w +: 32] = $urandom;
        want[i][0] = act[i] && (|hdr[i][HH-1:0]);
        want[i][1] = act[i] && (|hdr[i][H-1:HH]);
        if (want[i][0] && want[i][1]) n_copy++;
        chk_c[t+H+1][i] = act[i];
        ecu[t+H+1][i]   = want[i][0];
        ecl[t+H+1][i]   = want[i][1];
        for (int b = 0; b < FIN; b++)
          st[t+b][i] = '{vld: act[i], dat: act[i] && ((b < H) ? hdr[i][b] : body[i][b-H])};
      end
      for (int l = 0; l < 2; l++) begin
        automatic int win = -1;
        if (want[0][l] && want[1][l]) begin
          win = turn[l];
          turn[l] = ~turn[l];
          ecol[t+H+2][l] = 1;
          n_col++;
        end else if (want[0][l]) win = 0;
        else if (want[1][l]) win = 1;
        if (win >= 0)
          for (int m = 0; m < FOUT; m++)
            eo[t+H+2+m][l] = '{vld: 1'b1,
                               dat: (m < HH) ? hdr[win][l*HH+m] : body[win][m-HH]};
      end
      if (k % 6 == 4) begin
        t += FIN;
        n_b2b++;
      end else begin
        t += FIN + $urandom_range(1, 25);
      end
    end
  end

  initial begin
    rst_n = 0; in0 = '0; in1 = '0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < LEN; c++) begin
      in0 = st[c][0];
      in1 = st[c][1];
      #1;
      checks++;
      if (out0 !== eo[c][0] || out1 !== eo[c][1] || collision !== ecol[c]) begin
        failures++;
        if (failures < 10)
          $display("FAIL clock %0d: out=%b/%b col=%b want %b/%b col=%b",
                   c, out0, out1, collision, eo[c][0], eo[c][1], ecol[c]);
      end
      for (int i = 0; i < 2; i++)
        if (chk_c[c][i]) begin
          checks++;
          if (c_u[i] !== ecu[c][i] || c_l[i] !== ecl[c][i]) begin
            failures++;
            $display("FAIL clock %0d: input %0d C=%b%b want %b%b",
                     c, i, c_u[i], c_l[i], ecu[c][i], ecl[c][i]);
          end
        end
      @(negedge clk);
    end
    if (n_copy == 0 || n_col == 0 || n_b2b == 0) failures++;
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
