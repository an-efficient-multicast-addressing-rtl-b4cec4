// tb_input_controller: checks one input controller (RPHOR logic, strobe
// counter and packet controller together) at the default size.
//
// Random cells, some back to back, enter the controller. The expected control
// bits are the OR of each header half, worked out here; the expected streams
// are the split header halves plus the body, starting H+1 clocks after the
// cell's first bit, on the links whose control bit is set. Streams are
// compared clock by clock, control bits at the first clock of each outgoing
// frame.
module tb_input_controller;
  import rphor_pkg::*;

  localparam int H     = 16;
  localparam int HH    = H / 2;
  localparam int CELL  = ATM_CELL_BITS;
  localparam int FIN   = H + CELL;
  localparam int FOUT  = HH + CELL;
  localparam int NCELL = 32;
  localparam int LEN   = NCELL * (FIN + 40) + 2 * FIN;

  logic clk = 1'b0;
  logic rst_n;
  link_t in, up, lo;
  logic c_u, c_l;

  input_controller dut (
    .clk(clk), .rst_n(rst_n), .in(in), .up(up), .lo(lo), .c_u(c_u), .c_l(c_l)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  link_t stim   [LEN];
  link_t exp_up [LEN];
  link_t exp_lo [LEN];
  logic  chk_c  [LEN];
  logic  exp_cu [LEN];
  logic  exp_cl [LEN];

  int n_kind [4] = '{0, 0, 0, 0};

  initial begin
    int t;
    for (int c = 0; c < LEN; c++) begin
      stim[c] = '0; exp_up[c] = '0; exp_lo[c] = '0;
      chk_c[c] = 0; exp_cu[c] = 0; exp_cl[c] = 0;
    end
    t = 4;
    for (int k = 0; k < NCELL; k++) begin
      automatic logic [H-1:0]    hdr;
      automatic logic [CELL-1:0] body;
      automatic logic cu, cl;
      case (k % 4)
        0: hdr = H'($urandom) | H'(1) | H'(1 << HH);   // both halves busy
        1: hdr = H'($urandom) & H'((1 << HH) - 1) | H'(1 << (HH - 1));
        2: hdr = (H'($urandom) << HH) | H'(1 << (H - 1));
        default: hdr = '0;
      endcase
      for (int w = 0; w < CELL; w += 32) body[w +: 32] = $urandom;
      cu = |hdr[HH-1:0];
      cl = |hdr[H-1:HH];
      n_kind[{cu, cl}]++;
      for (int i = 0; i < FIN; i++) begin
        stim[t+i].vld = 1;
        stim[t+i].dat = (i < H) ? hdr[i] : body[i-H];
      end
      chk_c[t+H+1] = 1; exp_cu[t+H+1] = cu; exp_cl[t+H+1] = cl;
      for (int m = 0; m < FOUT; m++) begin
        if (cu) exp_up[t+H+1+m] = '{vld: 1'b1, dat: (m < HH) ? hdr[m] : body[m-HH]};
        if (cl) exp_lo[t+H+1+m] = '{vld: 1'b1, dat: (m < HH) ? hdr[HH+m] : body[m-HH]};
      end
      t += ((k % 8) inside {3, 4, 5}) ? FIN : FIN + $urandom_range(1, 30);
    end
  end

  initial begin
    rst_n = 0; in = '0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < LEN; c++) begin
      in = stim[c];
      #1;
      checks++;
      if (up !== exp_up[c] || lo !== exp_lo[c]) begin
        failures++;
        if (failures < 10)
          $display("FAIL clock %0d: up=%b lo=%b want up=%b lo=%b", c, up, lo, exp_up[c], exp_lo[c]);
      end
      if (chk_c[c]) begin
        checks++;
        if (c_u !== exp_cu[c] || c_l !== exp_cl[c]) begin
          failures++;
          $display("FAIL clock %0d: C=%b%b want %b%b", c, c_u, c_l, exp_cu[c], exp_cl[c]);
        end
      end
      @(negedge clk);
    end
    for (int k = 0; k < 4; k++) if (n_kind[k] == 0) failures++;
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
