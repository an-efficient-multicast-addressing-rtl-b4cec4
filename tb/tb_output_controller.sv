// tb_output_controller: checks the link arbiter at its default frame length.
//
// Slot-aligned frames arrive on none, one or both request inputs; some slots
// follow back to back. A lone request must win; when both request, the grant
// must alternate between the inputs from one contended slot to the next,
// starting with input 0, and the collision flag must pulse once. The output
// is the winner's stream delayed by one clock, checked clock by clock.
module tb_output_controller;
  import rphor_pkg::*;

  localparam int FRAME = 8 + ATM_CELL_BITS;   // the controller's default
  localparam int NSLOT = 40;
  localparam int LEN   = NSLOT * (FRAME + 20) + 2 * FRAME;

  logic clk = 1'b0;
  logic rst_n;
  link_t req0, req1, out;
  logic collision;

  output_controller dut (
    .clk(clk), .rst_n(rst_n), .req0(req0), .req1(req1),
    .out(out), .collision(collision)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  link_t s0 [LEN];
  link_t s1 [LEN];
  link_t exp_out [LEN];
  logic  exp_col [LEN];
  int    n_col = 0, n_alone = 0;

  initial begin
    int t;
    bit turn;
    for (int c = 0; c < LEN; c++) begin
      s0[c] = '0; s1[c] = '0; exp_out[c] = '0; exp_col[c] = 0;
    end
    t = 4;
    turn = 0;
    for (int k = 0; k < NSLOT; k++) begin
      automatic int  kind = $urandom_range(0, 3);   // bit0: req0, bit1: req1
      automatic bit  win;
      if (k < 4) kind = k;
      for (int b = 0; b < FRAME; b++) begin
        s0[t+b] = '{vld: kind[0], dat: kind[0] & 1'($urandom)};
        s1[t+b] = '{vld: kind[1], dat: kind[1] & 1'($urandom)};
      end
      if (kind == 3) begin
        win = turn;
        turn = ~turn;
        exp_col[t+1] = 1;
        n_col++;
      end else begin
        win = (kind == 2);
        if (kind != 0) n_alone++;
      end
      for (int b = 0; b < FRAME; b++) exp_out[t+b+1] = win ? s1[t+b] : s0[t+b];
      t += (k % 5 == 2) ? FRAME : FRAME + $urandom_range(1, 15);
    end
  end

  initial begin
    rst_n = 0; req0 = '0; req1 = '0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < LEN; c++) begin
      req0 = s0[c];
      req1 = s1[c];
      #1;
      checks++;
      if (out !== exp_out[c] || collision !== exp_col[c]) begin
        failures++;
        if (failures < 10)
          $display("FAIL clock %0d: out=%b col=%b want out=%b col=%b",
                   c, out, collision, exp_out[c], exp_col[c]);
      end
      @(negedge clk);
    end
    if (n_col == 0 || n_alone == 0) failures++;
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
