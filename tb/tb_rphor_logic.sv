// tb_rphor_logic: checks the bit-serial RPHOR logic on its own.
//
// The testbench produces the restart/capture strobes itself for header
// lengths 16, 8, 4 and 2 (every stage of a 16-port network), streams random
// headers (plus all-zero and all-one ones), some back to back, and checks
// that C(U) and C(L) equal the OR of the first and second header halves one
// clock after the last header bit has been captured, and that they hold.
module tb_rphor_logic;

  logic clk = 1'b0;
  logic rst_n;
  logic hdr_bit, clr, cnt0, cnt1;
  logic c_u, c_l;

  rphor_logic dut (
    .clk(clk), .rst_n(rst_n), .hdr_bit(hdr_bit), .clr(clr),
    .cnt0(cnt0), .cnt1(cnt1), .c_u(c_u), .c_l(c_l)
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

  // Send one header of h bits; return the expected pair.
  task automatic send(input int h, input logic [15:0] bits, input int gap);
    bit eu = 0, el = 0;
    for (int i = 0; i < h; i++) begin
      if (i < h / 2) eu |= bits[i]; else el |= bits[i];
    end
    // strobes lag the data by one clock
    for (int i = 0; i <= h; i++) begin
      hdr_bit = (i < h) ? bits[i] : 1'($urandom);
      clr  = (i >= 1) && ((i - 1) == 0 || (i - 1) == h / 2);
      cnt0 = (i >= 1) && ((i - 1) == h / 2 - 1);
      cnt1 = (i >= 1) && ((i - 1) == h - 1);
      @(negedge clk);
    end
    clr = 0; cnt0 = 0; cnt1 = 0;
    check(c_u == eu && c_l == el,
          $sformatf("h=%0d hdr=%b: got C=%b%b want %b%b", h, bits, c_u, c_l, eu, el));
    for (int g = 0; g < gap; g++) begin
      hdr_bit = 1'($urandom);
      @(negedge clk);
      check(c_u == eu && c_l == el, "control bits did not hold");
    end
  endtask

  initial begin
    rst_n = 0; hdr_bit = 0; clr = 0; cnt0 = 0; cnt1 = 0;
    repeat (3) @(negedge clk);
    check(c_u == 0 && c_l == 0, "reset value");
    rst_n = 1;
    @(negedge clk);
    for (int h = 16; h >= 2; h /= 2) begin
      send(h, 16'h0000, 2);
      send(h, 16'hFFFF, 2);
      send(h, 16'h0001, 1);                  // only P0
      send(h, 16'(1 << (h - 1)), 1);         // only the last bit
      send(h, 16'(1 << (h / 2)), 0);         // only the first lower bit
      for (int k = 0; k < 60; k++) send(h, 16'($urandom) & 16'($urandom), $urandom_range(0, 2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
