// tb_rphor_table_sizes: runs the copy network at the smallest port count of
// the header-size comparison (32 ports, 424-bit cell bodies) with several
// random multicast cells, each checked at every output port. More sizes can
// be added to SIZES; each one costs a separate network in the build, and
// the build time grows steeply with N (about 1 minute at N = 32,
// over 7 minutes at N = 64).
module tb_rphor_table_sizes;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  localparam int NSIZE = 1;
  localparam int SIZES [NSIZE] = '{32};

  logic done [NSIZE];
  int   chk  [NSIZE];
  int   fail [NSIZE];

  for (genvar i = 0; i < NSIZE; i++) begin : g_size
    rphor_net_exerciser #(.N(SIZES[i]), .NCELL(6)) u_ex (
      .clk(clk), .rst_n(rst_n), .done(done[i]), .checks(chk[i]), .failures(fail[i])
    );
  end

  initial begin
    int checks, failures;
    bit all_done;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    do begin
      @(negedge clk);
      all_done = 1;
      for (int i = 0; i < NSIZE; i++) all_done &= done[i];
    end while (!all_done);
    checks = 0; failures = 0;
    for (int i = 0; i < NSIZE; i++) begin
      $display("N=%0d: checks=%0d failures=%0d", SIZES[i], chk[i], fail[i]);
      checks += chk[i];
      failures += fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

endmodule
