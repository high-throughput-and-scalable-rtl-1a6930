// End-to-end test of the reduced array setups: runs the kernel with two rows
// of PEs and with one row side by side, each on its own random block stream
// (all four transform types, gaps, enable drops, clear requests), and
// reports the sum of their checks. Latencies expected: 20 / 8 cycles (two
// rows) and 35 / 11 cycles (one row) for a 4x4 block / 2x2 pair; block
// spacing 16 / 4 and 32 / 8 cycles.
//
// The block spacings (twice and four times the base period for 4x4 blocks,
// unchanged on two rows and doubled on one row for 2x2 pairs) follow the
// original setups; the latencies follow from this design's schedule.
module tb_utc_scaled;

  localparam int WATCHDOG = 400000;

  logic done2, done1;
  int   c2, f2, c1, f1;
  logic clk = 1'b0;

  always #5 clk = ~clk;

  tb_utc_top_core #(.ROWS(2)) u_rows2 (.done(done2), .n_checks(c2), .n_failures(f2));
  tb_utc_top_core #(.ROWS(1)) u_rows1 (.done(done1), .n_checks(c1), .n_failures(f1));

  initial begin
    int n;
    n = 0;
    @(posedge clk);   // let both cores clear their done flags first
    while (!(done2 && done1) && n < WATCHDOG) begin
      @(posedge clk);
      n++;
    end
    if (done2 && done1)
      $display("TB_RESULT checks=%0d failures=%0d", c2 + c1, f2 + f1);
    else
      $display("TB_RESULT checks=%0d failures=%0d", c2 + c1, f2 + f1 + 1);
    $finish;
  end

endmodule
