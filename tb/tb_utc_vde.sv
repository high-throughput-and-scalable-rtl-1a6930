// Testbench of the variable delay element, in the two-row setup (a left
// column, which takes the column-1 taps for 2x2 pairs) and in the one-row
// setup (a right column). Random markers start 4x4 blocks and 2x2 pairs; the
// row and tap inputs change every cycle. A model keeps the four expected
// register values from the write schedule (coefficient s*ROWS + r captured
// from array row r in cycle L*s + r after the marker, L = 4 or 2, S = 4/ROWS
// sweeps for a 4x4 block, 1 or 2 for a pair) and every cycle the output for
// a random read index is compared with it. Enable drops freeze both.
//
// Standing-data registers in the switch follow the original setups; the
// write schedule tested is this design's own.
module tb_utc_vde;
  import utc_pkg::*;

  localparam int NCYC = 20000;

  logic       clk = 1'b0, rst, en, restart, is_h2;
  word_t      row2 [2];
  word_t      tap2 [2];
  word_t      row1 [1];
  word_t      tap1 [1];
  logic [1:0] rd2, rd1;
  word_t      dout2, dout1;

  utc_vde #(.ROWS(2), .LEFT(1'b1)) dut2 (.clk, .rst, .en, .restart, .is_h2,
    .row_acc(row2), .tap_acc(tap2), .rd_idx(rd2), .dout(dout2));
  utc_vde #(.ROWS(1), .LEFT(1'b0)) dut1 (.clk, .rst, .en, .restart, .is_h2,
    .row_acc(row1), .tap_acc(tap1), .rd_idx(rd1), .dout(dout1));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n4 = 0, n2 = 0;

  // model state per instance: [0] two rows, [1] one row
  int   mreg [2][4];
  int   dcnt;          // cycles since the marker (shared)
  logic mh2;
  int   gap;

  function automatic int rows_of(int i);
    return (i == 0) ? 2 : 1;
  endfunction

  initial begin
    rst = 1'b1; en = 1'b1; restart = 0; is_h2 = 0; rd2 = 0; rd1 = 0;
    row2 = '{0, 0}; tap2 = '{0, 0}; row1 = '{0}; tap1 = '{0};
    for (int i = 0; i < 2; i++) for (int j = 0; j < 4; j++) mreg[i][j] = 0;
    dcnt = 1000; mh2 = 0; gap = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int t = 0; t < NCYC; t++) begin
      en = ($urandom_range(9) != 0);
      restart = 1'b0;
      if (gap == 0 && $urandom_range(3) == 0) begin
        restart = 1'b1;
        is_h2   = $urandom_range(1);
        gap     = is_h2 ? 4 : 16;
      end
      row2[0] = $urandom(); row2[1] = $urandom();
      tap2[0] = $urandom(); tap2[1] = $urandom();
      row1[0] = $urandom(); tap1[0] = $urandom();
      rd2 = 2'($urandom_range(3)); rd1 = 2'($urandom_range(3));
      #1;
      checks += 2;
      if (dout2 !== word_t'(mreg[0][rd2])) begin
        failures++;
        $display("FAIL cycle %0d two rows: reg %0d got %0d expected %0d", t, rd2, dout2, mreg[0][rd2]);
      end
      if (dout1 !== word_t'(mreg[1][rd1])) begin
        failures++;
        $display("FAIL cycle %0d one row: reg %0d got %0d expected %0d", t, rd1, dout1, mreg[1][rd1]);
      end
      @(posedge clk);
      if (en) begin
        if (restart) begin
          dcnt = 0; mh2 = is_h2;
          if (is_h2) n2++; else n4++;
        end
        for (int i = 0; i < 2; i++) begin
          int R, L, S, s, r;
          R = rows_of(i);
          L = mh2 ? 2 : 4;
          S = mh2 ? ((R == 1) ? 2 : 1) : 4 / R;
          s = dcnt / L;
          r = dcnt % L;
          if (s < S && r < R) begin
            if (i == 0) mreg[0][s * R + r] = mh2 ? int'(tap2[r]) : int'(row2[r]);
            else        mreg[1][s * R + r] = int'(row1[0]);
          end
        end
        dcnt++;
        if (gap > 0) gap--;
      end
      @(negedge clk);
    end
    checks++;
    if (n4 == 0 || n2 == 0) begin
      failures++;
      $display("FAIL: a block kind never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
