// Testbench of the transposition switch.
//
// Presents row outputs and column-1 taps whose values encode their source
// (row, cycle), and emits block markers the way the array does: for a 4x4
// block the marker leaves PE(0,3) at t0 and column k must then show row m
// at t0+k+m; for a 2x2 pair the marker leaves PE(0,1) at t0 and PE(0,3) at
// t0+2, columns 0-1 must show tap row m at t0+k+m and columns 2-3 row m at
// t0+2+(k-2)+m. Blocks of both kinds follow each other at random spacings
// (at least the kernel's 8 / 4 cycle period); enable drops freeze time.
// Base setup (four rows); the delay elements of the reduced setups are
// tested on their own and end to end.
//
// The selection pattern checked is the original memory-free transposition;
// the marker timing of the 2x2 mode is this design's own.
module tb_utc_transpose_switch;
  import utc_pkg::*;

  localparam int NCYC = 20000;

  logic         clk = 1'b0, rst, en;
  word_t        row_acc [N];
  word_t        tap_acc [2];
  logic         row_new, tap_new;
  logic [N-1:0] is_h2;
  logic [1:0]   vec [N];
  word_t        fb [N];

  utc_transpose_switch dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n4 = 0, n2 = 0;

  // schedule, indexed by enabled cycle
  logic rn  [NCYC + 16];
  logic tn  [NCYC + 16];
  int   src [NCYC + 16][N];   // -1: no check, 0..3 row, 10..11 tap
  logic h2  [NCYC + 16][N];

  initial begin
    int t;
    for (int i = 0; i < NCYC + 16; i++) begin
      rn[i] = 0; tn[i] = 0;
      for (int k = 0; k < N; k++) begin src[i][k] = -1; h2[i][k] = 0; end
    end
    t = 5;
    while (t < NCYC - 20) begin
      if ($urandom_range(1)) begin
        n4++;
        rn[t] = 1;
        for (int m = 0; m < 4; m++) for (int k = 0; k < 4; k++) src[t+k+m][k] = m;
        t += 8 + $urandom_range(3);
      end else begin
        n2++;
        tn[t] = 1; rn[t+2] = 1;
        for (int m = 0; m < 2; m++) begin
          for (int k = 0; k < 2; k++) begin
            src[t+k+m][k] = 10 + m;     h2[t+k+m][k] = 1;
            src[t+2+k+m][k+2] = m;      h2[t+2+k+m][k+2] = 1;
          end
        end
        t += 4 + $urandom_range(3);
      end
    end
  end

  int ec = 0;   // enabled-cycle index
  initial begin
    rst = 1'b1; en = 1'b1; row_new = 0; tap_new = 0; is_h2 = '0;
    for (int k = 0; k < N; k++) vec[k] = '0;
    for (int r = 0; r < N; r++) row_acc[r] = '0;
    tap_acc[0] = '0; tap_acc[1] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    while (ec < NCYC) begin
      en = ($urandom_range(9) != 0);
      row_new = rn[ec] & en;
      tap_new = tn[ec] & en;
      for (int r = 0; r < N; r++) row_acc[r] = word_t'(r * 100000 + ec);
      tap_acc[0] = word_t'(10 * 100000 + ec);
      tap_acc[1] = word_t'(11 * 100000 + ec);
      for (int k = 0; k < N; k++) is_h2[k] = h2[ec][k];
      #1;
      if (en) begin
        for (int k = 0; k < N; k++) begin
          if (src[ec][k] >= 0) begin
            checks++;
            if (fb[k] !== word_t'(src[ec][k] * 100000 + ec)) begin
              failures++;
              $display("FAIL cycle %0d column %0d: got %0d expected source %0d", ec, k, fb[k], src[ec][k]);
            end
          end
        end
      end
      @(posedge clk);
      if (en) ec++;
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
    repeat (2 * NCYC + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
