// Testbench of the 4x4 PE array as a 1-D transform engine.
//
// Issues a random vector (random transform type, random gaps) into the
// top-left corner each cycle, presenting element c on column c exactly c
// cycles after element 0 as the wavefront requires, and checks that row r
// delivers coefficient r of the 1-D transform r+4 cycles after issue (the
// 1-D latency of 4 cycles for row 0), that for the 2x2 Hadamard the taps after
// column 1 deliver the left 2-point result after r+2 cycles and the right
// edge the right one after r+4, and that the block marker leaves PE(0,3) and
// PE(0,1) with the vector it was issued with. A two-row array runs beside it
// on the same vectors, each given a random sweep number w, and its row r must
// deliver coefficient 2*w + r. It also counts full-rate issue (one vector
// per cycle, 4 values per cycle).
//
// The 4-cycle 1-D latency and 4 values per cycle are the original figures;
// the tap timing of the 2x2 mode is this design's own.
module tb_utc_pe_array;
  import utc_pkg::*;

  localparam int NCYC = 20000;

  logic   clk = 1'b0, rst, en, calc, clr, new_blk;
  word_t  x_top [N];
  ttype_t type_t;
  logic [1:0] sweep;
  word_t  row_acc [N];
  word_t  tap_acc [2];
  logic   row_new, tap_new;

  utc_pe_array dut (.*);

  // a two-row array on the same vectors, each with a random sweep number
  logic [1:0] sweep2;
  word_t  row_acc2 [2];
  word_t  tap_acc2 [2];
  logic   row_new2, tap_new2;

  utc_pe_array #(.ROWS(2)) dut2 (
    .clk, .rst, .en, .x_top, .calc, .clr, .new_blk, .type_t, .sweep(sweep2),
    .row_acc(row_acc2), .tap_acc(tap_acc2), .row_new(row_new2), .tap_new(tap_new2)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, full_rate = 0;

  int tbl [4][4][4];
  initial begin
    tbl[0] = '{'{2, 2, 2, 2}, '{4, 2,-2,-4}, '{2,-2,-2, 2}, '{2,-4, 4,-2}};
    tbl[1] = '{'{2, 2, 2, 1}, '{2, 1,-2,-2}, '{2,-1,-2, 2}, '{2,-2, 2,-1}};
    tbl[2] = '{'{2, 2, 2, 2}, '{2, 2,-2,-2}, '{2,-2,-2, 2}, '{2,-2, 2,-2}};
    tbl[3] = '{'{2, 2, 0, 0}, '{2,-2, 0, 0}, '{0, 0, 0, 0}, '{0, 0, 0, 0}};
  end

  function automatic int cmul(int c2, int x);
    case (c2)
      1:  return x >>> 1;
      -1: return -(x >>> 1);
      2:  return x;
      -2: return -x;
      4:  return 2 * x;
      -4: return -2 * x;
      default: return 0;
    endcase
  endfunction

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // issued vectors by cycle
  int     vv   [NCYC][4];
  logic   vok  [NCYC];
  logic   vnew [NCYC];
  int     vty  [NCYC];
  int     vsw  [NCYC];

  // coefficient i of the 1-D transform of the vector issued at s
  function automatic int coef_of(int s, int i);
    int e;
    e = 0;
    if (vty[s] == 3) begin
      if (i < 2) for (int k = 0; k < 2; k++) e += cmul(tbl[3][i][k], vv[s][k+2]);
    end else begin
      for (int k = 0; k < 4; k++) e += cmul(tbl[vty[s]][i][k], vv[s][k]);
    end
    return e;
  endfunction

  initial begin
    rst = 1'b1; en = 1'b1; sweep = '0; sweep2 = '0; calc = 0; clr = 0; new_blk = 0; type_t = T_FDCT;
    for (int c = 0; c < N; c++) x_top[c] = '0;
    for (int t = 0; t < NCYC; t++) begin
      vok[t] = ($urandom_range(9) != 0);
      vnew[t] = 1'($urandom_range(1));
      vty[t] = $urandom_range(3);
      vsw[t] = $urandom_range(1);
      for (int c = 0; c < 4; c++) vv[t][c] = int'($urandom_range(20000)) - 10000;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int t = 0; t < NCYC; t++) begin
      // drive at the start of cycle t
      calc    = vok[t];
      new_blk = vok[t] & vnew[t];
      type_t  = ttype_t'(vty[t]);
      sweep2  = 2'(vsw[t]);
      for (int c = 0; c < N; c++) x_top[c] = (t >= c) ? word_t'(vv[t-c][c]) : '0;
      if (t > 0 && vok[t] && vok[t-1]) full_rate++;
      @(posedge clk);
      #1;
      // results visible now belong to cycle t+1; vector issued at s shows on
      // row r at s+4+r, i.e. s = t+1-4-r
      for (int r = 0; r < N; r++) begin
        int s;
        s = t + 1 - 4 - r;
        if (s >= 0 && vok[s]) begin
          int e;
          e = 0;
          if (vty[s] == 3) begin
            if (r < 2) for (int k = 0; k < 2; k++) e += cmul(tbl[3][r][k], vv[s][k+2]);
          end else begin
            for (int k = 0; k < 4; k++) e += cmul(tbl[vty[s]][r][k], vv[s][k]);
          end
          chk($sformatf("row %0d vector %0d", r, s), row_acc[r], e);
          if (r == 0) chk("row_new", int'(row_new), int'(vnew[s]));
        end
      end
      // two-row array: row r on sweep w gives coefficient 2*w + r
      for (int r = 0; r < 2; r++) begin
        int s;
        s = t + 1 - 4 - r;
        if (s >= 0 && vok[s]) begin
          chk($sformatf("2-row array row %0d vector %0d", r, s), row_acc2[r], coef_of(s, 2 * vsw[s] + r));
          if (r == 0) chk("2-row row_new", int'(row_new2), int'(vnew[s]));
        end
        s = t + 1 - 2 - r;
        if (s >= 0 && vok[s] && vty[s] == 3 && vsw[s] == 0) begin
          int e;
          e = 0;
          for (int k = 0; k < 2; k++) e += cmul(tbl[3][r][k], vv[s][k]);
          chk($sformatf("2-row array tap %0d vector %0d", r, s), tap_acc2[r], e);
        end
      end
      for (int r = 0; r < 2; r++) begin
        int s;
        s = t + 1 - 2 - r;
        if (s >= 0 && vok[s] && vty[s] == 3) begin
          int e;
          e = 0;
          for (int k = 0; k < 2; k++) e += cmul(tbl[3][r][k], vv[s][k]);
          chk($sformatf("tap %0d vector %0d", r, s), tap_acc[r], e);
          if (r == 0) chk("tap_new", int'(tap_new), int'(vnew[s]));
        end
      end
      @(negedge clk);
    end
    checks++;
    if (full_rate == 0) begin
      failures++;
      $display("FAIL: no back-to-back vectors issued");
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
