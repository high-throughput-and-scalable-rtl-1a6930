// Workload test: whole 4:2:0 macroblocks through the kernel at its default
// size, as a video encoder would use it.
//
// Each macroblock holds sixteen 4x4 luma residue blocks (raster order) and
// four 4x4 blocks of each chroma component, with random 9-bit residues. All
// 24 blocks go through the forward DCT back to back. As soon as the kernel has
// delivered the sixteen luma results, their DC coefficients, taken from the
// kernel's own outputs, form a 4x4 block for the Hadamard transform. As soon
// as the chroma results are out, the 2x2 DC blocks of the two chroma
// components go in as one 2x2 Hadamard pair (first component left, second
// right). Every result is compared with a reference computed here (integer
// tables, rows first, then columns).
//
// Timing checked per macroblock: the 24 DCT blocks and the luma Hadamard
// block start exactly 8 cycles apart, with no gap, and the chroma Hadamard
// pair starts within a few cycles of the last chroma result, the time its two
// lines need to be loaded. The macroblock time (first block start to last
// result) is reported: 24*8 + 8 + 4 = 204 cycles of issue, plus the few
// cycles the chroma pair waits for its inputs (210 cycles in all).
//
// The transform set, the 8-cycle block period and 14-cycle latency follow the
// original design; the macroblock order and the raster placement of the luma
// DC values are this test's own.
module tb_utc_macroblock;
  import utc_pkg::*;

  localparam int NMB      = 30;
  localparam int PAIR_MAX = 4;    // cycles allowed from last chroma result to pair start
  localparam int WATCHDOG = 40000;

  logic         clk = 1'b0;
  logic         rst, en, clr_req, in_valid, in_ready;
  word_t        in_line [N];
  ttype_t       in_type;
  logic [N-1:0] out_valid, out_h2;
  word_t        out_data [N];
  logic         busy;

  utc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;

  // ---------------- reference model ----------------
  // coefficient tables, times two so that 1/2 is an integer
  int tbl [4][4][4];
  initial begin
    tbl[0] = '{'{2, 2, 2, 2}, '{4, 2,-2,-4}, '{2,-2,-2, 2}, '{2,-4, 4,-2}};
    tbl[1] = '{'{2, 2, 2, 1}, '{2, 1,-2,-2}, '{2,-1,-2, 2}, '{2,-2, 2,-1}};
    tbl[2] = '{'{2, 2, 2, 2}, '{2, 2,-2,-2}, '{2,-2,-2, 2}, '{2,-2, 2,-2}};
    tbl[3] = '{'{2, 2, 0, 0}, '{2,-2, 0, 0}, '{0, 0, 0, 0}, '{0, 0, 0, 0}};
  end

  function automatic int cmul(int c2, int x);
    case (c2)
      0:  return 0;
      1:  return x >>> 1;
      -1: return -(x >>> 1);
      2:  return x;
      -2: return -x;
      4:  return 2 * x;
      -4: return -2 * x;
      default: return 0;
    endcase
  endfunction

  function automatic void t1d(int t, int n, input int v[4], output int o[4]);
    for (int i = 0; i < 4; i++) begin
      o[i] = 0;
      if (i < n) for (int k = 0; k < n; k++) o[i] += cmul(tbl[t][i][k], v[k]);
    end
  endfunction

  // 2-D transform of an n x n block: rows, then columns. y[i][j] = Y row i col j
  function automatic void t2d(int t, int n, input int x[4][4], output int y[4][4]);
    int w[4][4];
    int col[4], o[4], r[4];
    for (int j = 0; j < n; j++) begin
      r = x[j];
      t1d(t, n, r, o);
      w[j] = o;
    end
    for (int m = 0; m < n; m++) begin
      for (int k = 0; k < 4; k++) col[k] = (k < n) ? w[k][m] : 0;
      t1d(t, n, col, o);
      for (int i = 0; i < 4; i++) y[i][m] = o[i];
    end
  endfunction

  // ---------------- blocks in flight ----------------
  typedef struct { word_t d[N]; ttype_t t; } line_t;
  line_t lq[$];
  typedef struct { int v; int blk; } exp_t;
  exp_t  expq[N][$];
  int    blk_left[int];    // results still due, per block number
  int    dc_got[int];      // coefficient (0,0) as delivered, per 4x4 block
  int    lane0_seen[int];  // results seen on lane 0, per block
  int    start_at[int];    // start cycle, per block
  int    done_at[int];     // cycle of the last result, per block
  int    nblk_gen = 0, nblk_start = 0;
  int    n_type[4];

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom_range(hi - lo));
  endfunction

  // queue a 4x4 block of type t; ref_y returns the reference result
  task automatic add4(int t, input int x[4][4], output int ref_y[4][4]);
    line_t l;
    t2d(t, 4, x, ref_y);
    for (int r = 0; r < 4; r++) for (int m = 0; m < 4; m++) expq[r].push_back('{ref_y[r][m], nblk_gen});
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) l.d[j] = x[i][j];
      l.t = ttype_t'(t);
      lq.push_back(l);
    end
    blk_left[nblk_gen] = 16;
    lane0_seen[nblk_gen] = 0;
    n_type[t]++;
    nblk_gen++;
  endtask

  // queue a 2x2 Hadamard pair: a (left) and b (right)
  task automatic add2(input int a[4][4], input int b[4][4]);
    line_t l;
    int ya[4][4], yb[4][4];
    t2d(3, 2, a, ya);
    t2d(3, 2, b, yb);
    for (int m = 0; m < 2; m++) begin
      expq[0].push_back('{ya[0][m], nblk_gen}); expq[1].push_back('{ya[1][m], nblk_gen});
      expq[2].push_back('{yb[0][m], nblk_gen}); expq[3].push_back('{yb[1][m], nblk_gen});
    end
    for (int i = 0; i < 2; i++) begin
      l.d[0] = a[i][0]; l.d[1] = a[i][1]; l.d[2] = b[i][0]; l.d[3] = b[i][1];
      l.t = T_HAD2;
      lq.push_back(l);
    end
    blk_left[nblk_gen] = 8;
    lane0_seen[nblk_gen] = 0;
    n_type[3]++;
    nblk_gen++;
  endtask

  // ---------------- driver and monitor ----------------
  always_comb begin
    in_valid = 1'b0;
    in_type  = T_FDCT;
    for (int j = 0; j < N; j++) in_line[j] = '0;
    if (lq.size() > 0 && !rst) begin
      in_valid = 1'b1;
      in_line  = lq[0].d;
      in_type  = lq[0].t;
    end
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst) begin
      if (in_valid && in_ready) void'(lq.pop_front());
      if (en && dut.u_ctrl.new_blk) begin
        start_at[nblk_start] = cycle;
        nblk_start++;
      end
      for (int r = 0; r < N; r++) begin
        if (out_valid[r]) begin
          exp_t e;
          checks++;
          if (expq[r].size() == 0) begin
            failures++;
            $display("FAIL: unexpected result on lane %0d at cycle %0d", r, cycle);
          end else begin
            e = expq[r].pop_front();
            if (out_data[r] != word_t'(e.v)) begin
              failures++;
              if (failures < 20)
                $display("FAIL: block %0d lane %0d got %0d expected %0d", e.blk, r, out_data[r], e.v);
            end
            if (r == 0) begin
              if (lane0_seen[e.blk] == 0) dc_got[e.blk] = int'(out_data[r]);
              lane0_seen[e.blk]++;
            end
            blk_left[e.blk]--;
            if (blk_left[e.blk] == 0) done_at[e.blk] = cycle;
          end
        end
      end
    end
  end

  // ---------------- macroblocks ----------------
  task automatic wait_done(int b);
    while (!(blk_left.exists(b) && blk_left[b] == 0)) @(posedge clk);
    #1;
  endtask

  int mb_cycles_min = 1 << 30, mb_cycles_max = 0, n_b2b = 0, n_pair_wait = 0;

  initial begin
    int x[4][4], y[4][4], dcl[4][4], dcc[2][4][4];
    int b0, bh4, bh2;
    rst = 1'b1; en = 1'b1; clr_req = 1'b0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    for (int mb = 0; mb < NMB; mb++) begin
      b0 = nblk_gen;
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
        dcl[i][j] = 0; dcc[0][i][j] = 0; dcc[1][i][j] = 0;
      end
      // 16 luma + 4 + 4 chroma blocks, forward DCT
      for (int k = 0; k < 24; k++) begin
        for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) x[i][j] = rnd(-255, 255);
        add4(0, x, y);
      end
      // luma DC block, from the kernel's results, once they are all out
      wait_done(b0 + 15);
      for (int k = 0; k < 16; k++) dcl[k / 4][k % 4] = dc_got[b0 + k];
      bh4 = nblk_gen;
      add4(2, dcl, y);
      // chroma DC pair
      wait_done(b0 + 23);
      for (int c = 0; c < 2; c++)
        for (int k = 0; k < 4; k++) dcc[c][k / 2][k % 2] = dc_got[b0 + 16 + 4 * c + k];
      bh2 = nblk_gen;
      add2(dcc[0], dcc[1]);
      wait_done(bh2);

      // timing: 24 DCT blocks and the luma Hadamard back to back
      for (int b = b0 + 1; b <= bh4; b++) begin
        checks++;
        if (start_at[b] - start_at[b - 1] != 8) begin
          failures++;
          $display("FAIL: macroblock %0d block %0d started %0d cycles after the previous one",
                   mb, b - b0, start_at[b] - start_at[b - 1]);
        end else n_b2b++;
      end
      checks++;
      if (start_at[bh2] <= done_at[b0 + 23] || start_at[bh2] - done_at[b0 + 23] > PAIR_MAX) begin
        failures++;
        $display("FAIL: macroblock %0d chroma DC pair started %0d cycles after the chroma results",
                 mb, start_at[bh2] - done_at[b0 + 23]);
      end else n_pair_wait++;
      checks++;
      if (done_at[bh4] - start_at[bh4] != 14) begin
        failures++;
        $display("FAIL: luma Hadamard latency %0d", done_at[bh4] - start_at[bh4]);
      end
      if (done_at[bh2] - start_at[b0] < mb_cycles_min) mb_cycles_min = done_at[bh2] - start_at[b0];
      if (done_at[bh2] - start_at[b0] > mb_cycles_max) mb_cycles_max = done_at[bh2] - start_at[b0];
    end

    for (int r = 0; r < N; r++) begin
      checks++;
      if (expq[r].size() != 0) begin
        failures++;
        $display("FAIL: lane %0d still expects %0d results", r, expq[r].size());
      end
    end
    // every block type and mechanism of the workload must have occurred
    checks++;
    if (n_type[0] != 24 * NMB || n_type[2] != NMB || n_type[3] != NMB || n_b2b == 0 || n_pair_wait == 0) begin
      failures++;
      $display("FAIL: workload incomplete");
    end
    $display("macroblocks=%0d cycles per macroblock=%0d..%0d (issue %0d) back-to-back=%0d",
             NMB, mb_cycles_min, mb_cycles_max, 24 * 8 + 8 + 4, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
