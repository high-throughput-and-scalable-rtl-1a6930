// End-to-end testbench of the unified transform kernel at its default size.
//
// Generates a random stream of blocks of all four transform types (4x4
// forward DCT, inverse DCT, Hadamard, and 2x2 Hadamard pairs), feeds their
// lines through the in_valid/in_ready handshake with random gaps, random
// global-enable drops and clear requests between blocks, and compares every
// result lane with a reference 2-D transform computed here from integer
// coefficient tables (rows first, then columns; x1/2 as arithmetic shift).
// It also checks the latency of each block (14 cycles for 4x4, 8 for a 2x2
// pair, from block start to its last coefficient), the block spacing of a
// continuous stream (8 / 4 cycles) and that a clear request zeroes the
// accumulators. Each mechanism (every type, back-to-back blocks, waiting for
// input data, input back-pressure, enable drop, clear) is counted and must
// occur at least once.
//
// The 14-cycle latency and 8-cycle block period are the original figures;
// the 2x2 timings, the interface and the mechanisms counted belong to this
// design.
module tb_utc_top;
  import utc_pkg::*;

  localparam int NBLK     = 400;
  localparam int WATCHDOG = 200000;

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
  int ecycle = 0;   // cycles with the kernel enabled

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

  // 1-D transform of n points with table t
  function automatic void t1d(int t, int n, input int v[4], output int o[4]);
    for (int i = 0; i < 4; i++) begin
      o[i] = 0;
      if (i < n) for (int k = 0; k < n; k++) o[i] += cmul(tbl[t][i][k], v[k]);
    end
  endfunction

  // 2-D transform of an n x n block: rows, then columns. y[i][j] = Y row i col j
  function automatic void t2d(int t, int n, input int x[4][4], output int y[4][4]);
    int w[4][4];   // w[j] = transform of row j
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

  // ---------------- stimulus queues ----------------
  typedef struct { word_t d[N]; ttype_t t; } line_t;
  line_t lq[$];
  typedef struct { int v; int blk; } exp_t;
  exp_t  expq[N][$];
  int    blk_type_q[$];       // type of each block, in order
  int    blk_left[int];       // outputs still due, per block number
  int    start_at[int];       // start cycle, per block number
  int    blk_ty[int];         // type, per block number
  int    nblk_gen = 0, nblk_start = 0;

  int n_type[4];
  int n_b2b = 0, n_wait = 0, n_bp = 0, n_enlow = 0, n_clr = 0;

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom_range(hi - lo));
  endfunction

  task automatic add_block(int t);
    int x[4][4], y[4][4], xb[4][4], yb[4][4];
    line_t l;
    int lim;
    lim = (t == 3 || t == 2) ? 4095 : 255;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) x[i][j] = rnd(-lim, lim);
    if (t == 3) begin
      // left 2x2 in columns 0-1, right 2x2 in columns 2-3
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) xb[i][j] = 0;
      for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) xb[i][j] = x[i][j+2];
      t2d(3, 2, x, y);
      t2d(3, 2, xb, yb);
      for (int m = 0; m < 2; m++) begin
        expq[0].push_back('{y[0][m], nblk_gen});  expq[1].push_back('{y[1][m], nblk_gen});
        expq[2].push_back('{yb[0][m], nblk_gen}); expq[3].push_back('{yb[1][m], nblk_gen});
      end
      for (int i = 0; i < 2; i++) begin
        for (int j = 0; j < 4; j++) l.d[j] = x[i][j];
        l.t = T_HAD2;
        lq.push_back(l);
      end
      blk_left[nblk_gen] = 8;
    end else begin
      t2d(t, 4, x, y);
      for (int r = 0; r < 4; r++) for (int m = 0; m < 4; m++) expq[r].push_back('{y[r][m], nblk_gen});
      for (int i = 0; i < 4; i++) begin
        for (int j = 0; j < 4; j++) l.d[j] = x[i][j];
        l.t = ttype_t'(t);
        lq.push_back(l);
      end
      blk_left[nblk_gen] = 16;
    end
    blk_type_q.push_back(t);
    blk_ty[nblk_gen] = t;
    n_type[t]++;
    nblk_gen++;
  endtask

  // ---------------- driver ----------------
  int  gap_pct = 0, en_pct = 0;
  line_t cur;
  always_comb begin
    in_valid = 1'b0;
    in_type  = T_FDCT;
    for (int j = 0; j < N; j++) in_line[j] = '0;
    if (lq.size() > 0 && drive_ok) begin
      in_valid = 1'b1;
      in_line  = lq[0].d;
      in_type  = lq[0].t;
    end
  end
  logic drive_ok;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (en) ecycle <= ecycle + 1;
    if (!rst) begin
      if (in_valid && in_ready) void'(lq.pop_front());
      if (in_valid && !in_ready && en) n_bp++;
      if (!en) n_enlow++;
      if (en && dut.u_ctrl.clr) n_clr++;
    end
  end

  always @(negedge clk) begin
    drive_ok <= (rnd(0, 99) >= gap_pct);
    en       <= rst ? 1'b1 : (rnd(0, 99) >= en_pct);
  end

  // ---------------- monitor ----------------
  int last_start = -100, last_len = 0;
  int blk_done = 0;
  int out_cnt = 0;
  always @(posedge clk) begin
    if (!rst && en) begin
      if (dut.u_ctrl.new_blk) begin
        int len;
        len = (dut.u_ctrl.type_t == T_HAD2) ? 4 : 8;
        if (ecycle - last_start == last_len) n_b2b++;
        last_start = ecycle;
        last_len   = len;
        start_at[nblk_start++] = ecycle;
      end
      if (!dut.u_ctrl.busy && !dut.u_ctrl.start && dut.u_ctrl.lines != 0) n_wait++;
      for (int r = 0; r < N; r++) begin
        if (out_valid[r]) begin
          exp_t e;
          checks++;
          if (expq[r].size() == 0) begin
            failures++;
            $display("FAIL cycle %0d lane %0d: unexpected output %0d", cycle, r, out_data[r]);
          end else begin
            e = expq[r].pop_front();
            if (out_data[r] !== e.v) begin
              failures++;
              $display("FAIL cycle %0d lane %0d: got %0d expected %0d", cycle, r, out_data[r], e.v);
            end
            out_cnt++;
            blk_left[e.blk]--;
            if (blk_left[e.blk] == 0) begin
              int t, lat;
              t = blk_ty[e.blk];
              void'(blk_type_q.pop_front());
              lat = (t == 3) ? 8 : 14;
              checks++;
              if (ecycle - start_at[e.blk] != lat) begin
                failures++;
                $display("FAIL block %0d type %0d: latency %0d expected %0d", e.blk, t, ecycle - start_at[e.blk], lat);
              end
              blk_done++;
            end
          end
        end
      end
    end
  end

  // ---------------- phases ----------------
  task automatic wait_drain();
    int guard = 0;
    while ((lq.size() != 0 || blk_type_q.size() != 0) && guard < 20000) begin
      @(posedge clk);
      guard++;
    end
    repeat (20) @(posedge clk);
  endtask

  int spacing_ok = 0, spacing_chk = 0;
  int prev_start;
  always @(posedge clk)
    if (!rst && en && dut.u_ctrl.new_blk && gap_pct == 0 && en_pct == 0 && spacing_en) begin
      if (prev_start >= 0) begin
        checks++;
        spacing_chk++;
        if (ecycle - prev_start != spacing_period) begin
          failures++;
          $display("FAIL cycle %0d: block spacing %0d expected %0d", cycle, ecycle - prev_start, spacing_period);
        end
      end
      prev_start = ecycle;
    end
  logic spacing_en = 1'b0;
  int   spacing_period = 8;

  initial begin
    rst = 1'b1; clr_req = 1'b0; drive_ok = 1'b0; en = 1'b1;
    prev_start = -1;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // phase 1: continuous 4x4 stream, then continuous 2x2 pairs
    for (int t = 0; t < 3; t++) begin
      spacing_period = 8; prev_start = -1; spacing_en = 1'b1;
      for (int i = 0; i < 6; i++) add_block(t);
      wait_drain();
      spacing_en = 1'b0;
    end
    spacing_period = 4; prev_start = -1; spacing_en = 1'b1;
    for (int i = 0; i < 6; i++) add_block(3);
    wait_drain();
    spacing_en = 1'b0;

    // phase 2: clear request while idle zeroes every accumulator
    @(negedge clk) clr_req = 1'b1;
    @(negedge clk) clr_req = 1'b0;
    repeat (10) @(posedge clk);
    for (int r = 0; r < N; r++) begin
      checks++;
      if (dut.u_array.row_acc[r] != 0) begin
        failures++;
        $display("FAIL: row %0d accumulator not cleared", r);
      end
    end

    // phase 3: random mix with gaps, enable drops and clear requests
    gap_pct = 30; en_pct = 5;
    for (int i = 0; i < NBLK; i++) begin
      add_block(rnd(0, 3));
      if (rnd(0, 9) == 0) begin
        @(negedge clk) clr_req = 1'b1;
        @(negedge clk) clr_req = 1'b0;
      end
      while (lq.size() > 12) @(posedge clk);
    end
    wait_drain();
    gap_pct = 0; en_pct = 0;
    repeat (5) @(posedge clk);

    // every expected output must have been seen
    for (int r = 0; r < N; r++) begin
      checks++;
      if (expq[r].size() != 0) begin
        failures++;
        $display("FAIL: lane %0d still expects %0d outputs", r, expq[r].size());
      end
    end
    // mechanisms
    $display("blocks: fdct=%0d idct=%0d had4=%0d had2=%0d back-to-back=%0d wait-for-data=%0d back-pressure=%0d enable-low=%0d clear=%0d spacing-checks=%0d outputs=%0d",
             n_type[0], n_type[1], n_type[2], n_type[3], n_b2b, n_wait, n_bp, n_enlow, n_clr, spacing_chk, out_cnt);
    begin
      int mech[9];
      mech = '{n_type[0], n_type[1], n_type[2], n_type[3], n_b2b, n_wait, n_bp, n_enlow, n_clr};
      foreach (mech[i]) begin
        checks++;
        if (mech[i] == 0) begin
          failures++;
          $display("FAIL: mechanism %0d never happened", i);
        end
      end
    end
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
