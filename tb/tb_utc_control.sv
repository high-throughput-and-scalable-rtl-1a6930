// Testbench of the control unit.
//
// Models the input buffer as a count of lines with a queue of their types,
// adds lines at random and runs a reference scheduler: a block (4 lines for a
// 4x4 transform, 2 for a 2x2 pair) starts as soon as the unit is idle and the
// block's lines are all present, and then issues L first-pass and L
// second-pass vectors on consecutive cycles. Checks every cycle the commands
// to the top-left PE (calc, NEW_4x4T, type, sweep), the per-column pop,
// read offset, feedback, 2x2 and vector-number selects delayed by the column
// index, the result-lane valid flags and sources, and the gating of clear
// requests, all in the base setup (four rows). Counts back-to-back starts and
// idle waits.
//
// The expected timings (second pass right after the first, a new block
// after both passes) follow the original schedule; the start rule and the
// lane encoding being checked are this design's own.
module tb_utc_control;
  import utc_pkg::*;

  localparam int NCYC  = 20000;
  localparam int DEPTH = 4;

  logic         clk = 1'b0, rst, en, clr_req;
  logic [$clog2(DEPTH):0] lines;
  ttype_t       head_type;
  logic [N-1:0] pop, sel_fb, is_h2;
  logic [1:0]   off [N];
  logic [1:0]   vec [N];
  logic [1:0]   sweep;
  src_t         out_src [N];
  logic         calc, clr, new_blk;
  ttype_t       type_t;
  logic [N-1:0] out_valid, out_h2;
  logic         busy_o;

  utc_control #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_b2b = 0, n_wait = 0;

  typedef struct packed { logic v; logic p2; logic h2; logic first; logic [1:0] ty; logic [1:0] vec; } r_t;
  r_t plan [$];
  r_t hist [8];
  int avail;
  int tq [$];

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    rst = 1'b1; en = 1'b1; clr_req = 0; lines = '0; head_type = T_FDCT;
    avail = 0;
    for (int d = 0; d < 8; d++) hist[d] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int t = 0; t < NCYC; t++) begin
      r_t cur;
      logic [N-1:0] ev, eh;
      en      = ($urandom_range(15) != 0);
      clr_req = ($urandom_range(7) == 0);
      lines     = ($clog2(DEPTH)+1)'(avail);
      head_type = (tq.size() > 0) ? ttype_t'(tq[0]) : T_FDCT;
      // reference scheduler
      if (plan.size() == 0 && tq.size() > 0) begin
        int need;
        need = (tq[0] == 3) ? 2 : 4;
        if (avail >= need) begin
          if (hist[1].v) n_b2b++;
          for (int s = 0; s < 2 * need; s++)
            plan.push_back('{1'b1, s >= need, tq[0] == 3, s == 0, 2'(tq[0]), 2'(s % need)});
        end else if (avail > 0) n_wait++;
      end
      cur = (plan.size() > 0) ? plan[0] : r_t'(0);
      #1;
      if (en) begin
        chk("calc", int'(calc), int'(cur.v));
        chk("new_blk", int'(new_blk), int'(cur.first));
        if (cur.v) chk("type_t", int'(type_t), int'(cur.ty));
        chk("clr", int'(clr), int'(clr_req && !cur.v));
        for (int k = 1; k < N; k++) begin
          chk("pop", int'(pop[k]), int'(hist[k].v && !hist[k].p2));
          chk("sel_fb", int'(sel_fb[k]), int'(hist[k].v && hist[k].p2));
          chk("is_h2", int'(is_h2[k]), int'(hist[k].h2));
        end
        chk("pop0", int'(pop[0]), int'(cur.v && !cur.p2));
        chk("sweep", int'(sweep), 0);
        if (cur.v) chk("vec0", int'(vec[0]), int'(cur.vec));
        for (int k = 0; k < N; k++) begin
          chk("off", int'(off[k]), 0);
          if (k > 0 && hist[k].v) chk("vec", int'(vec[k]), int'(hist[k].vec));
        end
        ev = '0; eh = '0;
        for (int r = 0; r < N; r++) if (hist[4+r].p2 && !hist[4+r].h2) ev[r] = 1'b1;
        for (int r = 0; r < 2; r++) begin
          if (hist[2+r].p2 && hist[2+r].h2) begin ev[r] = 1'b1; eh[r] = 1'b1; end
          if (hist[4+r].p2 && hist[4+r].h2) begin ev[2+r] = 1'b1; eh[2+r] = 1'b1; end
        end
        chk("out_valid", int'(out_valid), int'(ev));
        chk("out_h2", int'(out_h2), int'(eh));
        for (int j = 0; j < N; j++)
          if (ev[j]) chk("out_src", int'(out_src[j]), eh[j] ? ((j < 2) ? 4 + j : j - 2) : j);
      end else begin
        chk("out_valid while disabled", int'(out_valid), 0);
      end
      @(posedge clk);
      if (en) begin
        for (int d = 7; d > 0; d--) hist[d] = (d == 1) ? cur : hist[d-1];
        if (plan.size() > 0) void'(plan.pop_front());
        if (cur.v && !cur.p2) begin avail--; void'(tq.pop_front()); end
        if (avail < DEPTH && $urandom_range(2) != 0) begin
          avail++;
          tq.push_back($urandom_range(3));
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_b2b == 0 || n_wait == 0) begin
      failures++;
      $display("FAIL: back-to-back %0d, waits %0d", n_b2b, n_wait);
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
