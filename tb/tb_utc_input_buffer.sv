// Testbench of the input buffer.
//
// Loads random lines (with random transform types) whenever the buffer is
// ready, pops the four columns independently at random (never an empty
// column), and switches each column's output multiplexer at random between
// the buffered sample and a random fed-back value. Columns not popped may
// read ahead by a random offset within the lines they hold. Checks against four
// model queues: each column's output, in_ready (room in every column, and
// enable high), the line count of column 0 and the type of the next line.
// Counts how often the buffer was full and how often the feedback path was
// taken.
//
// Line-wide loading and per-column serial reading follow the original
// buffer; the queue model, depth and read-ahead are this design's own.
module tb_utc_input_buffer;
  import utc_pkg::*;

  localparam int NCYC = 20000;
  localparam int DEPTH = 4;

  logic   clk = 1'b0, rst, en;
  logic   in_valid, in_ready;
  word_t  in_line [N];
  ttype_t in_type;
  logic [N-1:0] pop, sel_fb;
  logic [1:0]   off [N];
  word_t  fb    [N];
  word_t  x_col [N];
  logic [$clog2(DEPTH):0] lines;
  ttype_t head_type;

  utc_input_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_full = 0, n_fb = 0;
  int q [N][$];
  int tq [$];

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    rst = 1'b1; en = 1'b1; in_valid = 0; in_type = T_FDCT; pop = '0; sel_fb = '0;
    for (int c = 0; c < N; c++) begin in_line[c] = '0; fb[c] = '0; off[c] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int t = 0; t < NCYC; t++) begin
      logic ready_exp;
      en       = ($urandom_range(15) != 0);
      in_valid = $urandom_range(1);
      in_type  = ttype_t'($urandom_range(3));
      for (int c = 0; c < N; c++) begin
        in_line[c] = $urandom();
        fb[c]      = $urandom();
        sel_fb[c]  = ($urandom_range(3) == 0);
        pop[c]     = (q[c].size() > 0) && ($urandom_range(2) == 0) && en;
        // read-ahead without popping, within the lines present
        off[c]     = (!pop[c] && q[c].size() > 1) ? 2'($urandom_range(q[c].size() - 1)) : 2'd0;
      end
      #1;
      ready_exp = en;
      for (int c = 0; c < N; c++) if (q[c].size() >= DEPTH) ready_exp = 1'b0;
      if (!ready_exp && en) n_full++;
      chk("in_ready", int'(in_ready), int'(ready_exp));
      chk("lines", int'(lines), q[0].size());
      if (tq.size() > 0) chk("head_type", int'(head_type), tq[0]);
      for (int c = 0; c < N; c++) begin
        if (sel_fb[c]) begin
          n_fb++;
          chk($sformatf("fb column %0d", c), x_col[c], fb[c]);
        end else if (q[c].size() > 0) begin
          chk($sformatf("column %0d", c), x_col[c], q[c][off[c]]);
        end
      end
      @(posedge clk);
      if (en) begin
        for (int c = 0; c < N; c++) if (pop[c]) void'(q[c].pop_front());
        if (pop[0]) void'(tq.pop_front());
        if (in_valid && ready_exp) begin
          for (int c = 0; c < N; c++) q[c].push_back(in_line[c]);
          tq.push_back(in_type);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_full == 0 || n_fb == 0) begin
      failures++;
      $display("FAIL: buffer never full (%0d) or feedback never used (%0d)", n_full, n_fb);
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
