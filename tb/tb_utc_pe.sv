// Testbench of one processing element.
//
// Drives random data, partial sums, coefficient positions, transform types and
// control inputs, and checks after each clock edge the accumulator
// (partial sum + C[y][x] * data, with the 2x2 Hadamard restart in column 2),
// the standing-data register, hold when no compute command is present,
// clear, global enable and the forwarded CALC, CLR, NEW_4x4T and TYPE_T,
// against a model written here from integer coefficient tables.
//
// The coefficient set (0, +-1, +-2, +-1/2) and the forwarded control signals
// follow the original PE; the coefficient tables are the H.264 matrices and
// the signal timing checked is this design's own register placement.
module tb_utc_pe;
  import utc_pkg::*;

  localparam int NVEC = 20000;

  logic   clk = 1'b0, rst, en;
  word_t  x_in, x_out, acc_in, acc_out;
  logic [1:0] coord_x, coord_y;
  logic   calc_in_l, calc_in_u, clr_in_l, clr_in_u, new_in;
  ttype_t type_in;
  logic   calc_out, clr_out, new_out;
  ttype_t type_out;

  utc_pe dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

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

  int e_acc, e_x, c2, base;
  logic calc, clr;

  initial begin
    rst = 1'b1; en = 1'b1; x_in = '0; acc_in = '0; coord_x = '0; coord_y = '0;
    calc_in_l = 0; calc_in_u = 0; clr_in_l = 0; clr_in_u = 0; new_in = 0; type_in = T_FDCT;
    repeat (2) @(posedge clk);
    #1;
    chk("reset acc", acc_out, 0);
    chk("reset calc", calc_out, 0);
    @(negedge clk) rst = 1'b0;
    e_acc = 0; e_x = 0;
    for (int i = 0; i < NVEC; i++) begin
      @(negedge clk);
      x_in      = $urandom();
      if ($urandom_range(3) != 0) x_in = word_t'(int'($urandom_range(60000)) - 30000);
      acc_in    = word_t'(int'($urandom_range(2000000)) - 1000000);
      coord_x   = 2'($urandom_range(3));
      coord_y   = 2'($urandom_range(3));
      type_in   = ttype_t'($urandom_range(3));
      calc_in_l = ($urandom_range(3) != 0);
      calc_in_u = ($urandom_range(3) == 0);
      clr_in_l  = ($urandom_range(15) == 0);
      clr_in_u  = ($urandom_range(15) == 0);
      new_in    = $urandom_range(1);
      en        = ($urandom_range(9) != 0);
      calc = calc_in_l | calc_in_u;
      clr  = clr_in_l | clr_in_u;
      if (type_in == T_HAD2) c2 = tbl[3][coord_y][coord_x % 2];
      else                   c2 = tbl[type_in][coord_y][coord_x];
      base = (type_in == T_HAD2 && coord_x == 2) ? 0 : int'(acc_in);
      if (en) begin
        if (clr)       e_acc = 0;
        else if (calc) e_acc = base + cmul(c2, int'(x_in));
        if (calc)      e_x   = int'(x_in);
      end
      @(posedge clk);
      #1;
      chk("acc_out", acc_out, e_acc);
      chk("x_out", x_out, e_x);
      if (en) begin
        chk("calc_out", calc_out, calc);
        chk("clr_out", clr_out, clr);
        chk("new_out", new_out, new_in & calc);
        if (calc) chk("type_out", type_out, type_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NVEC + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
