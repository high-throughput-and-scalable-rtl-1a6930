// Systolic array of ROWS x 4 processing elements computing one 1-D 4-point
// transform per clock cycle (ROWS = 4, the base setup), or a part of one
// (ROWS = 2 or 1, the reduced setups).
//
// Data enter at the top of each column (x_top[c]) and move down one row per
// cycle through the PEs' standing-data registers; partial sums start at 0 on
// the left and move right one column per cycle, so array row r accumulates
// sum_c C[y][c] * x[c] and its last PE presents output coefficient y. With
// all four rows y = r. With fewer rows a vector is fed ROWS/4 times; on sweep
// s array row r computes coefficient y = s*ROWS + r. The sweep number enters
// at the top-left PE with the vector and travels with it.
// The compute command (calc), clear (clr), block marker (new_blk), transform
// type and sweep number enter at the top-left PE and travel with the data as
// a diagonal wavefront: PE(r,c) works on a vector r+c cycles after the vector
// entered PE(0,0). Consequently the caller must present element c of a vector
// c cycles after element 0, and the result of array row r appears on
// row_acc[r] (a register) r+4 cycles after element 0 entered.
//
// For the 2x2 Hadamard, rows 0-1 compute two 2-point transforms at once:
// columns 0-1 (result on tap_acc, the partial sums after column 1) and
// columns 2-3 (result on row_acc). row_new / tap_new carry the block marker
// as it leaves PE(0,3) / PE(0,1); the transposition switch resets on it.
//
// The row/column flow, the zero fed into column 0, the taps after column 1
// and the three setups (4, 2 or 1 rows of four PEs) follow the original
// architecture; carrying the sweep number with the wavefront to form
// COORD_Y is this design's way of programming the reduced setups.
module utc_pe_array
  import utc_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  localparam int unsigned TAPS = (ROWS >= 2) ? 2 : 1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  word_t      x_top   [N],
  input  logic       calc,
  input  logic       clr,
  input  logic       new_blk,
  input  ttype_t     type_t,
  input  logic [1:0] sweep,
  output word_t      row_acc [ROWS],
  output word_t      tap_acc [TAPS],
  output logic       row_new,
  output logic       tap_new
);

  word_t      x_q    [ROWS][N];
  word_t      acc_q  [ROWS][N];
  logic       calc_q [ROWS][N];
  logic       clr_q  [ROWS][N];
  logic       new_q  [ROWS][N];
  ttype_t     type_q [ROWS][N];
  logic [1:0] sw_q   [ROWS][N];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      word_t      x_in, acc_in;
      logic       calc_l, calc_u, clr_l, clr_u, new_in;
      ttype_t     type_in;
      logic [1:0] sw_in;
      logic [1:0] coord_y;

      if (r == 0) begin : g_top
        assign x_in   = x_top[c];
        assign calc_u = 1'b0;
        assign clr_u  = 1'b0;
      end else begin : g_inner
        assign x_in   = x_q[r-1][c];
        assign calc_u = calc_q[r-1][c];
        assign clr_u  = clr_q[r-1][c];
      end

      if (c == 0) begin : g_left
        assign acc_in = '0;
        if (r == 0) begin : g_origin
          assign calc_l  = calc;
          assign clr_l   = clr;
          assign new_in  = new_blk;
          assign type_in = type_t;
          assign sw_in   = sweep;
        end else begin : g_down
          assign calc_l  = 1'b0;
          assign clr_l   = 1'b0;
          assign new_in  = new_q[r-1][0];
          assign type_in = type_q[r-1][0];
          assign sw_in   = sw_q[r-1][0];
        end
      end else begin : g_right
        assign acc_in  = acc_q[r][c-1];
        assign calc_l  = calc_q[r][c-1];
        assign clr_l   = clr_q[r][c-1];
        assign new_in  = new_q[r][c-1];
        assign type_in = type_q[r][c-1];
        assign sw_in   = sw_q[r][c-1];
      end

      // output coefficient of this PE for the vector now present
      assign coord_y = 2'(int'(sw_in) * ROWS + r);

      // sweep number travels with the wavefront, like TYPE_T
      always_ff @(posedge clk) begin
        if (rst)                            sw_q[r][c] <= '0;
        else if (en && (calc_l || calc_u))  sw_q[r][c] <= sw_in;
      end

      utc_pe u_pe (
        .clk       (clk),
        .rst       (rst),
        .en        (en),
        .x_in      (x_in),
        .x_out     (x_q[r][c]),
        .acc_in    (acc_in),
        .acc_out   (acc_q[r][c]),
        .coord_x   (2'(c)),
        .coord_y   (coord_y),
        .calc_in_l (calc_l),
        .calc_in_u (calc_u),
        .clr_in_l  (clr_l),
        .clr_in_u  (clr_u),
        .new_in    (new_in),
        .type_in   (type_in),
        .calc_out  (calc_q[r][c]),
        .clr_out   (clr_q[r][c]),
        .new_out   (new_q[r][c]),
        .type_out  (type_q[r][c])
      );
    end
    assign row_acc[r] = acc_q[r][N-1];
  end

  for (genvar r = 0; r < TAPS; r++) begin : g_tap
    assign tap_acc[r] = acc_q[r][1];
  end
  assign row_new = new_q[0][N-1];
  assign tap_new = new_q[0][1];

  initial assert (ROWS == 4 || ROWS == 2 || ROWS == 1) else $fatal(1, "ROWS must be 4, 2 or 1");

endmodule
