// Memory-free row-column transposition switch, with programmable variable
// delay elements for the reduced array setups.
//
// Base setup (four PE rows). After the first (row) pass, coefficient r of
// vector m sits in the last PE of array row r during exactly one cycle.
// Because the array is skewed by one cycle per row and the second pass is
// skewed by one cycle per column, column k of the second pass needs, for its
// vector m, the value that row m is presenting at that very cycle. A 4:1
// multiplexer per column therefore selects row (t - t0 - k), where t0 is the
// cycle the block marker NEW_4x4T leaves PE(0,3): no storage of the
// intermediate block is needed. Each column keeps a small select counter that
// the marker, delayed by k cycles, resets to row 0.
// For a pair of 2x2 Hadamard blocks (is_h2 set for the column) columns 2-3
// select rows 0-1 of the row outputs in the same way, and columns 0-1 take
// rows 0-1 of the taps after array column 1 through two 2:1 multiplexers,
// timed by the marker leaving PE(0,1).
//
// Reduced setups (ROWS = 2 or 1). The array then produces the first-pass
// coefficients of a vector over several sweeps, and the second pass reads
// each of them once per sweep, so the values must wait. Each column has a
// variable delay element: four standing-data registers, written with
// coefficient s*ROWS + r as array row r presents it on sweep s (counted
// from the delayed marker like the select counter), and read by the
// second-pass vector number vec[k] (module utc_vde). When a block needs only one sweep (every
// block with four rows, a 2x2 pair with two rows) the delay element is
// bypassed and the direct multiplexer path is used.
//
// Interface: fb[k] is combinational from the array registers, the select
// counters and the delay registers; everything clocked holds when en is low.
// vec (the second-pass vector number per column) is only read by the delay
// elements, so it is unused in the base setup.
//
// Four 4:1 and two 2:1 multiplexers reset by NEW_4x4T, and delay elements
// made of registers and bypass multiplexers, follow the original design; the
// counter form of the control, the final 2:1 choice on columns 0-1 and the
// addressed four-register form of the delay elements are this design's own.
module utc_transpose_switch
  import utc_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  localparam int unsigned TAPS = (ROWS >= 2) ? 2 : 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  word_t        row_acc [ROWS],
  input  word_t        tap_acc [TAPS],
  input  logic         row_new,
  input  logic         tap_new,
  input  logic [N-1:0] is_h2,
  input  logic [1:0]   vec     [N],
  output word_t        fb      [N]
);

  logic [N-1:0] rn_d;   // row_new delayed by k cycles
  logic [1:0]   tn_d;   // tap_new delayed by k cycles
  logic [1:0]   cnt [N];
  logic [1:0]   sel [N];
  logic [N-1:0] restart;

  assign rn_d[0] = row_new;
  assign tn_d[0] = tap_new;

  always_ff @(posedge clk) begin
    if (rst) begin
      rn_d[N-1:1] <= '0;
      tn_d[1]     <= 1'b0;
    end else if (en) begin
      rn_d[N-1:1] <= rn_d[N-2:0];
      tn_d[1]     <= tn_d[0];
    end
  end

  for (genvar k = 0; k < N; k++) begin : g_col
    word_t direct;
    logic  src_tap;   // this column takes the column-1 taps (2x2, left block)

    if (k < 2) begin : g_left
      assign restart[k] = is_h2[k] ? tn_d[k] : rn_d[k];
      assign src_tap    = is_h2[k];
    end else begin : g_right
      assign restart[k] = is_h2[k] ? rn_d[k-2] : rn_d[k];
      assign src_tap    = 1'b0;
    end

    assign sel[k]  = restart[k] ? 2'd0 : cnt[k];
    assign direct  = src_tap ? tap_acc[int'(sel[k][0]) % TAPS] : row_acc[int'(sel[k]) % ROWS];

    always_ff @(posedge clk) begin
      if (rst)     cnt[k] <= '0;
      else if (en) cnt[k] <= sel[k] + 2'd1;
    end

    if (ROWS == 4) begin : g_bypass
      assign fb[k] = direct;
    end else begin : g_vde
      word_t delayed;
      utc_vde #(.ROWS(ROWS), .LEFT(k < 2)) u_vde (
        .clk, .rst, .en,
        .restart (restart[k]),
        .is_h2   (is_h2[k]),
        .row_acc,
        .tap_acc,
        .rd_idx  (vec[k]),
        .dout    (delayed)
      );
      // bypass when the block needs a single sweep (2x2 pair on two rows)
      assign fb[k] = (ROWS == 2 && is_h2[k]) ? direct : delayed;
    end
  end

endmodule
