// Programmable variable delay element of the transposition switch, one per
// array column, used by the reduced setups (2 or 1 rows of PEs).
//
// With fewer than four PE rows the array delivers the first-pass
// coefficients of a block over several sweeps, while the second pass needs
// each of them once per sweep, later. The element keeps the column's four
// intermediate values in standing-data registers until they are read:
//   * restart (the block marker, already delayed to this column) starts a
//     cycle count d and latches whether the block is a 2x2 pair;
//   * a sweep lasts L = 4 cycles (2 for a 2x2 pair) and the pass S sweeps;
//     in cycle d = L*s + r, with r < ROWS and s < S, array row r presents
//     coefficient s*ROWS + r of this column's vector, which is written to
//     register s*ROWS + r. A column with LEFT = 1 takes the taps after array
//     column 1 instead of the row ends when the block is a 2x2 pair;
//   * rd_idx (the second-pass vector number) selects the register on dout.
// The delay a value sees is thus set by when it is read, which is what
// makes it programmable across setups.
//
// Timing: writes on the clock edge, dout combinational from the registers;
// holds when en is low.
//
// Registers with bypass multiplexers in the switch follow the original
// architecture; this addressed four-register form and its write schedule are
// this design's own.
module utc_vde
  import utc_pkg::*;
#(
  parameter int unsigned ROWS = 2,
  parameter bit          LEFT = 1'b0,
  localparam int unsigned TAPS = (ROWS >= 2) ? 2 : 1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic       restart,
  input  logic       is_h2,
  input  word_t      row_acc [ROWS],
  input  word_t      tap_acc [TAPS],
  input  logic [1:0] rd_idx,
  output word_t      dout
);

  word_t      dreg [N];
  logic [4:0] d, dd, span;
  logic       mode_h2, m_h2, m_tap, wr;
  logic [1:0] r_idx, s_idx, w_idx;

  assign m_h2  = restart ? is_h2 : mode_h2;
  assign m_tap = LEFT && m_h2;
  assign span  = m_h2 ? ((ROWS == 1) ? 5'd4 : 5'd2) : 5'(16 / ROWS);
  assign dd    = restart ? 5'd0 : d;
  assign r_idx = m_h2 ? {1'b0, dd[0]} : dd[1:0];
  assign s_idx = m_h2 ? 2'(dd >> 1)   : 2'(dd >> 2);
  assign wr    = (dd < span) && (int'(r_idx) < ROWS);
  assign w_idx = 2'(int'(s_idx) * ROWS + int'(r_idx));

  always_ff @(posedge clk) begin
    if (rst) begin
      d       <= 5'd31;
      mode_h2 <= 1'b0;
      for (int i = 0; i < N; i++) dreg[i] <= '0;
    end else if (en) begin
      if (dd != 5'd31) d <= dd + 5'd1;
      else             d <= dd;
      mode_h2 <= m_h2;
      if (wr) dreg[w_idx] <= m_tap ? tap_acc[int'(r_idx[0]) % TAPS] : row_acc[int'(r_idx) % ROWS];
    end
  end

  assign dout = dreg[rd_idx];

  initial assert (ROWS == 2 || ROWS == 1) else $fatal(1, "utc_vde serves the 2- and 1-row setups");

endmodule
