// Unified H.264/AVC transform kernel: 2-D 4x4 forward and inverse integer
// DCT, 4x4 Hadamard, and two simultaneous 2x2 Hadamard transforms.
//
// The 2-D transform Y = C * X * C^T is split into two 1-D passes over the same
// 4x4 systolic PE array. Lines of the input block (four samples each) are
// loaded whole into the input buffer and fed skewed into the array columns;
// each array row produces one output coefficient per vector. The results of
// the first pass leave the right edge of the array already in the order the
// second pass needs, so the transposition switch only multiplexes them back to
// the column inputs - no transpose memory. The second-pass results are the
// transform coefficients.
//
// Interface:
//   in_valid/in_ready/in_line/in_type  one line of four samples per cycle;
//        a 4x4 block is four consecutive lines (row 0 first) of one type; a
//        T_HAD2 block is two lines, each holding row m of the left 2x2 block
//        in elements 0-1 and row m of the right 2x2 block in elements 2-3.
//   out_valid[r]/out_data[r]  result lanes. For a 4x4 block lane r delivers
//        row r of Y, element m on its m-th valid cycle, lane r one cycle
//        behind lane r-1. For a 2x2 pair (out_h2 set) lanes 0-1 deliver rows
//        0-1 of the left result and lanes 2-3 rows 0-1 of the right one.
//   clr_req  clears the PE accumulators (taken only between blocks).
//   en  global enable; low freezes the whole kernel.
// Timing: with the block buffered, the first result appears 8 cycles
// (2x2: 4) after the block starts and the last 14 cycles (2x2: 8) after;
// a new 4x4 block can start every 8 cycles, a 2x2 pair every 4.
//
// ROWS selects the setup: 4 rows of four PEs (the base setup, default), 2 or
// 1. With fewer rows each pass is swept 4/ROWS times (a 2x2 pair twice on
// one row), the transposed values wait in the switch's delay elements, and a
// block takes 16 (2 rows) or 32 (1 row) cycles instead of 8; a 2x2 pair takes
// 4 cycles on 4 or 2 rows and 8 on one row. Lane order and values are the
// same in every setup; the latency to the last result is 2*S*L + 2 + R cycles
// (S sweeps of L vectors per pass, R = rows used).
//
// Block structure and data flow follow the original architecture and its
// three setups; interface handshakes and result lanes are this design's.
module utc_top
  import utc_pkg::*;
#(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned ROWS  = 4,
  localparam int unsigned TAPS = (ROWS >= 2) ? 2 : 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         clr_req,
  input  logic         in_valid,
  output logic         in_ready,
  input  word_t        in_line  [N],
  input  ttype_t       in_type,
  output logic [N-1:0] out_valid,
  output logic [N-1:0] out_h2,
  output word_t        out_data [N],
  output logic         busy
);

  logic [$clog2(DEPTH):0] lines;
  ttype_t       head_type;
  logic [N-1:0] pop, sel_fb, is_h2;
  logic [1:0]   off     [N];
  logic [1:0]   vec     [N];
  logic         calc, clr, new_blk;
  ttype_t       type_t;
  logic [1:0]   sweep;
  src_t         out_src [N];
  word_t        x_col   [N];
  word_t        fb      [N];
  word_t        row_acc [ROWS];
  word_t        tap_acc [TAPS];
  logic         row_new, tap_new;

  utc_input_buffer #(.DEPTH(DEPTH)) u_buf (
    .clk, .rst, .en,
    .in_valid, .in_ready, .in_line, .in_type,
    .pop, .off, .sel_fb, .fb, .x_col, .lines, .head_type
  );

  utc_control #(.DEPTH(DEPTH), .ROWS(ROWS)) u_ctrl (
    .clk, .rst, .en, .clr_req,
    .lines, .head_type, .pop, .off, .sel_fb, .is_h2, .vec,
    .calc, .clr, .new_blk, .type_t, .sweep,
    .out_valid, .out_h2, .out_src, .busy_o(busy)
  );

  utc_pe_array #(.ROWS(ROWS)) u_array (
    .clk, .rst, .en,
    .x_top(x_col), .calc, .clr, .new_blk, .type_t, .sweep,
    .row_acc, .tap_acc, .row_new, .tap_new
  );

  utc_transpose_switch #(.ROWS(ROWS)) u_switch (
    .clk, .rst, .en,
    .row_acc, .tap_acc, .row_new, .tap_new, .is_h2, .vec, .fb
  );

  // result lanes: each lane shows the array row end or column-1 tap the
  // control unit names for it
  for (genvar j = 0; j < N; j++) begin : g_lane
    always_comb begin
      if (out_src[j] == SRC_TAP0 || out_src[j] == SRC_TAP1)
        out_data[j] = tap_acc[int'(out_src[j] == SRC_TAP1) % TAPS];
      else
        out_data[j] = row_acc[int'(out_src[j][1:0]) % ROWS];
    end
  end

endmodule
