// Control unit of the transform kernel.
//
// Schedules one block at a time on the systolic array. A block is either one
// 4x4 transform (forward DCT, inverse DCT or Hadamard; L = 4 vectors) or a
// pair of 2x2 Hadamard transforms placed side by side (L = 2). An array with
// ROWS rows of PEs needs S = (rows of the result) / ROWS sweeps per pass
// (S = 1 in the base 4x4 setup; 2 or 4 for a 4x4 block on 2 or 1 rows; 2 for
// a 2x2 pair on 1 row). A block starts only once the input buffer holds all
// L of its lines, because the memory-free transposition allows no gap inside
// a block. It then issues S sweeps of L first-pass vectors (lines from the
// input buffer, popped on the last sweep) followed immediately by S sweeps of
// L second-pass vectors (transposed values from the switch), one per cycle;
// the next block may start in the cycle after. In the base setup a 4x4 block
// therefore occupies the array input for 8 cycles and a 2x2 pair for 4.
//
// Column 0 of the array acts on the issue record of the current cycle and
// column k on the record of k cycles earlier, so pop, off, sel_fb, is_h2 and
// vec are per-column copies of a small record delay line. The same delay line
// marks when a second-pass result leaves the array: array row r presents it
// 4+r cycles after the vector entered (2+r for the left block of a 2x2 pair,
// taken after column 1); it is result row s*ROWS + r on sweep s, which names
// the output lane (2x2 pair: lanes 0-1 left block, 2-3 right block).
//
// The top-left PE receives calc (local enable), new_blk (NEW_4x4T on the
// first vector of the first pass), the transform type, the sweep number, and
// clr, a clear request that is passed on only in a cycle with no vector
// issued. out_valid is forced low while en is low (the kernel is frozen).
//
// The original text gives the unit's role and the cycle counts of the three
// setups; the start rule, the exact schedule (second pass right after the
// first, new block after 2*S*L cycles, as in the original data-flow figure
// for the base setup) and the valid delay lines are this design's.
module utc_control
  import utc_pkg::*;
#(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned ROWS  = 4
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   en,
  input  logic   clr_req,
  // input buffer status and controls
  input  logic [$clog2(DEPTH):0] lines,
  input  ttype_t head_type,
  output logic [N-1:0] pop,
  output logic [1:0]   off [N],
  output logic [N-1:0] sel_fb,
  output logic [N-1:0] is_h2,
  output logic [1:0]   vec [N],
  // top-left PE
  output logic   calc,
  output logic   clr,
  output logic   new_blk,
  output ttype_t type_t,
  output logic [1:0] sweep,
  // result lanes
  output logic [N-1:0] out_valid,
  output logic [N-1:0] out_h2,
  output src_t   out_src [N],
  // activity
  output logic   busy_o
);

  typedef struct packed {
    logic       valid;
    logic       pass2;
    logic       h2;
    logic       first;
    logic       last_sweep;
    logic [1:0] sweep;
    logic [1:0] vec;
    ttype_t     ty;
  } rec_t;

  localparam int unsigned HIST  = 8;
  localparam int unsigned TROWS = (ROWS >= 2) ? 2 : ROWS;   // rows used by a 2x2 pair

  // sweeps per pass
  function automatic logic [2:0] sweeps(logic h2);
    if (h2) return (ROWS == 1) ? 3'd2 : 3'd1;
    return 3'(4 / ROWS);
  endfunction

  logic       busy;
  logic [4:0] slot;
  ttype_t     bt;

  logic       start, active, cur_h2;
  logic [4:0] cur_slot, last_slot, pass_len, q;
  ttype_t     cur_ty;
  logic [2:0] need, ns;
  rec_t       rec0;
  rec_t       hist [HIST];   // hist[d] = record issued d cycles ago (hist[0] = now)

  always_comb begin
    need     = (head_type == T_HAD2) ? 3'd2 : 3'd4;
    start    = !busy && ((3'(lines)) >= need);
    active   = busy || start;
    cur_slot = busy ? slot : 5'd0;
    cur_ty   = busy ? bt   : head_type;
    cur_h2   = (cur_ty == T_HAD2);
    ns       = sweeps(cur_h2);
    pass_len = cur_h2 ? 5'(2 * ns) : 5'(4 * ns);
    last_slot = 5'(2 * pass_len - 1);
    q        = (cur_slot >= pass_len) ? cur_slot - pass_len : cur_slot;

    rec0.valid      = active;
    rec0.pass2      = active && (cur_slot >= pass_len);
    rec0.h2         = active && cur_h2;
    rec0.first      = active && (cur_slot == 5'd0);
    rec0.sweep      = cur_h2 ? 2'(q >> 1) : 2'(q >> 2);
    rec0.vec        = cur_h2 ? {1'b0, q[0]} : q[1:0];
    rec0.last_sweep = (3'(rec0.sweep) == ns - 3'd1);
    rec0.ty         = cur_ty;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      slot <= '0;
      bt   <= T_FDCT;
    end else if (en && active) begin
      busy <= (cur_slot != last_slot);
      slot <= cur_slot + 5'd1;
      bt   <= cur_ty;
    end
  end

  assign hist[0] = rec0;
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int d = 1; d < HIST; d++) hist[d] <= '0;
    end else if (en) begin
      for (int d = 1; d < HIST; d++) hist[d] <= hist[d-1];
    end
  end

  for (genvar k = 0; k < N; k++) begin : g_col
    logic feed;
    assign feed      = hist[k].valid && !hist[k].pass2;
    assign pop[k]    = feed && hist[k].last_sweep;
    assign off[k]    = (feed && !hist[k].last_sweep) ? hist[k].vec : 2'd0;
    assign sel_fb[k] = hist[k].valid && hist[k].pass2;
    assign is_h2[k]  = hist[k].h2;
    assign vec[k]    = hist[k].vec;
  end

  assign calc    = rec0.valid;
  assign new_blk = rec0.first;
  assign type_t  = rec0.ty;
  assign sweep   = rec0.sweep;
  assign clr     = clr_req && !active;
  assign busy_o  = active;

  // result lanes
  always_comb begin
    for (int j = 0; j < N; j++) begin
      out_valid[j] = 1'b0;
      out_h2[j]    = 1'b0;
      out_src[j]   = SRC_ROW0;
    end
    for (int r = 0; r < ROWS; r++) begin
      // 4x4 block: array row r, 4+r cycles after issue
      if (hist[4+r].pass2 && !hist[4+r].h2) begin
        out_valid[2'(int'(hist[4+r].sweep) * ROWS + r)] = 1'b1;
        out_src[2'(int'(hist[4+r].sweep) * ROWS + r)]   = src_t'(r);
      end
    end
    for (int r = 0; r < TROWS; r++) begin
      // 2x2 pair: left block from the tap after column 1, right block from the row end
      if (hist[2+r].pass2 && hist[2+r].h2) begin
        out_valid[2'(int'(hist[2+r].sweep) * ROWS + r)] = 1'b1;
        out_h2[2'(int'(hist[2+r].sweep) * ROWS + r)]    = 1'b1;
        out_src[2'(int'(hist[2+r].sweep) * ROWS + r)]   = src_t'(4 + r);
      end
      if (hist[4+r].pass2 && hist[4+r].h2) begin
        out_valid[2'(2 + int'(hist[4+r].sweep) * ROWS + r)] = 1'b1;
        out_h2[2'(2 + int'(hist[4+r].sweep) * ROWS + r)]    = 1'b1;
        out_src[2'(2 + int'(hist[4+r].sweep) * ROWS + r)]   = src_t'(r);
      end
    end
    out_valid = out_valid & {N{en}};
  end

endmodule
