// Input buffer of the transform kernel.
//
// Holds up to DEPTH lines of four samples (residues when encoding, transform
// coefficients when decoding). A whole line is written at once (in_valid /
// in_ready handshake, one line per cycle), but each column has its own read
// pointer: the control unit pops column c exactly c cycles after column 0, so
// the elements of one line reach the array as the skewed, one-per-column
// stream the systolic wavefront needs. A 2:1 multiplexer at the foot of each
// column chooses between the buffered sample and the transposed intermediate
// value fed back from the transposition switch (second pass).
// In the reduced setups (fewer than four PE rows) a block's lines are fed
// several times: off[c] reads the line that many entries behind the head
// without popping it, and only the last sweep pops.
// The transform type of each line is stored beside column 0 and shown on
// head_type; lines reports how many lines column 0 still holds.
//
// in_ready is low while en is low.
// Timing: a line written in cycle t can be popped from cycle t+1; x_col is
// combinational from the FIFO heads and fb.
//
// Parallel line loading, per-column serial read-out and the feedback
// multiplexers follow the original description; the FIFO organisation,
// handshake and depth (four registers per column) are this design's reading
// of it.
module utc_input_buffer
  import utc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   en,
  // line load
  input  logic   in_valid,
  output logic   in_ready,
  input  word_t  in_line [N],
  input  ttype_t in_type,
  // read side
  input  logic [N-1:0] pop,
  input  logic [1:0]   off   [N],
  input  logic [N-1:0] sel_fb,
  input  word_t  fb    [N],
  output word_t  x_col [N],
  output logic [$clog2(DEPTH):0] lines,
  output ttype_t head_type
);

  localparam int unsigned AW = $clog2(DEPTH);

  word_t        mem  [N][DEPTH];
  ttype_t       tmem [DEPTH];
  logic [AW:0]  wr_ptr;
  logic [AW:0]  rd_ptr [N];
  logic [AW:0]  cnt    [N];
  logic         push;

  always_comb begin
    in_ready = en;
    for (int c = 0; c < N; c++) begin
      cnt[c] = wr_ptr - rd_ptr[c];
      if (cnt[c] >= (AW+1)'(DEPTH)) in_ready = 1'b0;
    end
  end

  assign push      = in_valid & in_ready;
  assign lines     = cnt[0];
  assign head_type = tmem[rd_ptr[0][AW-1:0]];

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      for (int c = 0; c < N; c++) rd_ptr[c] <= '0;
      for (int d = 0; d < DEPTH; d++) tmem[d] <= T_FDCT;
    end else if (en) begin
      if (push) begin
        for (int c = 0; c < N; c++) mem[c][wr_ptr[AW-1:0]] <= in_line[c];
        tmem[wr_ptr[AW-1:0]] <= in_type;
        wr_ptr <= wr_ptr + 1'b1;
      end
      for (int c = 0; c < N; c++)
        if (pop[c]) rd_ptr[c] <= rd_ptr[c] + 1'b1;
    end
  end

  for (genvar c = 0; c < N; c++) begin : g_mux
    logic [AW-1:0] ra;
    assign ra       = rd_ptr[c][AW-1:0] + AW'(off[c]);
    assign x_col[c] = sel_fb[c] ? fb[c] : mem[c][ra];
  end

  // a column is never popped while empty
  always_ff @(posedge clk)
    if (!rst && en)
      for (int c = 0; c < N; c++)
        assert (!(pop[c] && cnt[c] == '0)) else $error("pop of empty column %0d", c);

endmodule
