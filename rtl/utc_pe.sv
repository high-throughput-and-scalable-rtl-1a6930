// Processing element of the systolic transform array.
//
// Each PE holds one coefficient position (COORD_Y = output row, COORD_X =
// input column) of the 1-D transform. When its compute command (CALC) is
// present it
//   * latches the incoming data value X_in in a standing-data register that
//     feeds the PE below (X_out), and
//   * adds C[COORD_Y][COORD_X] * X_in to the partial sum arriving from the
//     left neighbour (ACC_in) and latches the result in ACC_out.
// The multiplier only ever needs 0, +-1, +-2 and +-1/2, so it is a left shift,
// an arithmetic right shift and a sign inversion; the negation is a bit
// inversion plus a carry into the accumulator adder. The ACC_CLR decoder
// drops ACC_in in column 2 for the 2x2 Hadamard, so that columns 0-1 and 2-3
// form two independent 2-point transforms.
//
// The control part registers CALC, CLR, NEW_4x4T and TYPE_T and hands them to
// the right-hand and lower neighbours, so that a single command at the
// top-left PE sweeps the array as a diagonal wavefront one PE per cycle.
// CALC and CLR are taken from either neighbour (left or upper); a PE with no
// CALC holds all of its state, EN low freezes the PE, RST clears it and
// CLR clears the accumulator register.
//
// Timing: every output is a register; a value computed in cycle t is seen by
// the neighbours in cycle t+1.
//
// The structure (two modules, standing-data registers, shift-based
// multiplier, M and ACC_CLR decoders, signal names) follows the original
// PE description; the gate-level choices of the control part, the decoder
// tables and the synchronous reset are this design's own.
module utc_pe
  import utc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  // data
  input  word_t      x_in,
  output word_t      x_out,
  input  word_t      acc_in,
  output word_t      acc_out,
  // coefficient position
  input  logic [1:0] coord_x,
  input  logic [1:0] coord_y,
  // control, in
  input  logic       calc_in_l,
  input  logic       calc_in_u,
  input  logic       clr_in_l,
  input  logic       clr_in_u,
  input  logic       new_in,
  input  ttype_t     type_in,
  // control, out (each feeds both the right and the lower neighbour)
  output logic       calc_out,
  output logic       clr_out,
  output logic       new_out,
  output ttype_t     type_out
);

  logic  calc, clr;
  mcmd_t m;
  logic  acc_clr;
  word_t shifted, operand, acc_term, sum;

  assign calc = calc_in_l | calc_in_u;
  assign clr  = clr_in_l  | clr_in_u;

  // M decoder and ACC_CLR decoder
  assign m       = coef(type_in, coord_y, (type_in == T_HAD2) ? {1'b0, coord_x[0]} : coord_x);
  assign acc_clr = (type_in == T_HAD2) && (coord_x == 2'd2);

  // multiplier: shift, then conditional bit inversion (+1 via carry-in)
  always_comb begin
    unique case (m.mag)
      MAG_ZERO: shifted = '0;
      MAG_ONE:  shifted = x_in;
      MAG_TWO:  shifted = x_in <<< 1;
      MAG_HALF: shifted = x_in >>> 1;
    endcase
    operand  = m.neg ? ~shifted : shifted;
    acc_term = acc_clr ? '0 : acc_in;
    sum      = acc_term + operand + word_t'(m.neg);
  end

  // arithmetic module registers
  always_ff @(posedge clk) begin
    if (rst) begin
      x_out   <= '0;
      acc_out <= '0;
    end else if (en) begin
      if (clr) begin
        acc_out <= '0;
      end else if (calc) begin
        acc_out <= sum;
      end
      if (calc) x_out <= x_in;
    end
  end

  // control module registers
  always_ff @(posedge clk) begin
    if (rst) begin
      calc_out <= 1'b0;
      clr_out  <= 1'b0;
      new_out  <= 1'b0;
      type_out <= T_FDCT;
    end else if (en) begin
      calc_out <= calc;
      clr_out  <= clr;
      new_out  <= new_in & calc;
      if (calc) type_out <= type_in;
    end
  end

endmodule
