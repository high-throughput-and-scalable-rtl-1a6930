// Shared types and constants of the unified 4x4 / 2x2 transform kernel.
//
// The kernel computes the H.264/AVC 2-D transforms Y = C * X * C^T with a
// row-column decomposition on a 4x4 systolic array of processing elements.
// This package holds the data word type, the transform-type code carried on
// TYPE_T (encoding as in the original PE legend), the multiplier command a
// PE derives from (type, row, column), and the coefficient table itself.
//
// The coefficient table follows the H.264/AVC standard matrices: forward
// integer DCT, inverse integer DCT (with the x1/2 entries), 4x4 and 2x2
// Hadamard. Data words are 32 bits, matching the 32-bit adder of each PE.
// N is the transform size and the number of array columns; the number of
// array rows (4, 2 or 1) is a parameter of the modules that depend on it.
package utc_pkg;

  localparam int unsigned DATA_W = 32;  // data and accumulator width
  localparam int unsigned N      = 4;   // transform size / array columns

  typedef logic signed [DATA_W-1:0] word_t;

  // Source of a result lane: the right edge of an array row, or one of the
  // taps after array column 1 (left block of a 2x2 pair).
  typedef enum logic [2:0] {
    SRC_ROW0 = 3'd0,
    SRC_ROW1 = 3'd1,
    SRC_ROW2 = 3'd2,
    SRC_ROW3 = 3'd3,
    SRC_TAP0 = 3'd4,
    SRC_TAP1 = 3'd5
  } src_t;

  // TYPE_T encoding
  typedef enum logic [1:0] {
    T_FDCT = 2'b00,  // 4x4 forward integer DCT
    T_IDCT = 2'b01,  // 4x4 inverse integer DCT
    T_HAD4 = 2'b10,  // 4x4 Hadamard
    T_HAD2 = 2'b11   // two 2x2 Hadamard transforms side by side
  } ttype_t;

  // Multiplier command: magnitude (0, 1, 2, 1/2) and sign.
  typedef enum logic [1:0] {
    MAG_ZERO = 2'd0,
    MAG_ONE  = 2'd1,
    MAG_TWO  = 2'd2,
    MAG_HALF = 2'd3
  } mag_t;

  typedef struct packed {
    mag_t mag;
    logic neg;
  } mcmd_t;

  // Coefficient C[row][col] of the transform selected by t.
  function automatic mcmd_t coef(ttype_t t, logic [1:0] row, logic [1:0] col);
    mcmd_t m;
    m.mag = MAG_ONE;
    m.neg = 1'b0;
    unique case (t)
      T_FDCT: begin
        // [ 1  1  1  1 ; 2  1 -1 -2 ; 1 -1 -1  1 ; 1 -2  2 -1 ]
        unique case (row)
          2'd0: ;
          2'd1: begin
            m.mag = (col == 2'd0 || col == 2'd3) ? MAG_TWO : MAG_ONE;
            m.neg = col[1];
          end
          2'd2: m.neg = col[0] ^ col[1];
          2'd3: begin
            m.mag = (col == 2'd1 || col == 2'd2) ? MAG_TWO : MAG_ONE;
            m.neg = col[0];
          end
        endcase
      end
      T_IDCT: begin
        // [ 1  1    1  1/2 ; 1  1/2 -1 -1 ; 1 -1/2 -1  1 ; 1 -1  1 -1/2 ]
        unique case (row)
          2'd0: m.mag = (col == 2'd3) ? MAG_HALF : MAG_ONE;
          2'd1: begin
            m.mag = (col == 2'd1) ? MAG_HALF : MAG_ONE;
            m.neg = col[1];
          end
          2'd2: begin
            m.mag = (col == 2'd1) ? MAG_HALF : MAG_ONE;
            m.neg = col[0] ^ col[1];
          end
          2'd3: begin
            m.mag = (col == 2'd3) ? MAG_HALF : MAG_ONE;
            m.neg = col[0];
          end
        endcase
      end
      T_HAD4: begin
        // [ 1  1  1  1 ; 1  1 -1 -1 ; 1 -1 -1  1 ; 1 -1  1 -1 ]
        unique case (row)
          2'd0: ;
          2'd1: m.neg = col[1];
          2'd2: m.neg = col[0] ^ col[1];
          2'd3: m.neg = col[0];
        endcase
      end
      T_HAD2: begin
        // [ 1  1 ; 1 -1 ] on columns {0,1} and again on {2,3}; rows 2-3 idle
        if (row[1]) m.mag = MAG_ZERO;
        else        m.neg = row[0] & col[0];
      end
    endcase
    return m;
  endfunction

endpackage
