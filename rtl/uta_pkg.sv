// uta_pkg: types and constants shared by the unified 4x4/2x2 H.264/AVC transform
// kernel.
//
// The kernel computes every 2-D transform as Y = A * X * A^T with a 4x4 (or two
// 2x2) integer kernel A whose entries are all powers of two: +-1, +-2 and +-1/2.
// A processing element therefore never multiplies; it shifts by one place left or
// right and optionally negates. The 2-bit transform code (00 forward 4x4 integer
// DCT, 01 inverse 4x4 integer DCT, 10 4x4 Hadamard, 11 two 2x2 Hadamards) follows
// the document. The kernels for the forward DCT and both Hadamard transforms are
// the ones it prints; for the inverse DCT the array uses the transpose of the
// printed inverse kernel, which is the orientation of the H.264 inverse core
// transform (X = Ci^T * W * Ci), with the +-1/2 products taken as arithmetic right
// shifts exactly as the standard does.
//
// A token (tok_t) travels with every data vector through the array: CALC (valid),
// CLR (clear the accumulators), NEW_4x4T (first vector of a block), TYPE_T, and three
// fields of this design's own, the pass (0 = first 1-D pass on input lines,
// 1 = second pass on transposed intermediates) and the index of the vector within
// its pass, which steer the memory-free transposition multiplexers, and the
// sweep number used by the reduced 2x4 and 1x4 array setups, which pass each
// vector through their one or two PE rows several times.
package uta_pkg;

  // Transform selected by TYPE_T.
  typedef enum logic [1:0] {
    T_FDCT = 2'b00,   // 4x4 forward integer DCT
    T_IDCT = 2'b01,   // 4x4 inverse integer DCT
    T_H4   = 2'b10,   // 4x4 Hadamard
    T_H2   = 2'b11    // two 2x2 Hadamards side by side
  } ttype_e;

  // Shift applied by the PE multiplier.
  typedef enum logic [1:0] {
    SH_X1   = 2'b00,  // multiply by 1
    SH_X2   = 2'b01,  // multiply by 2 (shift left)
    SH_HALF = 2'b10   // multiply by 1/2 (arithmetic shift right)
  } shift_e;

  typedef struct packed {
    shift_e sh;
    logic   neg;      // negate the shifted value
  } mcode_t;

  // Control token carried through the PE array with each data vector.
  typedef struct packed {
    logic       calc;    // CALC: the vector is valid, compute
    logic       clr;     // CLR: clear the accumulator registers
    logic       new4x4;  // NEW_4x4T: first vector of a new block
    ttype_e     ttype;   // TYPE_T
    logic       pass;    // 0: first 1-D pass, 1: second (transposed) pass
    logic [1:0] idx;     // vector index within the pass
    logic [1:0] sweep;   // repetition of the vector in the 2x4 and 1x4 setups
  } tok_t;

  localparam tok_t TOK_IDLE = '{calc: 1'b0, clr: 1'b0, new4x4: 1'b0,
                                ttype: T_FDCT, pass: 1'b0, idx: 2'd0,
                                sweep: 2'd0};

  // Number of vectors (input lines) per pass: 4 for the 4x4 transforms, 2 for
  // the pair of 2x2 Hadamard transforms.
  function automatic logic [2:0] lines_per_block(ttype_e t);
    return (t == T_H2) ? 3'd2 : 3'd4;
  endfunction

  // Number of times each vector passes through an array of `rows` PE rows: the
  // 4x4 transforms need 4 kernel rows, the 2x2 pair needs 2, and an array with
  // fewer PE rows covers them in several sweeps (kernel row = PE row + rows *
  // sweep).
  function automatic logic [2:0] sweeps(ttype_e t, int unsigned rows);
    int unsigned need;
    need = (t == T_H2) ? 2 : 4;
    return (rows >= need) ? 3'd1 : 3'(need / rows);
  endfunction

  // Kernel coefficient A[row][col] as a shift/negate code. Row = output
  // coefficient index (COORD_Y), col = input element index (COORD_X).
  function automatic mcode_t coef(ttype_e t, logic [1:0] row, logic [1:0] col);
    mcode_t m;
    m.sh  = SH_X1;
    m.neg = 1'b0;
    unique case (t)
      T_FDCT: begin
        // [1 1 1 1; 2 1 -1 -2; 1 -1 -1 1; 1 -2 2 -1]
        unique case (row)
          2'd0: m.neg = 1'b0;
          2'd1: begin
            m.sh  = (col == 2'd0 || col == 2'd3) ? SH_X2 : SH_X1;
            m.neg = (col >= 2'd2);
          end
          2'd2: m.neg = (col == 2'd1 || col == 2'd2);
          2'd3: begin
            m.sh  = (col == 2'd1 || col == 2'd2) ? SH_X2 : SH_X1;
            m.neg = (col == 2'd1 || col == 2'd3);
          end
        endcase
      end
      T_IDCT: begin
        // transpose of the printed inverse kernel:
        // [1 1 1 1/2; 1 1/2 -1 -1; 1 -1/2 -1 1; 1 -1 1 -1/2]
        unique case (row)
          2'd0: m.sh = (col == 2'd3) ? SH_HALF : SH_X1;
          2'd1: begin
            m.sh  = (col == 2'd1) ? SH_HALF : SH_X1;
            m.neg = (col >= 2'd2);
          end
          2'd2: begin
            m.sh  = (col == 2'd1) ? SH_HALF : SH_X1;
            m.neg = (col == 2'd1 || col == 2'd2);
          end
          2'd3: begin
            m.sh  = (col == 2'd3) ? SH_HALF : SH_X1;
            m.neg = (col == 2'd1 || col == 2'd3);
          end
        endcase
      end
      T_H4: begin
        // [1 1 1 1; 1 1 -1 -1; 1 -1 -1 1; 1 -1 1 -1]
        unique case (row)
          2'd0: m.neg = 1'b0;
          2'd1: m.neg = (col >= 2'd2);
          2'd2: m.neg = (col == 2'd1 || col == 2'd2);
          2'd3: m.neg = (col == 2'd1 || col == 2'd3);
        endcase
      end
      T_H2: begin
        // [1 1; 1 -1] in columns 0-1 and again in columns 2-3
        m.neg = row[0] & col[0];
      end
    endcase
    return m;
  endfunction

endpackage
