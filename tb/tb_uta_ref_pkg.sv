// tb_uta_ref_pkg: reference models of the H.264/AVC 4x4 and 2x2 transforms,
// written from the textbook definitions and independent of the RTL: the forward
// core transform Y = Cf X Cf^T, the inverse core transform as the standard
// writes it (rows, then columns, with >>1 on the odd inputs), the 4x4 Hadamard
// Y = H X H^T and a pair of 2x2 Hadamards (left block in columns 0-1, right block
// in columns 2-3, rows 0-1).
package tb_uta_ref_pkg;
  import uta_pkg::*;

  typedef int mat_t [4][4];

  function automatic mat_t fdct(mat_t x);
    mat_t t, y;
    int c[4][4] = '{'{1,1,1,1}, '{2,1,-1,-2}, '{1,-1,-1,1}, '{1,-2,2,-1}};
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      t[i][j] = 0;
      for (int k = 0; k < 4; k++) t[i][j] += x[i][k] * c[j][k];   // rows
    end
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      y[i][j] = 0;
      for (int k = 0; k < 4; k++) y[i][j] += c[i][k] * t[k][j];   // columns
    end
    return y;
  endfunction

  function automatic void idct1(input int d[4], output int f[4]);
    int e0, e1, e2, e3;
    e0 = d[0] + d[2];
    e1 = d[0] - d[2];
    e2 = (d[1] >>> 1) - d[3];
    e3 = d[1] + (d[3] >>> 1);
    f[0] = e0 + e3; f[1] = e1 + e2; f[2] = e1 - e2; f[3] = e0 - e3;
  endfunction

  function automatic mat_t idct(mat_t w);
    mat_t t, y;
    int d[4], f[4];
    for (int i = 0; i < 4; i++) begin
      for (int k = 0; k < 4; k++) d[k] = w[i][k];
      idct1(d, f);
      for (int k = 0; k < 4; k++) t[i][k] = f[k];
    end
    for (int j = 0; j < 4; j++) begin
      for (int k = 0; k < 4; k++) d[k] = t[k][j];
      idct1(d, f);
      for (int k = 0; k < 4; k++) y[k][j] = f[k];
    end
    return y;
  endfunction

  function automatic mat_t had4(mat_t x);
    mat_t t, y;
    int h[4][4] = '{'{1,1,1,1}, '{1,1,-1,-1}, '{1,-1,-1,1}, '{1,-1,1,-1}};
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      t[i][j] = 0;
      for (int k = 0; k < 4; k++) t[i][j] += h[i][k] * x[k][j];
    end
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      y[i][j] = 0;
      for (int k = 0; k < 4; k++) y[i][j] += t[i][k] * h[j][k];
    end
    return y;
  endfunction

  // two 2x2 Hadamards: left block in columns 0-1, right in columns 2-3, rows 0-1
  function automatic mat_t had2(mat_t x);
    mat_t y = '{default: 0};
    for (int b = 0; b < 2; b++) begin
      int a = x[0][2*b], bb = x[0][2*b+1], c = x[1][2*b], d = x[1][2*b+1];
      y[0][2*b]   = a + bb + c + d;
      y[0][2*b+1] = a - bb + c - d;
      y[1][2*b]   = a + bb - c - d;
      y[1][2*b+1] = a - bb - c + d;
    end
    return y;
  endfunction

  function automatic mat_t ref_of(ttype_e t, mat_t x);
    case (t)
      T_FDCT:  return fdct(x);
      T_IDCT:  return idct(x);
      T_H4:    return had4(x);
      default: return had2(x);
    endcase
  endfunction

  // Random input block in the value range each transform sees in a codec.
  function automatic mat_t rand_block(ttype_e t);
    mat_t b;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      case (t)
        T_FDCT:  b[i][j] = int'($urandom_range(0, 510)) - 255;
        T_IDCT:  b[i][j] = int'($urandom_range(0, 4000)) - 2000;
        T_H4:    b[i][j] = int'($urandom_range(0, 3000)) - 1500;
        default: b[i][j] = (i < 2) ? int'($urandom_range(0, 12000)) - 6000 : 0;
      endcase
    end
    return b;
  endfunction

endpackage
