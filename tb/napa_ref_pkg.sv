// napa_ref_pkg: reference model of the NAPA cellular network for testbenches.
//
// Computes one iteration of the digital CNN directly from its equation,
//   x = C + sum_d a_d*s(y_d) + b_d*u_d,  d in {self, N, E, S, W},
// with s(y) = +1 for y = 0 and -1 for y = 1, a zero contribution from
// neighbours outside the array, and y_new = (x < 0). Arrays are flattened
// row-major (index r*cols + c).
package napa_ref_pkg;
  function automatic int sgn(bit y);
    return y ? -1 : 1;
  endfunction

  function automatic void step(input int rows, input int cols,
                               input int a[5], input int b[5], input int cc,
                               input int u[], input bit y[],
                               output bit ny[], output int nx[]);
    int dr[5] = '{0, -1, 0, 1, 0};
    int dc[5] = '{0, 0, 1, 0, -1};
    ny = new[rows*cols];
    nx = new[rows*cols];
    for (int r = 0; r < rows; r++) begin
      for (int c = 0; c < cols; c++) begin
        int s = cc;
        for (int d = 0; d < 5; d++) begin
          int rr = r + dr[d];
          int cx = c + dc[d];
          if (rr >= 0 && rr < rows && cx >= 0 && cx < cols)
            s += a[d] * sgn(y[rr*cols+cx]) + b[d] * u[rr*cols+cx];
        end
        nx[r*cols+c] = s;
        ny[r*cols+c] = (s < 0);
      end
    end
  endfunction
endpackage
