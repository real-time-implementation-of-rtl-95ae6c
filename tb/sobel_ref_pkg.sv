// sobel_ref_pkg: reference Sobel arithmetic for the testbenches.
//
// Works on a 3x3 neighbourhood given as n[row][col] (row 0 top, col 0 left), straight from
// the two Sobel masks: Gx weighs the bottom row minus the top row by 1, 2, 1 across the
// columns, Gy weighs the left column minus the right column by 1, 2, 1 down the rows. The
// magnitude is |Gx| + |Gy| clamped to 255. Plain integers throughout, so it shares no
// arithmetic with the design.
package sobel_ref_pkg;

  function automatic int ref_gx(input int n[3][3]);
    int s = 0;
    for (int c = 0; c < 3; c++) s += ((c == 1) ? 2 : 1) * (n[2][c] - n[0][c]);
    return s;
  endfunction

  function automatic int ref_gy(input int n[3][3]);
    int s = 0;
    for (int r = 0; r < 3; r++) s += ((r == 1) ? 2 : 1) * (n[r][0] - n[r][2]);
    return s;
  endfunction

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  // Unclamped |Gx| + |Gy|.
  function automatic int ref_sum(input int n[3][3]);
    return iabs(ref_gx(n)) + iabs(ref_gy(n));
  endfunction

  function automatic int ref_mag(input int n[3][3]);
    int s = ref_sum(n);
    return (s > 255) ? 255 : s;
  endfunction

endpackage
