// tb_pkg: reference arithmetic shared by the testbenches, written without
// any of the design's structure: integer square root by bisection.
package tb_pkg;
  function automatic longint unsigned isqrt(longint unsigned v);
    longint unsigned lo = 0, hi = 64'd4294967296, mid;
    // invariant: lo*lo <= v < hi*hi
    while (hi - lo > 1) begin
      mid = (lo + hi) / 2;
      if (mid * mid <= v) lo = mid;
      else hi = mid;
    end
    return lo;
  endfunction
endpackage
