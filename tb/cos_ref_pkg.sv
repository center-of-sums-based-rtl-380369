// cos_ref_pkg -- reference model of the Center-of-Sums defuzzifier for the
// testbenches, written from the formulas with plain integers:
//   L1 = X4 - X1, L2 = X3 - X2          parallel sides of the trapezoid
//   VC = (L1 + L2) / NUM2, AC = H * VC  area (VC kept to 4 bits)
//   CC = X1 + (X4 - X1) / NUM2          centre of the base
//   O  = (CC1*AC1 + CC2*AC2) / (AC1 + AC2), truncated; all ones if 0/0.
// Also a generator of random ordered trapezoids.
package cos_ref_pkg;

  typedef struct {
    int x1, x2, x3, x4, h;
  } trap_t;

  function automatic int ref_q(int n, int d, int qbits);
    if (d == 0) return (1 << qbits) - 1;
    return (n / d) % (1 << qbits);
  endfunction

  function automatic int ref_vc(trap_t t, int num2);
    return ref_q((t.x4 - t.x1) + (t.x3 - t.x2), num2, 4);
  endfunction

  function automatic int ref_area(trap_t t, int num2);
    return t.h * ref_vc(t, num2);
  endfunction

  function automatic int ref_centre(trap_t t, int num2);
    return (t.x1 + ref_q(t.x4 - t.x1, num2, 4)) % 16;
  endfunction

  function automatic int ref_num(trap_t a, trap_t b, int num2);
    return ref_centre(a, num2) * ref_area(a, num2) + ref_centre(b, num2) * ref_area(b, num2);
  endfunction

  function automatic int ref_den(trap_t a, trap_t b, int num2);
    return ref_area(a, num2) + ref_area(b, num2);
  endfunction

  function automatic int ref_out(trap_t a, trap_t b, int num2);
    return ref_q(ref_num(a, b, num2), ref_den(a, b, num2), 16);
  endfunction

  // Four random 4-bit points sorted into ascending order, random height.
  function automatic trap_t rand_trap();
    int p[4];
    trap_t t;
    foreach (p[i]) p[i] = int'($urandom_range(0, 15));
    p.sort();
    t.x1 = p[0]; t.x2 = p[1]; t.x3 = p[2]; t.x4 = p[3];
    t.h  = int'($urandom_range(0, 15));
    return t;
  endfunction

endpackage
