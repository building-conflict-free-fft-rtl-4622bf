// cfs_pkg: constants and types shared by the conflict-free FFT engine.
//
// The group size G is the number of datapoints the engine touches in one
// cycle window and therefore the number of single-ported banks it needs.
// Following the sizing rule of the schedule, G is the smallest power of two
// that is at least B*R*P, with R the butterfly radix (2 or 4), B butterflies and
// P = pipeline depth when reads overlap writes (P = 1 when they do not).
package cfs_pkg;

  // Smallest power of two >= B*R*P (P taken as 1 without overlap).
  function automatic int unsigned group_size(int unsigned b, int unsigned r, int unsigned p,
                                             bit overlap);
    int unsigned need;
    int unsigned g;
    need = overlap ? b * r * p : b * r;
    g = 1;
    while (g < need) g = g * 2;
    return g;
  endfunction

  // Engine control states.
  typedef enum logic [1:0] {
    ST_IDLE,   // host owns the banks
    ST_RUN,    // butterflies are being issued
    ST_FLUSH   // pipeline and bypass buffer are emptied into the banks
  } state_t;

endpackage
