// Reset state of the counter array (see counter_array_next): counter n holds n mod 2^CW,
// snapshot registers, cycle counter and shift clock are 0. Expects NCNT, CW and SW in scope.
function automatic logic [SW-1:0] counter_array_init_state();
  logic [SW-1:0] s;
  s = '0;
  for (int unsigned n = 0; n < NCNT; n++) s[n*CW +: CW] = CW'(n);
  return s;
endfunction
