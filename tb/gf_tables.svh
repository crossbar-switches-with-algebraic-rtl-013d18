// gf_tables.svh: GF(2^4) reference tables for the testbenches, taken from
// the published element list of GF(2^4) with F(X) = X^4 + X + 1.
// PRINTED[k] is the printed form of a^k (leftmost digit = a^0), which read
// as a binary number is also the receiver number selected by a^k.
localparam logic [3:0] PRINTED [15] = '{4'b1000, 4'b0100, 4'b0010, 4'b0001,
  4'b1100, 4'b0110, 4'b0011, 4'b1101, 4'b1010, 4'b0101, 4'b1110, 4'b0111,
  4'b1111, 4'b1011, 4'b1001};

// Held form (bit i = coefficient of a^i) of a^k.
function automatic logic [3:0] elem_of_pow(int k);
  logic [3:0] p;
  p = PRINTED[k % 15];
  return {p[0], p[1], p[2], p[3]};
endfunction

// Exponent of the element whose receiver number is r (1..15).
function automatic int log_of_rx(int r);
  for (int k = 0; k < 15; k++) if (int'(PRINTED[k]) == r) return k;
  return -1;
endfunction

// Control element that takes sender s (element a^(s-1)) to receiver r.
function automatic logic [3:0] ctrl_for(int s, int r);
  if (s < 1 || s > 15 || r < 1 || r > 15) return 4'b0;
  return elem_of_pow((log_of_rx(r) - (s - 1) + 30) % 15);
endfunction
