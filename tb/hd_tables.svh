// hd_tables.svh: Hadamard reference code words for the testbenches.
// H8_PRINTED holds the published rows of H(8), leftmost digit first; the
// designs hold column j in bit j, so hd8_code() reverses the digits.
// Receivers 9..15 of the extended switch use rows 2..8 of -H(8), the
// bitwise complement of H(8).
localparam logic [7:0] H8_PRINTED [8] = '{8'b11111111, 8'b10101010,
  8'b11001100, 8'b10011001, 8'b11110000, 8'b10100101, 8'b11000011,
  8'b10010110};

function automatic logic [7:0] rev8(logic [7:0] v);
  logic [7:0] r;
  for (int i = 0; i < 8; i++) r[i] = v[7-i];
  return r;
endfunction

// Code word of receiver r (1..15); 0 for r = 0.
function automatic logic [7:0] hd8_code(int r);
  if (r == 0) return 8'h00;
  if (r <= 8) return rev8(H8_PRINTED[r-1]);
  return ~rev8(H8_PRINTED[r-8]);
endfunction
