// bin_decoder: binary to one-hot (unitary position code) decoder.
//
// Output k (1 <= k <= N) is 1 exactly when the binary input equals k; the
// value 0, and any value above N, selects no output. Output numbering starts
// at 1, as receivers and sources are numbered in the switches, so bit 0 of
// `y` is output 1. The decoder has W inputs and up to 2^W - 1 useful
// outputs. Purely combinational.
module bin_decoder #(
  parameter int unsigned W = 4,               // input width
  parameter int unsigned N = (1 << W) - 1     // number of outputs
) (
  input  logic [W-1:0] sel,
  output logic [N-1:0] y      // y[k-1] = (sel == k)
);
  always_comb begin
    for (int k = 1; k <= int'(N); k++)
      y[k-1] = (sel == W'(k));
  end
endmodule
