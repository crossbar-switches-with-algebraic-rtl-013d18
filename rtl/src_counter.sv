// src_counter: source-address counter of the synchronous switch.
//
// Holds the number (1 .. N) of the source being switched. `load` copies the
// binary source address `addr` (weights 1, 2, 4, 8 for N = 15); otherwise,
// with `en` high, each clock advances to the next source, wrapping from N
// back to 1, so the switch can step through its sources one per clock.
// Reset clears it to 0, which selects no source. Load has priority over
// counting.
//
// The published design names the counter and its address inputs only; the
// load priority, wrap and reset behaviour are this implementation's choices.
//
// Ports: clk, rst_n (active low, synchronous), load, addr, en, q.
module src_counter #(
  parameter int unsigned W = 4,
  parameter int unsigned N = (1 << W) - 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] addr,
  input  logic         en,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n)                 q <= '0;
    else if (load)              q <= addr;
    else if (en) begin
      if (32'(q) >= N)          q <= W'(1);
      else                      q <= q + W'(1);
    end
  end
endmodule
