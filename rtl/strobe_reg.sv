// strobe_reg: output register of the switches.
//
// The switches themselves are combinational; the clock is used only to
// capture their outputs. On a rising clock edge with `strobe` high the
// register loads `d`; otherwise it holds. An active-low synchronous reset
// clears it.
//
// The published design only states that the output register is strobed;
// the enable-register form and the reset are this implementation's choices.
//
// Ports: clk, rst_n, strobe, d, q. Timing: q shows d one clock after the
// strobed edge.
module strobe_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         strobe,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n)      q <= '0;
    else if (strobe) q <= d;
  end
endmodule
