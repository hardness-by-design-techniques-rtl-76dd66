// tmr_incrementer: registered incrementer with no internal feedback path.
// The register loads d_i + 1 on each enabled clock edge; its own output is
// never fed back to its adder. In the feedback TMR counter the input d_i comes
// from a majority voter over all three copies, so a copy that was stopped by
// a fault reloads the correct next value on the first enabled edge after the
// fault is repaired.
//
// Interface: clk_i, synchronous active-high rst_i (clears q_o), ce_i (load
// enable), d_i (the value to increment), q_o (registered d_i + 1).
// Timing: one cycle from d_i to q_o. The registered "input plus one" behaviour
// follows the hardening study; reset and the enable port are this design's
// choices (the enable is where the study places its stuck-at-0 fault).
module tmr_incrementer #(
  parameter int unsigned WIDTH = hbd_pkg::COUNT_W
) (
  input  logic             clk_i,
  input  logic             rst_i,
  input  logic             ce_i,
  input  logic [WIDTH-1:0] d_i,
  output logic [WIDTH-1:0] q_o
);

  always_ff @(posedge clk_i) begin
    if (rst_i)     q_o <= '0;
    else if (ce_i) q_o <= d_i + WIDTH'(1);
  end

endmodule
