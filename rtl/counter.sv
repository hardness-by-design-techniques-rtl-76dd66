// counter: plain WIDTH-bit binary up counter with clock enable. This is the
// non-redundant baseline counter and the unit that the conventional TMR
// counters replicate three times. The counter's own register feeds its own
// adder, so once a copy falls out of step nothing brings it back; that is the
// weakness the feedback TMR counter removes.
//
// Interface: clk_i, synchronous active-high rst_i (clears the count), ce_i
// (count enables; a configuration fault that sticks it at 0 freezes the
// copy), q_o (the registered count).
// Timing: q_o advances by one on every rising edge of clk_i with ce_i high and
// wraps from all ones to zero. Reset and its value of zero are this design's
// choice; the 8-bit width follows the hardening study.
module counter #(
  parameter int unsigned WIDTH = hbd_pkg::COUNT_W
) (
  input  logic             clk_i,
  input  logic             rst_i,
  input  logic             ce_i,
  output logic [WIDTH-1:0] q_o
);

  always_ff @(posedge clk_i) begin
    if (rst_i)     q_o <= '0;
    else if (ce_i) q_o <= q_o + WIDTH'(1);
  end

endmodule
