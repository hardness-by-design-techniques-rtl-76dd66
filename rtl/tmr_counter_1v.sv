// tmr_counter_1v: triple-modular-redundant counter with a single voter. Three
// independent WIDTH-bit counters share one clock and one reset; one bitwise
// majority voter selects the output. A fault in one counter is masked, but the
// voter itself is not replicated, and a counter that has fallen out of step
// stays out of step after it is repaired.
//
// Interface: clk_i (the one global clock), rst_i (synchronous, active high,
// clears all three counters), ce_i[k] (enable of counter k; held high in normal
// operation, a stuck-at-0 configuration fault is modelled by driving it low),
// count_o (the voted count).
// Timing: count_o is combinational from the three counter registers, so it
// changes right after each rising clock edge. The structure follows the
// hardening study; reset and the enable ports are this design's choices.
module tmr_counter_1v #(
  parameter int unsigned WIDTH = hbd_pkg::COUNT_W
) (
  input  logic                                   clk_i,
  input  logic                                   rst_i,
  input  logic [hbd_pkg::N_COPIES-1:0]           ce_i,
  output logic [WIDTH-1:0]                       count_o
);

  logic [hbd_pkg::N_COPIES-1:0][WIDTH-1:0] q;

  for (genvar k = 0; k < hbd_pkg::N_COPIES; k++) begin : g_copy
    counter #(.WIDTH(WIDTH)) u_counter (
      .clk_i (clk_i),
      .rst_i (rst_i),
      .ce_i  (ce_i[k]),
      .q_o   (q[k])
    );
  end

  tmr_voter #(.WIDTH(WIDTH)) u_voter (
    .a_i (q[0]),
    .b_i (q[1]),
    .c_i (q[2]),
    .y_o (count_o)
  );

endmodule
