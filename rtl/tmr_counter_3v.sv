// tmr_counter_3v: triple-modular-redundant counter with three voters and one
// clock input per copy. Counter k runs on clk_i[k]; every voter sees all three
// counter outputs and drives its own output word, so a fault in one voter or
// one output path corrupts only one of the three outputs. Tying the three
// clock inputs to one buffered clock gives the single-clock-buffer variant;
// driving them from three separate clock buffers of the same source gives the
// three-clock variant. As in the one-voter version, a counter that was stopped
// and then repaired resumes from its stale value and stays out of step.
//
// Interface: clk_i[k] (clock of counter k), rst_i (synchronous, active high,
// sampled by each copy on its own clock), ce_i[k] (enable of counter k),
// count_o[k] (output of voter k).
// Timing: the counters advance on their rising edges; the voters are
// combinational. The three clocks are assumed to be one frequency and phase.
// The structure follows the hardening study; reset and the enable ports are
// this design's choices.
module tmr_counter_3v #(
  parameter int unsigned WIDTH = hbd_pkg::COUNT_W
) (
  input  logic [hbd_pkg::N_COPIES-1:0]            clk_i,
  input  logic                                    rst_i,
  input  logic [hbd_pkg::N_COPIES-1:0]            ce_i,
  output logic [hbd_pkg::N_COPIES-1:0][WIDTH-1:0] count_o
);

  logic [hbd_pkg::N_COPIES-1:0][WIDTH-1:0] q;

  for (genvar k = 0; k < hbd_pkg::N_COPIES; k++) begin : g_copy
    counter #(.WIDTH(WIDTH)) u_counter (
      .clk_i (clk_i[k]),
      .rst_i (rst_i),
      .ce_i  (ce_i[k]),
      .q_o   (q[k])
    );

    tmr_voter #(.WIDTH(WIDTH)) u_voter (
      .a_i (q[0]),
      .b_i (q[1]),
      .c_i (q[2]),
      .y_o (count_o[k])
    );
  end

endmodule
