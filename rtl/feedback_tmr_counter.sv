// feedback_tmr_counter: self-restoring triple-modular-redundant counter with
// the voters inside the feedback path. The counter's loop is cut between its
// register and its adder: each of the three copies is a registered
// incrementer (register <= input + 1), and the input of copy k is the output of
// voter k, which votes over all three registers. Every copy therefore always
// sees the correct current count, whatever copy is faulty. If copy k stops
// (for example its clock enable is stuck at 0), its register goes stale but
// is outvoted; on the first enabled edge after the repair it loads the voted
// value plus one and is back in step with the other two copies, so a later
// fault in another copy is again masked. Driving the three clock inputs from
// three clock buffers of one source gives the three-clock variant; tying them
// together gives the single-clock-buffer variant.
//
// Interface: clk_i[k] (clock of copy k), rst_i (synchronous, active high,
// clears the three registers), ce_i[k] (enable of copy k; held high in normal
// operation), count_o[k] (output of voter k, the voted count).
// Timing: count_o changes right after each rising edge and increments by one
// per enabled cycle, the same sequence as a plain counter. The voter sits in
// the loop, so the critical path is register, voter, adder, register. The
// structure follows the hardening study; reset, the enable ports, and the
// assumption that the three clocks share frequency and phase are this
// design's choices.
module feedback_tmr_counter #(
  parameter int unsigned WIDTH = hbd_pkg::COUNT_W
) (
  input  logic [hbd_pkg::N_COPIES-1:0]            clk_i,
  input  logic                                    rst_i,
  input  logic [hbd_pkg::N_COPIES-1:0]            ce_i,
  output logic [hbd_pkg::N_COPIES-1:0][WIDTH-1:0] count_o
);

  // Registered outputs of the three incrementers.
  logic [hbd_pkg::N_COPIES-1:0][WIDTH-1:0] q;

  for (genvar k = 0; k < hbd_pkg::N_COPIES; k++) begin : g_copy
    tmr_voter #(.WIDTH(WIDTH)) u_voter (
      .a_i (q[0]),
      .b_i (q[1]),
      .c_i (q[2]),
      .y_o (count_o[k])
    );

    tmr_incrementer #(.WIDTH(WIDTH)) u_incr (
      .clk_i (clk_i[k]),
      .rst_i (rst_i),
      .ce_i  (ce_i[k]),
      .d_i   (count_o[k]),
      .q_o   (q[k])
    );
  end

  // After any cycle in which every copy was enabled, the three registers hold
  // the same value: each loaded the same voted count plus one. This holds
  // with at most one faulty copy and in-phase clocks.
  a_resync : assert property (@(posedge clk_i[0]) disable iff (rst_i)
      (&ce_i) |=> (q[0] == q[1]) && (q[1] == q[2]))
    else $error("feedback_tmr_counter: copies disagree after a fully enabled cycle");

endmodule
