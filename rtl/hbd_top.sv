// hbd_top: the three hardened counter structures of the study side by side.
//
//   u_fb : feedback TMR counter, voters inside the counting loop
//          (self-restoring; the most reliable structure of the study)
//   u_3v : conventional TMR counter with three output voters
//   u_1v : conventional TMR counter with one output voter
//
// The three clock inputs stand for the outputs of three global clock buffers
// fed from one clock source. Copy k of u_fb and u_3v runs on clk_i[k]; u_1v,
// which the study shows with a single clock buffer, runs on clk_i[0]. Tie the
// three inputs together for the single-clock-buffer variants. The clock and
// output buffers themselves are FPGA primitives and sit outside this module.
//
// Interface: clk_i[2:0], rst_i (synchronous, active high, shared), one enable
// vector per structure (ce_*_i[k] enables copy k; all ones in normal operation,
// a bit driven low models a clock enable stuck at 0 by a configuration upset),
// and the voted outputs: three words each from u_fb and u_3v, one from u_1v.
// Timing: every output counts up by one per enabled clock cycle after reset.
module hbd_top #(
  parameter int unsigned WIDTH = hbd_pkg::COUNT_W
) (
  input  logic [hbd_pkg::N_COPIES-1:0]            clk_i,
  input  logic                                    rst_i,
  input  logic [hbd_pkg::N_COPIES-1:0]            ce_fb_i,
  input  logic [hbd_pkg::N_COPIES-1:0]            ce_3v_i,
  input  logic [hbd_pkg::N_COPIES-1:0]            ce_1v_i,
  output logic [hbd_pkg::N_COPIES-1:0][WIDTH-1:0] count_fb_o,
  output logic [hbd_pkg::N_COPIES-1:0][WIDTH-1:0] count_3v_o,
  output logic [WIDTH-1:0]                        count_1v_o
);

  feedback_tmr_counter #(.WIDTH(WIDTH)) u_fb (
    .clk_i   (clk_i),
    .rst_i   (rst_i),
    .ce_i    (ce_fb_i),
    .count_o (count_fb_o)
  );

  tmr_counter_3v #(.WIDTH(WIDTH)) u_3v (
    .clk_i   (clk_i),
    .rst_i   (rst_i),
    .ce_i    (ce_3v_i),
    .count_o (count_3v_o)
  );

  tmr_counter_1v #(.WIDTH(WIDTH)) u_1v (
    .clk_i   (clk_i[0]),
    .rst_i   (rst_i),
    .ce_i    (ce_1v_i),
    .count_o (count_1v_o)
  );

endmodule
