// tmr_voter: bitwise best-of-three majority voter. Each output bit is 1 when
// at least two of the three corresponding input bits are 1, so any single
// wrong input word is outvoted bit by bit. On a 4-input LUT FPGA each output
// bit costs one LUT.
//
// Interface: a_i, b_i, c_i (the three redundant words), y_o (the voted word).
// Timing: purely combinational, no clock.
module tmr_voter #(
  parameter int unsigned WIDTH = hbd_pkg::COUNT_W
) (
  input  logic [WIDTH-1:0] a_i,
  input  logic [WIDTH-1:0] b_i,
  input  logic [WIDTH-1:0] c_i,
  output logic [WIDTH-1:0] y_o
);

  always_comb y_o = (a_i & b_i) | (a_i & c_i) | (b_i & c_i);

endmodule
