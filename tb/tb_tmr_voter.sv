// tb_tmr_voter: self-checking testbench for the majority voter. Checks all
// 8 combinations of one bit position exhaustively in every bit lane, then
// random words, including the case the voter exists for: two equal words and
// a third one that differs. The reference counts the ones in each bit column.
module tb_tmr_voter;
  localparam int unsigned WIDTH = hbd_pkg::COUNT_W;

  logic [WIDTH-1:0] a, b, c, y;
  int               checks = 0;
  int               failures = 0;

  tmr_voter dut (.a_i(a), .b_i(b), .c_i(c), .y_o(y));

  function automatic logic [WIDTH-1:0] ref_vote(input logic [WIDTH-1:0] x,
                                                input logic [WIDTH-1:0] v,
                                                input logic [WIDTH-1:0] w);
    logic [WIDTH-1:0] r;
    for (int i = 0; i < WIDTH; i++) begin
      int ones = int'(x[i]) + int'(v[i]) + int'(w[i]);
      r[i] = (ones >= 2);
    end
    return r;
  endfunction

  task automatic apply(input logic [WIDTH-1:0] x, input logic [WIDTH-1:0] v,
                       input logic [WIDTH-1:0] w);
    a = x; b = v; c = w;
    #1;
    checks++;
    if (y !== ref_vote(x, v, w)) begin
      failures++;
      $display("FAIL vote(%h,%h,%h)=%h expected %h", x, v, w, y, ref_vote(x, v, w));
    end
  endtask

  initial begin
    for (int lane = 0; lane < WIDTH; lane++)
      for (int p = 0; p < 8; p++)
        apply(WIDTH'(p[0]) << lane, WIDTH'(p[1]) << lane, WIDTH'(p[2]) << lane);
    for (int i = 0; i < 500; i++) begin
      logic [WIDTH-1:0] good, bad;
      good = WIDTH'($urandom);
      bad  = WIDTH'($urandom);
      case (i % 4)
        0: apply(bad, good, good);
        1: apply(good, bad, good);
        2: apply(good, good, bad);
        default: apply(WIDTH'($urandom), WIDTH'($urandom), WIDTH'($urandom));
      endcase
      if (i % 4 != 3 && y !== good) begin
        failures++;
        $display("FAIL single bad word not outvoted");
      end
      if (i % 4 != 3) checks++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
