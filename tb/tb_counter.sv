// tb_counter: self-checking testbench for the plain up counter. Drives a
// random clock enable for 600 cycles (more than two wraps of the 8-bit count)
// and compares the count with a reference kept as an integer modulo 2**WIDTH.
// Also checks that reset clears the count mid-run.
module tb_counter;
  localparam int unsigned WIDTH = hbd_pkg::COUNT_W;

  logic             clk = 1'b0;
  logic             rst;
  logic             ce;
  logic [WIDTH-1:0] q;
  int               checks = 0;
  int               failures = 0;
  int unsigned      ref_count;

  counter dut (.clk_i(clk), .rst_i(rst), .ce_i(ce), .q_o(q));

  always #5 clk = ~clk;

  task automatic check(input logic [WIDTH-1:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%0d expected %0d at %0t", what, q, exp, $time);
    end
  endtask

  initial begin
    rst = 1'b1;
    ce  = 1'b0;
    repeat (2) @(posedge clk);
    #1 check('0, "reset");
    rst = 1'b0;
    ref_count = 0;
    for (int i = 0; i < 600; i++) begin
      ce = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (ce) ref_count = (ref_count + 1) % (1 << WIDTH);
      #1 check(WIDTH'(ref_count), "count");
    end
    rst = 1'b1;
    ce  = 1'b1;
    @(posedge clk);
    #1 check('0, "reset mid-run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
