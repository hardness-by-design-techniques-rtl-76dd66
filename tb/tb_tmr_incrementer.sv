// tb_tmr_incrementer: self-checking testbench for the registered incrementer.
// Applies random inputs and enables; after each edge the output must be the
// previous input plus one (modulo 2**WIDTH) when enabled, and must hold its
// value when not. Checks the one-cycle latency and the wrap from 255 to 0.
module tb_tmr_incrementer;
  localparam int unsigned WIDTH = hbd_pkg::COUNT_W;

  logic             clk = 1'b0;
  logic             rst;
  logic             ce;
  logic [WIDTH-1:0] d;
  logic [WIDTH-1:0] q;
  int               checks = 0;
  int               failures = 0;
  int unsigned      expect_q;

  tmr_incrementer dut (
    .clk_i(clk), .rst_i(rst), .ce_i(ce), .d_i(d), .q_o(q)
  );

  always #5 clk = ~clk;

  task automatic check(input int unsigned exp, input string what);
    checks++;
    if (q !== WIDTH'(exp)) begin
      failures++;
      $display("FAIL %s: q=%0d expected %0d at %0t", what, q, exp, $time);
    end
  endtask

  initial begin
    rst = 1'b1;
    ce  = 1'b1;
    d   = 8'd17;
    @(posedge clk);
    #1 check(0, "reset");
    rst = 1'b0;
    expect_q = 0;
    // wrap-around case first
    d = '1;
    @(posedge clk);
    #1 check(0, "wrap");
    expect_q = 0;
    for (int i = 0; i < 400; i++) begin
      d  = WIDTH'($urandom);
      ce = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (ce) expect_q = (int'(d) + 1) % (1 << WIDTH);
      #1 check(expect_q, ce ? "load" : "hold");
    end
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
