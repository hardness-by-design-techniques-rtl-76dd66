// tb_tmr_counter_1v: self-checking testbench for the three-voter TMR counter.
// Part 1 replays the fault sequence of the conventional TMR counter: the
// clock enable of counter 3 is stuck at 0 for three cycles starting after
// the count reaches 8, then repaired. Counter 3 must read 7,8,8,8,8,9,A while
// counters 1 and 2 read 7,8,9,A,B,C,D, and the voted output stays correct. Part 2 then stops counter 1 as well: with two copies out of step
// the voted output must follow the reference model and must differ from the
// true count. Part 3 runs random single-copy stalls against the reference
// model (three independent counters and a per-bit majority).
module tb_tmr_counter_1v;
  localparam int unsigned WIDTH = hbd_pkg::COUNT_W;

  logic                  clk = 1'b0;
  logic                  rst;
  logic [2:0]            ce;
  logic [WIDTH-1:0]      count;
  logic [2:0][WIDTH-1:0] raw;
  int                    checks = 0;
  int                    failures = 0;
  int unsigned           mdl [3];
  int unsigned           golden;
  int                    wrong_after_second_fault = 0;

  tmr_counter_1v dut (
    .clk_i(clk), .rst_i(rst), .ce_i(ce), .count_o(count)
  );

  assign raw[0] = dut.g_copy[0].u_counter.q_o;
  assign raw[1] = dut.g_copy[1].u_counter.q_o;
  assign raw[2] = dut.g_copy[2].u_counter.q_o;

  always #5 clk = ~clk;

  function automatic logic [WIDTH-1:0] majority(input int unsigned x, input int unsigned v,
                                                input int unsigned w);
    logic [WIDTH-1:0] r;
    for (int i = 0; i < WIDTH; i++) r[i] = ((((x >> i) & 1) + ((v >> i) & 1) + ((w >> i) & 1)) >= 2);
    return r;
  endfunction

  // One clock edge with the given enables; updates the reference model and
  // checks the voted output against it.
  task automatic step(input logic [2:0] en);
    ce = en;
    @(posedge clk);
    for (int k = 0; k < 3; k++) if (en[k]) mdl[k] = (mdl[k] + 1) % (1 << WIDTH);
    golden = (golden + 1) % (1 << WIDTH);
    #1;
    checks++;
    if (count !== majority(mdl[0], mdl[1], mdl[2])) begin
      failures++;
      $display("FAIL voter: %h expected %h at %0t", count,
               majority(mdl[0], mdl[1], mdl[2]), $time);
    end
  endtask

  task automatic expect_raw(input int k, input logic [WIDTH-1:0] v);
    checks++;
    if (raw[k] !== v) begin
      failures++;
      $display("FAIL counter %0d reads %h expected %h", k + 1, raw[k], v);
    end
  endtask

  localparam logic [WIDTH-1:0] SEQ1 [7] = '{8'h7, 8'h8, 8'h9, 8'hA, 8'hB, 8'hC, 8'hD};
  localparam logic [WIDTH-1:0] SEQ3 [7] = '{8'h7, 8'h8, 8'h8, 8'h8, 8'h8, 8'h9, 8'hA};
  localparam logic [2:0]       EN   [7] = '{3'b111, 3'b111, 3'b011, 3'b011, 3'b011, 3'b111, 3'b111};

  initial begin
    rst = 1'b1;
    ce  = 3'b111;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    mdl = '{0, 0, 0};
    golden = 0;
    // Part 1: count to 7, then the stuck-enable sequence.
    repeat (7) step(3'b111);
    for (int p = 0; p < 7; p++) begin
      if (p > 0) step(EN[p]);
      expect_raw(0, SEQ1[p]);
      expect_raw(1, SEQ1[p]);
      expect_raw(2, SEQ3[p]);
      checks++;
      if (count !== SEQ1[p]) begin
        failures++;
        $display("FAIL voted output %h expected %h", count, SEQ1[p]);
      end
    end
    // Part 2: counter 3 stays 4 behind; now counter 1 stalls too.
    repeat (6) begin
      step(3'b110);
      if (count !== WIDTH'(golden)) wrong_after_second_fault++;
    end
    checks++;
    if (wrong_after_second_fault == 0) begin
      failures++;
      $display("FAIL second fault did not corrupt the conventional TMR output");
    end
    // Part 3: restart from reset, then random single-copy stalls.
    rst = 1'b1;
    @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    mdl = '{0, 0, 0};
    golden = 0;
    #1;
    for (int i = 0; i < 300; i++) begin
      logic [2:0] en;
      en = 3'b111;
      if ($urandom_range(0, 3) == 0) en[$urandom_range(0, 2)] = 1'b0;
      step(en);
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
