// tb_hbd_top: end-to-end testbench of the three hardened counters at their
// default size. It plays the golden-versus-under-test comparison of a
// configuration-upset campaign: an integer reference counter is the golden
// design, and the same fault pattern is applied to all three structures.
//
// Each round stalls one copy (its clock enable stuck at 0) for 1 to 8 cycles,
// repairs it, lets the counters run, then stalls a different copy, repairs
// that too, and finally resets everything. Every cycle it checks:
//   - the feedback TMR outputs always equal the golden count;
//   - the conventional TMR outputs equal a reference model of three
//     independent counters with per-bit majority voting.
// It counts, and fails if any never happened: a single fault masked by each
// structure, a repaired feedback copy reloading the voted count, a repaired
// conventional copy left out of sequence, a second fault corrupting the
// conventional outputs while the feedback outputs stayed correct, and the
// count wrapping from all ones to zero. The three clock inputs are driven
// from one clock, as three buffers of the same source.
module tb_hbd_top;
  localparam int unsigned WIDTH  = hbd_pkg::COUNT_W;
  localparam int unsigned MOD    = 1 << WIDTH;
  localparam int          ROUNDS = 60;

  logic                  clk = 1'b0;
  logic                  rst;
  logic [2:0]            ce;
  logic [2:0][WIDTH-1:0] count_fb, count_3v;
  logic [WIDTH-1:0]      count_1v;
  logic [2:0][WIDTH-1:0] fb_q;

  int checks = 0;
  int failures = 0;
  int unsigned golden;
  int unsigned conv [3];   // model of the independent conventional counters

  // mechanism counters
  int n_masked_fb = 0, n_masked_3v = 0, n_masked_1v = 0;
  int n_resync_fb = 0, n_out_of_seq_conv = 0;
  int n_conv_corrupted = 0, n_fb_survived_second = 0, n_wrap = 0;

  hbd_top dut (
    .clk_i      ({3{clk}}),
    .rst_i      (rst),
    .ce_fb_i    (ce),
    .ce_3v_i    (ce),
    .ce_1v_i    (ce),
    .count_fb_o (count_fb),
    .count_3v_o (count_3v),
    .count_1v_o (count_1v)
  );

  assign fb_q[0] = dut.u_fb.g_copy[0].u_incr.q_o;
  assign fb_q[1] = dut.u_fb.g_copy[1].u_incr.q_o;
  assign fb_q[2] = dut.u_fb.g_copy[2].u_incr.q_o;

  always #5 clk = ~clk;

  function automatic logic [WIDTH-1:0] majority(input int unsigned x, input int unsigned v,
                                                input int unsigned w);
    logic [WIDTH-1:0] r;
    for (int i = 0; i < WIDTH; i++) r[i] = ((((x >> i) & 1) + ((v >> i) & 1) + ((w >> i) & 1)) >= 2);
    return r;
  endfunction

  function automatic bit fb_copies_agree();
    return (fb_q[0] == fb_q[1]) && (fb_q[1] == fb_q[2]);
  endfunction

  // One clock cycle with enables en; returns whether any conventional output
  // differed from the golden count in this cycle.
  task automatic cycle(input logic [2:0] en, output bit conv_wrong);
    logic [WIDTH-1:0] want_conv;
    ce = en;
    @(posedge clk);
    for (int k = 0; k < 3; k++) if (en[k]) conv[k] = (conv[k] + 1) % MOD;
    if (golden == MOD - 1) n_wrap++;
    golden = (golden + 1) % MOD;
    #1;
    want_conv = majority(conv[0], conv[1], conv[2]);
    conv_wrong = 1'b0;
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (count_fb[k] !== WIDTH'(golden)) begin
        failures++;
        $display("FAIL feedback output %0d = %h, golden %h at %0t", k, count_fb[k],
                 WIDTH'(golden), $time);
      end
      checks++;
      if (count_3v[k] !== want_conv) begin
        failures++;
        $display("FAIL 3-voter output %0d = %h, model %h at %0t", k, count_3v[k], want_conv, $time);
      end
      if (count_3v[k] !== WIDTH'(golden)) conv_wrong = 1'b1;
    end
    checks++;
    if (count_1v !== want_conv) begin
      failures++;
      $display("FAIL 1-voter output = %h, model %h at %0t", count_1v, want_conv, $time);
    end
    if (count_1v !== WIDTH'(golden)) conv_wrong = 1'b1;
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst = 1'b1;
    ce  = 3'b111;
    @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    golden = 0;
    conv = '{0, 0, 0};
    checks++;
    if (count_fb !== '0 || count_3v !== '0 || count_1v !== '0) begin
      failures++;
      $display("FAIL outputs not cleared by reset");
    end
  endtask

  initial begin
    bit wrong;
    rst = 1'b1;
    ce  = 3'b111;
    do_reset();
    for (int r = 0; r < ROUNDS; r++) begin
      int a, b, d1, d2, run;
      int corrupted;
      a  = $urandom_range(0, 2);
      b  = (a + 1 + $urandom_range(0, 1)) % 3;
      d1 = $urandom_range(1, 8);
      d2 = $urandom_range(1, 8);
      run = $urandom_range(0, 5);
      // free running, occasionally long enough to wrap the count
      repeat (r % 10 == 9 ? 300 : $urandom_range(1, 20)) cycle(3'b111, wrong);
      // first fault: copy a stalled for d1 cycles, all outputs still correct
      for (int i = 0; i < d1; i++) begin
        cycle(~(3'b001 << a), wrong);
        if (wrong) begin
          failures++;
          $display("FAIL a single stalled copy reached a conventional output");
        end
      end
      n_masked_fb++;
      n_masked_3v++;
      n_masked_1v++;
      // repair: one cycle with every enable on
      cycle(3'b111, wrong);
      checks++;
      if (fb_copies_agree()) n_resync_fb++;
      else begin
        failures++;
        $display("FAIL feedback copies disagree after repair: %h %h %h", fb_q[0], fb_q[1], fb_q[2]);
      end
      if (conv[a] != golden) n_out_of_seq_conv++;
      repeat (run) cycle(3'b111, wrong);
      // second fault on another copy
      corrupted = 0;
      for (int i = 0; i < d2; i++) begin
        cycle(~(3'b001 << b), wrong);
        if (wrong) corrupted++;
      end
      if (corrupted != 0) begin
        n_conv_corrupted++;
        n_fb_survived_second++;   // the feedback outputs were checked every cycle
      end
      cycle(3'b111, wrong);
      do_reset();
    end

    $display("mechanisms: masked fb=%0d 3v=%0d 1v=%0d, fb resync=%0d, conv out-of-sequence=%0d,",
             n_masked_fb, n_masked_3v, n_masked_1v, n_resync_fb, n_out_of_seq_conv);
    $display("            conv corrupted by 2nd fault=%0d (fb survived), wraps=%0d",
             n_conv_corrupted, n_wrap);
    checks++;
    if (n_masked_fb == 0 || n_masked_3v == 0 || n_masked_1v == 0 || n_resync_fb == 0 ||
        n_out_of_seq_conv == 0 || n_conv_corrupted == 0 || n_fb_survived_second == 0 ||
        n_wrap == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
