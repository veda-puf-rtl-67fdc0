// tb_ghana_expander: streams random bit strings of many lengths (1 to 40,
// and the 128-bit key length) through the Ghana expander with random gaps on
// the input and random back-pressure on the output, and compares every output
// bit and the last flag with the Eqn. 1 / Eqn. 2 reference. Also checks the
// output length 13*(n-2)+6, and that with no gaps or back-pressure a 3-bit
// window costs 14 cycles (13 output cycles and one input cycle).
module tb_ghana_expander;
  import veda_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_bit = 0, in_last = 0, in_ready;
  logic out_valid, out_bit, out_last, out_ready = 0;
  int checks = 0, failures = 0;
  bit gaps = 1;

  always #5 clk = ~clk;

  ghana_expander dut (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .in_bit(in_bit), .in_last(in_last),
    .out_valid(out_valid), .out_ready(out_ready), .out_bit(out_bit), .out_last(out_last));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bitq_t stim, expq;
  int    got;
  bit    stream_done;

  // output side: random back-pressure, compare each bit as it is taken
  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid && out_ready) begin
        check(got < expq.size(), "no more bits than expected");
        if (got < expq.size()) begin
          check(out_bit == expq[got], $sformatf("bit %0d of %0d (n=%0d)", got, expq.size(), stim.size()));
          check(out_last == (got == expq.size() - 1), $sformatf("last flag at bit %0d", got));
        end
        if (out_last) stream_done <= 1;
        got <= got + 1;
      end
      out_ready <= gaps ? 1'($urandom_range(0, 3) != 0) : 1'b1;
    end
  end

  task automatic run_stream(int n);
    int k = 0;
    int unsigned t0;
    stim.delete();
    for (int i = 0; i < n; i++) stim.push_back(1'($urandom));
    expq = ghana_ref(stim);
    got = 0;
    stream_done = 0;
    t0 = int'($time / 10);
    while (k < n) begin
      in_valid <= gaps ? 1'($urandom_range(0, 2) != 0) : 1'b1;
      in_bit   <= stim[k];
      in_last  <= (k == n - 1);
      @(posedge clk);
      if (in_valid && in_ready) k++;
    end
    in_valid <= 0;
    while (!stream_done) @(posedge clk);
    check(got == expq.size(), $sformatf("length %0d for n=%0d", got, n));
    if (n >= 2) check(got == 13 * (n - 2) + 6, "length formula");
    if (!gaps && n >= 3) begin
      // n-2 windows of 14 cycles, the Jata tail, the first fill
      int unsigned cyc = int'($time / 10) - t0;
      check(cyc >= 14 * (n - 2) && cyc <= 14 * (n - 2) + 12,
            $sformatf("cycle count %0d for n=%0d", cyc, n));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 1; n <= 40; n++) run_stream(n);
    for (int r = 0; r < 5; r++) run_stream(128);
    gaps = 0;
    @(posedge clk);
    for (int n = 3; n <= 10; n++) run_stream(n);
    run_stream(128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
