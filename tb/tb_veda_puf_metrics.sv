// tb_veda_puf_metrics: the key-quality evaluation of the Veda-PUF run on the
// RTL. Chip A (DEVICE_SEED 1) generates NKEYS full-size keys for random
// challenges; chip B (DEVICE_SEED 2) answers the first NCHIP_B of the same
// challenges. Reported and checked:
// - uniqueness: mean and standard deviation of the pairwise Hamming distance
//   between all keys of chip A, for the 128-bit first responses ("original
//   keys") and the 21352-bit final keys ("processed keys"); mean must lie
//   within 45 % to 55 %;
// - randomness: mean share of zeros per key, within 45 % to 55 %;
// - reliability: every challenge of chip A is asked a second time and must
//   give the identical key (the model is noise-free, so 100 % is expected);
// - inter-chip distance of the final keys of A and B for the same challenge.
module tb_veda_puf_metrics;
  import veda_puf_pkg::*;

  localparam int unsigned W       = KEY_W;
  localparam int unsigned DEPTH   = ceil_div(expanded_len(KEY_W, ROUNDS), KEY_W);
  localparam int unsigned AW      = $clog2(DEPTH);
  localparam int unsigned KL      = expanded_len(KEY_W, ROUNDS);
  localparam int          NKEYS   = 1000;
  localparam int          NREPEAT = 50;
  localparam int          NCHIP_B = 100;

  logic clk = 0, rst_n = 0;
  logic start_a = 0, start_b = 0;
  logic [W-1:0] challenge = '0, rd_a, rd_b;
  logic [AW-1:0] rd_addr = '0;
  logic busy_a, busy_b, done_a, done_b;
  logic [31:0] len_a, len_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  veda_puf_top #(.DEVICE_SEED(1)) chip_a (
    .clk(clk), .rst_n(rst_n), .start(start_a), .challenge(challenge),
    .busy(busy_a), .done(done_a), .key_len(len_a), .key_rd_addr(rd_addr), .key_rd_data(rd_a));
  veda_puf_top #(.DEVICE_SEED(2)) chip_b (
    .clk(clk), .rst_n(rst_n), .start(start_b), .challenge(challenge),
    .busy(busy_b), .done(done_b), .key_len(len_b), .key_rd_addr(rd_addr), .key_rd_data(rd_b));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DEPTH*W-1:0] keys [NKEYS];
  logic [W-1:0]       orig [NKEYS];
  logic [W-1:0]       chal [NKEYS];

  // first response of chip A, taken from the PUF as the controller stores it
  logic [W-1:0] r1_a;
  always @(posedge clk)
    if (chip_a.u_ctrl.busy && !chip_a.u_ctrl.running && chip_a.u_ctrl.puf_resp_valid)
      r1_a <= chip_a.u_ctrl.puf_response;

  task automatic run(bit use_b, output logic [DEPTH*W-1:0] key_a, output logic [DEPTH*W-1:0] key_b);
    start_a <= 1;
    start_b <= use_b;
    @(posedge clk);
    start_a <= 0;
    start_b <= 0;
    @(posedge clk);
    while (!done_a || (use_b && !done_b)) @(posedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      rd_addr <= AW'(a);
      @(posedge clk);
      #1;
      key_a[a*W +: W] = rd_a;
      key_b[a*W +: W] = rd_b;
    end
  endtask

  function automatic real pct(int num, int den);
    return 100.0 * num / den;
  endfunction

  initial begin
    logic [DEPTH*W-1:0] ka, kb;
    real s, s2, m, sd, v;
    int zeros_o, same;
    longint pairs;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int k = 0; k < NKEYS; k++) begin
      logic [W-1:0] c;
      for (int i = 0; i < W; i += 32) c[i +: 32] = $urandom;
      chal[k] = c;
      challenge <= c;
      run(k < NCHIP_B, ka, kb);
      keys[k] = ka;
      orig[k] = r1_a;
      check(len_a == KL, "key length");
      if (k < NCHIP_B) begin
        s = pct($countones(ka ^ kb), KL);
        if (k == 0) begin m = 0; end
        m += s;
      end
    end
    $display("inter-chip distance of final keys (%0d challenges): %0.3f %%", NCHIP_B, m / NCHIP_B);
    check(m / NCHIP_B > 45.0 && m / NCHIP_B < 55.0, "inter-chip distance near 50 %");

    // reliability: ask again, compare
    same = 0;
    for (int k = 0; k < NREPEAT; k++) begin
      challenge <= chal[k];
      run(0, ka, kb);
      check(ka == keys[k], $sformatf("repeated challenge %0d gives the same key", k));
      same += int'(ka == keys[k]);
    end
    $display("reliability: %0d of %0d repeated keys identical", same, NREPEAT);

    // uniqueness, original keys
    s = 0; s2 = 0; pairs = 0;
    for (int i = 0; i < NKEYS; i++)
      for (int j = i + 1; j < NKEYS; j++) begin
        v = pct($countones(orig[i] ^ orig[j]), W);
        s += v; s2 += v * v; pairs++;
      end
    m = s / pairs; sd = $sqrt(s2 / pairs - m * m);
    $display("uniqueness, original %0d-bit keys: mean %0.3f %%, std %0.3f %% (%0d pairs)", W, m, sd, pairs);
    check(m > 45.0 && m < 55.0, "original key uniqueness near 50 %");

    // uniqueness, processed keys
    s = 0; s2 = 0; pairs = 0;
    for (int i = 0; i < NKEYS; i++)
      for (int j = i + 1; j < NKEYS; j++) begin
        v = pct($countones(keys[i] ^ keys[j]), KL);
        s += v; s2 += v * v; pairs++;
      end
    m = s / pairs; sd = $sqrt(s2 / pairs - m * m);
    $display("uniqueness, processed %0d-bit keys: mean %0.3f %%, std %0.3f %%", KL, m, sd);
    check(m > 45.0 && m < 55.0, "processed key uniqueness near 50 %");

    // randomness: share of zeros
    zeros_o = 0;
    s = 0; s2 = 0;
    for (int i = 0; i < NKEYS; i++) begin
      zeros_o += W - $countones(orig[i]);
      v = pct(KL - $countones(keys[i]), KL);   // bits beyond KL are zero and not counted
      s += v; s2 += v * v;
    end
    m = s / NKEYS; sd = $sqrt(s2 / NKEYS - m * m);
    $display("randomness (zeros), original keys: %0.3f %%", pct(zeros_o, NKEYS * W));
    $display("randomness (zeros), processed keys: mean %0.3f %%, std %0.3f %%", m, sd);
    check(pct(zeros_o, NKEYS * W) > 45.0 && pct(zeros_o, NKEYS * W) < 55.0, "original key randomness near 50 %");
    check(m > 45.0 && m < 55.0, "processed key randomness near 50 %");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
