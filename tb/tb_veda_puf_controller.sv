// tb_veda_puf_controller: runs the full-size controller (128-bit words, two
// expansion rounds) against a stand-in PUF with a simple keyed response
// function and a random 1-4 cycle response latency. For several challenges
// it checks every bit of the 21352-bit key against a reference of the
// algorithm, the key length, that bits beyond the key are zero, the
// busy/done protocol, that each PUF evaluation gets a KEY_W-bit challenge
// equal to the expected chunk, and the number of PUF evaluations per key
// (1 + 13 + 167).
module tb_veda_puf_controller;
  import veda_puf_pkg::*;
  import veda_ref_pkg::*;

  localparam int unsigned W     = KEY_W;
  localparam int unsigned DEPTH = ceil_div(expanded_len(KEY_W, ROUNDS), KEY_W);
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk = 0, rst_n = 0, start = 0;
  logic [W-1:0] challenge = '0, key_rd_data;
  logic [AW-1:0] key_rd_addr = '0;
  logic busy, done;
  logic [31:0] key_len;
  logic puf_launch, puf_resp_valid;
  logic [W-1:0] puf_challenge, puf_response;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  veda_puf_controller dut (
    .clk(clk), .rst_n(rst_n), .start(start), .challenge(challenge),
    .busy(busy), .done(done), .key_len(key_len),
    .key_rd_addr(key_rd_addr), .key_rd_data(key_rd_data),
    .puf_launch(puf_launch), .puf_challenge(puf_challenge),
    .puf_response(puf_response), .puf_resp_valid(puf_resp_valid));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Stand-in PUF: a fixed scrambling of the challenge.
  function automatic logic [W-1:0] stub(logic [W-1:0] c);
    return {c[W-8:0], c[W-1:W-7]} ^ ~(c >> 3) ^ W'(128'h5a0f_c3a9_5a0f_c3a9_5a0f_c3a9_5a0f_c3a9);
  endfunction

  function automatic bitq_t stub_q(bitq_t c);
    logic [W-1:0] v = '0, r;
    bitq_t o;
    for (int i = 0; i < W; i++) v[i] = (i < c.size()) ? c[i] : 1'b0;
    r = stub(v);
    for (int i = 0; i < W; i++) o.push_back(r[i]);
    return o;
  endfunction

  // Expected challenges seen by the PUF, in order.
  bitq_t chal_log[$];
  int    launches;

  // stand-in PUF with random latency
  initial begin
    puf_resp_valid = 0;
    puf_response   = '0;
    forever begin
      @(posedge clk);
      puf_resp_valid <= 0;
      if (puf_launch) begin
        automatic logic [W-1:0] c = puf_challenge;
        automatic bitq_t q;
        launches++;
        for (int i = 0; i < W; i++) q.push_back(c[i]);
        chal_log.push_back(q);
        repeat ($urandom_range(0, 3)) @(posedge clk);
        puf_response   <= stub(c);
        puf_resp_valid <= 1;
      end
    end
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic gen_key(logic [W-1:0] c1);
    bitq_t r, pc, chunk, ans, expect_chal[$];
    int n = 0;
    // reference
    for (int i = 0; i < W; i++) chunk.push_back(c1[i]);
    expect_chal.push_back(chunk);
    r = stub_q(chunk);
    for (int k = 0; k < ROUNDS; k++) begin
      pc = ghana_ref(r);
      r.delete();
      for (int base = 0; base < pc.size(); base += W) begin
        chunk.delete();
        for (int j = 0; j < W; j++) chunk.push_back(base + j < pc.size() ? pc[base + j] : 1'b0);
        expect_chal.push_back(chunk);
        ans = stub_q(chunk);
        for (int j = 0; j < W && base + j < pc.size(); j++) r.push_back(ans[j]);
      end
    end
    // run
    chal_log.delete();
    launches = 0;
    challenge <= c1;
    start <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge clk);
    check(busy && !done, "busy after start");
    while (!done) begin
      @(posedge clk);
      if (!done) n++;
      if (!done && !busy) begin
        check(0, "busy dropped before done");
        break;
      end
    end
    check(key_len == r.size(), $sformatf("key length %0d, expected %0d", key_len, r.size()));
    check(r.size() == expanded_len(W, ROUNDS), "reference length");
    check(launches == expect_chal.size(), $sformatf("PUF evaluations %0d, expected %0d", launches, expect_chal.size()));
    for (int i = 0; i < expect_chal.size() && i < chal_log.size(); i++)
      check(chal_log[i] == expect_chal[i], $sformatf("challenge word %0d", i));
    // read the key back
    for (int a = 0; a < DEPTH; a++) begin
      key_rd_addr <= AW'(a);
      @(posedge clk);
      #1;
      for (int b = 0; b < W; b++) begin
        int idx = a * W + b;
        if (idx < r.size()) check(key_rd_data[b] == r[idx], $sformatf("key bit %0d", idx));
        else                check(key_rd_data[b] == 1'b0, $sformatf("pad bit %0d is zero", idx));
      end
    end
    $display("key of %0d bits in %0d cycles, %0d PUF evaluations", key_len, n, launches);
  endtask

  initial begin
    logic [W-1:0] c;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(!busy && !done, "idle after reset");
    for (int t = 0; t < 3; t++) begin
      for (int i = 0; i < W; i += 32) c[i +: 32] = $urandom;
      gen_key(c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
