// tb_veda_puf_top: end-to-end test of the Veda-PUF at its default size
// (128 arbiter PUFs of 128 stages, two expansion rounds, 21352-bit key).
//
// For three random challenges, and once more for the first challenge again,
// it generates the key, reads it back over the host port and compares every
// bit with the reference model of the whole algorithm (arbiter PUF delay
// model, Eqn. 1 / Eqn. 2 expansion, 128-bit chunking). It checks key length,
// the busy/done protocol and that a repeated challenge gives the same key.
// It also counts how often each mechanism of the design ran and fails if one
// never did: the first response, the pre-processing round, the
// post-processing round, the Jata tail of each expansion, the zero-padded
// final chunk of a round, the expander held while the PUF evaluates, and
// the serializer fetching a new response word.
module tb_veda_puf_top;
  import veda_puf_pkg::*;
  import veda_ref_pkg::*;

  localparam int unsigned W      = KEY_W;
  localparam int unsigned DEPTH  = ceil_div(expanded_len(KEY_W, ROUNDS), KEY_W);
  localparam int unsigned AW     = $clog2(DEPTH);
  localparam int unsigned SEED   = 1;   // the top's default DEVICE_SEED

  logic clk = 0, rst_n = 0, start = 0;
  logic [W-1:0] challenge = '0, key_rd_data;
  logic [AW-1:0] key_rd_addr = '0;
  logic busy, done;
  logic [31:0] key_len;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  veda_puf_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .challenge(challenge),
    .busy(busy), .done(done), .key_len(key_len),
    .key_rd_addr(key_rd_addr), .key_rd_data(key_rd_data));

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

  // mechanism counters (the controller waits for a PUF answer to a packed
  // word when it is running but not taking expander output)
  int n_first, n_pre, n_post, n_jata, n_pad, n_stall, n_fetch;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.busy && !dut.u_ctrl.running && dut.u_ctrl.puf_resp_valid) n_first++;
    if (dut.u_ctrl.running && !dut.u_ctrl.exp_out_ready && dut.u_ctrl.puf_resp_valid && dut.u_ctrl.pk_last) begin
      if (dut.u_ctrl.round == 0) n_pre++;
      if (dut.u_ctrl.round == 1) n_post++;
      if (32'(dut.u_ctrl.pk_top) != W - 1) n_pad++;
    end
    if (dut.u_ctrl.exp_out_valid && dut.u_ctrl.exp_out_ready && dut.u_ctrl.exp_out_last) n_jata++;
    if (dut.u_ctrl.exp_out_valid && !dut.u_ctrl.exp_out_ready) n_stall++;
    if (dut.u_ctrl.ser_fetch) n_fetch++;
  end

  bitq_t first_key;

  task automatic gen_key(logic [W-1:0] c1, bit is_repeat);
    bitq_t c, r;
    int n = 0;
    for (int i = 0; i < W; i++) c.push_back(c1[i]);
    r = key_ref(SEED, c, ROUNDS);
    challenge <= c1;
    start <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge clk);
    check(busy && !done, "busy after start");
    while (!done) begin
      @(posedge clk);
      n++;
    end
    check(key_len == expanded_len(W, ROUNDS), $sformatf("key length %0d", key_len));
    check(r.size() == key_len, "reference length");
    for (int a = 0; a < DEPTH; a++) begin
      key_rd_addr <= AW'(a);
      @(posedge clk);
      #1;
      for (int b = 0; b < W; b++) begin
        int idx = a * W + b;
        if (idx < r.size()) begin
          check(key_rd_data[b] == r[idx], $sformatf("key bit %0d", idx));
          if (is_repeat) check(key_rd_data[b] == first_key[idx], $sformatf("repeat bit %0d", idx));
        end
      end
    end
    if (first_key.size() == 0) first_key = r;
    $display("key of %0d bits (%0d bytes) in %0d cycles", key_len, key_len / 8, n);
  endtask

  initial begin
    logic [W-1:0] c, c0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 3; t++) begin
      for (int i = 0; i < W; i += 32) c[i +: 32] = $urandom;
      if (t == 0) c0 = c;
      gen_key(c, 0);
    end
    gen_key(c0, 1);
    $display("first responses %0d, pre-processing rounds %0d, post-processing rounds %0d",
             n_first, n_pre, n_post);
    $display("Jata tails %0d, padded chunks %0d, expander stall cycles %0d, word fetches %0d",
             n_jata, n_pad, n_stall, n_fetch);
    check(n_first == 4, "first response of every key");
    check(n_pre == 4,   "pre-processing round of every key");
    check(n_post == 4,  "post-processing round of every key");
    check(n_jata == 8,  "Jata tail of every expansion");
    check(n_pad > 0,    "padded final chunk happened");
    check(n_stall > 0,  "expander stall happened");
    check(n_fetch > 0,  "response word fetch happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
