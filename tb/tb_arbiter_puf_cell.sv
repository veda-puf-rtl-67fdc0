// tb_arbiter_puf_cell: checks the behavioural one-bit arbiter PUF against the
// delay-difference reference model for random challenges on two cells with
// different seeds, checks the one-cycle launch-to-response latency and that
// the response holds between launches, and checks that the two cells are not
// identical and not stuck at one value.
module tb_arbiter_puf_cell;
  import veda_ref_pkg::*;

  localparam int unsigned STAGES = 128;
  localparam int unsigned SEED_A = 32'h1234_5678;
  localparam int unsigned SEED_B = 32'h0bad_cafe;
  localparam int          NTEST  = 300;

  logic clk = 0, rst_n = 0, launch = 0;
  logic [STAGES-1:0] challenge = '0;
  logic resp_a, resp_b, valid_a, valid_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  arbiter_puf_cell #(.STAGES(STAGES), .SEED(SEED_A)) dut_a (
    .clk(clk), .rst_n(rst_n), .launch(launch), .challenge(challenge),
    .response(resp_a), .resp_valid(valid_a));
  arbiter_puf_cell #(.STAGES(STAGES), .SEED(SEED_B)) dut_b (
    .clk(clk), .rst_n(rst_n), .launch(launch), .challenge(challenge),
    .response(resp_b), .resp_valid(valid_b));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bitq_t c;
    bit exp_a, exp_b;
    logic [STAGES-1:0] cv;
    automatic int ones_a = 0, differ = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < NTEST; t++) begin
      c.delete();
      for (int i = 0; i < STAGES; i++) c.push_back(1'($urandom));
      // a few structured challenges: all zeros, all ones
      if (t == 0) foreach (c[i]) c[i] = 0;
      if (t == 1) foreach (c[i]) c[i] = 1;
      exp_a = arbiter_ref(SEED_A, c);
      exp_b = arbiter_ref(SEED_B, c);
      for (int i = 0; i < STAGES; i++) cv[i] = c[i];
      challenge <= cv;
      launch <= 1;
      @(posedge clk);
      launch <= 0;
      challenge <= ~challenge;    // must not affect the held response
      #1;
      check(valid_a && valid_b, "resp_valid one cycle after launch");
      check(resp_a == exp_a, $sformatf("cell A challenge %0d", t));
      check(resp_b == exp_b, $sformatf("cell B challenge %0d", t));
      @(posedge clk);
      #1;
      check(!valid_a && resp_a == exp_a, "response holds, valid is a pulse");
      ones_a += int'(exp_a);
      differ += int'(exp_a != exp_b);
    end
    check(ones_a > NTEST / 10 && ones_a < NTEST * 9 / 10, $sformatf("cell A not stuck (%0d ones)", ones_a));
    check(differ > NTEST / 10, $sformatf("cells differ (%0d)", differ));
    $display("cell A ones %0d/%0d, A/B differ on %0d", ones_a, NTEST, differ);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
