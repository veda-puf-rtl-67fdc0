// tb_arbiter_puf_array: checks two full-size 128 x 128 arbiter PUF arrays
// (two chips, DEVICE_SEED 1 and 2) against the reference model for random
// challenges, the one-cycle latency, and that the two chips give different
// keys for the same challenge (inter-chip Hamming distance near 50 %).
module tb_arbiter_puf_array;
  import veda_ref_pkg::*;
  import veda_puf_pkg::*;

  localparam int unsigned W     = KEY_W;
  localparam int          NTEST = 20;

  logic clk = 0, rst_n = 0, launch = 0;
  logic [W-1:0] challenge = '0, resp1, resp2;
  logic v1, v2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  arbiter_puf_array #(.DEVICE_SEED(1)) dut1 (
    .clk(clk), .rst_n(rst_n), .launch(launch), .challenge(challenge),
    .response(resp1), .resp_valid(v1));
  arbiter_puf_array #(.DEVICE_SEED(2)) dut2 (
    .clk(clk), .rst_n(rst_n), .launch(launch), .challenge(challenge),
    .response(resp2), .resp_valid(v2));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bitq_t c, e1, e2;
    logic [W-1:0] cv, ev1, ev2;
    automatic int hd = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < NTEST; t++) begin
      c.delete();
      for (int i = 0; i < W; i++) begin
        c.push_back(1'($urandom));
        cv[i] = c[i];
      end
      e1 = puf_ref(1, c, W);
      e2 = puf_ref(2, c, W);
      for (int i = 0; i < W; i++) begin
        ev1[i] = e1[i];
        ev2[i] = e2[i];
      end
      challenge <= cv;
      launch <= 1;
      @(posedge clk);
      launch <= 0;
      #1;
      check(v1 && v2, "resp_valid one cycle after launch");
      check(resp1 == ev1, $sformatf("chip 1 challenge %0d", t));
      check(resp2 == ev2, $sformatf("chip 2 challenge %0d", t));
      hd += $countones(ev1 ^ ev2);
      @(posedge clk);
      #1;
      check(!v1, "resp_valid is a pulse");
    end
    $display("inter-chip Hamming distance %0.2f %%", 100.0 * hd / (NTEST * W));
    check(hd > NTEST * W * 35 / 100 && hd < NTEST * W * 65 / 100, "inter-chip distance near 50 %");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
