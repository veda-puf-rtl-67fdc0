// tb_key_buffer: writes random words to every address of a full-size key
// buffer in random order, reads them back with the one-cycle read latency,
// and checks simultaneous read and write of one word (old data is read).
module tb_key_buffer;
  import veda_puf_pkg::*;

  localparam int unsigned W     = KEY_W;
  localparam int unsigned DEPTH = ceil_div(expanded_len(KEY_W, ROUNDS), KEY_W);
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0]  wdata = '0, rdata;
  logic [W-1:0]  model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  key_buffer dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [W-1:0] rnd_word();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] v;
    @(posedge clk);
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      v = rnd_word();
      model[a] = v;
      we <= 1; waddr <= AW'(a); wdata <= v;
      @(posedge clk);
    end
    we <= 0;
    // random overwrites mixed with reads
    for (int t = 0; t < 2000; t++) begin
      int unsigned ra, wa;
      logic [W-1:0] expect_r;
      ra = $urandom_range(0, DEPTH - 1);
      wa = (t % 7 == 0) ? ra : $urandom_range(0, DEPTH - 1);
      expect_r = model[ra];
      v = rnd_word();
      we <= (t % 3 != 0); waddr <= AW'(wa); wdata <= v; raddr <= AW'(ra);
      @(posedge clk);
      if (t % 3 != 0) model[wa] = v;
      we <= 0;
      #1;
      check(rdata == expect_r, $sformatf("read word %0d (t=%0d)", ra, t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
