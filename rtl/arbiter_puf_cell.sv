// arbiter_puf_cell: behavioural model of a one-bit arbiter PUF.
//
// This is a behavioural model, not a circuit that behaves as a PUF when
// synthesised: a real arbiter PUF gets its answer from the uncontrolled delays
// of its own multiplexers, which no RTL can describe. The model keeps the
// structure of the real part and replaces the silicon delays by fixed numbers.
//
// Structure (as in the conventional arbiter PUF): a launch edge enters two
// paths, "top" and "bottom", that run through STAGES switch stages. Each stage
// is a pair of 2:1 multiplexers whose select is one challenge bit: with the
// bit at 0 each path goes straight on, with the bit at 1 the two paths swap.
// Every multiplexer input has its own delay. At the end a D flip-flop, data
// from the top path and clock from the bottom path, acts as the arbiter: it
// captures 1 when the top edge arrives first, 0 otherwise (a tie counts as
// 0, the data having no time to set up).
//
// Model of the variation (this design's own choice): the delay of input m of
// stage i is NOMINAL_DLY plus an offset in [-DLY_VAR, +DLY_VAR] taken from
// mix32() of SEED, i and m. Different SEEDs stand for different chips or
// different PUF instances on one chip. The model is noise-free, so the same
// challenge always gives the same response (reliability 100 %).
//
// Interface and timing: challenge is sampled with launch at a rising clk edge;
// response and resp_valid appear one cycle later. response holds until the
// next launch. resp_valid is a one-cycle pulse.
module arbiter_puf_cell
  import veda_puf_pkg::*;
#(
  parameter int unsigned STAGES      = 128,
  parameter int unsigned SEED        = 1,
  parameter int unsigned NOMINAL_DLY = 100,
  parameter int unsigned DLY_VAR     = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              launch,
  input  logic [STAGES-1:0] challenge,
  output logic              response,
  output logic              resp_valid
);

  // Widths of one multiplexer delay and of an arrival time.
  localparam int unsigned DW = $clog2(NOMINAL_DLY + DLY_VAR + 1);
  localparam int unsigned TW = $clog2(STAGES * (NOMINAL_DLY + DLY_VAR) + 1);

  typedef logic [3:0][DW-1:0] stage_dly_t;

  // Delay of multiplexer input m (0: top straight, 1: top crossed,
  // 2: bottom straight, 3: bottom crossed) of stage i.
  function automatic int unsigned mux_delay(input int unsigned i, input int unsigned m);
    logic [31:0] h;
    h = mix32(SEED ^ mix32(32'(i * 4 + m) + 32'h9e3779b9));
    return NOMINAL_DLY + (h % (2 * DLY_VAR + 1)) - DLY_VAR;
  endfunction

  // The delays are fixed at elaboration: constants of this "chip".
  stage_dly_t [STAGES-1:0] dly;
  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    for (genvar m = 0; m < 4; m++) begin : g_mux
      localparam logic [DW-1:0] D = DW'(mux_delay(i, m));
      assign dly[i][m] = D;
    end
  end

  // Race of the two edges through the stages; 1 when the top edge wins.
  function automatic logic race(input logic [STAGES-1:0] c, input stage_dly_t [STAGES-1:0] d);
    logic [TW-1:0] t_top, t_bot, top_in, bot_in;
    t_top = '0;
    t_bot = '0;
    for (int unsigned i = 0; i < STAGES; i++) begin
      top_in = t_top;
      bot_in = t_bot;
      if (!c[i]) begin
        t_top = top_in + TW'(d[i][0]);
        t_bot = bot_in + TW'(d[i][2]);
      end else begin
        t_top = bot_in + TW'(d[i][1]);
        t_bot = top_in + TW'(d[i][3]);
      end
    end
    return t_top < t_bot;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      response   <= 1'b0;
      resp_valid <= 1'b0;
    end else begin
      resp_valid <= launch;
      if (launch) response <= race(challenge, dly);
    end
  end

endmodule
