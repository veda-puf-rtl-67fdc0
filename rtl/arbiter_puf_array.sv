// arbiter_puf_array: NUM_PUF one-bit arbiter PUFs that share one challenge.
//
// Each bit of the response word comes from its own arbiter PUF, so a
// STAGES-bit challenge gives a NUM_PUF-bit response in one evaluation (128
// modules for a 128-bit key, as in the reference design). All cells see the
// same challenge and are launched together; they differ only in their
// manufacturing variation, here the SEED of each behavioural cell, derived
// from DEVICE_SEED and the cell index (this design's own choice: one
// DEVICE_SEED stands for one chip).
//
// Interface and timing: challenge is sampled with launch at a rising clk edge;
// response and the one-cycle resp_valid pulse follow one cycle later.
// response holds until the next launch.
module arbiter_puf_array
  import veda_puf_pkg::*;
#(
  parameter int unsigned NUM_PUF     = KEY_W,
  parameter int unsigned STAGES      = KEY_W,
  parameter int unsigned DEVICE_SEED = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               launch,
  input  logic [STAGES-1:0]  challenge,
  output logic [NUM_PUF-1:0] response,
  output logic               resp_valid
);

  logic [NUM_PUF-1:0] cell_valid;

  for (genvar g = 0; g < NUM_PUF; g++) begin : g_cell
    arbiter_puf_cell #(
      .STAGES (STAGES),
      .SEED   (mix32(DEVICE_SEED * 32'h01000193 ^ 32'(g)))
    ) u_cell (
      .clk        (clk),
      .rst_n      (rst_n),
      .launch     (launch),
      .challenge  (challenge),
      .response   (response[g]),
      .resp_valid (cell_valid[g])
    );
  end

  // All cells are launched together, so they finish together.
  assign resp_valid = &cell_valid;

endmodule
