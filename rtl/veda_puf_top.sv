// veda_puf_top: Veda-PUF, a controlled arbiter PUF that lengthens its key by
// Ghanapatham (Vedic recitation) expansion.
//
// The top joins the controller (with its Ghana expander and key buffers) to
// an array of KEY_W one-bit arbiter PUFs. The host, in the reference system
// the processor of an IoMT node, talks to it only over the plain start /
// challenge / done / key read interface below, which keeps the PUF and its
// intermediate responses out of the host's reach.
//
// Operation: pulse start with a KEY_W-bit challenge C1. The controller gets R1
// from the PUF, expands it (Eqns. 1 and 2) into challenge PC1, gets R2,
// expands R2 and gets R3, the final key. With the defaults (KEY_W = 128,
// ROUNDS = 2) the key grows from 128 to 21352 bits. When done is high,
// key_len gives the key length and key word key_rd_addr is on key_rd_data one
// cycle later. DEVICE_SEED selects the behavioural PUF's variation and so
// stands for one particular chip.
module veda_puf_top
  import veda_puf_pkg::*;
#(
  parameter int unsigned DEVICE_SEED = 1,
  localparam int unsigned DEPTH      = ceil_div(expanded_len(KEY_W, ROUNDS), KEY_W),
  localparam int unsigned AW         = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [KEY_W-1:0] challenge,
  output logic             busy,
  output logic             done,
  output logic [31:0]      key_len,
  input  logic [AW-1:0]    key_rd_addr,
  output logic [KEY_W-1:0] key_rd_data
);

  logic             puf_launch, puf_resp_valid;
  logic [KEY_W-1:0] puf_challenge, puf_response;

  veda_puf_controller #(.KEY_W_P(KEY_W), .ROUNDS_P(ROUNDS)) u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .start          (start),
    .challenge      (challenge),
    .busy           (busy),
    .done           (done),
    .key_len        (key_len),
    .key_rd_addr    (key_rd_addr),
    .key_rd_data    (key_rd_data),
    .puf_launch     (puf_launch),
    .puf_challenge  (puf_challenge),
    .puf_response   (puf_response),
    .puf_resp_valid (puf_resp_valid)
  );

  arbiter_puf_array #(
    .NUM_PUF     (KEY_W),
    .STAGES      (KEY_W),
    .DEVICE_SEED (DEVICE_SEED)
  ) u_puf (
    .clk        (clk),
    .rst_n      (rst_n),
    .launch     (puf_launch),
    .challenge  (puf_challenge),
    .response   (puf_response),
    .resp_valid (puf_resp_valid)
  );

endmodule
