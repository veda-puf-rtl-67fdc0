// key_buffer: word memory that holds a PUF response or key between the
// processing steps of the Veda-PUF controller.
//
// A simple dual-port RAM: one synchronous write port and one synchronous read
// port, DEPTH words of WIDTH bits. The sizes are this design's own choice: the
// default depth of 167 words of 128 bits holds the largest key the controller
// builds (21352 bits after two expansion rounds of a 128-bit response).
//
// Timing: a write with we high takes effect at the rising clk edge; rdata shows
// the word at raddr one cycle after raddr is presented (read-before-write when
// both ports name the same word in the same cycle). The contents are not reset.
module key_buffer
  import veda_puf_pkg::*;
#(
  parameter int unsigned WIDTH = KEY_W,
  parameter int unsigned DEPTH = ceil_div(expanded_len(KEY_W, ROUNDS), KEY_W),
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
