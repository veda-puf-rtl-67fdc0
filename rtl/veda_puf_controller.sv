// veda_puf_controller: the Veda-PUF controller algorithm in hardware.
//
// Given a KEY_W-bit challenge C1 the controller runs
//
//   C1  --PUF-->  R1                                (first response)
//   R1  --Ghana expansion-->  PC1  --PUF-->  R2     (pre-processing)
//   R2  --Ghana expansion-->  PC2  --PUF-->  R3     (post-processing)
//
// and leaves R3, the final key, in a key buffer for the host to read. With
// KEY_W = 128 and ROUNDS = 2 the lengths are 128 -> 1644 -> 21352 bits.
//
// How it works. The controller owns two key buffers used in ping-pong: R1 is
// written to buffer 0; each round reads the current response from one buffer
// and writes the next one to the other. A round streams the stored response,
// bit 0 of word 0 first, into the Ghana expander. The expanded bits are packed
// into KEY_W-bit challenge words, bit 0 first. Each full word, and the final
// partial word padded with zeros, is applied to the PUF; the KEY_W-bit answer
// is written to the next free word of the other buffer. So a challenge of L
// bits gives a response of L bits: the bits of the last answer beyond the
// padded chunk's length are cleared. The expander is held (out_ready low)
// while the PUF evaluates a word. Choices of this design, not of the
// algorithm: the bit order, the zero padding, the fixed KEY_W-bit chunking
// and the hardware (rather than processor) sequencing.
//
// Interface and timing. start (while not busy) samples challenge and begins a
// key generation; busy stays high until done rises. done stays high until the
// next start, and key_len then gives the key length in bits. While not busy
// the host reads key word key_rd_addr on key_rd_data one cycle later (bit b of
// the key is bit b%KEY_W of word b/KEY_W). The PUF port expects the timing of
// arbiter_puf_array: launch samples puf_challenge, puf_resp_valid returns
// with the response one or more cycles later. A key generation takes about
// one cycle per expanded bit plus a few cycles per PUF evaluation.
module veda_puf_controller
  import veda_puf_pkg::*;
#(
  parameter int unsigned KEY_W_P  = KEY_W,
  parameter int unsigned ROUNDS_P = ROUNDS,
  localparam int unsigned DEPTH   = ceil_div(expanded_len(KEY_W_P, ROUNDS_P), KEY_W_P),
  localparam int unsigned AW      = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned BW      = $clog2(KEY_W_P)
) (
  input  logic               clk,
  input  logic               rst_n,
  // host side
  input  logic               start,
  input  logic [KEY_W_P-1:0] challenge,
  output logic               busy,
  output logic               done,
  output logic [31:0]        key_len,
  input  logic [AW-1:0]      key_rd_addr,
  output logic [KEY_W_P-1:0] key_rd_data,
  // PUF side
  output logic               puf_launch,
  output logic [KEY_W_P-1:0] puf_challenge,
  input  logic [KEY_W_P-1:0] puf_response,
  input  logic               puf_resp_valid
);

  typedef enum logic [2:0] {
    C_IDLE,       // waiting for start
    C_FIRST,      // waiting for R1
    C_ROUND,      // setting up an expansion round
    C_EXPAND,     // streaming bits through the expander into the packer
    C_PUF,        // waiting for the PUF answer to a packed word
    C_DONE        // key ready in buffer src
  } cstate_t;

  cstate_t      state;
  logic [31:0]  cur_len;     // bits in the source buffer
  logic [31:0]  round;       // expansion rounds completed
  logic         src;         // buffer that holds the current response

  // serializer: source buffer -> expander
  logic [31:0]        ser_cnt;
  logic               ser_have, ser_pend;
  logic [KEY_W_P-1:0] ser_word;

  // packer: expander -> PUF challenge words
  logic [BW-1:0]      pk_pos;
  logic [KEY_W_P-1:0] pk_word;
  logic [AW-1:0]      pk_widx;
  logic               pk_last;   // the word being evaluated ends the round
  logic [BW-1:0]      pk_top;    // highest valid bit of the word being evaluated

  // expander
  logic exp_in_valid, exp_in_ready, exp_in_bit, exp_in_last;
  logic exp_out_valid, exp_out_ready, exp_out_bit, exp_out_last;

  // buffers
  logic [1:0]         buf_we;
  logic [AW-1:0]      buf_waddr, buf_raddr;
  logic [KEY_W_P-1:0] buf_wdata, buf_rdata [2];
  logic [KEY_W_P-1:0] resp_mask;

  for (genvar b = 0; b < 2; b++) begin : g_buf
    key_buffer #(.WIDTH(KEY_W_P), .DEPTH(DEPTH)) u_buf (
      .clk   (clk),
      .we    (buf_we[b]),
      .waddr (buf_waddr),
      .wdata (buf_wdata),
      .raddr (buf_raddr),
      .rdata (buf_rdata[b])
    );
  end

  ghana_expander u_exp (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (exp_in_valid),
    .in_ready  (exp_in_ready),
    .in_bit    (exp_in_bit),
    .in_last   (exp_in_last),
    .out_valid (exp_out_valid),
    .out_ready (exp_out_ready),
    .out_bit   (exp_out_bit),
    .out_last  (exp_out_last)
  );

  logic running;
  assign running = (state == C_EXPAND) || (state == C_PUF);

  // ---- serializer ----
  assign exp_in_valid = running && ser_have;
  assign exp_in_bit   = ser_word[ser_cnt[BW-1:0]];
  assign exp_in_last  = (ser_cnt == cur_len - 1);

  logic ser_fetch;
  assign ser_fetch = running && !ser_have && !ser_pend && (ser_cnt < cur_len);

  // ---- packer ----
  assign exp_out_ready = (state == C_EXPAND);

  // Clears the response bits beyond the length of a padded final chunk.
  always_comb begin
    for (int unsigned i = 0; i < KEY_W_P; i++)
      resp_mask[i] = (i <= 32'(pk_top));
  end

  // ---- buffer ports ----
  always_comb begin
    buf_we    = '0;
    buf_waddr = pk_widx;
    buf_wdata = puf_response & resp_mask;
    if (state == C_FIRST && puf_resp_valid) begin
      buf_we[0] = 1'b1;
      buf_waddr = '0;
      buf_wdata = puf_response;
    end else if (state == C_PUF && puf_resp_valid) begin
      buf_we[~src] = 1'b1;
    end
    buf_raddr = running ? AW'(ser_cnt >> BW) : key_rd_addr;
  end

  assign key_rd_data = buf_rdata[src];
  assign busy        = (state != C_IDLE) && (state != C_DONE);
  assign done        = (state == C_DONE);
  assign key_len     = cur_len;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= C_IDLE;
      cur_len       <= '0;
      round         <= '0;
      src           <= 1'b0;
      ser_cnt       <= '0;
      ser_have      <= 1'b0;
      ser_pend      <= 1'b0;
      ser_word      <= '0;
      pk_pos        <= '0;
      pk_word       <= '0;
      pk_widx       <= '0;
      pk_last       <= 1'b0;
      pk_top        <= '0;
      puf_launch    <= 1'b0;
      puf_challenge <= '0;
    end else begin
      puf_launch <= 1'b0;

      // serializer word fetch (one-cycle read latency)
      if (ser_fetch) ser_pend <= 1'b1;
      if (ser_pend) begin
        ser_word <= buf_rdata[src];
        ser_have <= 1'b1;
        ser_pend <= 1'b0;
      end
      if (exp_in_valid && exp_in_ready) begin
        ser_cnt <= ser_cnt + 1;
        if (&ser_cnt[BW-1:0] || exp_in_last) ser_have <= 1'b0;
      end

      case (state)
        C_IDLE, C_DONE: if (start) begin
          puf_challenge <= challenge;
          puf_launch    <= 1'b1;
          cur_len       <= KEY_W_P;
          round         <= '0;
          src           <= 1'b0;
          state         <= C_FIRST;
        end
        C_FIRST: if (puf_resp_valid) begin
          state <= (ROUNDS_P == 0) ? C_DONE : C_ROUND;
        end
        C_ROUND: begin
          ser_cnt  <= '0;
          ser_have <= 1'b0;
          ser_pend <= 1'b0;
          pk_pos   <= '0;
          pk_word  <= '0;
          pk_widx  <= '0;
          state    <= C_EXPAND;
        end
        C_EXPAND: if (exp_out_valid) begin
          if (&pk_pos || exp_out_last) begin
            // word complete: apply it to the PUF
            puf_challenge         <= pk_word;
            puf_challenge[pk_pos] <= exp_out_bit;
            puf_launch            <= 1'b1;
            pk_last               <= exp_out_last;
            pk_top                <= pk_pos;
            state                 <= C_PUF;
          end else begin
            pk_word[pk_pos] <= exp_out_bit;
            pk_pos          <= pk_pos + 1'b1;
          end
        end
        C_PUF: if (puf_resp_valid) begin
          pk_widx <= pk_widx + 1'b1;
          pk_pos  <= '0;
          pk_word <= '0;
          if (pk_last) begin
            cur_len <= ghana_len(cur_len);
            src     <= ~src;
            round   <= round + 1;
            state   <= (round + 1 == ROUNDS_P) ? C_DONE : C_ROUND;
          end else begin
            state <= C_EXPAND;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  // The serializer never runs past the stored response.
  assert property (@(posedge clk) disable iff (!rst_n) exp_in_valid |-> ser_cnt < cur_len);
  // KEY_W must be a power of two for the bit/word split of the counters.
  initial assert (KEY_W_P == (1 << BW)) else $error("KEY_W_P must be a power of two");

endmodule
