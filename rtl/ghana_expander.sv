// ghana_expander: Ghanapatham bit-stream expansion, one bit per cycle.
//
// The input stream b1, b2, ..., bn is recited the way a Vedic text is recited
// in Ghana form. A 3-bit window slides over the stream one bit at a time; for
// the window (bi, bi+1, bi+2) the expander emits the 13 bits
//
//     [bi, bi+1] [bi+1, bi] [bi, bi+1, bi+2] [bi+2, bi+1, bi] [bi, bi+1, bi+2]
//
// (Eqn. 1 of the Veda-PUF algorithm), for i = 1 .. n-2. After the last full
// window the final pair is recited in Jata form as the 6 bits
//
//     [bn-1, bn] [bn, bn-1] [bn-1, bn]
//
// (Eqn. 2). The output therefore has 13*(n-2)+6 bits for n >= 2. Streams of a
// single bit, which the algorithm never produces, are passed through as that
// one bit (this design's own choice).
//
// How it works: a 3-entry window register holds the current window. A step
// counter walks the 13-entry (Ghana) or 6-entry (Jata) recitation pattern,
// each entry naming the window position to emit. After a Ghana group the
// window shifts by one and the next input bit is taken in, or, when the
// window already ended with the last input bit, the Jata tail follows.
//
// Interface and timing: both sides are valid/ready streams with a last flag
// on the final bit. A transfer happens when valid and ready are both high at a
// rising clk edge. The expander reads one input bit per 14 cycles in steady
// state (13 output cycles plus one input cycle) and emits one bit per cycle
// while out_ready is high. A new stream may start right after out_last.
module ghana_expander (
  input  logic clk,
  input  logic rst_n,
  // input bit stream
  input  logic in_valid,
  output logic in_ready,
  input  logic in_bit,
  input  logic in_last,
  // expanded bit stream
  output logic out_valid,
  input  logic out_ready,
  output logic out_bit,
  output logic out_last
);

  typedef enum logic [2:0] {
    S_FILL,    // taking in the first bits of a stream
    S_GHANA,   // reciting the 13-bit group of the current window
    S_NEXT,    // taking in the next bit to slide the window
    S_JATA,    // reciting the 6-bit group of the final pair
    S_SINGLE   // one-bit stream: emit the bit itself
  } state_t;

  state_t     state;
  logic [2:0] win;      // win[0] is the oldest bit of the window
  logic [1:0] fill;     // bits held while in S_FILL
  logic [3:0] step;     // position in the recitation pattern
  logic       ended;    // win[2] was the last input bit

  // Window position emitted at each step of Eqn. 1.
  function automatic logic [1:0] ghana_pos(input logic [3:0] s);
    case (s)
      4'd0, 4'd3, 4'd4, 4'd9, 4'd10: return 2'd0;
      4'd1, 4'd2, 4'd5, 4'd8, 4'd11: return 2'd1;
      default:                       return 2'd2;  // steps 6, 7, 12
    endcase
  endfunction

  // Window position emitted at each step of Eqn. 2 (pair in win[1:0]).
  function automatic logic [1:0] jata_pos(input logic [3:0] s);
    case (s)
      4'd1, 4'd2, 4'd5: return 2'd1;
      default:          return 2'd0;  // steps 0, 3, 4
    endcase
  endfunction

  always_comb begin
    in_ready  = (state == S_FILL) || (state == S_NEXT);
    out_valid = 1'b0;
    out_bit   = 1'b0;
    out_last  = 1'b0;
    case (state)
      S_GHANA: begin
        out_valid = 1'b1;
        out_bit   = win[ghana_pos(step)];
      end
      S_JATA: begin
        out_valid = 1'b1;
        out_bit   = win[jata_pos(step)];
        out_last  = (step == 4'd5);
      end
      S_SINGLE: begin
        out_valid = 1'b1;
        out_bit   = win[0];
        out_last  = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_FILL;
      win   <= '0;
      fill  <= '0;
      step  <= '0;
      ended <= 1'b0;
    end else begin
      case (state)
        S_FILL: if (in_valid) begin
          win[fill] <= in_bit;
          if (in_last) begin
            ended <= 1'b1;
            fill  <= '0;
            step  <= '0;
            case (fill)
              2'd0:    state <= S_SINGLE;
              2'd1:    state <= S_JATA;
              default: state <= S_GHANA;
            endcase
          end else if (fill == 2'd2) begin
            ended <= 1'b0;
            fill  <= '0;
            step  <= '0;
            state <= S_GHANA;
          end else begin
            fill <= fill + 2'd1;
          end
        end
        S_GHANA: if (out_ready) begin
          if (step == 4'd12) begin
            step <= '0;
            win  <= {1'b0, win[2:1]};
            state <= ended ? S_JATA : S_NEXT;
          end else begin
            step <= step + 4'd1;
          end
        end
        S_NEXT: if (in_valid) begin
          win[2] <= in_bit;
          ended  <= in_last;
          state  <= S_GHANA;
        end
        S_JATA: if (out_ready) begin
          if (step == 4'd5) begin
            step  <= '0;
            state <= S_FILL;
          end else begin
            step <= step + 4'd1;
          end
        end
        S_SINGLE: if (out_ready) state <= S_FILL;
        default: state <= S_FILL;
      endcase
    end
  end

  // Stream rule: a stalled output bit holds until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid && !out_ready |=> out_valid && $stable(out_bit) && $stable(out_last));

endmodule
