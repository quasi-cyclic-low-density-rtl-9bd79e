// decoder_ctrl: iteration controller of the decoder.
//
// It sequences the loop of the decoding flow: load the received values, then
// repeat (check node update, variable node update, hard decision, parity
// check) until the parity check passes or the iteration limit is reached.
// One iteration of the fully parallel datapath takes one clock cycle.
//
//   IDLE --start--> LOAD --> ITER --(iter>0 and (parity_ok or iter>=limit))--> DONE --> IDLE
//
// LOAD (one cycle) asserts load: the datapath stores the channel values and
// clears its check-to-variable messages. In ITER the controller first judges
// the decisions left by the previous iteration (none on the first cycle) and
// otherwise asserts update, which stores one new set of check messages and
// counts an iteration. DONE lasts one cycle and pulses done; success tells
// whether the last parity check passed. iterations holds the count until the
// next start. A limit of 0 is taken as 1. The encoding of states, the limit
// input and the handshake are this design's choices.
//
// Parameter: ITER_W, width of the iteration counter and limit.
// Interface: start (ignored while busy), parity_ok from the syndrome check,
// max_iter; load, update, busy, done, success, iterations.
// Timing: registered outputs except load/update, which decode the state.
module decoder_ctrl #(
  parameter int ITER_W = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              parity_ok,
  input  logic [ITER_W-1:0] max_iter,
  output logic              load,
  output logic              update,
  output logic              busy,
  output logic              done,
  output logic              success,
  output logic [ITER_W-1:0] iterations
);

  typedef enum logic [1:0] {IDLE, LOAD, ITER, DONE} state_t;

  state_t            state;
  logic [ITER_W-1:0] limit;
  logic              stop;

  assign stop   = (state == ITER) && (iterations != '0) &&
                  (parity_ok || iterations >= limit);
  assign load   = (state == LOAD);
  assign update = (state == ITER) && !stop;
  assign busy   = (state != IDLE);
  assign done   = (state == DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      limit      <= '0;
      iterations <= '0;
      success    <= 1'b0;
    end else begin
      unique case (state)
        IDLE: if (start) begin
          state <= LOAD;
          limit <= (max_iter == '0) ? ITER_W'(1) : max_iter;
        end
        LOAD: begin
          state      <= ITER;
          iterations <= '0;
          success    <= 1'b0;
        end
        ITER: begin
          if (stop) begin
            state   <= DONE;
            success <= parity_ok;
          end else begin
            iterations <= iterations + 1'b1;
          end
        end
        DONE: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  // The iteration count never passes the limit.
  assert property (@(posedge clk) disable iff (!rst_n) (state == ITER) |-> iterations <= limit);
  // load and update are never asserted together.
  assert property (@(posedge clk) disable iff (!rst_n) !(load && update));

endmodule
