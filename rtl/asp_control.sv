// asp_control: control unit of the option-pricing processor. It starts a
// run, issues n_iter samples into the datapath, and stops when the cycle
// counter reaches n_iter + PIPE_LAT, the point where the last sample has
// left the pipeline; it then latches the datapath output as the result
// and raises `done`.
//
// States: IDLE -> (start) -> RUN -> DRAIN -> DONE; `start` in DONE begins
// a new run. In the start cycle the counter is cleared and the random
// seeds are loaded. RUN lasts n_iter cycles (counter 0 .. n_iter-1) with
// `issue` high and `first` high in its first cycle. DRAIN waits until the
// counter reads n_iter - 1 + PIPE_LAT; in that cycle `z` holds the final
// value, which is latched. The counter is enabled in RUN and DRAIN, so it
// stops at n_iter + PIPE_LAT, the run length in cycles.
//
// Using the cycle count as the stop condition follows the design; the
// state encoding and the handshake (a start pulse, a done level) are this
// design's. n_iter must be at least 1.
module asp_control #(
  parameter int PIPE_LAT = 26
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [31:0] n_iter,
  input  logic [63:0] count,
  input  logic [31:0] z,
  output logic        cnt_clear,
  output logic        cnt_en,
  output logic        load,
  output logic        issue,
  output logic        first,
  output logic [31:0] result,
  output logic        done
);

  typedef enum logic [1:0] {IDLE, RUN, DRAIN, DONE} state_t;
  state_t state;

  logic last_issue, last_drain;
  assign last_issue = count == 64'(n_iter) - 64'd1;
  assign last_drain = count == 64'(n_iter) - 64'd1 + 64'(PIPE_LAT);

  always_comb begin
    cnt_clear = 1'b0;
    cnt_en    = 1'b0;
    load      = 1'b0;
    issue     = 1'b0;
    first     = 1'b0;
    case (state)
      IDLE, DONE: begin
        cnt_clear = start;
        load      = start;
      end
      RUN: begin
        cnt_en = 1'b1;
        issue  = 1'b1;
        first  = count == 64'd0;
      end
      DRAIN: cnt_en = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= IDLE;
      result <= '0;
      done   <= 1'b0;
    end else begin
      case (state)
        IDLE, DONE: if (start) begin
          state <= RUN;
          done  <= 1'b0;
        end
        RUN:   if (last_issue) state <= DRAIN;
        DRAIN: if (last_drain) begin
          state  <= DONE;
          result <= z;
          done   <= 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // a run issues exactly one `first` and never issues while done
  assert property (@(posedge clk) disable iff (rst) first |-> issue);
  assert property (@(posedge clk) disable iff (rst) done |-> !issue);

endmodule
