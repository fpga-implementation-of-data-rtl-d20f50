// led_control: sequencing of the iterative LED engine.
//
// Three states. IDLE and DONE accept a start: that cycle is the load cycle
// (load = 1), in which the input block passes the datapath's input
// multiplexer into the state register. RUN then lasts ROUNDS cycles, one
// round per cycle (run = 1), with round counting 0..ROUNDS-1 for encryption
// and ROUNDS-1..0 for decryption. After the last round the FSM enters DONE
// and raises done until the next start. A start during RUN is ignored.
// The mode given with start is held in mode for the whole operation.
//
// Timing: start sampled at clock edge 0, rounds at edges 1..ROUNDS, done high
// after edge ROUNDS; the result is ready ROUNDS cycles after the load.
// Asynchronous active-low reset to IDLE.
module led_control
  import led_pkg::*;
#(
  parameter int unsigned ROUNDS = led_pkg::NUM_ROUNDS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  mode_t      mode_in,
  output logic       load,     // load cycle: input block enters the state register
  output logic       run,      // a round is evaluated in this cycle
  output round_idx_t round,    // index of the round evaluated in this cycle
  output mode_t      mode,     // mode of the current operation
  output logic       busy,
  output logic       done
);

  typedef enum logic [1:0] {
    S_IDLE = 2'd0,
    S_RUN  = 2'd1,
    S_DONE = 2'd2
  } state_e;

  localparam round_idx_t LAST = round_idx_t'(ROUNDS - 1);

  state_e state;
  logic   last_round;

  assign busy       = (state == S_RUN);
  assign done       = (state == S_DONE);
  assign run        = busy;
  assign load       = start && !busy;
  assign last_round = (mode == MODE_ENC) ? (round == LAST) : (round == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      round <= '0;
      mode  <= MODE_ENC;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state <= S_RUN;
            mode  <= mode_in;
            round <= (mode_in == MODE_ENC) ? '0 : LAST;
          end
        end
        S_RUN: begin
          if (last_round) state <= S_DONE;
          else            round <= (mode == MODE_ENC) ? round + 1'b1 : round - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // busy and done are never raised together.
  a_busy_done: assert property (@(posedge clk) disable iff (!rst_n) !(busy && done));
  // The round index stays in range.
  a_round_range: assert property (@(posedge clk) disable iff (!rst_n) busy |-> round <= LAST);

endmodule
