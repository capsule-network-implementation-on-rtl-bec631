// routing_ctrl: controller (ASM chart) of the routing-by-agreement datapath.
//
// It walks the flowchart of the design one step per clock cycle:
//   IDLE -> SOFTMAX -> REP1 -> DOT_PRO -> REP2 -> SQUASH -> RESHAPE
//        -> UPDATE_B -> SOFTMAX ...            while the loop flag is 0
//        -> MAG -> DONE                        once the flag is 1
// The source design has a single flag, cleared at the start and set by
// Update_b, which gives exactly two routing passes; here the flag is
// derived from a pass counter so that ITERS (default 2) passes are run,
// and ITERS = 2 reproduces the flag behaviour.
//
// Interface: start is sampled in IDLE; clear_b tells the datapath to zero
// the logits b as a run begins; one enable per flowchart step is high in
// that step's cycle; done is held from DONE until start goes low, after
// which the controller returns to IDLE. flag is the loop flag.
// Timing: from the edge that samples start, done rises 7*ITERS edges
// later (14 for ITERS = 2). The one-cycle-per-step schedule and the start /
// done handshake are this design's choices; the source reports 32 cycles
// for its own schedule. Reset is synchronous and active low.
module routing_ctrl #(
  parameter int unsigned ITERS = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic clear_b,
  output logic en_softmax,
  output logic en_rep1,
  output logic en_dot,
  output logic en_rep2,
  output logic en_squash,
  output logic en_reshape,
  output logic en_update_b,
  output logic en_mag,
  output logic flag,
  output logic busy,
  output logic done
);

  typedef enum logic [3:0] {
    S_IDLE, S_SOFTMAX, S_REP1, S_DOT_PRO, S_REP2, S_SQUASH, S_RESHAPE,
    S_UPDATE_B, S_MAG, S_DONE
  } state_t;

  localparam int unsigned CW = (ITERS > 1) ? $clog2(ITERS) : 1;

  state_t        state, state_n;
  logic [CW-1:0] pass;  // routing passes already completed

  always_comb flag = (32'(pass) == ITERS - 1);

  always_comb begin
    state_n = state;
    unique case (state)
      S_IDLE:     if (start) state_n = S_SOFTMAX;
      S_SOFTMAX:  state_n = S_REP1;
      S_REP1:     state_n = S_DOT_PRO;
      S_DOT_PRO:  state_n = S_REP2;
      S_REP2:     state_n = S_SQUASH;
      S_SQUASH:   state_n = S_RESHAPE;
      S_RESHAPE:  state_n = flag ? S_MAG : S_UPDATE_B;
      S_UPDATE_B: state_n = S_SOFTMAX;
      S_MAG:      state_n = S_DONE;
      S_DONE:     if (!start) state_n = S_IDLE;
      default:    state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pass  <= '0;
    end else begin
      state <= state_n;
      if (state == S_IDLE)          pass <= '0;
      else if (state == S_UPDATE_B) pass <= pass + 1'b1;
    end
  end

  always_comb begin
    clear_b     = (state == S_IDLE) && start;
    en_softmax  = (state == S_SOFTMAX);
    en_rep1     = (state == S_REP1);
    en_dot      = (state == S_DOT_PRO);
    en_rep2     = (state == S_REP2);
    en_squash   = (state == S_SQUASH);
    en_reshape  = (state == S_RESHAPE);
    en_update_b = (state == S_UPDATE_B);
    en_mag      = (state == S_MAG);
    busy        = (state != S_IDLE) && (state != S_DONE);
    done        = (state == S_DONE);
  end

  // Exactly one step of the flowchart is active in any cycle.
  a_one_step: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({en_softmax, en_rep1, en_dot, en_rep2, en_squash, en_reshape,
              en_update_b, en_mag}));

  // Update_b is only reached while the loop flag is still 0.
  a_flag: assert property (@(posedge clk) disable iff (!rst_n)
    en_update_b |-> !flag);

endmodule
