// pairing_fsm: pairs the transition periods of the two channels and forms
// their absolute difference |dT| = |T1 - T2|.
//
// Each channel has a latch and a "full" flag. A new period of a channel
// always replaces the latched one, so when one signal completes several
// periods before the other completes any, only its last one is used. As soon
// as both channels hold a period, `d` = |T1 - T2| is offered with `d_valid`
// (combinational, in the cycle the second period arrives) and both latches
// are emptied on the next clock edge; periods of both channels arriving
// together pair at once. `d_valid` is the pulse that marks each computed
// transition period pair. `overwrite` flags a latched, unpaired period being
// replaced. The pairing rule follows the published algorithm; the
// same-cycle output timing is this design's choice.
module pairing_fsm #(
  parameter int unsigned CW = dda_pkg::CNT_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          p1_valid,
  input  logic [CW-1:0] p1,
  input  logic          p2_valid,
  input  logic [CW-1:0] p2,
  output logic          d_valid,
  output logic [CW-1:0] d,
  output logic          overwrite
);

  typedef enum logic [1:0] {
    EMPTY  = 2'b00,   // no period latched
    HAVE1  = 2'b01,   // period of s1 waiting for s2
    HAVE2  = 2'b10    // period of s2 waiting for s1
  } pair_state_e;

  pair_state_e   state, state_next;
  logic [CW-1:0] t1, t2, t1_next, t2_next;

  always_comb begin
    t1_next    = p1_valid ? p1 : t1;
    t2_next    = p2_valid ? p2 : t2;
    state_next = state;
    d_valid    = 1'b0;
    overwrite  = (p1_valid && state == HAVE1) || (p2_valid && state == HAVE2);
    unique case (state)
      EMPTY: begin
        if (p1_valid && p2_valid) d_valid    = 1'b1;
        else if (p1_valid)        state_next = HAVE1;
        else if (p2_valid)        state_next = HAVE2;
      end
      HAVE1: if (p2_valid) begin d_valid = 1'b1; state_next = EMPTY; end
      HAVE2: if (p1_valid) begin d_valid = 1'b1; state_next = EMPTY; end
      default: state_next = EMPTY;
    endcase
    d = (t1_next >= t2_next) ? t1_next - t2_next : t2_next - t1_next;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= EMPTY;
      t1    <= '0;
      t2    <= '0;
    end else begin
      state <= state_next;
      t1    <= t1_next;
      t2    <= t2_next;
    end
  end

endmodule
