// lms_ctrl: sequencer of the LMS adaptation loop, one sample at a time.
//
// Every multiplier of the filter has one clock of latency, so a sample passes
// through five steps (lms_state_e): IDLE accepts it (in_ready high; a
// handshake on in_valid & in_ready shifts the delay line and latches the
// reference), FILT lets the filter multipliers capture u*w, ERR registers yk,
// y and e, UPD lets the update multipliers capture u*e, and WRITE writes the
// new weights. out_valid is high for the one clock after WRITE, when results
// and weights are all updated; the next sample can be accepted in that same
// clock. The schedule and handshake are this design's choices.
//
// Synchronous, active-high reset to IDLE.
module lms_ctrl
  import lms_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  output logic in_ready,
  output logic accept,     // sample taken this clock
  output logic err_en,     // register yk, y and e
  output logic upd_en,     // write the weights
  output logic out_valid
);

  lms_state_e state, state_n;

  always_comb begin
    in_ready = (state == ST_IDLE);
    accept   = in_ready && in_valid;
    err_en   = (state == ST_ERR);
    upd_en   = (state == ST_WRITE);
    unique case (state)
      ST_IDLE:  state_n = accept ? ST_FILT : ST_IDLE;
      ST_FILT:  state_n = ST_ERR;
      ST_ERR:   state_n = ST_UPD;
      ST_UPD:   state_n = ST_WRITE;
      ST_WRITE: state_n = ST_IDLE;
      default:  state_n = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= ST_IDLE;
      out_valid <= 1'b0;
    end else begin
      state     <= state_n;
      out_valid <= upd_en;
    end
  end

  // a sample is only taken while idle
  assert property (@(posedge clk) disable iff (rst) accept |-> state == ST_IDLE);
  // results are announced exactly once per accepted sample, four clocks later
  assert property (@(posedge clk) disable iff (rst) accept |-> ##4 upd_en);

endmodule
