// pmsi_cache_table: combinational coherence table of a private L1 cache.
//
// One row per (state, event) pair, in the style of a generated protocol
// table: the current coherence state of a line and the event observed on it
// select the next state and the actions the cache controller performs.
// Stable states I, S, M follow the MSI rules (a remote GetS turns M into S,
// a remote GetM invalidates S and M, a modified line is written back when it
// is given up). Transient states follow the predictable MSI scheme: a line
// waiting for the bus is _AD, waiting for data is _D, and a remote request
// seen while waiting for data is remembered (IS_D_I, IM_D_S, IM_D_I) so the
// own access still completes once before the line is handed on. That
// transient set is this design's reading of the predictable MSI protocol;
// only IS_AD and IM_D and the IM_D + data row are spelled out by the
// platform description.
//
// Outputs:
//   next      next state of the line
//   respond   the core access completes now
//   pr_insert a request of type pr_msg goes into the PR buffer
//   fill      the line's data array entry is written with response data
//   store     the core's store data is merged into the line
//   wback     the (possibly just merged) line is pushed into the PWB buffer
//   legal     the event is defined in this state (otherwise next = state)
// Purely combinational, no timing.
module pmsi_cache_table
  import maple_pkg::*;
(
  input  cstate_e state,
  input  cevent_e event_i,
  output cstate_e next,
  output logic    respond,
  output logic    pr_insert,
  output msg_e    pr_msg,
  output logic    fill,
  output logic    store,
  output logic    wback,
  output logic    legal
);

  always_comb begin
    next      = state;
    respond   = 1'b0;
    pr_insert = 1'b0;
    pr_msg    = MSG_NONE;
    fill      = 1'b0;
    store     = 1'b0;
    wback     = 1'b0;
    legal     = 1'b1;
    unique case (state)
      ST_I: unique case (event_i)
        EV_LOAD:  begin next = ST_IS_AD; pr_insert = 1'b1; pr_msg = MSG_GETS; end
        EV_STORE: begin next = ST_IM_AD; pr_insert = 1'b1; pr_msg = MSG_GETM; end
        EV_OTHER_S, EV_OTHER_M, EV_REPLACE: ;
        default:  legal = 1'b0;
      endcase
      ST_S: unique case (event_i)
        EV_LOAD:    respond = 1'b1;
        EV_STORE:   begin next = ST_IM_AD; pr_insert = 1'b1; pr_msg = MSG_GETM; end
        EV_OTHER_S: ;
        EV_OTHER_M: next = ST_I;
        EV_REPLACE: next = ST_I;
        default:    legal = 1'b0;
      endcase
      ST_M: unique case (event_i)
        EV_LOAD:    respond = 1'b1;
        EV_STORE:   begin respond = 1'b1; store = 1'b1; end
        EV_OTHER_S: begin next = ST_S; wback = 1'b1; end
        EV_OTHER_M: begin next = ST_I; wback = 1'b1; end
        EV_REPLACE: begin next = ST_I; wback = 1'b1; end
        default:    legal = 1'b0;
      endcase
      ST_IS_AD: unique case (event_i)
        EV_OWN:                 next = ST_IS_D;
        EV_OTHER_S, EV_OTHER_M: ;
        default:                legal = 1'b0;
      endcase
      ST_IS_D: unique case (event_i)
        EV_OTHER_S: ;
        EV_OTHER_M: next = ST_IS_D_I;
        EV_DATA:    begin next = ST_S; fill = 1'b1; respond = 1'b1; end
        default:    legal = 1'b0;
      endcase
      ST_IS_D_I: unique case (event_i)
        EV_OTHER_S, EV_OTHER_M: ;
        EV_DATA:    begin next = ST_I; respond = 1'b1; end
        default:    legal = 1'b0;
      endcase
      ST_IM_AD: unique case (event_i)
        EV_OWN:                 next = ST_IM_D;
        EV_OTHER_S, EV_OTHER_M: ;
        default:                legal = 1'b0;
      endcase
      ST_IM_D: unique case (event_i)
        EV_OTHER_S: next = ST_IM_D_S;
        EV_OTHER_M: next = ST_IM_D_I;
        EV_DATA:    begin next = ST_M; fill = 1'b1; store = 1'b1; respond = 1'b1; end
        default:    legal = 1'b0;
      endcase
      ST_IM_D_S: unique case (event_i)
        EV_OTHER_S: ;
        EV_OTHER_M: next = ST_IM_D_I;
        EV_DATA:    begin next = ST_S; fill = 1'b1; store = 1'b1; respond = 1'b1; wback = 1'b1; end
        default:    legal = 1'b0;
      endcase
      ST_IM_D_I: unique case (event_i)
        EV_OTHER_S, EV_OTHER_M: ;
        EV_DATA:    begin next = ST_I; fill = 1'b1; store = 1'b1; respond = 1'b1; wback = 1'b1; end
        default:    legal = 1'b0;
      endcase
      default: legal = 1'b0;
    endcase
  end

endmodule
