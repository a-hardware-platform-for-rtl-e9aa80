// tb_pmsi_cache_table: exhaustive check of the private-cache coherence table.
//
// Walks all 10 states x 7 events. The expected rows are listed here as a
// compact string per defined transition (state, event -> next state and
// action letters: R respond, P insert into PR (with GetS/GetM), F fill,
// W store merge, B write back); every pair not listed must be reported
// illegal and leave the state unchanged.
// The stable-state rows and the IS_AD and IM_D rows follow the platform's
// protocol; the other transient rows are this design's completion, so the
// list here is a second, independent statement of the same table.
module tb_pmsi_cache_table;
  import maple_pkg::*;

  cstate_e state, next;
  cevent_e ev;
  logic respond, pr_insert, fill, store, wback, legal;
  msg_e pr_msg;

  pmsi_cache_table dut (.state, .event_i(ev), .next, .respond, .pr_insert, .pr_msg,
                        .fill, .store, .wback, .legal);

  typedef struct { cstate_e s; cevent_e e; cstate_e n; string act; msg_e m; } row_t;
  row_t rows [$];

  int checks = 0, failures = 0;

  task automatic add(cstate_e s, cevent_e e, cstate_e n, string act, msg_e m = MSG_NONE);
    row_t r;
    r.s = s; r.e = e; r.n = n; r.act = act; r.m = m;
    rows.push_back(r);
  endtask

  function automatic bit has(string a, byte c);
    for (int i = 0; i < a.len(); i++) if (a[i] == c) return 1'b1;
    return 1'b0;
  endfunction

  initial begin
    // stable states (MSI)
    add(ST_I, EV_LOAD, ST_IS_AD, "P", MSG_GETS);   add(ST_I, EV_STORE, ST_IM_AD, "P", MSG_GETM);
    add(ST_I, EV_OTHER_S, ST_I, "");               add(ST_I, EV_OTHER_M, ST_I, "");
    add(ST_I, EV_REPLACE, ST_I, "");
    add(ST_S, EV_LOAD, ST_S, "R");                 add(ST_S, EV_STORE, ST_IM_AD, "P", MSG_GETM);
    add(ST_S, EV_OTHER_S, ST_S, "");               add(ST_S, EV_OTHER_M, ST_I, "");
    add(ST_S, EV_REPLACE, ST_I, "");
    add(ST_M, EV_LOAD, ST_M, "R");                 add(ST_M, EV_STORE, ST_M, "RW");
    add(ST_M, EV_OTHER_S, ST_S, "B");              add(ST_M, EV_OTHER_M, ST_I, "B");
    add(ST_M, EV_REPLACE, ST_I, "B");
    // transient states
    add(ST_IS_AD, EV_OWN, ST_IS_D, "");            add(ST_IS_AD, EV_OTHER_S, ST_IS_AD, "");
    add(ST_IS_AD, EV_OTHER_M, ST_IS_AD, "");
    add(ST_IS_D, EV_OTHER_S, ST_IS_D, "");         add(ST_IS_D, EV_OTHER_M, ST_IS_D_I, "");
    add(ST_IS_D, EV_DATA, ST_S, "RF");
    add(ST_IS_D_I, EV_OTHER_S, ST_IS_D_I, "");     add(ST_IS_D_I, EV_OTHER_M, ST_IS_D_I, "");
    add(ST_IS_D_I, EV_DATA, ST_I, "R");
    add(ST_IM_AD, EV_OWN, ST_IM_D, "");            add(ST_IM_AD, EV_OTHER_S, ST_IM_AD, "");
    add(ST_IM_AD, EV_OTHER_M, ST_IM_AD, "");
    add(ST_IM_D, EV_OTHER_S, ST_IM_D_S, "");       add(ST_IM_D, EV_OTHER_M, ST_IM_D_I, "");
    add(ST_IM_D, EV_DATA, ST_M, "RFW");
    add(ST_IM_D_S, EV_OTHER_S, ST_IM_D_S, "");     add(ST_IM_D_S, EV_OTHER_M, ST_IM_D_I, "");
    add(ST_IM_D_S, EV_DATA, ST_S, "RFWB");
    add(ST_IM_D_I, EV_OTHER_S, ST_IM_D_I, "");     add(ST_IM_D_I, EV_OTHER_M, ST_IM_D_I, "");
    add(ST_IM_D_I, EV_DATA, ST_I, "RFWB");

    for (int si = 0; si <= 9; si++) begin
      for (int ei = 0; ei <= 6; ei++) begin
        int k;
        state = cstate_e'(si);
        ev    = cevent_e'(ei);
        #1;
        k = -1;
        foreach (rows[r]) if (rows[r].s == state && rows[r].e == ev) k = r;
        checks++;
        if (k < 0) begin
          if (legal || next != state || respond || pr_insert || fill || store || wback) begin
            failures++;
            $display("FAIL: %s + %s should be illegal and inert", state.name(), ev.name());
          end
        end else begin
          string a;
          a = rows[k].act;
          if (!legal || next != rows[k].n || respond != has(a, "R") || pr_insert != has(a, "P") ||
              fill != has(a, "F") || store != has(a, "W") || wback != has(a, "B") ||
              (has(a, "P") && pr_msg != rows[k].m)) begin
            failures++;
            $display("FAIL: %s + %s -> %s (want %s, %s)", state.name(), ev.name(), next.name(),
                     rows[k].n.name(), a);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
