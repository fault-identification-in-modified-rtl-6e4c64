// Cycle-level reference model of one MHDPWM generator, used by the
// testbenches. It is written from the event rules of the design, not from
// the RTL structure: per Fclk cycle it evaluates the SET and RESET events for
// the current period position and duty word, then advances the state by one
// rising edge.
//   SET  events: period count == upper field; ring position == 2^ND - lower
//   RESET events: period count == 0; second counter (restarted at the rising
//                 edge of the first SET event) == upper field; ring position
//                 == lower field
//   output flop: reset wins, then set, else hold.
package mhdpwm_ref_pkg;
  class mhdpwm_ref;
    int nc, nd;
    int cnt, pos, cnt2;
    bit act2, setc_prev, q;
    // events of the last evaluated cycle, for coverage counting
    bit ev_set_c, ev_reset1, ev_reset2, ev_set_d, ev_reset_d;

    function new(int nc_i, int nd_i);
      nc = nc_i;
      nd = nd_i;
      reset();
    endfunction

    function void reset();
      cnt = 0; pos = 0; cnt2 = 0; act2 = 0; setc_prev = 0; q = 0;
    endfunction

    // advance one rising edge with duty word `duty` applied
    function void step(int duty);
      int dc, dl, w, mc;
      bit s, r, start;
      mc = 1 << nc;
      w  = 1 << nd;
      dc = (duty >> nd) % mc;
      dl = duty % w;
      ev_set_c   = (cnt == dc);
      ev_reset1  = (cnt == 0);
      ev_reset2  = act2 && (cnt2 == dc);
      ev_reset_d = (pos == dl);
      ev_set_d   = (pos == ((w - dl) % w));
      start = ev_set_c && !setc_prev;
      s = ev_set_c || ev_set_d;
      r = ev_reset1 || ev_reset2 || ev_reset_d;
      if (r)      q = 0;
      else if (s) q = 1;
      if (start) begin
        cnt2 = 0; act2 = 1;
      end else if (act2) begin
        if (cnt2 == dc) act2 = 0;
        cnt2 = (cnt2 + 1) % mc;
      end
      setc_prev = ev_set_c;
      cnt = (cnt + 1) % mc;
      pos = (pos + 1) % w;
    endfunction
  endclass
endpackage
