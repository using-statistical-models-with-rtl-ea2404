// tb_ref_pkg: behavioural reference models used by the testbenches, written from
// the arithmetic definition of the filters (plain integer arithmetic on a
// sample history), independent of the RTL structure.
//   hb_model  - one halfband stage: y = sat(floor(sum_k h[k] x[n-k] / 2**(5-g))),
//               h = [-1 0 9 16 9 0 -1], g = out_w - in_w; decimating stages emit
//               on every second input.
//   ds_model  - five such stages in cascade, growth spread as 2,2,2,1,1 (for a
//               12 to 20 bit cascade), the last stage not decimating.
package tb_ref_pkg;

  class hb_model;
    int  in_w, out_w;
    bit  decimate;
    longint hist[$];
    bit  phase;
    int  sat_count;

    function new(int in_w, int out_w, bit decimate);
      this.in_w = in_w; this.out_w = out_w; this.decimate = decimate;
      hist = {0, 0, 0, 0, 0, 0, 0};
      phase = 0; sat_count = 0;
    endfunction

    // Feed one sample; returns 1 and sets y when an output is produced.
    function bit push(longint x, output longint y);
      longint h[7] = '{-1, 0, 9, 16, 9, 0, -1};
      longint acc = 0, maxv, minv;
      int sh;
      hist.push_front(x);
      void'(hist.pop_back());
      for (int k = 0; k < 7; k++) acc += h[k] * hist[k];
      sh = 5 - (out_w - in_w);
      // floor division by 2**sh (arithmetic shift)
      y = acc >>> sh;
      maxv = (longint'(1) <<< (out_w - 1)) - 1;
      minv = -(longint'(1) <<< (out_w - 1));
      if (y > maxv) begin y = maxv; sat_count++; end
      if (y < minv) begin y = minv; sat_count++; end
      phase = ~phase;
      return !decimate || !phase;  // phase toggled: emit on the 2nd of a pair
    endfunction
  endclass

  class ds_model;
    hb_model st[5];

    function new(int in_w = 12, int out_w = 20);
      int w = in_w, g = out_w - in_w, gi;
      for (int s = 0; s < 5; s++) begin
        gi = (g + 4 - s) / 5;
        st[s] = new(w, w + gi, s < 4);
        w += gi;
      end
    endfunction

    function bit push(longint x, output longint y);
      longint v = x, o;
      for (int s = 0; s < 5; s++) begin
        if (!st[s].push(v, o)) return 0;
        v = o;
      end
      y = v;
      return 1;
    endfunction
  endclass

endpackage
