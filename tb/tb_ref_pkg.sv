// tb_ref_pkg: reference models used by the testbenches, written
// independently of the RTL: road search, data set generation of a PTB and
// the pad-pair list of the road encoder.
package tb_ref_pkg;
  import hpt_pkg::*;

  function automatic logic [95:0] ref_rsf(logic [95:0] a, logic [95:0] b, logic [95:0] c);
    logic [95:0] r = '0;
    for (int j = 0; j < 96; j++)
      for (int k = j; k <= j + 1 && k < 96; k++)
        if (b[j] && c[k])
          for (int i = j - 2; i <= j + 2; i++)
            if (i >= 0 && i < 96 && a[i]) r[i] = 1'b1;
    return r;
  endfunction

  function automatic logic pad(logic [95:0] v, int p);
    return (p >= 0 && p < 96) ? v[p] : 1'b0;
  endfunction

  // data sets of one event, most significant RSF first, at most max_sets
  // (0 = all)
  function automatic void ref_sets(input event_t ev, input int max_sets, ref dataset_t q [$]);
    int n = 0;
    for (int i = 95; i >= 0; i--) begin
      if (ev.rsf[i] && (max_sets == 0 || n < max_sets)) begin
        dataset_t d;
        d.code = 7'(i);
        for (int k = 0; k < 5; k++) d.pt2[k] = pad(ev.pt2, i - 2 + k);
        for (int k = 0; k < 6; k++) d.pt3[k] = pad(ev.pt3, i - 2 + k);
        d.bn = ev.bn;
        d.cb = ev.cb;
        q.push_back(d);
        n++;
      end
    end
  endfunction

  // hit PT2/PT3 pairs of a data set in code order: PT2 pad j with PT3 pads
  // j-1 .. j+2 (those in 0..5), numbered consecutively
  function automatic void ref_codes(input dataset_t d, ref int q [$]);
    int c = 0;
    for (int j = 0; j < 5; j++)
      for (int k = j - 1; k <= j + 2; k++)
        if (k >= 0 && k <= 5) begin
          if (d.pt2[j] && d.pt3[k]) q.push_back(c);
          c++;
        end
  endfunction
endpackage
