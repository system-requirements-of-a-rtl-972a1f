// etm_ref_pkg: testbench reference of the ETM code, written independently of
// the RTL tables. It checks words against the running-digital-sum rule
// directly and rebuilds the byte/word assignment described in mtr_pkg:
// shared zero-disparity words in ascending order (the largest is the sync
// pattern), then the words of only one state in ascending order.
package etm_ref_pkg;
  // Walk a word from RDS s; ok = stays within 0..5; e = end RDS.
  function automatic void walk(input int w, input int s, output bit ok, output int e);
    int r;
    int lo, hi;
    r = s; lo = s; hi = s;
    for (int i = 0; i < 10; i++) begin
      r  = r + (w[9-i] ? 1 : -1);
      lo = (r < lo) ? r : lo;
      hi = (r > hi) ? r : hi;
    end
    ok = (lo >= 0) && (hi <= 5);
    e  = r;
  endfunction

  // Allowed from state st (0: RDS 3, 1: RDS 1), ending in one of the states.
  function automatic bit allowed_from(input int w, input int st);
    bit ok; int e;
    walk(w, (st != 0) ? 1 : 3, ok, e);
    return ok && (e == 1 || e == 3);
  endfunction

  function automatic int end_state(input int w, input int st);
    bit ok; int e;
    walk(w, (st != 0) ? 1 : 3, ok, e);
    return (e == 1) ? 1 : 0;
  endfunction

  class etm_ref;
    int enc[2][256];
    int dec[1024];     // -1: not a code word
    int sync_word;

    function new();
      int shared_list[$], only0[$], only1[$];
      for (int w = 0; w < 1024; w++) begin
        bit a0, a1, z;
        a0 = allowed_from(w, 0);
        a1 = allowed_from(w, 1);
        z  = a0 && a1 && end_state(w, 0) == 0 && end_state(w, 1) == 1;
        if (z) shared_list.push_back(w);
        else begin
          if (a0) only0.push_back(w);
          if (a1) only1.push_back(w);
        end
      end
      sync_word = shared_list[shared_list.size() - 1];
      for (int w = 0; w < 1024; w++) dec[w] = -1;
      for (int b = 0; b < 256; b++) begin
        if (b < 88) begin
          enc[0][b] = shared_list[b];
          enc[1][b] = shared_list[b];
        end else begin
          enc[0][b] = only0[b - 88];
          enc[1][b] = only1[b - 88];
        end
        dec[enc[0][b]] = b;
        dec[enc[1][b]] = b;
      end
    endfunction
  endclass
endpackage
