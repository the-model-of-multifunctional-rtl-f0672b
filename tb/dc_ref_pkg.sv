// dc_ref_pkg: reference model for the testbenches of the difference-cut
// neural element. It computes the expected results directly from the
// definition of the method rather than by simulating cuts: with the distinct
// non-zero values v_1 < v_2 < ... of the array, cut j subtracts
// q_j = v_j - v_{j-1} from the b_j elements that are >= v_j, so the
// partial sums are S_j = q_j * b_j, the full run takes as many cuts as there
// are distinct non-zero values, and the threshold run stops at the first j
// where S_1+...+S_j >= theta.
package dc_ref_pkg;

  typedef longint unsigned u64_t;

  typedef struct {
    bit      y;
    int      n_cycles;
    u64_t    sum;
    u64_t    sorted[$];
  } ref_res_t;

  function automatic ref_res_t dc_ref(input u64_t a[$], input u64_t theta, input bit full_mode);
    ref_res_t r;
    u64_t vals[$];
    u64_t prev;
    u64_t acc;
    int   b;
    bit   fired;
    r.sorted = a;
    r.sorted.sort();
    vals = r.sorted.unique();
    vals.sort();
    prev = 0;
    acc  = 0;
    fired = 0;
    r.n_cycles = 0;
    foreach (vals[k]) begin
      if (vals[k] == 0) continue;
      b = 0;
      foreach (a[i]) if (a[i] >= vals[k]) b++;
      acc += (vals[k] - prev) * u64_t'(b);
      prev = vals[k];
      r.n_cycles++;
      if (!full_mode && acc >= theta) begin
        fired = 1;
        break;
      end
    end
    r.sum = acc;
    r.y   = (acc >= theta);
    return r;
  endfunction

  // Number of distinct non-zero values (cuts of a full run).
  function automatic int distinct_nonzero(input u64_t a[$]);
    u64_t v[$];
    int c;
    v = a.unique();
    c = 0;
    foreach (v[k]) if (v[k] != 0) c++;
    return c;
  endfunction

endpackage
