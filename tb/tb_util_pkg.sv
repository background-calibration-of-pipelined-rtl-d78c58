// tb_util_pkg: stimulus helpers for the estimator testbenches.
// gen_sample models the error of one decision boundary: an input t uniform on
// [-range, range) is split at 0; samples above get a gap of g codes added,
// then Gaussian circuit noise (sigma, in LSB) is added before quantizing, so
// a noise-free integer g shows up as exactly g missing codes at `base`.
package tb_util_pkg;
  function automatic real urand();
    return real'($urandom) / 4294967296.0;
  endfunction

  // Approximately normal (sum of 12 uniforms), unit variance.
  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += urand();
    return s - 6.0;
  endfunction

  function automatic int floor_int(input real v);
    int i = int'(v);      // rounds to nearest
    if (real'(i) > v) i--;
    return i;
  endfunction

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic gen_sample(input int base, input real g, input real sigma, input real range,
                            output logic hi, output int x);
    real t;
    t  = (2.0 * urand() - 1.0) * range;
    hi = (t >= 0.0);
    x  = base + floor_int(t + (hi ? g : 0.0) + sigma * gauss());
  endtask
endpackage
