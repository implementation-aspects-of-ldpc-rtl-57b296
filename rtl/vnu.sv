// vnu: on-demand variable node activation for one edge. The symbol's
// a-posteriori sum `app` holds its channel value plus the newest
// check-to-variable message of each of its J edges. When a check node needs
// the symbol's message, the unit removes that check's own previous
// contribution, v2c = app - c2v_old, so the check sees the most recent
// information of every other neighbour, including messages produced earlier
// in the same iteration. Once the check has answered with c2v_new the sum
// is brought up to date: app_new = v2c + c2v_new. Both results saturate to
// +-APP_MAX. Purely combinational; `v2c` depends only on `app` and
// `c2v_old`, so v2c -> cnu -> c2v_new -> app_new is not a loop.
module vnu
  import ldpccc_pkg::*;
(
  input  app_t app,
  input  llr_t c2v_old,
  input  llr_t c2v_new,
  output app_t v2c,
  output app_t app_new
);

  function automatic app_t sat(int x);
    if (x > APP_MAX)  return app_t'(APP_MAX);
    if (x < -APP_MAX) return app_t'(-APP_MAX);
    return app_t'(x);
  endfunction

  always_comb begin
    v2c     = sat(int'(app) - int'(c2v_old));
    app_new = sat(int'(v2c) + int'(c2v_new));
  end

endmodule
