// li_ref_pkg: double-precision reference model of level-index addition/subtraction for
// the testbenches. It evaluates the same recurrences as li_addsub (a_j, b_j, c_j and the
// final division or logarithms) with $exp and $ln, without fixed point or tables, and
// reports the path taken, the result level n and the latency that the one-state-per-clock
// schedule of li_addsub gives for that path.
package li_ref_pkg;
  import li_pkg::*;

  typedef struct {
    real  z;            // level + index of the result
    int   n;            // result level
    logic zero;         // exact zero
    logic neg;          // negative result
    int   lat;          // clocks from the start clock to the done clock
    logic swap, trivial, cancel, level0, level0_log, b_eq, b_less, b_zero;
    int   table_waits;  // steps with a second (b) table look-up
    int   a_underflows; // a_j <= 2^-5, so a_{j-1} = 0
    logic division, one_log, two_log;
  } ref_t;

  function automatic ref_t li_model(input li_t xi, input li_t yi, input logic sub);
    ref_t o;
    li_t  xo, yo;
    int   l, m, states;
    real  f, g, h, b, c;
    real  a [8];
    o = '{z: 0.0, n: 0, zero: 1'b0, neg: 1'b0, lat: 0, swap: 1'b0, trivial: 1'b0,
          cancel: 1'b0, level0: 1'b0, level0_log: 1'b0, b_eq: 1'b0, b_less: 1'b0,
          b_zero: 1'b0, table_waits: 0, a_underflows: 0, division: 1'b0, one_log: 1'b0,
          two_log: 1'b0};
    o.swap = (yi > xi);
    xo     = o.swap ? yi : xi;
    yo     = o.swap ? xi : yi;
    o.neg  = sub && o.swap;
    l = int'(xo.level);
    m = int'(yo.level);
    f = real'(xo.index) / (2.0 ** IDX_W);
    g = real'(yo.index) / (2.0 ** IDX_W);
    states = 0;
    if (sub && xo == yo) begin
      o.zero   = 1'b1;
      o.cancel = 1'b1;
    end else if (l >= TRIVIAL_LEVEL) begin
      o.z       = real'(l) + f;
      o.trivial = 1'b1;
    end else if (l == 0) begin
      o.level0 = 1'b1;
      h = sub ? f - g : f + g;
      states = 1;                                   // FTEST
      if (h < 1.0) o.z = h;
      else begin
        o.z = 1.0 + $ln(h);
        states++;                                   // LN2
        o.level0_log = 1'b1;
      end
    end else begin
      a[l-1] = $exp(-f);
      for (int j = l - 1; j >= 1; j--) begin
        if (a[j] <= 2.0 ** -5) begin
          a[j-1] = 0.0;
          o.a_underflows++;
        end else a[j-1] = $exp(-1.0 / a[j]);
      end
      if (m == 0) o.b_zero = 1'b1;
      else if (m == l) begin
        o.b_eq = 1'b1;
        b = $exp(g - f);
      end else begin
        o.b_less = 1'b1;
        b = (a[m] == 0.0) ? 0.0 : $exp(g - 1.0 / a[m]);
      end
      for (int j = m - 1; j >= 1; j--) begin
        if (a[j] == 0.0) b = (b == 1.0) ? 1.0 : 0.0;
        else             b = $exp(-(1.0 - b) / a[j]);
      end
      if (m == 0) b = g * a[0];
      // a/b phase: step l takes LOOKA + PRODA (or LOOKA, LOOKB, PRODB when b advances);
      // every later step adds RECIP. Then B0 (m = 0 only) and C0.
      for (int j = l; j >= 1; j--) begin
        states += (j == l) ? 2 : 3;
        if (j <= m) begin
          states++;
          o.table_waits++;
        end
      end
      if (m == 0) states++;
      states++;
      c = sub ? 1.0 - b : 1.0 + b;
      if (sub && c == 0.0) o.zero = 1'b1;
      else begin
        for (int j = 0; j < l; j++) begin
          states++;                                 // CTEST
          if (c < a[j]) begin
            o.z = real'(j) + c / a[j];
            states += 2;                            // DRECIP, DMUL
            o.division = 1'b1;
            break;
          end else if (j == l - 1) begin
            h = f + $ln(c);
            states += 3;                            // LNF, HADD, FTEST
            if (h < 1.0) begin
              o.z = real'(l) + h;
              o.one_log = 1'b1;
            end else begin
              o.z = real'(l + 1) + $ln(h);
              states++;                             // LN2
              o.two_log = 1'b1;
            end
            break;
          end else begin
            c = 1.0 + a[j+1] * $ln(c);
            states += 2;                            // LN, CUPD
          end
        end
      end
    end
    o.n   = int'($floor(o.z));
    o.lat = states + 1;
    return o;
  endfunction
endpackage
