// End-to-end testbench for li_addsub at its default parameters.
//
// Each operation is checked against li_ref_pkg, a double-precision model of the same
// level-index algorithm (the a_j, b_j, c_j recurrences evaluated with $exp and $ln, no fixed
// point and no tables), and for results up to level 3 also against the direct value
// phi(x) +- phi(y). The result z = level + index must be within 2^-22 of the model; z = 0
// and the sign must match exactly. The latency, counted from the clock that takes `start`
// to the clock with `done`, must equal the one the model's path predicts for the
// one-state-per-clock schedule described in li_addsub.
// Directed cases cover the paper's worst case (l = m = 5) and its "realistic" case
// (l = 3, m = 2), then random operands at all levels. The testbench counts how often each
// mechanism occurs and fails if one never does: operand swap, level >= 6 shortcut, equal
// operands cancelling, the level-0 path (with and without its logarithm), m = l, m < l and
// m = 0 starts of the b sequence, a serialised second table look-up, an a_j below 2^-5
// giving a zero look-up, and the three endings: division, one and two final logarithms.
module tb_li_addsub;
  import li_pkg::*;
  import li_ref_pkg::*;

  int checks = 0, failures = 0;
  real max_err = 0.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic op = 1'b0;
  li_t  x = '0, y = '0;
  logic busy, done, z_neg;
  li_t  z;

  li_addsub dut (.*);

  always #5 clk = ~clk;

  typedef enum int {
    EV_SWAP, EV_TRIVIAL, EV_CANCEL, EV_LEVEL0, EV_LEVEL0_LOG, EV_B_EQ, EV_B_LESS, EV_B_ZERO,
    EV_TABLE_WAIT, EV_A_UNDERFLOW, EV_DIVISION, EV_ONE_LOG, EV_TWO_LOG, EV_COUNT
  } ev_e;
  int ev [EV_COUNT];
  string ev_name [EV_COUNT] = '{"operand swap", "level>=6 shortcut", "cancellation to zero",
    "level-0 path", "level-0 path with log", "b start m=l", "b start m<l", "b_0 = g a_0",
    "second table look-up waits", "a_j <= 2^-5 gives 0", "final division",
    "one final log", "two final logs"};

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real phi(real v);
    real r;
    int  lv;
    lv = int'($floor(v));
    r  = v - real'(lv);
    for (int i = 0; i < lv; i++) r = $exp(r);
    return r;
  endfunction

  function automatic real phi_inv(real p);
    int lv = 0;
    while (p >= 1.0) begin
      p = $ln(p);
      lv++;
    end
    return real'(lv) + p;
  endfunction

  task automatic run(input li_t xi, input li_t yi, input logic sub);
    real zr, zh, err, zd;
    logic zzero, neg;
    int lat, cyc;
    ref_t rm;
    rm    = li_model(xi, yi, sub);
    zr    = rm.z;
    zzero = rm.zero;
    neg   = rm.neg;
    lat   = rm.lat;
    ev[EV_SWAP]        += int'(rm.swap);
    ev[EV_TRIVIAL]     += int'(rm.trivial);
    ev[EV_CANCEL]      += int'(rm.cancel);
    ev[EV_LEVEL0]      += int'(rm.level0);
    ev[EV_LEVEL0_LOG]  += int'(rm.level0_log);
    ev[EV_B_EQ]        += int'(rm.b_eq);
    ev[EV_B_LESS]      += int'(rm.b_less);
    ev[EV_B_ZERO]      += int'(rm.b_zero);
    ev[EV_TABLE_WAIT]  += rm.table_waits;
    ev[EV_A_UNDERFLOW] += rm.a_underflows;
    ev[EV_DIVISION]    += int'(rm.division);
    ev[EV_ONE_LOG]     += int'(rm.one_log);
    ev[EV_TWO_LOG]     += int'(rm.two_log);
    @(negedge clk);
    while (busy) @(negedge clk);
    x = xi;
    y = yi;
    op = sub;
    start = 1'b1;
    @(posedge clk);
    #1;
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(posedge clk);
      #1;
      cyc++;
    end
    zh  = real'(z.level) + real'(z.index) / (2.0 ** IDX_W);
    err = zh - zr;
    if (err < 0) err = -err;
    if (!zzero && err > max_err) max_err = err;
    checks++;
    if (zzero ? (z != '0) : (err > 2.0 ** -22)) begin
      failures++;
      $display("x=%0d+%f y=%0d+%f %s: got %.9f want %.9f", xi.level,
               real'(xi.index) / (2.0 ** IDX_W), yi.level, real'(yi.index) / (2.0 ** IDX_W),
               sub ? "-" : "+", zh, zr);
    end
    checks++;
    if (!zzero && z_neg != neg) begin
      failures++;
      $display("sign mismatch");
    end
    checks++;
    if (cyc != lat) begin
      failures++;
      $display("x=%h y=%h %s: latency %0d, expected %0d", xi, yi, sub ? "-" : "+", cyc, lat);
    end
    // Direct check where phi is representable and the result is well conditioned.
    if (!zzero && xi.level <= 3 && yi.level <= 3 && zr <= 3.9) begin
      real px, py, pz;
      px = phi(real'(xi.level) + real'(xi.index) / (2.0 ** IDX_W));
      py = phi(real'(yi.level) + real'(yi.index) / (2.0 ** IDX_W));
      pz = sub ? px - py : px + py;
      if (pz < 0) pz = -pz;
      zd = phi_inv(pz) - zh;
      if (zd < 0) zd = -zd;
      checks++;
      if (zd > 2.0 ** -20) begin
        failures++;
        $display("direct check: x=%h y=%h got %.9f direct %.9f", xi, yi, zh, phi_inv(pz));
      end
    end
  endtask

  function automatic li_t mk(int lv, real fr);
    li_t v;
    v.level = LVL_W'(lv);
    v.index = IDX_W'(longint'(fr * (2.0 ** IDX_W)));
    return v;
  endfunction

  function automatic li_t rnd(int lv);
    li_t v;
    v.level = LVL_W'(lv);
    v.index = IDX_W'($urandom);
    return v;
  endfunction

  initial begin
    for (int i = 0; i < EV_COUNT; i++) ev[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // The paper's worst case l = m = n = 5 and its "realistic" case l = 3, m = 2.
    run(mk(5, 0.5), mk(5, 0.25), 1'b0);
    run(mk(5, 0.5), mk(5, 0.25), 1'b1);
    run(mk(3, 0.7), mk(2, 0.9), 1'b0);
    run(mk(3, 0.7), mk(2, 0.9), 1'b1);
    run(mk(2, 0.3), mk(2, 0.2), 1'b0);
    // Equal operands, swapped operands, level 0, level >= 6, b_0 = g a_0.
    run(mk(3, 0.125), mk(3, 0.125), 1'b1);
    run(mk(3, 0.125), mk(3, 0.125), 1'b0);
    run(mk(1, 0.5), mk(2, 0.5), 1'b1);
    run(mk(0, 0.3), mk(0, 0.2), 1'b0);
    run(mk(0, 0.7), mk(0, 0.6), 1'b0);
    run(mk(0, 0.7), mk(0, 0.6), 1'b1);
    run(mk(6, 0.1), mk(5, 0.9), 1'b0);
    run(mk(2, 0.5), mk(0, 0.5), 1'b0);
    run(mk(1, 0.0), mk(1, 0.0), 1'b0);
    run(mk(1, 0.5), mk(1, 0.49), 1'b1);
    run(mk(4, 0.9), mk(4, 0.8), 1'b0);
    for (int it = 0; it < 400; it++) begin
      int lx, ly;
      lx = int'($urandom % 8);
      ly = (lx == 0) ? 0 : int'($urandom % (lx + 1));
      if (it % 7 == 0) ly = lx;
      if (it % 2 == 0) run(rnd(lx), rnd(ly), 1'($urandom));
      else             run(rnd(ly), rnd(lx), 1'($urandom));
    end
    for (int i = 0; i < EV_COUNT; i++) begin
      $display("%-28s %0d", ev_name[i], ev[i]);
      checks++;
      if (ev[i] == 0) begin
        failures++;
        $display("mechanism never exercised: %s", ev_name[i]);
      end
    end
    $display("max |z - model| %e", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
