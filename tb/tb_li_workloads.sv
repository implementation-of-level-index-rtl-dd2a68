// Workload testbench for li_addsub: the three operand-level cases used to judge the speed
// of the method, run at the unit's default parameters.
//   worst case      : l = m = n = 5 (the largest levels for which the operation is not
//                     trivial), additions and subtractions of random level-5 operands
//   "realistic" case: l = 3, m = 2, n = 4, additions whose sum just crosses phi(4)
//   short case      : l = n = 2, with m = 2 and m = 1
// For every operation the result must match the double-precision model of li_ref_pkg to
// within 2^-22, the result level must be the case's n, and the latency must equal the
// fixed count of the schedule: 37, 23, 16 and 15 clocks (from the clock that takes
// `start` to the clock with `done`).
module tb_li_workloads;
  import li_pkg::*;
  import li_ref_pkg::*;

  int checks = 0, failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic op = 1'b0;
  li_t  x = '0, y = '0;
  logic busy, done, z_neg;
  li_t  z;

  li_addsub dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input string name, input li_t xi, input li_t yi, input logic sub,
                     input int n_want, input int lat_want);
    ref_t rm;
    real  zh, err;
    int   cyc;
    rm = li_model(xi, yi, sub);
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
    err = zh - rm.z;
    if (err < 0) err = -err;
    checks++;
    if (err > 2.0 ** -22) begin
      failures++;
      $display("%s: x=%h y=%h got %.9f want %.9f", name, xi, yi, zh, rm.z);
    end
    checks++;
    if (int'(z.level) != n_want || rm.n != n_want) begin
      failures++;
      $display("%s: x=%h y=%h level %0d (model %0d), case needs %0d", name, xi, yi,
               z.level, rm.n, n_want);
    end
    checks++;
    if (cyc != lat_want) begin
      failures++;
      $display("%s: latency %0d, expected %0d", name, cyc, lat_want);
    end
  endtask

  function automatic li_t mk(int lv, logic [IDX_W-1:0] idx);
    li_t v;
    v.level = LVL_W'(lv);
    v.index = idx;
    return v;
  endfunction

  initial begin
    logic [IDX_W-1:0] fi, gi;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Worst case: l = m = n = 5.
    for (int it = 0; it < 40; it++) begin
      fi = IDX_W'($urandom) % IDX_W'(240000000);
      gi = IDX_W'($urandom) % (fi + 1'b1);
      run("worst case", mk(5, fi), mk(5, gi), 1'(it % 2), 5, 37);
    end
    // Realistic case: l = 3, m = 2, n = 4.
    for (int k = 0; k < 5; k++) begin
      for (int gg = 0; gg < 3; gg++) begin
        fi = IDX_W'({IDX_W{1'b1}} << k);
        gi = IDX_W'(longint'((0.9 + 0.03 * gg) * (2.0 ** IDX_W)));
        run("realistic case", mk(3, fi), mk(2, gi), 1'b0, 4, 23);
      end
    end
    // Short case: l = n = 2.
    for (int it = 0; it < 20; it++) begin
      fi = IDX_W'($urandom) % IDX_W'(200000000);
      gi = IDX_W'($urandom) % (fi + 1'b1);
      run("short case m=2", mk(2, fi), mk(2, gi), 1'b0, 2, 16);
      run("short case m=1", mk(2, fi), mk(1, gi), 1'b0, 2, 15);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
