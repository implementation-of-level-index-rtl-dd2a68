// Testbench for exp_table: for random arguments t (and t = 0, t = all ones) every one of
// the seven factors must equal exp(-t_i) of its 6-bit packet, computed in double
// precision, to within one unit of 2^-41, one clock after t is presented; the output must
// not change before that clock edge.
module tb_exp_table;
  import li_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0;
  logic [T_W-1:0] t;
  logic [N_PKT-1:0][FX_W-1:0] e, last_e;

  exp_table dut (.clk(clk), .t(t), .e(e));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [T_W-1:0] tv);
    logic [N_PKT-1:0][FX_W-1:0] prev_out;
    real want, got, err;
    @(negedge clk);
    t = tv;
    #1;
    prev_out = e;
    @(posedge clk);
    #1;
    for (int b = 0; b < N_PKT; b++) begin
      int v;
      v    = int'(tv[T_W-1-6*b -: 6]);
      want = $exp(-real'(v) * (2.0 ** (-1 - 6 * b)));
      got  = real'(e[b]) / (2.0 ** FX_F);
      err  = got - want;
      if (err < 0) err = -err;
      checks++;
      if (err > 2.0 ** -41) begin
        failures++;
        $display("t=%h packet %0d: got %.15f want %.15f", tv, b, got, want);
      end
    end
    // Registered read: before the edge the output still showed the previous look-up.
    checks++;
    if (prev_out != last_e) begin
      failures++;
      $display("output changed before the clock edge");
    end
    last_e = e;
  endtask

  initial begin
    t = '0;
    @(posedge clk);
    #1;
    last_e = e;
    check('0);
    check('1);
    for (int it = 0; it < 300; it++) check({$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
