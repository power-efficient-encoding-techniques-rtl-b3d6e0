// tb_xor_correlator: self-checking test of the bus correlator/decorrelator.
//
// Two correlators are wired as the two ends of one bus. Random codes are
// sent from either end (never both in one cycle); the test checks that the
// wires change by exactly the code one cycle later (so a one-hot code costs
// one transition), that the far end recovers the code, that both ends hold
// the same bus value afterwards, and that an idle cycle leaves the wires
// alone.
module tb_xor_correlator;

  localparam int unsigned K = 32;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         a_tx = 1'b0, b_tx = 1'b0;
  logic [K-1:0] a_code = '0, b_code = '0;
  logic         a_drv = 1'b0, b_drv = 1'b0;
  logic [K-1:0] a_q, b_q, a_rx, b_rx, wires;

  int checks = 0, failures = 0;
  int n_a = 0, n_b = 0, n_idle = 0;

  assign wires = a_drv ? a_q : b_q;

  xor_correlator #(.K(K)) u_a (.clk, .rst_n, .tx_en(a_tx), .tx_code(a_code),
                               .rx_en(b_drv), .bus_in(wires), .rx_code(a_rx), .bus_q(a_q));
  xor_correlator #(.K(K)) u_b (.clk, .rst_n, .tx_en(b_tx), .tx_code(b_code),
                               .rx_en(a_drv), .bus_in(wires), .rx_code(b_rx), .bus_q(b_q));

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    a_drv <= a_tx;
    b_drv <= b_tx;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [K-1:0] prev, code;
    int           who;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(a_q == '0 && b_q == '0, "reset value");
    prev = '0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // The far end sees the word sent in the previous cycle.
      who  = $urandom_range(2);
      code = (t % 3 == 0) ? (K'(1) << $urandom_range(K - 1)) : K'($urandom());
      // No send in the cycle the other end's word is on the wires.
      if ((who == 0 && b_drv) || (who == 1 && a_drv)) who = 2;
      a_tx   = (who == 0);
      b_tx   = (who == 1);
      a_code = code;
      b_code = code;
      @(posedge clk);
      #1;
      if (who == 2) begin
        n_idle++;
        check(wires == prev, "idle cycle holds the wires");
      end else begin
        if (who == 0) n_a++; else n_b++;
        check((wires ^ prev) == code, "wires change by the code");
        if (who == 0) check(b_rx == code, "B decorrelates the code");
        else          check(a_rx == code, "A decorrelates the code");
        if (t % 3 == 0) check($countones(wires ^ prev) == 1, "one-hot code is one transition");
      end
      prev = wires;
      @(negedge clk);
      a_tx = 1'b0;
      b_tx = 1'b0;
      @(posedge clk);
      #1;
      check(a_q == b_q, "both ends hold the same bus value");
    end
    check(n_a > 0 && n_b > 0 && n_idle > 0, "coverage of both directions and idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
