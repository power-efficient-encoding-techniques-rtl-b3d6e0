// tb_fv_i_codec: self-checking test of the FV-i codec.
//
// Runs fv_i_link_check for the two enlarged tables the scheme is evaluated
// with: m = 1 (62 words) and m = 2 (120 words, the codec's default). Each
// link is two codecs on one bus, checked word by word against a reference
// encoder, including the two-cycle send-to-receive latency.
module tb_fv_i_codec;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic done1, done2;
  int   c1, f1, c2, f2;
  int   checks, failures;

  always #5 clk = ~clk;

  fv_i_link_check #(.M(1), .NWORDS(3000)) u_m1 (.clk, .rst_n, .done(done1), .checks(c1), .failures(f1));
  fv_i_link_check #(.M(2), .NWORDS(4000)) u_m2 (.clk, .rst_n, .done(done2), .checks(c2), .failures(f2));

  initial begin
    repeat (30000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done1 && done2);
    checks   = c1 + c2;
    failures = f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
