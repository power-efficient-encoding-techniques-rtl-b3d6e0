// tb_fv_i_msb_j_codec: self-checking test of the FV-i-MSB-j codec.
//
// Runs fv_i_msb_j_link_check for the two evaluated configurations:
// FV-1-MSB-2 with 20 MSBs (32-word FV table, 38-part MSB table) and
// FV-2-MSB-2 with 19 MSBs (62 and 36 entries, the codec's default). Each
// link is two codecs on one bus, checked word by word against a reference
// encoder, including the two-cycle send-to-receive latency.
module tb_fv_i_msb_j_codec;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic done1, done2;
  int   c1, f1, c2, f2;

  always #5 clk = ~clk;

  fv_i_msb_j_link_check #(.I(1), .J(2), .R(20), .NWORDS(3000)) u_fv1 (
    .clk, .rst_n, .done(done1), .checks(c1), .failures(f1));
  fv_i_msb_j_link_check #(.I(2), .J(2), .R(19), .NWORDS(3000)) u_fv2 (
    .clk, .rst_n, .done(done2), .checks(c2), .failures(f2));

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
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2);
    $finish;
  end

endmodule
