// tb_fv_msb_lsb_codec: self-checking test of the FV-MSB-LSB codec.
//
// Runs fv_msb_lsb_link_check with the evaluated split of 20 MSBs and 12
// LSBs: two codecs on one bus, checked word by word against a reference
// encoder, including the two-cycle send-to-receive latency, with every code
// kind exercised.
module tb_fv_msb_lsb_codec;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic done1;
  int   c1, f1;

  always #5 clk = ~clk;

  fv_msb_lsb_link_check #(.R(20), .NWORDS(4000)) u_link (
    .clk, .rst_n, .done(done1), .checks(c1), .failures(f1));

  initial begin
    repeat (30000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c1, f1 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done1);
    $display("TB_RESULT checks=%0d failures=%0d", c1, f1);
    $finish;
  end

endmodule
