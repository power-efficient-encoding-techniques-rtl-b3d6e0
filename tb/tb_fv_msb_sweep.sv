// tb_fv_msb_sweep: the three MSB-based schemes over MSB widths from 2 to 29
// bits.
//
// The widths are every third one from 2 to 29 plus 19 and 20, the widths
// chosen for the three schemes (eleven in all, to keep compile time short).
// For each width R there is one FV-MSB-LSB link (R high bits, 32-R low
// bits), one FV-1-MSB-2 link and one FV-2-MSB-2 link: 33 links, all fed the
// same stream of memory read data in bursts of eight words. The stream mixes
// heap pointers (a few shared high parts), small integers and random words.
// Every word must reach the far end of every link unchanged two cycles after
// it was sent; an encoded word that fails to decode counts as a failure. At
// the end the test prints, per width, the bus transitions of each scheme
// against the unencoded stream, which is the curve used to choose the MSB
// width of each scheme.
module tb_fv_msb_sweep;
  import fvbus_pkg::*;

  localparam int unsigned K      = BUS_WIDTH;
  localparam int          NR     = 11;
  localparam int          WIDTHS [NR] = '{2, 5, 8, 11, 14, 17, 19, 20, 23, 26, 29};
  localparam int          NWORDS = 3000;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         tx_valid = 1'b0;
  logic [K-1:0] tx_data = '0;

  // [scheme][width]: scheme 0 FV-MSB-LSB, 1 FV-1-MSB-2, 2 FV-2-MSB-2.
  logic [2:0][NR-1:0]        drv, enc, rxv, rxe;
  logic [2:0][NR-1:0][K-1:0] dq, rxd;

  always #5 clk = ~clk;

  for (genvar X = 0; X < NR; X++) begin : g_w
    localparam int r = WIDTHS[X];
    code_kind_e [5:0] kind_unused;
    logic [2:0][K-1:0] c_dq_unused;
    logic [2:0]        c_enc_unused, c_drv_unused, m_rxv_unused, m_err_unused;
    logic [2:0][K-1:0] m_rxd_unused;

    fv_msb_lsb_codec #(.R(r)) u_ml_mem (
      .clk, .rst_n, .tx_valid, .tx_data, .tx_kind(kind_unused[0]),
      .rx_valid(m_rxv_unused[0]), .rx_data(m_rxd_unused[0]), .rx_kind(kind_unused[1]), .rx_error(m_err_unused[0]),
      .bus_dq_o(dq[0][X]), .bus_enc_o(enc[0][X]), .bus_drive_o(drv[0][X]),
      .bus_dq_i(dq[0][X]), .bus_enc_i(enc[0][X]), .bus_strobe_i(1'b0));
    fv_msb_lsb_codec #(.R(r)) u_ml_cpu (
      .clk, .rst_n, .tx_valid(1'b0), .tx_data('0), .tx_kind(),
      .rx_valid(rxv[0][X]), .rx_data(rxd[0][X]), .rx_kind(), .rx_error(rxe[0][X]),
      .bus_dq_o(c_dq_unused[0]), .bus_enc_o(c_enc_unused[0]), .bus_drive_o(c_drv_unused[0]),
      .bus_dq_i(dq[0][X]), .bus_enc_i(enc[0][X]), .bus_strobe_i(drv[0][X]));

    fv_i_msb_j_codec #(.I(1), .J(2), .R(r)) u_f1_mem (
      .clk, .rst_n, .tx_valid, .tx_data, .tx_kind(kind_unused[2]),
      .rx_valid(m_rxv_unused[1]), .rx_data(m_rxd_unused[1]), .rx_kind(kind_unused[3]), .rx_error(m_err_unused[1]),
      .bus_dq_o(dq[1][X]), .bus_enc_o(enc[1][X]), .bus_drive_o(drv[1][X]),
      .bus_dq_i(dq[1][X]), .bus_enc_i(enc[1][X]), .bus_strobe_i(1'b0));
    fv_i_msb_j_codec #(.I(1), .J(2), .R(r)) u_f1_cpu (
      .clk, .rst_n, .tx_valid(1'b0), .tx_data('0), .tx_kind(),
      .rx_valid(rxv[1][X]), .rx_data(rxd[1][X]), .rx_kind(), .rx_error(rxe[1][X]),
      .bus_dq_o(c_dq_unused[1]), .bus_enc_o(c_enc_unused[1]), .bus_drive_o(c_drv_unused[1]),
      .bus_dq_i(dq[1][X]), .bus_enc_i(enc[1][X]), .bus_strobe_i(drv[1][X]));

    fv_i_msb_j_codec #(.I(2), .J(2), .R(r)) u_f2_mem (
      .clk, .rst_n, .tx_valid, .tx_data, .tx_kind(kind_unused[4]),
      .rx_valid(m_rxv_unused[2]), .rx_data(m_rxd_unused[2]), .rx_kind(kind_unused[5]), .rx_error(m_err_unused[2]),
      .bus_dq_o(dq[2][X]), .bus_enc_o(enc[2][X]), .bus_drive_o(drv[2][X]),
      .bus_dq_i(dq[2][X]), .bus_enc_i(enc[2][X]), .bus_strobe_i(1'b0));
    fv_i_msb_j_codec #(.I(2), .J(2), .R(r)) u_f2_cpu (
      .clk, .rst_n, .tx_valid(1'b0), .tx_data('0), .tx_kind(),
      .rx_valid(rxv[2][X]), .rx_data(rxd[2][X]), .rx_kind(), .rx_error(rxe[2][X]),
      .bus_dq_o(c_dq_unused[2]), .bus_enc_o(c_enc_unused[2]), .bus_drive_o(c_drv_unused[2]),
      .bus_dq_i(dq[2][X]), .bus_enc_i(enc[2][X]), .bus_strobe_i(drv[2][X]));
  end

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [K-1:0] next_word(int w);
    int f;
    f = $urandom_range(9);
    if (f < 4) return 32'h1004_0000 + 32'($urandom_range(1023)) * 16;
    if (f < 5) return 32'h7FFF_E000 + 32'($urandom_range(255)) * 4;
    if (f < 8) return 32'($urandom_range(300));
    if (f < 9) return '0;
    return $urandom();
  endfunction

  initial begin
    logic [K-1:0] sent[$];
    logic [K-1:0] d, last_word, exp_w;
    logic [2:0][NR-1:0][K-1:0] prev;
    logic [2:0][NR-1:0]        prev_enc;
    longint       plain, bus[3][NR];
    int           w, ok, best[3], pm;
    string        nm[3];
    nm[0] = "FV-MSB-LSB"; nm[1] = "FV-1-MSB-2"; nm[2] = "FV-2-MSB-2";
    prev = '0; prev_enc = '0; last_word = '0; plain = 0; w = 0;
    for (int s = 0; s < 3; s++) for (int x = 0; x < NR; x++) bus[s][x] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (w < NWORDS || sent.size() > 0) begin
      @(negedge clk);
      for (int s = 0; s < 3; s++)
        for (int x = 0; x < NR; x++)
          if (drv[s][x]) begin
            bus[s][x] += $countones(dq[s][x] ^ prev[s][x]) + ((enc[s][x] != prev_enc[s][x]) ? 1 : 0);
            prev[s][x]     = dq[s][x];
            prev_enc[s][x] = enc[s][x];
          end
      if (rxv[0][0]) begin
        exp_w = sent.pop_front();
        ok = 1;
        for (int s = 0; s < 3; s++)
          for (int x = 0; x < NR; x++)
            if (!(rxv[s][x] && rxd[s][x] == exp_w && !rxe[s][x])) ok = 0;
        check(ok == 1, "every link delivers the word unchanged");
      end else begin
        check(rxv == '0, "links deliver in step");
      end
      tx_valid = 1'b0;
      if (w < NWORDS && ((w % 8) != 0 || $urandom_range(3) == 0)) begin
        d = next_word(w);
        plain += $countones(d ^ last_word);
        last_word = d;
        tx_valid = 1'b1;
        tx_data  = d;
        sent.push_back(d);
        w++;
      end
    end
    $display("unencoded transitions %0d; reduction in per mille by MSB width:", plain);
    for (int s = 0; s < 3; s++) begin
      best[s] = 0;
      for (int x = 0; x < NR; x++) if (bus[s][x] < bus[s][best[s]]) best[s] = x;
    end
    for (int x = 0; x < NR; x++) begin
      $write("  R=%2d:", WIDTHS[x]);
      for (int s = 0; s < 3; s++) begin
        pm = int'((1000 * (plain - bus[s][x])) / plain);
        $write("  %s %5d", nm[s], pm);
      end
      $write("\n");
    end
    for (int s = 0; s < 3; s++) $display("best width for %s on this stream: %0d", nm[s], WIDTHS[best[s]]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
