// tb_fv_workloads: the six evaluated codec configurations on the same data.
//
// Six links run side by side on one stream of memory read data, sent in
// bursts of eight words (a cache block) with random gaps:
//   0 FV-32 (m = 0, the plain frequent value baseline)  1 FV-62 (m = 1)
//   2 FV-120 (m = 2)   3 FV-1-MSB-2 (20 MSBs)   4 FV-2-MSB-2 (19 MSBs)
//   5 FV-MSB-LSB (20 MSBs, 12 LSBs)
// The stream is generated here in three phases that imitate typical data:
//   pointer : linked nodes on a heap (next/prev pointers, small keys, flags)
//   media   : packed 8-bit pixels of a smooth image with noise
//   integer : small integers, zeros, minus one and header-like words
// Every word must arrive unchanged, two cycles after it was sent, at every
// link. Per phase and link the test reports the bus transitions (data
// lines plus encode line) against the transitions of the same words sent
// unencoded, and the share of words sent encoded; it fails a link that
// encoded nothing in a phase.
module tb_fv_workloads;
  import fvbus_pkg::*;

  localparam int unsigned K      = BUS_WIDTH;
  localparam int          NL     = 6;
  localparam int          NWORDS = 4000;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              tx_valid = 1'b0;
  logic [K-1:0]      tx_data = '0;
  logic [NL-1:0]     rx_valid, rx_err, m_rxv, m_err, c_drv, m_drv, c_enc, m_enc;
  logic [NL-1:0][K-1:0] rx_data, m_rxd, c_dq, m_dq;
  code_kind_e [NL-1:0]  c_kind, m_kind, c_rk, m_rk;

  always #5 clk = ~clk;

  // Memory-side codec (m_*) sends, processor-side codec (c_*) receives.
`define FV_LINK(IDX, MOD, PARAMS) \
  MOD #PARAMS u_mem``IDX ( \
    .clk, .rst_n, .tx_valid(tx_valid), .tx_data(tx_data), .tx_kind(m_kind[IDX]), \
    .rx_valid(m_rxv[IDX]), .rx_data(m_rxd[IDX]), .rx_kind(m_rk[IDX]), .rx_error(m_err[IDX]), \
    .bus_dq_o(m_dq[IDX]), .bus_enc_o(m_enc[IDX]), .bus_drive_o(m_drv[IDX]), \
    .bus_dq_i(m_dq[IDX]), .bus_enc_i(m_enc[IDX]), .bus_strobe_i(1'b0)); \
  MOD #PARAMS u_cpu``IDX ( \
    .clk, .rst_n, .tx_valid(1'b0), .tx_data('0), .tx_kind(c_kind[IDX]), \
    .rx_valid(rx_valid[IDX]), .rx_data(rx_data[IDX]), .rx_kind(c_rk[IDX]), .rx_error(rx_err[IDX]), \
    .bus_dq_o(c_dq[IDX]), .bus_enc_o(c_enc[IDX]), .bus_drive_o(c_drv[IDX]), \
    .bus_dq_i(m_dq[IDX]), .bus_enc_i(m_enc[IDX]), .bus_strobe_i(m_drv[IDX]));

  `FV_LINK(0, fv_i_codec, (.M(0)))
  `FV_LINK(1, fv_i_codec, (.M(1)))
  `FV_LINK(2, fv_i_codec, (.M(2)))
  `FV_LINK(3, fv_i_msb_j_codec, (.I(1), .J(2), .R(20)))
  `FV_LINK(4, fv_i_msb_j_codec, (.I(2), .J(2), .R(19)))
  `FV_LINK(5, fv_msb_lsb_codec, (.R(20)))

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Word w of phase p.
  logic [K-1:0] node_key [512];
  function automatic logic [K-1:0] trace_word(int p, int w);
    int node, f, x, y;
    case (p)
      0: begin
        node = $urandom_range(511);
        f    = w % 8;
        case (f)
          0, 1, 5: return 32'h1004_0000 + 32'($urandom_range(511)) * 64;
          2:       return node_key[node];
          3:       return 32'($urandom_range(2000));
          4:       return 32'($urandom_range(1));
          default: return '0;
        endcase
      end
      1: begin
        x = w % 64;
        y = w / 64;
        return {4{8'(96 + x + y / 2 + $urandom_range(3))}};
      end
      default: begin
        f = $urandom_range(9);
        if (f < 3) return 32'($urandom_range(15));
        if (f < 5) return '0;
        if (f == 5) return '1;
        if (f < 8) return {16'h0800, 16'($urandom_range(7) * 1500)};
        return $urandom();
      end
    endcase
  endfunction

  initial begin
    string        pname[3];
    logic [K-1:0] sent[$];
    logic [K-1:0] d, last_word, exp_w;
    logic [NL-1:0][K-1:0] prev;
    logic [NL-1:0] prev_enc;
    longint       plain, bus[NL], nenc[NL];
    int           w, lat_ok, permille;
    pname[0] = "pointer"; pname[1] = "media"; pname[2] = "integer";
    foreach (node_key[i]) node_key[i] = 32'($urandom_range(100000));
    prev = '0; prev_enc = '0; last_word = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 3; p++) begin
      plain = 0;
      for (int l = 0; l < NL; l++) begin bus[l] = 0; nenc[l] = 0; end
      w = 0;
      while (w < NWORDS || sent.size() > 0) begin
        @(negedge clk);
        // Wires of every link: count transitions of the word now on them.
        for (int l = 0; l < NL; l++) begin
          if (m_drv[l]) begin
            bus[l]  += $countones(m_dq[l] ^ prev[l]) + ((m_enc[l] != prev_enc[l]) ? 1 : 0);
            nenc[l] += m_enc[l] ? 1 : 0;
            prev[l]     = m_dq[l];
            prev_enc[l] = m_enc[l];
          end
        end
        // Deliveries: all links together, two cycles after the send.
        if (rx_valid[0]) begin
          exp_w = sent.pop_front();
          for (int l = 0; l < NL; l++)
            check(rx_valid[l] && rx_data[l] == exp_w && !rx_err[l], "word delivered unchanged");
        end else begin
          check(rx_valid == '0, "links deliver in step");
        end
        tx_valid = 1'b0;
        if (w < NWORDS && ((w % 8) != 0 || $urandom_range(3) == 0)) begin
          d = trace_word(p, w);
          plain += $countones(d ^ last_word);
          last_word = d;
          tx_valid = 1'b1;
          tx_data  = d;
          sent.push_back(d);
          w++;
        end
      end
      $display("%-8s unencoded transitions %0d", pname[p], plain);
      for (int l = 0; l < NL; l++) begin
        permille = int'((1000 * (plain - bus[l])) / plain);
        $display("  link %0d: %0d transitions, reduction %s%0d.%0d %%, %0d of %0d words encoded", l, bus[l],
                 (permille < 0) ? "-" : "", ((permille < 0) ? -permille : permille) / 10,
                 ((permille < 0) ? -permille : permille) % 10, nenc[l], NWORDS);
        check(nenc[l] > 0, "every link encodes some words");
      end
    end
    // Latency: one more word, checked cycle by cycle.
    @(negedge clk);
    tx_valid = 1'b1;
    tx_data  = 32'hDEAD_BEEF;
    @(negedge clk);
    tx_valid = 1'b0;
    check(m_drv == '1 && rx_valid == '0, "word on the wires one cycle after send");
    @(negedge clk);
    lat_ok = 1;
    for (int l = 0; l < NL; l++) if (!(rx_valid[l] && rx_data[l] == 32'hDEAD_BEEF)) lat_ok = 0;
    check(lat_ok == 1, "word delivered two cycles after send");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
