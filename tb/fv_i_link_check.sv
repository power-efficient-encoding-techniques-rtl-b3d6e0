// fv_i_link_check: drives one FV-i link (two fv_i_codec ends on one bus)
// and checks it against fv_ref_pkg. Used by tb_fv_i_codec, once per table
// size.
//
// Words go both ways with random direction changes (one idle cycle at each
// turn) and random idle cycles. For each word the test checks, one cycle
// after it is given, that the wires changed by exactly the reference code
// and the encode line and kind match; and, one more cycle later, that only
// the receiving end shows rx_valid, with the word, the kind and no error.
// A cycle without a new word must leave the wires and rx_valid quiet.
// It counts hits in every table portion, raw words, evictions and direction
// changes, and fails if any of them never happened. done rises at the end.
module fv_i_link_check #(
  parameter int unsigned M      = 2,
  parameter int          NWORDS = 3000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  import fvbus_pkg::*;
  import fv_ref_pkg::*;

  localparam int unsigned K = 32;
  localparam int unsigned N = (K - M) << M;

  logic         a_tx = 1'b0, b_tx = 1'b0;
  logic [K-1:0] a_data = '0, b_data = '0;
  code_kind_e   a_kind, b_kind, a_rx_kind, b_rx_kind;
  logic         a_rxv, b_rxv, a_err, b_err;
  logic [K-1:0] a_rxd, b_rxd, a_dq, b_dq, dq;
  logic         a_enc, b_enc, a_drv, b_drv, enc;

  assign dq  = a_drv ? a_dq  : b_dq;
  assign enc = a_drv ? a_enc : b_enc;

  fv_i_codec #(.K(K), .M(M)) u_a (
    .clk, .rst_n, .tx_valid(a_tx), .tx_data(a_data), .tx_kind(a_kind),
    .rx_valid(a_rxv), .rx_data(a_rxd), .rx_kind(a_rx_kind), .rx_error(a_err),
    .bus_dq_o(a_dq), .bus_enc_o(a_enc), .bus_drive_o(a_drv),
    .bus_dq_i(dq), .bus_enc_i(enc), .bus_strobe_i(b_drv));
  fv_i_codec #(.K(K), .M(M)) u_b (
    .clk, .rst_n, .tx_valid(b_tx), .tx_data(b_data), .tx_kind(b_kind),
    .rx_valid(b_rxv), .rx_data(b_rxd), .rx_kind(b_rx_kind), .rx_error(b_err),
    .bus_dq_o(b_dq), .bus_enc_o(b_enc), .bus_drive_o(b_drv),
    .bus_dq_i(dq), .bus_enc_i(enc), .bus_strobe_i(a_drv));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL [FV-i m=%0d] %s at %0t", M, what, $time);
    end
  endtask

  initial begin
    lru_model fv;
    bit       s1_v, s2_v, s1_dir, s2_dir, s1_enc, s2_enc;
    longint   s1_data, s2_data, s1_code, s2_code, d, code;
    int       s1_kind, s2_kind, kind, sent, dir, portion;
    bit       e;
    logic [K-1:0] prev;
    int       n_portion[4];
    int       n_raw, n_evict, n_turn, n_a, n_b, n_bits_raw, n_bits_bus;
    fv = new(N);
    done = 1'b0; checks = 0; failures = 0;
    s1_v = 0; s2_v = 0; s1_dir = 0; s2_dir = 0; s1_enc = 0; s2_enc = 0;
    s1_data = 0; s2_data = 0; s1_code = 0; s2_code = 0; s1_kind = 0; s2_kind = 0;
    sent = 0; dir = 0; prev = '0;
    n_portion = '{default: 0};
    n_raw = 0; n_evict = 0; n_turn = 0; n_a = 0; n_b = 0; n_bits_raw = 0; n_bits_bus = 0;
    @(posedge rst_n);
    while (sent < NWORDS || s1_v || s2_v) begin
      @(negedge clk);
      // The word sent last cycle is on the wires now.
      if (s1_v) begin
        check((s1_dir ? b_drv : a_drv) && !(s1_dir ? a_drv : b_drv), "one end drives");
        check(64'(dq ^ prev) == s1_code, "wires change by the reference code");
        check(enc == s1_enc, "encode line");
        if (s1_enc) check($countones(dq ^ prev) <= M + 1, "an encoded word costs at most m+1 transitions");
        check(int'(s1_dir ? b_kind : a_kind) == s1_kind, "code kind");
        n_bits_bus += $countones(dq ^ prev) + ((enc != s2_enc) ? 1 : 0);
        prev = dq;
      end else begin
        check(!a_drv && !b_drv && dq == prev, "idle wires stay put");
      end
      // The word sent two cycles ago is decoded now.
      if (s2_v) begin
        if (s2_dir) begin
          check(a_rxv && !b_rxv, "rx_valid at the receiving end only, two cycles after send");
          check(64'(a_rxd) == s2_data && int'(a_rx_kind) == s2_kind && !a_err, "A decodes the word");
        end else begin
          check(b_rxv && !a_rxv, "rx_valid at the receiving end only, two cycles after send");
          check(64'(b_rxd) == s2_data && int'(b_rx_kind) == s2_kind && !b_err, "B decodes the word");
        end
      end else begin
        check(!a_rxv && !b_rxv, "no rx_valid without a word");
      end
      s2_v = s1_v; s2_dir = s1_dir; s2_data = s1_data; s2_code = s1_code;
      s2_enc = s1_enc; s2_kind = s1_kind;
      // Next word, if any.
      a_tx = 1'b0; b_tx = 1'b0;
      s1_v = 0;
      if (sent < NWORDS && $urandom_range(9) != 0) begin
        if ($urandom_range(7) == 0) dir = 1 - dir;
        // No send while the other end's word is on the wires.
        if (!(s2_v && s2_dir != dir[0])) begin
          if (sent > 0 && dir[0] != s1_dir) n_turn++;
          d = gen_word(K, 20, N + N / 4, 24, 16);
          enc_fvi(fv, K, M, d, code, e, kind);
          if (kind == 0) begin
            n_raw++;
            if (sent >= N) n_evict++;
          end else begin
            portion = (2 ** M - 1) - int'(code & ((1 << M) - 1));
            n_portion[portion]++;
          end
          fv.update(d);
          n_bits_raw += $countones(K'(d) ^ K'(s1_data));
          if (dir == 0) begin a_tx = 1'b1; a_data = K'(d); n_a++; end
          else          begin b_tx = 1'b1; b_data = K'(d); n_b++; end
          s1_v = 1; s1_dir = dir[0]; s1_data = d; s1_code = code; s1_enc = e; s1_kind = kind;
          sent++;
        end
      end
    end
    for (int p = 0; p < 2 ** M; p++) check(n_portion[p] > 0, "a hit in every table portion");
    check(n_raw > 0 && n_evict > 0, "raw words and evictions");
    check(n_turn > 0 && n_a > 0 && n_b > 0, "both directions and turns");
    $display("[FV-i m=%0d, %0d entries] words=%0d raw=%0d evictions=%0d turns=%0d hits per portion=%p",
             M, N, sent, n_raw, n_evict, n_turn, n_portion);
    done = 1'b1;
  end

endmodule
