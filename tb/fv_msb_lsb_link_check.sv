// fv_msb_lsb_link_check: drives one FV-MSB-LSB link (two fv_msb_lsb_codec
// ends on one bus) and checks it against fv_ref_pkg. Used by
// tb_fv_msb_lsb_codec.
//
// Words go both ways with random direction changes (one idle cycle at each
// turn) and random idle cycles. For each word the test checks, one cycle
// after it is given, that the wires changed by exactly the reference code
// and the encode line and kind match; and, one more cycle later, that only
// the receiving end shows rx_valid, with the word, the kind and no error.
// A cycle without a new word must leave the wires and rx_valid quiet.
// It counts every code kind (FV, MSB+LSB, MSB only, LSB only, raw), words
// sent raw although one part hit (the ">= 2 ones" rule), evictions and
// direction changes, and fails if any of them never happened. done rises at the end.
module fv_msb_lsb_link_check #(
  parameter int unsigned R      = 20,
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
  localparam int unsigned L = K - R;

  logic         a_tx = 1'b0, b_tx = 1'b0;
  logic [K-1:0] a_data = '0, b_data = '0;
  code_kind_e   a_kind, b_kind, a_rx_kind, b_rx_kind;
  logic         a_rxv, b_rxv, a_err, b_err;
  logic [K-1:0] a_rxd, b_rxd, a_dq, b_dq, dq;
  logic         a_enc, b_enc, a_drv, b_drv, enc;

  assign dq  = a_drv ? a_dq  : b_dq;
  assign enc = a_drv ? a_enc : b_enc;

  fv_msb_lsb_codec #(.K(K), .R(R)) u_a (
    .clk, .rst_n, .tx_valid(a_tx), .tx_data(a_data), .tx_kind(a_kind),
    .rx_valid(a_rxv), .rx_data(a_rxd), .rx_kind(a_rx_kind), .rx_error(a_err),
    .bus_dq_o(a_dq), .bus_enc_o(a_enc), .bus_drive_o(a_drv),
    .bus_dq_i(dq), .bus_enc_i(enc), .bus_strobe_i(b_drv));
  fv_msb_lsb_codec #(.K(K), .R(R)) u_b (
    .clk, .rst_n, .tx_valid(b_tx), .tx_data(b_data), .tx_kind(b_kind),
    .rx_valid(b_rxv), .rx_data(b_rxd), .rx_kind(b_rx_kind), .rx_error(b_err),
    .bus_dq_o(b_dq), .bus_enc_o(b_enc), .bus_drive_o(b_drv),
    .bus_dq_i(dq), .bus_enc_i(enc), .bus_strobe_i(a_drv));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL [FV-MSB-LSB r=%0d] %s at %0t", R, what, $time);
    end
  endtask

  initial begin
    lru_model fv, mt, lt;
    bit       s1_v, s2_v, s1_dir, s2_dir, s1_enc, s2_enc;
    longint   s1_data, s2_data, s1_code, s2_code, d, code;
    int       s1_kind, s2_kind, kind, sent, dir, portion;
    bit       e;
    logic [K-1:0] prev;
    int       n_kind[5];
    int       n_rule, n_raw, n_evict, n_turn, n_a, n_b, n_bits_raw, n_bits_bus;
    fv = new(K);
    mt = new(R);
    lt = new(L);
    done = 1'b0; checks = 0; failures = 0;
    s1_v = 0; s2_v = 0; s1_dir = 0; s2_dir = 0; s1_enc = 0; s2_enc = 0;
    s1_data = 0; s2_data = 0; s1_code = 0; s2_code = 0; s1_kind = 0; s2_kind = 0;
    sent = 0; dir = 0; prev = '0;
    n_kind = '{default: 0};
    n_rule = 0;
    n_raw = 0; n_evict = 0; n_turn = 0; n_a = 0; n_b = 0; n_bits_raw = 0; n_bits_bus = 0;
    @(posedge rst_n);
    while (sent < NWORDS || s1_v || s2_v) begin
      @(negedge clk);
      // The word sent last cycle is on the wires now.
      if (s1_v) begin
        check((s1_dir ? b_drv : a_drv) && !(s1_dir ? a_drv : b_drv), "one end drives");
        check(64'(dq ^ prev) == s1_code, "wires change by the reference code");
        check(enc == s1_enc, "encode line");
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
          d = gen_word(K, R, 40, R + 6, L + 4);
          enc_fv_msb_lsb(fv, mt, lt, K, R, d, code, e, kind);
          n_kind[kind]++;
          if (kind == 0) begin
            n_raw++;
            if (mt.find((d >> L) & mask(R)) >= 0 || lt.find(d & mask(L)) >= 0) n_rule++;
            if (sent >= K) n_evict++;
          end
          fv.update(d);
          mt.update((d >> L) & mask(R));
          lt.update(d & mask(L));
          n_bits_raw += $countones(K'(d) ^ K'(s1_data));
          if (dir == 0) begin a_tx = 1'b1; a_data = K'(d); n_a++; end
          else          begin b_tx = 1'b1; b_data = K'(d); n_b++; end
          s1_v = 1; s1_dir = dir[0]; s1_data = d; s1_code = code; s1_enc = e; s1_kind = kind;
          sent++;
        end
      end
    end
    for (int k = 1; k < 5; k++) check(n_kind[k] > 0, "every code kind");
    check(n_rule > 0, "a part hit sent raw by the >= 2 ones rule");
    check(n_raw > 0 && n_evict > 0, "raw words and evictions");
    check(n_turn > 0 && n_a > 0 && n_b > 0, "both directions and turns");
    $display("[FV-MSB-LSB r=%0d] words=%0d raw/FV/MSB/LSB/MSB+LSB=%p (part hit kept raw %0d) turns=%0d",
             R, sent, n_kind, n_rule, n_turn);
    $display("  bus transitions: unencoded %0d, encoded %0d", n_bits_raw, n_bits_bus);
    done = 1'b1;
  end

endmodule
