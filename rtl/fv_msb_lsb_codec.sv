// fv_msb_lsb_codec: one end of an FV-MSB-LSB encoded data bus.
//
// Besides whole words, data streams repeat their high-order parts (pointers
// into the same region) and their low-order parts far more often than whole
// words. This codec keeps three LRU tables: a k-entry FV table of whole
// words, an R-entry table of the R most significant bits and an L-entry
// table of the L = k-R least significant bits (a table has as many entries
// as its words have bits, so a hit is one-hot on that part of the bus).
// Defaults: k = 32, R = 20, L = 12.
//
// Encoder, in order of precedence (encode line high unless "as-is"):
//   FV hit                  -> one-hot FV index on all k lines
//   MSB and LSB hit         -> one-hot MSB index on the upper R lines and
//                              one-hot LSB index on the lower L lines
//   MSB hit, LSB part has >= 2 ones -> one-hot MSB index, LSB part as-is
//   LSB hit, MSB part has >= 2 ones -> MSB part as-is, one-hot LSB index
//   otherwise               -> word as-is, encode line low
// The decoder tells these apart by counting the ones in the two parts of the
// decorrelated word: 1 in total is an FV code, 1 and 1 is MSB+LSB, 1 and >=2
// is MSB only, >=2 and 1 is LSB only. The ">= 2 ones" rules keep an as-is
// part from looking like a one-hot or an empty part. After every transfer
// both ends update all three tables with the word (LRU touch or insert).
//
// The three tables, the order of precedence and the ">= 2 ones" rules follow
// the document. This design's choices: a word whose only hit fails the
// ">= 2 ones" rule is sent as-is with the encode line low; every table is
// updated on every transfer; the encode line is a level; an encoded word
// with any other ones count is flagged as rx_error.
//
// Interface and timing are those of fv_i_codec: a word given on tx_valid is
// on the bus the next cycle; a word on the bus (bus_strobe_i) is on rx_data
// one cycle later; tx_valid must not coincide with bus_strobe_i.
module fv_msb_lsb_codec
  import fvbus_pkg::*;
#(
  parameter int unsigned K = BUS_WIDTH,
  parameter int unsigned R = MSB_BITS_FV_MSB_LSB
) (
  input  logic         clk,
  input  logic         rst_n,
  // local side
  input  logic         tx_valid,
  input  logic [K-1:0] tx_data,
  output code_kind_e   tx_kind,
  output logic         rx_valid,
  output logic [K-1:0] rx_data,
  output code_kind_e   rx_kind,
  output logic         rx_error,
  // bus side
  output logic [K-1:0] bus_dq_o,
  output logic         bus_enc_o,
  output logic         bus_drive_o,
  input  logic [K-1:0] bus_dq_i,
  input  logic         bus_enc_i,
  input  logic         bus_strobe_i
);

  localparam int unsigned L   = K - R;
  localparam int unsigned FIW = $clog2(K);
  localparam int unsigned MIW = $clog2(R);
  localparam int unsigned LIW = $clog2(L);

  if (R < 2 || R > K - 2) begin : g_bad_r
    $error("fv_msb_lsb_codec: R = %0d, the MSB and LSB parts need at least 2 bits each", R);
  end

  logic            rx_en;
  logic [K-1:0]    tab_key;
  logic            fv_hit, msb_hit, lsb_hit;
  logic [FIW-1:0]  fv_idx, fv_rd_idx;
  logic [MIW-1:0]  msb_idx, msb_rd_idx;
  logic [LIW-1:0]  lsb_idx, lsb_rd_idx;
  logic [K-1:0]    fv_rd;
  logic [R-1:0]    msb_rd;
  logic [L-1:0]    lsb_rd;
  logic [K-1:0]    enc_code;
  logic            enc_flag;
  code_kind_e      enc_kind;
  logic [K-1:0]    rx_code;
  logic [K-1:0]    dec_data;
  code_kind_e      dec_kind;
  logic            dec_err;

  assign rx_en = bus_strobe_i && !tx_valid;

  // Encoder selection logic.
  always_comb begin
    logic [R-1:0] msb_oh;
    logic [L-1:0] lsb_oh;
    msb_oh   = R'(1) << msb_idx;
    lsb_oh   = L'(1) << lsb_idx;
    enc_code = tx_data;
    enc_flag = 1'b1;
    enc_kind = CK_RAW;
    if (fv_hit) begin
      enc_code = K'(1) << fv_idx;
      enc_kind = CK_FV;
    end else if (msb_hit && lsb_hit) begin
      enc_code = {msb_oh, lsb_oh};
      enc_kind = CK_MSB_LSB;
    end else if (msb_hit && $countones(tx_data[L-1:0]) >= 2) begin
      enc_code = {msb_oh, tx_data[L-1:0]};
      enc_kind = CK_MSB;
    end else if (lsb_hit && $countones(tx_data[K-1:L]) >= 2) begin
      enc_code = {tx_data[K-1:L], lsb_oh};
      enc_kind = CK_LSB;
    end else begin
      enc_flag = 1'b0;
    end
  end

  // Decoder selection logic.
  always_comb begin
    int unsigned cm, cl;
    cm         = $countones(rx_code[K-1:L]);
    cl         = $countones(rx_code[L-1:0]);
    fv_rd_idx  = FIW'(first_one(64'(rx_code)));
    msb_rd_idx = MIW'(first_one(64'(rx_code[K-1:L])));
    lsb_rd_idx = LIW'(first_one(64'(rx_code[L-1:0])));
    dec_data   = rx_code;
    dec_kind   = CK_RAW;
    dec_err    = 1'b0;
    if (bus_enc_i) begin
      if (cm + cl == 1) begin
        dec_data = fv_rd;
        dec_kind = CK_FV;
      end else if (cm == 1 && cl == 1) begin
        dec_data = {msb_rd, lsb_rd};
        dec_kind = CK_MSB_LSB;
      end else if (cm == 1 && cl >= 2) begin
        dec_data = {msb_rd, rx_code[L-1:0]};
        dec_kind = CK_MSB;
      end else if (cl == 1 && cm >= 2) begin
        dec_data = {rx_code[K-1:L], lsb_rd};
        dec_kind = CK_LSB;
      end else begin
        dec_err  = 1'b1;
      end
    end
  end

  assign tab_key = tx_valid ? tx_data : dec_data;

  fv_lru_table #(.W(K), .N(K)) u_fv_table (
    .clk (clk), .rst_n (rst_n),
    .key (tab_key), .hit (fv_hit), .hit_idx (fv_idx),
    .rd_idx (fv_rd_idx), .rd_data (fv_rd),
    .upd_en (tx_valid || rx_en)
  );

  fv_lru_table #(.W(R), .N(R)) u_msb_table (
    .clk (clk), .rst_n (rst_n),
    .key (tab_key[K-1:L]), .hit (msb_hit), .hit_idx (msb_idx),
    .rd_idx (msb_rd_idx), .rd_data (msb_rd),
    .upd_en (tx_valid || rx_en)
  );

  fv_lru_table #(.W(L), .N(L)) u_lsb_table (
    .clk (clk), .rst_n (rst_n),
    .key (tab_key[L-1:0]), .hit (lsb_hit), .hit_idx (lsb_idx),
    .rd_idx (lsb_rd_idx), .rd_data (lsb_rd),
    .upd_en (tx_valid || rx_en)
  );

  xor_correlator #(.K(K)) u_corr (
    .clk     (clk),
    .rst_n   (rst_n),
    .tx_en   (tx_valid),
    .tx_code (enc_code),
    .rx_en   (rx_en),
    .bus_in  (bus_dq_i),
    .rx_code (rx_code),
    .bus_q   (bus_dq_o)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_enc_o   <= 1'b0;
      bus_drive_o <= 1'b0;
      tx_kind     <= CK_RAW;
      rx_valid    <= 1'b0;
      rx_data     <= '0;
      rx_kind     <= CK_RAW;
      rx_error    <= 1'b0;
    end else begin
      bus_drive_o <= tx_valid;
      rx_valid    <= rx_en;
      if (tx_valid) begin
        bus_enc_o <= enc_flag;
        tx_kind   <= enc_kind;
      end
      if (rx_en) begin
        rx_data  <= dec_data;
        rx_kind  <= dec_kind;
        rx_error <= dec_err;
      end
    end
  end

  a_half_duplex: assert property (@(posedge clk) disable iff (!rst_n)
    !(tx_valid && bus_strobe_i));

endmodule
