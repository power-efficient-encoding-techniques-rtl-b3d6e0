// fv_i_msb_j_codec: one end of an FV-i-MSB-j encoded data bus.
//
// Two LRU tables: an FV table of whole k-bit words and an MSB table of the R
// most significant bits of words. Each is enlarged by a factor (I for the FV
// table, J for the MSB table, powers of two) with the internal-control-line
// method: a table enlarged by 2^m spends its lowest m lines on the portion
// number and sends a one-hot index on the rest. So the FV table holds
// (k - log2 I) * I words and the MSB table (R - log2 J) * J parts:
//   FV-1-MSB-2 (I = 1, J = 2, R = 20): 32 words, 38 MSB parts
//   FV-2-MSB-2 (I = 2, J = 2, R = 19): 62 words, 36 MSB parts (default)
//
// Encoder, in order of precedence:
//   FV hit  -> one-hot on lines k-1..log2 I, FV portion on the lines below
//   MSB hit -> one-hot on the upper R - log2 J lines of the MSB field, MSB
//              portion on the lowest log2 J lines of that field (for J = 2
//              the R-th line from the top: 1 = first half, 0 = second half),
//              the L = k-R low bits as-is
//   else    -> word as-is, encode line low
// The decoder reads an encoded word as an FV code when lines k-1..log2 I
// hold exactly one 1, otherwise as an MSB code when the MSB one-hot lines
// hold exactly one 1. An MSB code that would itself look like an FV code
// (all lines between the MSB one-hot field and the FV control lines zero) is
// sent as-is instead, so the two never collide. Both ends update both tables
// with every word.
//
// The table sizes, the portion lines (first portion = 1) and the precedence
// follow the document; the collision rule, updating every table on every
// transfer, the level-coded encode line and rx_error are this design's.
//
// Interface and timing are those of fv_i_codec: one cycle at the sending
// end, one at the receiving end; tx_valid must not coincide with
// bus_strobe_i.
module fv_i_msb_j_codec
  import fvbus_pkg::*;
#(
  parameter int unsigned K = BUS_WIDTH,
  parameter int unsigned I = 2,
  parameter int unsigned J = 2,
  parameter int unsigned R = MSB_BITS_FV2_MSB2
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

  localparam int unsigned L   = K - R;          // bits sent as-is on an MSB hit
  localparam int unsigned MF  = $clog2(I);      // FV control lines
  localparam int unsigned MM  = $clog2(J);      // MSB control lines
  localparam int unsigned FF  = K - MF;         // FV one-hot lines
  localparam int unsigned FM  = R - MM;         // MSB one-hot lines
  localparam int unsigned NF  = FF * I;         // FV table entries
  localparam int unsigned NM  = FM * J;         // MSB table entries
  localparam int unsigned FIW = (NF > 1) ? $clog2(NF) : 1;
  localparam int unsigned MIW = (NM > 1) ? $clog2(NM) : 1;
  localparam int unsigned CF  = I - 1;          // FV control mask
  localparam int unsigned CM  = J - 1;          // MSB control mask

  if (R < MM + 1 || R >= K) begin : g_bad_r
    $error("fv_i_msb_j_codec: R = %0d must be below K = %0d and above log2 J", R, K);
  end
  if (I == 0 || J == 0 || (I & (I - 1)) != 0 || (J & (J - 1)) != 0) begin : g_bad_ij
    $error("fv_i_msb_j_codec: I = %0d and J = %0d must be powers of two", I, J);
  end

  logic            rx_en;
  logic [K-1:0]    tab_key;
  logic            fv_hit, msb_hit;
  logic [FIW-1:0]  fv_idx, fv_rd_idx;
  logic [MIW-1:0]  msb_idx, msb_rd_idx;
  logic [K-1:0]    fv_rd;
  logic [R-1:0]    msb_rd;
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
    logic [K-1:0] fv_code, msb_code;
    logic [R-1:0] msb_field;
    int unsigned  fpos, fpor, mpos, mpor;
    fpos      = 32'(fv_idx) % FF;
    fpor      = 32'(fv_idx) / FF;
    mpos      = 32'(msb_idx) % FM;
    mpor      = 32'(msb_idx) / FM;
    fv_code   = (K'(1) << (fpos + MF)) | K'(CF - fpor);
    msb_field = (R'(1) << (mpos + MM)) | R'(CM - mpor);
    msb_code  = (K'(msb_field) << L) | (tx_data & K'((64'(1) << L) - 1));
    enc_code  = tx_data;
    enc_flag  = 1'b1;
    enc_kind  = CK_RAW;
    if (fv_hit) begin
      enc_code = fv_code;
      enc_kind = CK_FV;
    end else if (msb_hit && $countones(msb_code >> MF) != 1) begin
      enc_code = msb_code;
      enc_kind = CK_MSB;
    end else begin
      enc_flag = 1'b0;
    end
  end

  // Decoder selection logic.
  always_comb begin
    logic [K-1:0] ffield, mfield;
    int unsigned  fpor, mpor;
    ffield     = rx_code >> MF;
    mfield     = rx_code >> (L + MM);
    fpor       = CF - (32'(rx_code) & CF);
    mpor       = CM - (32'(rx_code >> L) & CM);
    fv_rd_idx  = FIW'(fpor * FF + first_one(64'(ffield)));
    msb_rd_idx = MIW'(mpor * FM + first_one(64'(mfield)));
    dec_data   = rx_code;
    dec_kind   = CK_RAW;
    dec_err    = 1'b0;
    if (bus_enc_i) begin
      if ($countones(ffield) == 1) begin
        dec_data = fv_rd;
        dec_kind = CK_FV;
      end else if ($countones(mfield) == 1) begin
        dec_data = (K'(msb_rd) << L) | (rx_code & K'((64'(1) << L) - 1));
        dec_kind = CK_MSB;
      end else begin
        dec_err  = 1'b1;
      end
    end
  end

  assign tab_key = tx_valid ? tx_data : dec_data;

  fv_lru_table #(.W(K), .N(NF)) u_fv_table (
    .clk (clk), .rst_n (rst_n),
    .key (tab_key), .hit (fv_hit), .hit_idx (fv_idx),
    .rd_idx (fv_rd_idx), .rd_data (fv_rd),
    .upd_en (tx_valid || rx_en)
  );

  fv_lru_table #(.W(R), .N(NM)) u_msb_table (
    .clk (clk), .rst_n (rst_n),
    .key (tab_key[K-1:L]), .hit (msb_hit), .hit_idx (msb_idx),
    .rd_idx (msb_rd_idx), .rd_data (msb_rd),
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
