// fv_i_codec: one end of an FV-i encoded data bus (encoder and decoder).
//
// FV-i keeps a frequent-value table larger than the bus is wide. Of the k
// bus lines, the upper k-m carry a one-hot code and the lowest m lines
// ("internal control lines") say which of the 2^m portions of the table the
// code points into, so the table holds (k-m)*2^m words: 62 for m = 1 and 120
// for m = 2 on a 32-bit bus. A table hit at index h is sent as a one on line
// m + (h mod (k-m)) plus the portion number h div (k-m) on lines m-1..0;
// after the XOR correlator this costs at most m+1 wire transitions. A miss is
// sent as-is with the encode line low. Both ends then update their tables
// with the word (LRU touch on a hit, insertion on a miss), so the tables stay
// equal. With m = 0 the codec is plain frequent value encoding.
//
// The table size, the one-hot-plus-control-lines layout and the use of the
// lowest lines for control follow the document. Its own choices: the
// portion number is sent inverted (the first portion as all ones, so the
// first half of an FV-1 table is marked by line 0 = 1, as in the document's
// FV-2-MSB-2 algorithm), the encode line is a level, not transition coded,
// and an encoded word whose code field is not one-hot is flagged as rx_error.
//
// Interface and timing (one clock; the bus is half duplex):
//   tx_valid, tx_data : word to send; it is on bus_dq_o/bus_enc_o the next
//                       cycle, with bus_drive_o high for that cycle.
//   bus_dq_i, bus_enc_i, bus_strobe_i : the bus as driven by the far end;
//                       bus_strobe_i marks a cycle carrying a new word.
//   rx_valid, rx_data, rx_kind, rx_error : the decoded word, one cycle after
//                       its strobe.
// So each end adds one cycle, two per transfer. tx_valid must not be high in
// a cycle with bus_strobe_i (one idle cycle when the direction turns).
module fv_i_codec
  import fvbus_pkg::*;
#(
  parameter int unsigned K = BUS_WIDTH,
  parameter int unsigned M = 2
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

  localparam int unsigned F  = K - M;          // one-hot lines
  localparam int unsigned N  = F << M;         // table entries
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned CMASK = (1 << M) - 1; // control lines mask

  if (M >= K - 1) begin : g_bad_m
    $error("fv_i_codec: M = %0d leaves no room for a one-hot code on %0d lines", M, K);
  end

  logic          rx_en;
  logic [K-1:0]  tab_key;
  logic          hit;
  logic [IW-1:0] hit_idx;
  logic [IW-1:0] dec_idx;
  logic [K-1:0]  rd_data;
  logic [K-1:0]  enc_code;
  logic          enc_flag;
  code_kind_e    enc_kind;
  logic [K-1:0]  rx_code;
  logic [K-1:0]  dec_data;
  code_kind_e    dec_kind;
  logic          dec_err;

  assign rx_en = bus_strobe_i && !tx_valid;

  // Encoder selection logic.
  always_comb begin
    int unsigned pos, portion;
    pos      = 32'(hit_idx) % F;
    portion  = 32'(hit_idx) / F;
    enc_code = tx_data;
    enc_flag = 1'b0;
    enc_kind = CK_RAW;
    if (hit) begin
      enc_code = (K'(1) << (pos + M)) | K'(CMASK - portion);
      enc_flag = 1'b1;
      enc_kind = CK_FV;
    end
  end

  // Decoder selection logic.
  always_comb begin
    logic [K-1:0] field;
    int unsigned  portion;
    field    = rx_code >> M;
    portion  = CMASK - (32'(rx_code) & CMASK);
    dec_idx  = IW'(portion * F + first_one(64'(field)));
    dec_data = rx_code;
    dec_kind = CK_RAW;
    dec_err  = 1'b0;
    if (bus_enc_i) begin
      if ($countones(field) == 1) begin
        dec_data = rd_data;
        dec_kind = CK_FV;
      end else begin
        dec_err  = 1'b1;
      end
    end
  end

  assign tab_key = tx_valid ? tx_data : dec_data;

  fv_lru_table #(.W(K), .N(N)) u_fv_table (
    .clk     (clk),
    .rst_n   (rst_n),
    .key     (tab_key),
    .hit     (hit),
    .hit_idx (hit_idx),
    .rd_idx  (dec_idx),
    .rd_data (rd_data),
    .upd_en  (tx_valid || rx_en)
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

  // The bus is half duplex: never send while a word from the far end is
  // being taken in.
  a_half_duplex: assert property (@(posedge clk) disable iff (!rst_n)
    !(tx_valid && bus_strobe_i));

endmodule
