// fv_lru_table: a value table with associative lookup and LRU replacement.
//
// It is the storage behind every codec: the frequent-value (FV) table that
// holds whole bus words and the MSB and LSB tables that hold the high- and
// low-order parts of words. N entries of W bits each.
//
// How it works: every entry has a valid bit and a timestamp, here an age rank
// in 0..N-1 (0 = most recently used, N-1 = least recently used). The ranks
// always form a permutation. On an update with a key that hits, the hit
// entry becomes rank 0 and the entries younger than it age by one. On a miss
// the entry of rank N-1 is overwritten with the key and becomes rank 0 while
// all others age by one. After reset the ranks are N-1-i, so an empty table
// fills in index order 0, 1, 2, ... and invalid entries are always the
// oldest. The LRU policy is the document's; the rank form of the timestamps
// and the fill order are this design's choice.
//
// Interface and timing:
//   key / hit / hit_idx : combinational lookup of key among the valid entries
//   rd_idx / rd_data    : combinational read of one entry (used by a decoder)
//   upd_en              : at the clock edge, touch (hit) or insert (miss) key
// Encoder and decoder apply the same update sequence, so their tables stay
// identical.
module fv_lru_table #(
  parameter int unsigned W  = 32,
  parameter int unsigned N  = 32,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [W-1:0]  key,
  output logic          hit,
  output logic [IW-1:0] hit_idx,
  input  logic [IW-1:0] rd_idx,
  output logic [W-1:0]  rd_data,
  input  logic          upd_en
);

  logic [W-1:0]  val_q  [N];
  logic          vld_q  [N];
  logic [IW-1:0] rank_q [N];

  logic [IW-1:0] victim;
  logic [IW-1:0] sel;
  logic [IW-1:0] sel_rank;

  // Associative lookup. Keys are unique in the table, so at most one entry
  // matches; the loop still resolves to a single index.
  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (vld_q[i] && (val_q[i] == key) && !hit) begin
        hit     = 1'b1;
        hit_idx = IW'(i);
      end
    end
  end

  // Least recently used entry: the one of rank N-1.
  always_comb begin
    victim = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (rank_q[i] == IW'(N - 1)) victim = IW'(i);
    end
  end

  assign sel      = hit ? hit_idx : victim;
  assign sel_rank = rank_q[sel];
  assign rd_data  = (32'(rd_idx) < N) ? val_q[rd_idx] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N; i++) begin
        val_q[i]  <= '0;
        vld_q[i]  <= 1'b0;
        rank_q[i] <= IW'(N - 1 - i);
      end
    end else if (upd_en) begin
      for (int unsigned i = 0; i < N; i++) begin
        if (IW'(i) == sel)            rank_q[i] <= '0;
        else if (rank_q[i] < sel_rank) rank_q[i] <= rank_q[i] + 1'b1;
      end
      if (!hit) begin
        val_q[sel] <= key;
        vld_q[sel] <= 1'b1;
      end
    end
  end

endmodule
