// tb_fv_lru_table: self-checking test of the LRU value table.
//
// Drives a stream of keys drawn from a pool larger than the table (so there
// are hits, misses and evictions) and compares, key by key, the table's hit
// flag and hit index with fv_ref_pkg::lru_model, reads the hit entry back
// through the read port, and checks the entry that an insertion overwrote.
// Lookup is combinational; the update takes effect at the next clock edge.
module tb_fv_lru_table;
  import fv_ref_pkg::*;

  localparam int unsigned W  = 32;
  localparam int unsigned N  = 32;
  localparam int unsigned IW = $clog2(N);

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [W-1:0]  key = '0;
  logic          hit;
  logic [IW-1:0] hit_idx;
  logic [IW-1:0] rd_idx = '0;
  logic [W-1:0]  rd_data;
  logic          upd_en = 1'b0;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_evict = 0;

  fv_lru_table #(.W(W), .N(N)) dut (.*);

  always #5 clk = ~clk;

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

  initial begin
    lru_model m;
    int       s;
    m = new(N);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      // Pool of 44 keys, one in four skewed to the first 12 for more hits.
      key    = W'(((t % 4) == 0) ? $urandom_range(11) : $urandom_range(43)) * 32'h9E3779B1 + 7;
      upd_en = 1'b1;
      #1;
      s = m.find(longint'(key));
      check(hit == (s >= 0), "hit flag");
      if (s >= 0) begin
        n_hit++;
        check(int'(hit_idx) == s, "hit index");
        rd_idx = hit_idx;
        #1;
        check(rd_data == key, "read back of hit entry");
      end else begin
        n_miss++;
        if (t >= N) n_evict++;
      end
      m.update(longint'(key));
      @(posedge clk);
      #1;
      // After the edge the key must be present at the model's slot.
      s = m.find(longint'(key));
      check(hit && int'(hit_idx) == s, "key present after update");
    end
    @(negedge clk);
    upd_en = 1'b0;
    // Every slot agrees with the model.
    for (int i = 0; i < N; i++) begin
      rd_idx = IW'(i);
      #1;
      check(rd_data == W'(m.val[i]), "final contents");
    end
    $display("hits=%0d misses=%0d evictions=%0d", n_hit, n_miss, n_evict);
    check(n_hit > 100 && n_evict > 100, "coverage of hits and evictions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
