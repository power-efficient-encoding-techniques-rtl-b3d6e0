// tb_fv_bus_top: end-to-end test of fv_bus_top at its default parameters.
//
// All three links run at once, each with its own stream: a mix of processor
// writes and memory read data, sent in bursts of eight words (a cache
// block) with the direction changing between bursts and one idle cycle at
// each turn. Per link the test checks that every word arrives unchanged at
// the other end exactly two cycles after it was given, that rx_error stays
// low, that the bus strobe marks exactly the cycles that carry a word and
// that the wires keep their value in between. It counts, per link, each
// mechanism of that scheme (FV hits, MSB hits, LSB hits, MSB+LSB hits, raw
// words, direction turns) and fails a link where one never happened. It
// also reports the bus transitions (data lines and encode line) against
// the transitions the same words would cause unencoded.
module tb_fv_bus_top;
  import fvbus_pkg::*;
  import fv_ref_pkg::*;

  localparam int unsigned K      = BUS_WIDTH;
  localparam int          BLOCKS = 600;
  localparam int          BLOCK  = 8;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic [2:0]        cpu_tx_valid = '0, mem_tx_valid = '0;
  logic [2:0][K-1:0] cpu_tx_data = '0, mem_tx_data = '0;
  logic [2:0]        cpu_rx_valid, mem_rx_valid, cpu_rx_error, mem_rx_error;
  logic [2:0][K-1:0] cpu_rx_data, mem_rx_data, bus_dq;
  code_kind_e [2:0]  cpu_rx_kind, mem_rx_kind, bus_kind;
  logic [2:0]        bus_enc, bus_strobe;

  fv_bus_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_kind[3][5];
  int n_turn[3];
  longint bits_plain[3], bits_bus[3];

  task automatic check(bit ok, string what, int l);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL link %0d: %s at %0t", l, what, $time);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One stream per link. A word is (data, direction); 1 = memory to processor.
  longint  q_data[3][$];
  bit      q_dir[3][$];
  bit      done[3];

  for (genvar l = 0; l < 3; l++) begin : g_link
    initial begin
      longint       d, s1_d, s2_d;
      bit           s1_v, s2_v, s1_dir, s2_dir, dir, prev_enc;
      logic [K-1:0] prev;
      int           r;
      r = (l == 1) ? MSB_BITS_FV2_MSB2 : MSB_BITS_FV_MSB_LSB;
      done[l] = 0;
      n_turn[l] = 0;
      bits_plain[l] = 0;
      bits_bus[l] = 0;
      for (int k = 0; k < 5; k++) n_kind[l][k] = 0;
      // Build the stream: bursts of BLOCK words, random direction per burst.
      for (int b = 0; b < BLOCKS; b++) begin
        dir = $urandom_range(1);
        for (int w = 0; w < BLOCK; w++) begin
          q_data[l].push_back(gen_word(K, r, (l == 0) ? 140 : 48, 30, 16));
          q_dir[l].push_back(dir);
        end
      end
      s1_v = 0; s2_v = 0; s1_dir = 0; s2_dir = 0; s1_d = 0; s2_d = 0;
      prev = '0; prev_enc = 0;
      @(posedge rst_n);
      while (q_data[l].size() > 0 || s1_v || s2_v) begin
        @(negedge clk);
        // Word given last cycle: on the wires now.
        check(bus_strobe[l] == s1_v, "strobe marks the cycles with a word", l);
        if (s1_v) begin
          n_kind[l][int'(bus_kind[l])]++;
          bits_bus[l]   += $countones(bus_dq[l] ^ prev) + ((bus_enc[l] != prev_enc) ? 1 : 0);
          bits_plain[l] += $countones(K'(s1_d) ^ K'(s2_d));
          prev     = bus_dq[l];
          prev_enc = bus_enc[l];
        end else begin
          check(bus_dq[l] == prev, "wires hold between words", l);
        end
        // Word given two cycles ago: delivered now, at the other end only.
        if (s2_v) begin
          if (s2_dir) begin
            check(cpu_rx_valid[l] && !mem_rx_valid[l], "delivered to the processor after two cycles", l);
            check(64'(cpu_rx_data[l]) == s2_d && !cpu_rx_error[l], "processor receives the word", l);
          end else begin
            check(mem_rx_valid[l] && !cpu_rx_valid[l], "delivered to the memory after two cycles", l);
            check(64'(mem_rx_data[l]) == s2_d && !mem_rx_error[l], "memory receives the word", l);
          end
        end else begin
          check(!cpu_rx_valid[l] && !mem_rx_valid[l], "no delivery without a word", l);
        end
        if (s1_v) s2_d = s1_d;
        s2_v = s1_v; s2_dir = s1_dir;
        cpu_tx_valid[l] = 1'b0;
        mem_tx_valid[l] = 1'b0;
        s1_v = 0;
        if (q_data[l].size() > 0) begin
          dir = q_dir[l][0];
          // One idle cycle when the direction turns.
          if (!(s2_v && s2_dir != dir)) begin
            if (s2_v && s2_dir != dir) n_turn[l]++;
            if (!s2_v && s1_dir != dir) n_turn[l]++;
            d = q_data[l].pop_front();
            void'(q_dir[l].pop_front());
            if (dir) begin mem_tx_valid[l] = 1'b1; mem_tx_data[l] = K'(d); end
            else     begin cpu_tx_valid[l] = 1'b1; cpu_tx_data[l] = K'(d); end
            s1_v = 1; s1_dir = dir; s1_d = d;
          end
        end
      end
      done[l] = 1;
    end
  end

  initial begin
    string name[3];
    name[0] = "FV-i (m=2, 120 words)";
    name[1] = "FV-2-MSB-2 (19 MSBs)";
    name[2] = "FV-MSB-LSB (20+12)";
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2]);
    for (int l = 0; l < 3; l++) begin
      $display("link %0d %s: raw=%0d FV=%0d MSB=%0d LSB=%0d MSB+LSB=%0d turns=%0d; transitions %0d encoded vs %0d unencoded",
               l, name[l], n_kind[l][0], n_kind[l][1], n_kind[l][2], n_kind[l][3], n_kind[l][4],
               n_turn[l], bits_bus[l], bits_plain[l]);
      check(n_kind[l][0] > 0 && n_kind[l][1] > 0 && n_turn[l] > 0, "raw words, FV hits, turns", l);
    end
    check(n_kind[1][2] > 0, "FV-i-MSB-j MSB hits", 1);
    check(n_kind[2][2] > 0 && n_kind[2][3] > 0 && n_kind[2][4] > 0, "FV-MSB-LSB MSB, LSB and MSB+LSB hits", 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
