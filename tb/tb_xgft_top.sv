// tb_xgft_top: end-to-end test of both networks at full size (60 leaves each).
//
// Every leaf of each network runs a traffic source: in each clock it may
// create a packet with probability rho/20 (20 = mean packet length), lengths
// uniform in 8..32 words. The first half of each source's packets goes to
// uniformly random destinations, the second half is cluster traffic: 75 %
// stay inside the 12-leaf cluster (sub-XGFT of height 2) of the source.
// Receivers are ready about 85 % of the clocks. Each packet carries its
// source and sequence number in word 1 and a known pattern in later words;
// the receiver checks the encoded destination and source in the header, the
// length, every word, and that every packet sent arrives exactly once.
// Mechanisms counted (each must occur): turn-back channel use per stage and
// up-routing of a packet whose turn-back channel was reserved (dual network),
// use of the root loop-back links, turns at stages 1 and 2 (mega network),
// receiver and injection back-pressure.
module tb_xgft_top;
  import xgft_pkg::*;

  localparam int NPKT    = 40;     // packets per source and network
  localparam int RHO_PCT = 60;     // load factor in percent
  localparam int WATCHDOG = 400000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  link_t in_l    [2][NLEAF];
  logic  in_rdy  [2][NLEAF];
  link_t out_l   [2][NLEAF];
  logic  out_rdy [2][NLEAF];

  xgft_top dut (
    .clk, .rst_n,
    .dual_in(in_l[0]), .dual_in_ready(in_rdy[0]), .dual_out(out_l[0]), .dual_out_ready(out_rdy[0]),
    .mega_in(in_l[1]), .mega_in_ready(in_rdy[1]), .mega_out(out_l[1]), .mega_out_ready(out_rdy[1])
  );

  int checks = 0, failures = 0;

  function automatic word_t pat(input int net, input int src, input int seq, input int i);
    return {net[0], src[5:0], seq[13:0], i[5:0], 5'h15};
  endfunction

  // ---------------- sources ----------------
  int   q_dst  [2][NLEAF][NPKT];
  int   q_len  [2][NLEAF][NPKT];
  int   q_t0   [2][NLEAF][NPKT];
  int   made   [2][NLEAF];
  int   sent   [2][NLEAF];      // packets completely sent
  int   widx   [2][NLEAF];      // next word of the current packet
  bit   got    [2][NLEAF][NPKT];
  int   cyc = 0;

  function automatic word_t src_word(input int n, input int s);
    int k;
    k = sent[n][s];
    if (widx[n][s] == 0)
      return word_t'({12'h0, 6'(q_len[n][s][k]), 8'h0, 6'(q_dst[n][s][k])});
    return pat(n, s, k, widx[n][s]);
  endfunction

  always_ff @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      for (int n = 0; n < 2; n++) begin
        for (int s = 0; s < NLEAF; s++) begin
          // packet creation
          if (made[n][s] < NPKT && ($urandom % 2000) < RHO_PCT) begin
            int m, d;
            m = made[n][s];
            if (m < NPKT / 2 || ($urandom % 100) >= 75) d = $urandom % NLEAF;
            else d = (s / 12) * 12 + ($urandom % 12);
            q_dst[n][s][m] = d;
            q_len[n][s][m] = 8 + ($urandom % 25);
            q_t0[n][s][m]  = cyc;
            made[n][s]     = m + 1;
          end
          // word transfer
          if (in_l[n][s].valid && in_rdy[n][s]) begin
            if (widx[n][s] + 1 == q_len[n][s][sent[n][s]]) begin
              widx[n][s] = 0;
              sent[n][s] = sent[n][s] + 1;
            end else widx[n][s] = widx[n][s] + 1;
          end
          if (sent[n][s] < made[n][s]) begin
            in_l[n][s].valid <= 1'b1;
            in_l[n][s].data  <= src_word(n, s);
          end else begin
            in_l[n][s].valid <= 1'b0;
            in_l[n][s].data  <= '0;
          end
          out_rdy[n][s] <= ($urandom % 100) < 85;
        end
      end
    end
  end

  // ---------------- receivers ----------------
  int   r_idx [2][NLEAF];
  int   r_len [2][NLEAF];
  enc_t r_src [2][NLEAF];
  int   r_s   [2][NLEAF];
  int   r_seq [2][NLEAF];
  int   received [2];
  longint lat_sum [2];
  int   n_rx_stall = 0, n_tx_stall = 0;

  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int n = 0; n < 2; n++) begin
        for (int d = 0; d < NLEAF; d++) begin
          if (out_l[n][d].valid && !out_rdy[n][d]) n_rx_stall++;
          if (in_l[n][d].valid && !in_rdy[n][d]) n_tx_stall++;
          if (out_l[n][d].valid && out_rdy[n][d]) begin
            word_t w;
            w = out_l[n][d].data;
            if (r_idx[n][d] == 0) begin
              checks++;
              if (hdr_dst(w) != encode_addr(d)) begin
                failures++;
                $display("FAIL net%0d leaf %0d: header dst %h", n, d, hdr_dst(w));
              end
              r_len[n][d] = int'(hdr_len(w));
              r_src[n][d] = hdr_src(w);
              r_idx[n][d] = 1;
            end else begin
              if (r_idx[n][d] == 1) begin
                r_s[n][d]   = int'(w[30:25]);
                r_seq[n][d] = int'(w[24:11]);
                checks++;
                if (r_s[n][d] >= NLEAF || r_seq[n][d] >= NPKT ||
                    encode_addr(r_s[n][d]) != r_src[n][d] ||
                    q_dst[n][r_s[n][d]][r_seq[n][d]] != d ||
                    q_len[n][r_s[n][d]][r_seq[n][d]] != r_len[n][d] ||
                    got[n][r_s[n][d]][r_seq[n][d]]) begin
                  failures++;
                  $display("FAIL net%0d leaf %0d: bad packet id src=%0d seq=%0d", n, d, r_s[n][d], r_seq[n][d]);
                end
              end
              if (w != pat(n, r_s[n][d], r_seq[n][d], r_idx[n][d])) begin
                failures++;
                checks++;
                $display("FAIL net%0d leaf %0d: word %0d = %h", n, d, r_idx[n][d], w);
              end
              r_idx[n][d] = r_idx[n][d] + 1;
              if (r_idx[n][d] == r_len[n][d]) begin
                r_idx[n][d] = 0;
                if (r_s[n][d] < NLEAF && r_seq[n][d] < NPKT) begin
                  got[n][r_s[n][d]][r_seq[n][d]] = 1'b1;
                  lat_sum[n] += longint'(cyc - q_t0[n][r_s[n][d]][r_seq[n][d]]);
                end
                received[n]++;
              end
            end
          end
        end
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_tbc   [1:H];   // dual: packets turned back through a turn-back channel
  int n_bypass[1:H];   // dual: common ancestor, turn-back reserved, sent upward
  int n_loop;          // dual: root loop-back links used
  int n_turn  [1:H];   // mega: packets turned down from a child port

  for (genvar L = 1; L <= H; L++) begin : g_mon
    for (genvar s = 0; s < nsw_of(L); s++) begin : g_sw
      for (genvar i = 0; i < M[L]; i++) begin : g_i
        always @(posedge clk) begin
          if (rst_n) begin
            if (dut.u_dual.g_st[L].g_sw[s].g_dual.u_node.u_up.g_in[i].u_ip.gnt &&
                dut.u_dual.g_st[L].g_sw[s].g_dual.u_node.u_up.g_in[i].u_ip.evt_bypass)
              n_bypass[L]++;
            if (dut.u_mega.g_st[L].g_sw[s].g_mega.u_node.u_sw.g_in[i].u_ip.gnt &&
                dut.u_mega.g_st[L].g_sw[s].g_mega.u_node.u_sw.g_in[i].u_ip.evt_common)
              n_turn[L]++;
          end
        end
      end
      for (genvar o = 0; o < W[L] + N_TBC_DEFAULT; o++) begin : g_o
        always @(posedge clk) begin
          if (rst_n && |dut.u_dual.g_st[L].g_sw[s].g_dual.u_node.u_up.ogrant[o]) begin
            if (o >= W[L]) n_tbc[L]++;
            else if (L == H) n_loop++;
          end
        end
      end
    end
  end

  // ---------------- run ----------------
  initial begin
    for (int n = 0; n < 2; n++)
      for (int s = 0; s < NLEAF; s++) begin
        in_l[n][s] = '0;
        out_rdy[n][s] = 1'b0;
        made[n][s] = 0; sent[n][s] = 0; widx[n][s] = 0;
        r_idx[n][s] = 0; r_len[n][s] = 0; r_src[n][s] = '0; r_s[n][s] = 0; r_seq[n][s] = 0;
        for (int k = 0; k < NPKT; k++) begin
          got[n][s][k] = 1'b0; q_dst[n][s][k] = -1; q_len[n][s][k] = 0; q_t0[n][s][k] = 0;
        end
      end
    for (int n = 0; n < 2; n++) begin received[n] = 0; lat_sum[n] = 0; end
    n_loop = 0;
    for (int L = 1; L <= H; L++) begin n_tbc[L] = 0; n_bypass[L] = 0; n_turn[L] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (received[0] == NLEAF * NPKT && received[1] == NLEAF * NPKT);
    repeat (50) @(posedge clk);
    for (int n = 0; n < 2; n++) begin
      int missing;
      missing = 0;
      for (int s = 0; s < NLEAF; s++)
        for (int k = 0; k < NPKT; k++) if (!got[n][s][k]) missing++;
      checks++;
      if (missing != 0) begin failures++; $display("FAIL net%0d: %0d packets missing", n, missing); end
      $display("net %s: %0d packets, mean latency %0d cycles", n == 0 ? "dual/TBWP" : "mega/TB",
               received[n], int'(lat_sum[n] / longint'(received[n])));
    end
    for (int n = 0; n < 2; n++)
      for (int d = 0; d < NLEAF; d++) begin
        checks++;
        if (out_l[n][d].valid) begin failures++; $display("FAIL net%0d leaf %0d: stray word", n, d); end
      end
    $display("turn-back use per stage: %0d %0d %0d, bypass per stage: %0d %0d %0d, root loop-back: %0d",
             n_tbc[1], n_tbc[2], n_tbc[3], n_bypass[1], n_bypass[2], n_bypass[3], n_loop);
    $display("mega turns per stage: %0d %0d %0d, rx stalls %0d, tx stalls %0d",
             n_turn[1], n_turn[2], n_turn[3], n_rx_stall, n_tx_stall);
    for (int L = 1; L <= H; L++) begin
      checks += 2;
      if (n_tbc[L] == 0) begin failures++; $display("FAIL: no turn-back at stage %0d", L); end
      if (n_turn[L] == 0) begin failures++; $display("FAIL: no mega turn at stage %0d", L); end
    end
    for (int L = 1; L < H; L++) begin
      checks++;
      if (n_bypass[L] == 0) begin failures++; $display("FAIL: no TBWP bypass at stage %0d", L); end
    end
    checks += 3;
    if (n_loop == 0)     begin failures++; $display("FAIL: root loop-back never used"); end
    if (n_rx_stall == 0) begin failures++; $display("FAIL: no receiver stall"); end
    if (n_tx_stall == 0) begin failures++; $display("FAIL: no injection stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, received %0d / %0d", received[0], received[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
