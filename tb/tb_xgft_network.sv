// tb_xgft_network: wiring and routing of the whole XGFT(3;4,3,5;2,2,2), built
// once from dual-switch nodes (TBWP) and once from mega-switch nodes (TB).
//
// Phase 1 sends one 8-word packet for every one of the 3600 source and
// destination pairs through the idle networks, one pair at a time, and
// checks that it arrives at the right leaf, intact, with the zero-load
// header latency of its route: turning in stage L passes 2L switch blocks
// in the dual network (4L clocks) and 2L-1 in the mega network (4L-2
// clocks). Phase 2 lets all 60 leaves send 20 packets each to random
// destinations at once and checks that all arrive intact.
module tb_xgft_network;
  import xgft_pkg::*;
  localparam int NPK = 20;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  link_t in_l [2][NLEAF], out_l [2][NLEAF];
  logic  in_rdy [2][NLEAF], out_rdy [2][NLEAF];

  xgft_network #(.NODE(NODE_DUAL)) u_dual (
    .clk, .rst_n, .leaf_in(in_l[0]), .leaf_in_ready(in_rdy[0]),
    .leaf_out(out_l[0]), .leaf_out_ready(out_rdy[0])
  );
  xgft_network #(.NODE(NODE_MEGA)) u_mega (
    .clk, .rst_n, .leaf_in(in_l[1]), .leaf_in_ready(in_rdy[1]),
    .leaf_out(out_l[1]), .leaf_out_ready(out_rdy[1])
  );

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic enc_t ref_enc(input int D);
    return enc_t'({3'((D / 12) % 5), 2'((D / 4) % 3), 2'(D % 4)});
  endfunction

  function automatic word_t pw(input int S, input int k, input int w);
    return {1'b1, 6'(S), 16'(k), 9'(w)};
  endfunction

  // sources: queue of (dst, len) per leaf, driven identically into both nets
  int q_d [NLEAF][NPK + 1];
  int nq [NLEAF];
  int sent [2][NLEAF], widx [2][NLEAF];
  int t_hdr_in [2][NLEAF];
  always_ff @(posedge clk) begin
    for (int n = 0; n < 2; n++)
      for (int s = 0; s < NLEAF; s++) begin
        if (!rst_n) in_l[n][s] <= '0;
        else begin
        if (in_l[n][s].valid && in_rdy[n][s]) begin
          if (widx[n][s] == 0) t_hdr_in[n][s] = cyc;
          if (widx[n][s] == 7) begin widx[n][s] = 0; sent[n][s] = sent[n][s] + 1; end
          else widx[n][s] = widx[n][s] + 1;
        end
        if (sent[n][s] < nq[s]) begin
          in_l[n][s].valid <= 1'b1;
          in_l[n][s].data  <= (widx[n][s] == 0) ? make_hdr(ref_enc(q_d[s][sent[n][s]]), ref_enc(s), len_t'(8))
                                                : pw(s, sent[n][s], widx[n][s]);
        end else in_l[n][s] <= '0;
        end
      end
  end

  // sinks
  int r_idx [2][NLEAF], r_s [2][NLEAF], r_k [2][NLEAF];
  int rcv [2];
  int last_lat [2];
  always_ff @(posedge clk) begin
    if (rst_n) for (int n = 0; n < 2; n++)
      for (int d = 0; d < NLEAF; d++)
        if (out_l[n][d].valid && out_rdy[n][d]) begin
          word_t w;
          w = out_l[n][d].data;
          checks++;
          if (r_idx[n][d] == 0) begin
            if (hdr_dst(w) != ref_enc(d) || hdr_len(w) != 8) begin
              failures++;
              $display("FAIL net%0d leaf %0d: header %h", n, d, w);
            end
            r_s[n][d] = -1;
            for (int s = 0; s < NLEAF; s++) if (ref_enc(s) == hdr_src(w)) r_s[n][d] = s;
          end else begin
            if (r_idx[n][d] == 1) r_k[n][d] = int'(w[24:9]);
            if (r_s[n][d] < 0 || w != pw(r_s[n][d], r_k[n][d], r_idx[n][d]) ||
                q_d[r_s[n][d]][r_k[n][d]] != d) begin
              failures++;
              $display("FAIL net%0d leaf %0d: word %0d = %h", n, d, r_idx[n][d], w);
            end
          end
          if (r_idx[n][d] == 0 && r_s[n][d] >= 0) last_lat[n] = cyc - t_hdr_in[n][r_s[n][d]];
          r_idx[n][d] = (r_idx[n][d] + 1) % 8;
          if (r_idx[n][d] == 0) rcv[n]++;
        end
  end

  function automatic int turn_stage(input int S, input int D);
    if (S / 4 == D / 4) return 1;
    if (S / 12 == D / 12) return 2;
    return 3;
  endfunction

  initial begin
    int total;
    for (int s = 0; s < NLEAF; s++) begin
      nq[s] = 0;
      for (int n = 0; n < 2; n++) begin
        sent[n][s] = 0; widx[n][s] = 0; r_idx[n][s] = 0; r_s[n][s] = 0; r_k[n][s] = 0;
        in_l[n][s] = '0; out_rdy[n][s] = 1'b1; t_hdr_in[n][s] = 0;
      end
    end
    rcv[0] = 0; rcv[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    total = 0;
    // phase 1: every pair alone
    for (int s = 0; s < NLEAF; s++) begin
      for (int d = 0; d < NLEAF; d++) begin
        int L;
        @(negedge clk);
        q_d[s][0] = d;
        nq[s] = 1;
        total++;
        while (rcv[0] < total || rcv[1] < total) @(negedge clk);
        L = turn_stage(s, d);
        checks++;
        if (last_lat[0] != 4 * L || last_lat[1] != 4 * L - 2) begin
          failures++;
          $display("FAIL %0d->%0d: latency dual %0d (exp %0d) mega %0d (exp %0d)",
                   s, d, last_lat[0], 4 * L, last_lat[1], 4 * L - 2);
        end
        nq[s] = 0;
        for (int n = 0; n < 2; n++) sent[n][s] = 0;
      end
    end
    // phase 2: everybody at once
    @(negedge clk);
    for (int s = 0; s < NLEAF; s++)
      for (int k = 0; k < NPK; k++) q_d[s][k] = $urandom % NLEAF;
    for (int s = 0; s < NLEAF; s++) nq[s] = NPK;
    total += NLEAF * NPK;
    for (int c = 0; c < 100000 && (rcv[0] < total || rcv[1] < total); c++) begin
      @(negedge clk);
      for (int n = 0; n < 2; n++) for (int d = 0; d < NLEAF; d++) out_rdy[n][d] = ($urandom % 4) != 0;
    end
    checks += 2;
    if (rcv[0] != total) begin failures++; $display("FAIL: dual network delivered %0d of %0d", rcv[0], total); end
    if (rcv[1] != total) begin failures++; $display("FAIL: mega network delivered %0d of %0d", rcv[1], total); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
