// tb_xgft_network_tbc: the dual-switch network with two and with three
// turn-back channels per node (the DUAL/2 and DUAL/3 configurations).
// All 60 leaves send 30 packets of 8..32 words each to uniformly random
// destinations at once into receivers that are ready 80 % of the clocks.
// Checks that every packet arrives intact at its destination, and that the
// last turn-back channel of the nodes is used.
module tb_xgft_network_tbc;
  import xgft_pkg::*;
  localparam int NPK = 30;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  link_t in_l [2][NLEAF], out_l [2][NLEAF];
  logic  in_rdy [2][NLEAF], out_rdy [2][NLEAF];

  xgft_network #(.NODE(NODE_DUAL), .N_TBC(2)) u_tbc2 (
    .clk, .rst_n, .leaf_in(in_l[0]), .leaf_in_ready(in_rdy[0]),
    .leaf_out(out_l[0]), .leaf_out_ready(out_rdy[0])
  );
  xgft_network #(.NODE(NODE_DUAL), .N_TBC(3)) u_tbc3 (
    .clk, .rst_n, .leaf_in(in_l[1]), .leaf_in_ready(in_rdy[1]),
    .leaf_out(out_l[1]), .leaf_out_ready(out_rdy[1])
  );

  int checks = 0, failures = 0;

  function automatic enc_t ref_enc(input int D);
    return enc_t'({3'((D / 12) % 5), 2'((D / 4) % 3), 2'(D % 4)});
  endfunction
  function automatic word_t pw(input int S, input int k, input int w);
    return {1'b0, 6'(S), 16'(k), 9'(w)};
  endfunction

  int q_d [NLEAF][NPK], q_len [NLEAF][NPK];
  int sent [2][NLEAF], widx [2][NLEAF];
  bit go = 0;
  always_ff @(posedge clk) begin
    for (int n = 0; n < 2; n++)
      for (int s = 0; s < NLEAF; s++) begin
        if (rst_n && in_l[n][s].valid && in_rdy[n][s]) begin
          if (widx[n][s] + 1 == q_len[s][sent[n][s]]) begin widx[n][s] = 0; sent[n][s] = sent[n][s] + 1; end
          else widx[n][s] = widx[n][s] + 1;
        end
        if (rst_n && go && sent[n][s] < NPK) begin
          in_l[n][s].valid <= 1'b1;
          in_l[n][s].data  <= (widx[n][s] == 0)
              ? make_hdr(ref_enc(q_d[s][sent[n][s]]), ref_enc(s), len_t'(q_len[s][sent[n][s]]))
              : pw(s, sent[n][s], widx[n][s]);
        end else in_l[n][s] <= '0;
        out_rdy[n][s] <= ($urandom % 10) < 8;
      end
  end

  int r_idx [2][NLEAF], r_s [2][NLEAF], r_k [2][NLEAF], r_len [2][NLEAF];
  int rcv [2];
  always_ff @(posedge clk) begin
    if (rst_n) for (int n = 0; n < 2; n++)
      for (int d = 0; d < NLEAF; d++)
        if (out_l[n][d].valid && out_rdy[n][d]) begin
          word_t w;
          w = out_l[n][d].data;
          checks++;
          if (r_idx[n][d] == 0) begin
            r_len[n][d] = int'(hdr_len(w));
            r_s[n][d] = -1;
            for (int s = 0; s < NLEAF; s++) if (ref_enc(s) == hdr_src(w)) r_s[n][d] = s;
            if (hdr_dst(w) != ref_enc(d) || r_s[n][d] < 0) begin
              failures++;
              $display("FAIL net%0d leaf %0d: header %h", n, d, w);
            end
          end else begin
            if (r_idx[n][d] == 1) r_k[n][d] = int'(w[24:9]);
            if (r_s[n][d] < 0 || w != pw(r_s[n][d], r_k[n][d], r_idx[n][d]) ||
                q_d[r_s[n][d]][r_k[n][d]] != d || q_len[r_s[n][d]][r_k[n][d]] != r_len[n][d]) begin
              failures++;
              $display("FAIL net%0d leaf %0d: word %0d = %h", n, d, r_idx[n][d], w);
            end
          end
          r_idx[n][d] = r_idx[n][d] + 1;
          if (r_idx[n][d] == r_len[n][d]) begin r_idx[n][d] = 0; rcv[n]++; end
        end
  end

  // use of the last turn-back channel of the nodes in every stage
  int n_last_tbc [2];
  for (genvar L = 1; L <= H; L++) begin : g_mon
    for (genvar s = 0; s < nsw_of(L); s++) begin : g_sw
      always @(posedge clk) begin
        if (rst_n && |u_tbc2.g_st[L].g_sw[s].g_dual.u_node.u_up.ogrant[W[L] + 1]) n_last_tbc[0]++;
        if (rst_n && |u_tbc3.g_st[L].g_sw[s].g_dual.u_node.u_up.ogrant[W[L] + 2]) n_last_tbc[1]++;
      end
    end
  end

  initial begin
    for (int s = 0; s < NLEAF; s++) begin
      for (int k = 0; k < NPK; k++) begin
        q_d[s][k] = $urandom % NLEAF;
        q_len[s][k] = 8 + ($urandom % 25);
      end
      for (int n = 0; n < 2; n++) begin
        sent[n][s] = 0; widx[n][s] = 0; r_idx[n][s] = 0; r_s[n][s] = 0; r_k[n][s] = 0; r_len[n][s] = 0;
        in_l[n][s] = '0; out_rdy[n][s] = 1'b0;
      end
    end
    for (int n = 0; n < 2; n++) begin rcv[n] = 0; n_last_tbc[n] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    go = 1'b1;
    wait (rcv[0] == NLEAF * NPK && rcv[1] == NLEAF * NPK);
    repeat (20) @(posedge clk);
    $display("last turn-back channel grants: N_TBC=2 %0d, N_TBC=3 %0d", n_last_tbc[0], n_last_tbc[1]);
    checks += 2;
    if (n_last_tbc[0] == 0) begin failures++; $display("FAIL: second turn-back channel unused"); end
    if (n_last_tbc[1] == 0) begin failures++; $display("FAIL: third turn-back channel unused"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, delivered %0d and %0d", rcv[0], rcv[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
