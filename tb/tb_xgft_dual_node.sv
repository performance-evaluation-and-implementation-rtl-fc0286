// tb_xgft_dual_node: a dual-switch node of stage 2 with one turn-back channel, serving leaves 0..11.
//
// Phase 1 sends single packets through an idle node and checks the
// header latency (four clocks through the turn-back channel (two switch blocks), two clocks straight up or down) and that the words of a packet leave on
// consecutive clocks. Phase 2 lets every input send 60 packets of 1..24
// words at random times into outputs that are ready about 70 % of the clocks.
// Each packet is checked at the output it leaves by: allowed output for its
// source/destination (routing rule below), header, identity word, every
// payload word, no interleaving of packets on one output, and that every
// packet arrives exactly once.
// Routing rule checked: from C_UR[c] to leaf D < 12: C_DR[D div 4] through the turn-back channel, or either P_UR when that channel is reserved (TBWP); to D >= 12: either P_UR; from P_DR: C_DR[D div 4].
module tb_xgft_dual_node;
  import xgft_pkg::*;
  localparam int NI = 5, NO = 5, NCH = 3, NPK = 60;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  link_t in [NI];
  logic  in_ready [NI];
  link_t out [NO];
  logic  out_ready [NO];

  link_t c_in [NCH], c_out [NCH], p_in [NO-NCH], p_out [NO-NCH];
  logic  c_in_ready [NCH], c_out_ready [NCH], p_in_ready [NO-NCH], p_out_ready [NO-NCH];
  for (genvar c = 0; c < NCH; c++) begin : g_c
    assign c_in[c] = in[c];
    assign in_ready[c] = c_in_ready[c];
    assign out[c] = c_out[c];
    assign c_out_ready[c] = out_ready[c];
  end
  for (genvar j = 0; j < NO - NCH; j++) begin : g_p
    assign p_in[j] = in[NCH + j];
    assign in_ready[NCH + j] = p_in_ready[j];
    assign out[NCH + j] = p_out[j];
    assign p_out_ready[j] = out_ready[NCH + j];
  end
  xgft_dual_node #(.STAGE(2)) dut (
    .clk, .rst_n, .c_in, .c_in_ready, .c_out, .c_out_ready,
    .p_out, .p_out_ready, .p_in, .p_in_ready
  );

  int checks = 0, failures = 0;

  function automatic enc_t ref_enc(input int D);
    return enc_t'({3'((D / 12) % 5), 2'((D / 4) % 3), 2'(D % 4)});
  endfunction

  // 1: allowed and preferred, 2: allowed (adaptive detour), 0: wrong output
  function automatic int route_ok(input int i, input int S, input int D, input int o);
    if (i < NCH) begin
      if (D < 12) return (o == D / 4) ? 1 : ((o >= NCH) ? 2 : 0);
      return (o >= NCH) ? 1 : 0;
    end
    return (o == D / 4) ? 1 : 0;
  endfunction

  function automatic void pick_sd(input int i, output int S, output int D);
    if (i < NCH) begin S = 4 * i + ($urandom % 4); D = ($urandom % 4 != 0) ? int'($urandom % 12) : int'($urandom % 60); end
    else begin S = 12 + ($urandom % 48); D = $urandom % 12; end
  endfunction

  function automatic word_t pkt_word(input int i, input int k, input int w, input int S, input int D, input int len);
    if (w == 0) return make_hdr(ref_enc(D), ref_enc(S), len_t'(len));
    if (w == 1) return {8'ha5, 8'(i), 16'(k)};
    return {8'(i), 16'(k), 8'(w)};
  endfunction

  int q_s [NI][NPK], q_d [NI][NPK], q_len [NI][NPK];
  bit got [NI][NPK];
  int nq [NI], sent [NI], widx [NI];
  bit go = 0;
  int cyc = 0;
  int n_pref = 0, n_alt = 0, n_stall = 0;

  // sources
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    for (int i = 0; i < NI; i++) begin
      if (!rst_n) in[i] <= '0;
      else begin
      if (in[i].valid && in_ready[i]) begin
        if (widx[i] + 1 == q_len[i][sent[i]]) begin widx[i] = 0; sent[i] = sent[i] + 1; end
        else widx[i] = widx[i] + 1;
      end
      if (go && sent[i] < nq[i] && (widx[i] != 0 || ($urandom % 8) == 0)) begin
        in[i].valid <= 1'b1;
        in[i].data  <= pkt_word(i, sent[i], widx[i], q_s[i][sent[i]], q_d[i][sent[i]], q_len[i][sent[i]]);
      end else in[i] <= '0;
      end
    end
  end

  // sinks
  int r_idx [NO], r_len [NO], r_i [NO], r_k [NO], r_s [NO], r_d [NO];
  int first_seen = -1;
  always_ff @(posedge clk) begin
    if (rst_n) for (int o = 0; o < NO; o++) begin
      if (out[o].valid && !out_ready[o]) n_stall++;
      if (out[o].valid && out_ready[o]) begin
        word_t w;
        w = out[o].data;
        if (first_seen < 0) first_seen = cyc;
        checks++;
        if (r_idx[o] == 0) begin
          r_len[o] = int'(hdr_len(w));
          r_idx[o] = 1;
          r_s[o] = int'(hdr_src(w));
          r_d[o] = int'(hdr_dst(w));
        end else begin
          if (r_idx[o] == 1) begin
            r_i[o] = int'(w[23:16]);
            r_k[o] = int'(w[15:0]);
            if (w[31:24] != 8'ha5 || r_i[o] >= NI || r_k[o] >= nq[r_i[o]] || got[r_i[o]][r_k[o]] ||
                q_len[r_i[o]][r_k[o]] != r_len[o] || enc_t'(r_d[o]) != ref_enc(q_d[r_i[o]][r_k[o]]) ||
                enc_t'(r_s[o]) != ref_enc(q_s[r_i[o]][r_k[o]])) begin
              failures++;
              $display("FAIL out %0d: unexpected packet %h", o, w);
              r_i[o] = 0; r_k[o] = 0;
            end else begin
              case (route_ok(r_i[o], q_s[r_i[o]][r_k[o]], q_d[r_i[o]][r_k[o]], o))
                1: n_pref++;
                2: n_alt++;
                default: begin
                  failures++;
                  $display("FAIL out %0d: packet from input %0d to leaf %0d on wrong output", o, r_i[o], q_d[r_i[o]][r_k[o]]);
                end
              endcase
            end
          end else if (w != pkt_word(r_i[o], r_k[o], r_idx[o], 0, 0, 0)) begin
            failures++;
            $display("FAIL out %0d: word %0d = %h", o, r_idx[o], w);
          end
          r_idx[o] = r_idx[o] + 1;
        end
        if (r_idx[o] >= r_len[o] || r_len[o] == 0) begin
          r_idx[o] = 0;
          if (r_len[o] > 1) got[r_i[o]][r_k[o]] = 1'b1;
        end
      end
    end
  end

  task automatic one_packet(input int i, input int S, input int D, input int len, input int exp_o, input int exp_lat);
    int t_acc, t_first, t_last, o_seen;
    nq[i] = nq[i] + 1;
    q_s[i][nq[i]-1] = S; q_d[i][nq[i]-1] = D; q_len[i][nq[i]-1] = len;
    t_acc = -1; t_first = -1; t_last = -1; o_seen = -1;
    go = 1'b1;
    for (int c = 0; c < 200 && t_last < 0; c++) begin
      @(posedge clk);
      if (t_acc < 0 && in[i].valid && in_ready[i]) t_acc = cyc;
      for (int o = 0; o < NO; o++) if (out[o].valid) begin
        if (t_first < 0) begin t_first = cyc; o_seen = o; end
        if (r_idx[o] == len - 1) t_last = cyc;
      end
    end
    go = 1'b0;
    checks++;
    if (o_seen != exp_o || t_first - t_acc != exp_lat || t_last - t_first != len - 1) begin
      failures++;
      $display("FAIL single packet %0d->%0d: output %0d latency %0d span %0d", S, D, o_seen, t_first - t_acc, t_last - t_first);
    end
    repeat (5) @(posedge clk);
  endtask

  initial begin
    for (int i = 0; i < NI; i++) begin
      nq[i] = 0; sent[i] = 0; widx[i] = 0; in[i] = '0;
      for (int k = 0; k < NPK; k++) got[i][k] = 1'b0;
    end
    for (int o = 0; o < NO; o++) begin out_ready[o] = 1'b1; r_idx[o] = 0; r_len[o] = 0; r_i[o] = 0; r_k[o] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    one_packet(0, 1, 9, 6, 2, 4);     // turn back in stage 2
    one_packet(2, 8, 50, 5, 3, 2);    // climb
    one_packet(3, 30, 5, 7, 1, 2);    // from a parent
    // phase 2
    for (int i = 0; i < NI; i++) begin
      for (int k = nq[i]; k < NPK; k++) begin
        int S, D;
        pick_sd(i, S, D);
        q_s[i][k] = S; q_d[i][k] = D; q_len[i][k] = 2 + ($urandom % 23);
      end
      nq[i] = NPK;
    end
    go = 1'b1;
    for (int c = 0; c < 40000; c++) begin
      bit done;
      @(negedge clk);
      for (int o = 0; o < NO; o++) out_ready[o] = ($urandom % 10) < 7;
      done = 1'b1;
      for (int i = 0; i < NI; i++) for (int k = 0; k < NPK; k++) if (!got[i][k]) done = 1'b0;
      if (done) break;
    end
    for (int i = 0; i < NI; i++)
      for (int k = 0; k < NPK; k++) begin
        checks++;
        if (!got[i][k]) begin failures++; $display("FAIL: packet %0d of input %0d lost", k, i); end
      end
    $display("preferred routes %0d, adaptive detours %0d, output stalls %0d", n_pref, n_alt, n_stall);
    checks += 2;
    if (n_stall == 0) begin failures++; $display("FAIL: no output stall"); end
    checks++;
    if (n_alt == 0) begin failures++; $display("FAIL: turn-back channel never found reserved"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
