// tb_packet_classifier: end-to-end test of the packet classifier at its
// default size (128-bit words, 256 criteria, 128 rules).
//
// Programs a decoder for Ethernet, 802.1Q VLAN, IPv4 (with options and IP-in-IP
// tunnelling), IPv6, TCP and UDP, a set of named criteria and rules plus random
// ones, and sends random packets, first with random input gaps and then
// back to back. A reference model written directly from the protocol formats
// (not from the microcode) predicts
//   * every indexed word the decoder must output (data, index, sop/eop), and
//   * the category of every packet (criteria matching, OR accumulation, rule
//     search, lowest rule number wins).
// Also checked: one decoder word per clock with no bubbles in the back-to-back
// phase (words = sum of ceil(H_i/W) + ceil(R/W)), and a category exactly six
// clocks after the packet's last decoder word. Every mechanism (input stall for
// realignment, variable header length, VLAN, IP-in-IP, IPv6, jump-table miss,
// truncated packet, hits in each criteria sub-CAM, several rules matching,
// no rule matching) is counted and must occur. A last phase runs header-only
// decoding back to back: the source drops the rest of a packet as soon as
// in_skip asks for it, no payload words may appear, and each packet must take
// only sum(ceil(H_i/W)) clocks.
module tb_packet_classifier;
  import pc_pkg::*;

  localparam int W = 16, NSUB = 4, K = 256, N = 128, PROTO_W = 5, POS_W = 7, JT_DEPTH = 32;
  localparam int REF_W = 16, BW = $clog2(W+1), IDX_W = PROTO_W + POS_W, SUBW = 8*W/NSUB;
  localparam int KS = K / NSUB;
  localparam int P_ETH = 1, P_VLAN = 2, P_IP4 = 3, P_IP6 = 4, P_TCP = 5, P_UDP = 6;
  localparam int NPKT_GAP = 150, NPKT_B2B = 150, NPKT_HO = 100;
  localparam int NPKT = NPKT_GAP + NPKT_B2B + NPKT_HO;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [PROTO_W-1:0] start_proto;
  logic mc_we; logic [PROTO_W-1:0] mc_waddr; mc_instr_t mc_wdata;
  logic jt_we; logic [$clog2(JT_DEPTH)-1:0] jt_waddr; logic jt_wvalid;
  logic [PROTO_W-1:0] jt_wkey_proto, jt_wtarget; logic [15:0] jt_wkey_val;
  logic crit_we; logic [$clog2(K)-1:0] crit_addr; logic crit_valid;
  logic [IDX_W-1:0] crit_idx_val, crit_idx_mask; logic [SUBW-1:0] crit_pat_val, crit_pat_mask;
  logic rule_we; logic [$clog2(N)-1:0] rule_addr; logic rule_valid; logic [K-1:0] rule_val, rule_mask;
  logic hdr_only, in_skip;
  logic in_valid, in_ready, in_sop, in_eop; logic [8*W-1:0] in_data; logic [BW-1:0] in_bytes;
  logic [REF_W-1:0] in_ref;
  logic cat_valid, cat_hit; logic [$clog2(N)-1:0] cat_rule; logic [REF_W-1:0] cat_ref;

  packet_classifier dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // ---------------- reference tables ----------------
  logic             c_vld [K];
  logic [IDX_W-1:0] c_iv [K], c_im [K];
  logic [SUBW-1:0]  c_pv [K], c_pm [K];
  logic             r_vld [N];
  logic [K-1:0]     r_v [N], r_m [N];

  // expected decoder words and categories
  typedef struct { logic [8*W-1:0] data; logic [IDX_W-1:0] index; bit sop, eop; } eword_t;
  typedef struct { bit hit; int rule; int ref_no; int nmatch; } ecat_t;
  eword_t exp_words[$];
  ecat_t  exp_cats[$];

  // mechanism counters
  int n_stall, n_varlen, n_vlan, n_ipip, n_ip6, n_miss, n_trunc, n_multi, n_nohit, n_hit;
  int n_sub [NSUB];
  int n_payload, n_skip, n_ho_drop;

  // ---------------- configuration ----------------
  task automatic wr_mc(int p, mc_instr_t ins);
    @(negedge clk); mc_we = 1; mc_waddr = PROTO_W'(p); mc_wdata = ins;
    @(negedge clk); mc_we = 0;
  endtask
  task automatic wr_jt(int a, int kp, int kv, int t);
    @(negedge clk); jt_we = 1; jt_waddr = 5'(a); jt_wvalid = 1; jt_wkey_proto = PROTO_W'(kp);
    jt_wkey_val = 16'(kv); jt_wtarget = PROTO_W'(t);
    @(negedge clk); jt_we = 0;
  endtask
  task automatic wr_crit(int c, int proto, int pos, bit pos_dc, logic [31:0] pv, logic [31:0] pm);
    c_vld[c] = 1; c_iv[c] = {PROTO_W'(proto), POS_W'(pos)};
    c_im[c] = {{PROTO_W{1'b1}}, pos_dc ? {POS_W{1'b0}} : {POS_W{1'b1}}};
    c_pv[c] = pv; c_pm[c] = pm;
    @(negedge clk); crit_we = 1; crit_addr = 8'(c); crit_valid = 1; crit_idx_val = c_iv[c];
    crit_idx_mask = c_im[c]; crit_pat_val = pv; crit_pat_mask = pm;
    @(negedge clk); crit_we = 0;
  endtask
  task automatic wr_rule(int r, logic [K-1:0] v, logic [K-1:0] m);
    r_vld[r] = 1; r_v[r] = v; r_m[r] = m;
    @(negedge clk); rule_we = 1; rule_addr = 7'(r); rule_valid = 1; rule_val = v; rule_mask = m;
    @(negedge clk); rule_we = 0;
  endtask

  function automatic mc_instr_t mk(bit term, bit hlf, int hoff, int hsh, int hmask, int hsc,
                                   int hadd, bit npf, int noff, int nmask, int nval);
    mc_instr_t i;
    i.term = term; i.hl_fixed = hlf; i.hl_off = 8'(hoff); i.hl_shift = 4'(hsh);
    i.hl_mask = 16'(hmask); i.hl_scale = 3'(hsc); i.hl_add = 12'(hadd);
    i.np_fixed = npf; i.np_off = 8'(noff); i.np_mask = 16'(nmask); i.np_value = 16'(nval);
    return i;
  endfunction

  // ---------------- reference model ----------------
  typedef struct { int proto; int off; int len; } seg_t;

  function automatic int b16(byte unsigned p[], int o);
    return (o + 1 < p.size()) ? {p[o], p[o+1]} : -1;
  endfunction

  // Parse the header chain from the protocol formats.
  function automatic void parse(byte unsigned p[], ref seg_t segs[$]);
    int off = 0, proto = P_ETH, len, nxt, key;
    bit done = 0;
    segs.delete();
    while (!done && off < p.size()) begin
      nxt = 0;
      case (proto)
        P_ETH:  begin len = 14; key = b16(p, off + 12); end
        P_VLAN: begin len = 4;  key = b16(p, off + 2); end
        P_IP4:  begin len = (p[off] & 8'h0F) * 4; key = (off + 9 < p.size()) ? p[off+9] : -1; end
        P_IP6:  begin len = 40; key = (off + 6 < p.size()) ? p[off+6] : -1; end
        P_TCP:  begin len = (off + 12 < p.size()) ? (p[off+12] >> 4) * 4 : 9999; key = -1; end
        default: begin len = 8; key = -1; end
      endcase
      if (proto == P_ETH || proto == P_VLAN)
        nxt = (key == 'h0800) ? P_IP4 : (key == 'h86DD) ? P_IP6 : (key == 'h8100) ? P_VLAN : 0;
      else if (proto == P_IP4 || proto == P_IP6)
        nxt = (key == 6) ? P_TCP : (key == 17) ? P_UDP : (key == 4 && proto == P_IP4) ? P_IP4 : 0;
      if (off + len >= p.size()) begin
        len = p.size() - off;
        done = 1;
      end
      segs.push_back('{proto, off, len});
      off += len;
      if (!done && nxt == 0) begin
        segs.push_back('{0, off, p.size() - off});
        done = 1;
      end
      proto = nxt;
    end
  endfunction

  function automatic logic [31:0] subw(logic [8*W-1:0] d, int s);
    return d[8*W-1-s*SUBW -: SUBW];
  endfunction

  task automatic model_packet(byte unsigned p[], int ref_no, bit ho);
    seg_t segs[$];
    logic [K-1:0] pmv = '0;
    int nw, first_rule = -1, nm = 0;
    bit first = 1;
    eword_t e;
    parse(p, segs);
    // header-only: the payload is not decoded, the last header ends the packet
    if (ho && segs.size() > 1 && segs[segs.size()-1].proto == 0) begin
      void'(segs.pop_back());
      n_ho_drop++;
    end
    foreach (segs[i]) begin
      nw = (segs[i].len + W - 1) / W;
      if (segs[i].proto == 0 && !ho) n_payload++;
      for (int k = 0; k < nw; k++) begin
        e.data = '0;
        for (int b = 0; b < W; b++)
          if (k*W + b < segs[i].len) e.data[8*(W-1-b) +: 8] = p[segs[i].off + k*W + b];
        e.index = {PROTO_W'(segs[i].proto), POS_W'((k > 127) ? 127 : k)};
        e.sop = first; first = 0;
        e.eop = (i == segs.size() - 1) && (k == nw - 1);
        exp_words.push_back(e);
        for (int c = 0; c < K; c++)
          if (c_vld[c] && ((e.index & c_im[c]) == (c_iv[c] & c_im[c])) &&
              ((subw(e.data, c / KS) & c_pm[c]) == (c_pv[c] & c_pm[c]))) begin
            if (!pmv[c]) n_sub[c / KS]++;
            pmv[c] = 1;
          end
      end
    end
    for (int r = 0; r < N; r++)
      if (r_vld[r] && ((pmv & r_m[r]) == (r_v[r] & r_m[r]))) begin
        if (first_rule < 0) first_rule = r;
        nm++;
      end
    exp_cats.push_back('{first_rule >= 0, first_rule, ref_no, nm});
  endtask

  // ---------------- packet generator ----------------
  task automatic gen_packet(ref byte unsigned p[], output bit trunc);
    byte unsigned q[$];
    int l3, ihl, nvlan, doff, tunnel, l4, plen;
    trunc = 0;
    for (int i = 0; i < 12; i++) q.push_back(8'($urandom));
    nvlan = ($urandom % 4 == 0) ? 1 + $urandom % 2 : 0;
    for (int v = 0; v < nvlan; v++) begin
      q.push_back(8'h81); q.push_back(8'h00); q.push_back(8'($urandom)); q.push_back(8'($urandom));
    end
    l3 = $urandom % 10;                 // 0-5 IPv4, 6-7 IPv6, 8 ARP (unknown), 9 IPv4 in IPv4
    tunnel = (l3 == 9);
    if (l3 == 8) begin
      q.push_back(8'h08); q.push_back(8'h06);
      repeat (28) q.push_back(8'($urandom));
    end else begin
      l4 = $urandom % 4;                 // 0,1 TCP, 2 UDP, 3 other (ICMP)
      if (l3 >= 6 && l3 <= 7) begin
        q.push_back(8'h86); q.push_back(8'hDD);
        q.push_back(8'h60); repeat (3) q.push_back(8'($urandom));
        q.push_back(8'h00); q.push_back(8'h40);
        q.push_back((l4 < 2) ? 8'd6 : (l4 == 2) ? 8'd17 : 8'd58);
        repeat (33) q.push_back(8'($urandom));
      end else begin
        q.push_back(8'h08); q.push_back(8'h00);
        for (int t = 0; t <= tunnel; t++) begin
          ihl = ($urandom % 3 == 0) ? 6 + $urandom % 3 : 5;
          q.push_back(8'h40 | 8'(ihl)); q.push_back(8'($urandom % 4));
          q.push_back(8'h00); q.push_back(8'h80);
          repeat (4) q.push_back(8'($urandom));
          q.push_back(8'h40);
          q.push_back((t < tunnel) ? 8'd4 : (l4 < 2) ? 8'd6 : (l4 == 2) ? 8'd17 : 8'd1);
          q.push_back(8'($urandom)); q.push_back(8'($urandom));
          q.push_back(($urandom % 2) ? 8'd10 : 8'd192); repeat (7) q.push_back(8'($urandom));
          repeat ((ihl - 5) * 4) q.push_back(8'($urandom));
        end
      end
      if (l4 < 2) begin
        doff = 5 + $urandom % 4;
        q.push_back(8'($urandom)); q.push_back(8'($urandom));
        q.push_back(8'h00); q.push_back(($urandom % 2) ? 8'd80 : 8'($urandom));
        repeat (8) q.push_back(8'($urandom));
        q.push_back(8'(doff << 4)); repeat (7) q.push_back(8'($urandom));
        repeat ((doff - 5) * 4) q.push_back(8'($urandom));
      end else if (l4 == 2) begin
        repeat (8) q.push_back(8'($urandom));
      end else begin
        repeat (8) q.push_back(8'($urandom));
      end
    end
    plen = ($urandom % 3 == 0) ? 0 : $urandom % 120;
    repeat (plen) q.push_back(8'($urandom));
    if ($urandom % 12 == 0) begin       // truncated packet
      int cut = 1 + $urandom % q.size();
      while (q.size() > cut) void'(q.pop_back());
      trunc = 1;
    end
    p = new[q.size()];
    foreach (q[i]) p[i] = q[i];
  endtask

  task automatic count_mechanisms(byte unsigned p[]);
    seg_t segs[$];
    parse(p, segs);
    foreach (segs[i]) begin
      if (segs[i].proto == P_IP4 && segs[i].len > 20) n_varlen++;
      if (segs[i].proto == P_VLAN) n_vlan++;
      if (segs[i].proto == P_IP6) n_ip6++;
      if (segs[i].proto == P_IP4 && i > 0 && segs[i-1].proto == P_IP4) n_ipip++;
      if (segs[i].proto == 0 && i > 0 && segs[i-1].proto inside {P_ETH, P_VLAN, P_IP4, P_IP6}) n_miss++;
    end
  endtask

  // ---------------- driver ----------------
  bit gaps = 1;
  task automatic send_packet(byte unsigned p[], int ref_no);
    int nw = (p.size() + W - 1) / W;
    bit acc;
    for (int k = 0; k < nw; k++) begin
      while (gaps && $urandom % 4 == 0) begin
        in_valid = 0; @(negedge clk);
      end
      in_valid = 1; in_sop = (k == 0); in_eop = (k == nw - 1);
      in_bytes = in_eop ? BW'(p.size() - k*W) : BW'(W); in_ref = 16'(ref_no);
      in_data = '0;
      for (int b = 0; b < W; b++) if (k*W + b < p.size()) in_data[8*(W-1-b) +: 8] = p[k*W + b];
      #1 acc = in_ready;
      while (!acc && !(k > 0 && in_skip)) begin
        n_stall++;
        @(negedge clk);
        #1 acc = in_ready;
      end
      // header-only: the decoder needs no more of this packet
      if (k > 0 && in_skip) begin
        n_skip++;
        break;
      end
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  // ---------------- monitors ----------------
  int words_seen = 0, cats_seen = 0, cyc = 0;
  int b2b_first = -1, b2b_last = -1, b2b_words = 0;
  int eop_cycles[$];
  bit b2b_phase = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) if (!rst && dut.d_valid) begin
    eword_t e;
    words_seen++;
    if (exp_words.size() == 0) check(0, "unexpected decoder word");
    else begin
      e = exp_words.pop_front();
      check(dut.d_data == e.data && dut.d_index == e.index && dut.d_sop == e.sop && dut.d_eop == e.eop,
            $sformatf("decoder word %0d: got idx %h sop %b eop %b data %h, exp idx %h sop %b eop %b data %h",
                      words_seen, dut.d_index, dut.d_sop, dut.d_eop, dut.d_data, e.index, e.sop, e.eop, e.data));
    end
    if (dut.d_eop) eop_cycles.push_back(cyc);
    if (b2b_phase) begin
      if (b2b_first < 0) b2b_first = cyc;
      b2b_last = cyc;
      b2b_words++;
    end
  end

  always @(posedge clk) if (!rst && cat_valid) begin
    ecat_t c;
    int ec;
    cats_seen++;
    if (exp_cats.size() == 0) check(0, "unexpected category");
    else begin
      c = exp_cats.pop_front();
      ec = eop_cycles.pop_front();
      check(cat_hit == c.hit && (!c.hit || int'(cat_rule) == c.rule) && int'(cat_ref) == c.ref_no,
            $sformatf("category %0d: got hit %b rule %0d ref %0d, exp hit %b rule %0d ref %0d",
                      cats_seen, cat_hit, cat_rule, cat_ref, c.hit, c.rule, c.ref_no));
      check(cyc - ec == 6, $sformatf("category latency %0d clocks, expected 6", cyc - ec));
      if (!c.hit) n_nohit++; else n_hit++;
      if (c.nmatch > 1) n_multi++;
    end
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned pkts[NPKT][];
    int gap_words;
    logic [K-1:0] v, m;
    for (int s = 0; s < NSUB; s++) n_sub[s] = 0;
    for (int c = 0; c < K; c++) c_vld[c] = 0;
    for (int r = 0; r < N; r++) r_vld[r] = 0;
    hdr_only = 0; n_skip = 0; n_ho_drop = 0;
    {mc_we, jt_we, crit_we, rule_we, in_valid, in_sop, in_eop} = '0;
    mc_waddr = '0; mc_wdata = '0; jt_waddr = '0; jt_wvalid = 0; jt_wkey_proto = '0;
    jt_wkey_val = '0; jt_wtarget = '0; crit_addr = '0; crit_valid = 0; crit_idx_val = '0;
    crit_idx_mask = '0; crit_pat_val = '0; crit_pat_mask = '0; rule_addr = '0; rule_valid = 0;
    rule_val = '0; rule_mask = '0; in_data = '0; in_bytes = '0; in_ref = '0;
    start_proto = PROTO_W'(P_ETH);
    repeat (3) @(negedge clk);
    rst = 0;

    // microcode: term hlf hoff hsh hmask hsc hadd npf noff nmask nval
    wr_mc(P_ETH,  mk(0, 1, 0, 0, 0, 0, 14, 0, 12, 'hFFFF, 0));
    wr_mc(P_VLAN, mk(0, 1, 0, 0, 0, 0, 4, 0, 2, 'hFFFF, 0));
    wr_mc(P_IP4,  mk(0, 0, 0, 8, 'hF, 2, 0, 0, 8, 'h00FF, 0));
    wr_mc(P_IP6,  mk(0, 1, 0, 0, 0, 0, 40, 0, 5, 'h00FF, 0));
    wr_mc(P_TCP,  mk(1, 0, 12, 12, 'hF, 2, 0, 1, 0, 0, 0));
    wr_mc(P_UDP,  mk(1, 1, 0, 0, 0, 0, 8, 1, 0, 0, 0));
    wr_jt(0, P_ETH, 'h0800, P_IP4);  wr_jt(1, P_ETH, 'h86DD, P_IP6);
    wr_jt(2, P_ETH, 'h8100, P_VLAN); wr_jt(3, P_VLAN, 'h0800, P_IP4);
    wr_jt(4, P_VLAN, 'h86DD, P_IP6); wr_jt(5, P_VLAN, 'h8100, P_VLAN);
    wr_jt(6, P_IP4, 6, P_TCP);       wr_jt(7, P_IP4, 17, P_UDP);
    wr_jt(8, P_IP4, 4, P_IP4);       wr_jt(9, P_IP6, 6, P_TCP);
    wr_jt(10, P_IP6, 17, P_UDP);

    // named criteria
    wr_crit(0,   P_IP4, 0, 0, 32'h4000_0000, 32'hF000_0000);   // IPv4 version 4
    wr_crit(1,   P_TCP, 0, 0, 32'h0000_0050, 32'h0000_FFFF);   // TCP destination port 80
    wr_crit(2,   P_UDP, 0, 0, 32'h0, 32'h0);                   // any UDP header
    wr_crit(3,   0,     0, 1, 32'h0, 32'h0);                   // any payload word
    wr_crit(4,   P_VLAN, 0, 0, 32'h0, 32'h0);                  // VLAN tag present
    wr_crit(5,   P_IP6, 0, 0, 32'h0, 32'h0);                   // IPv6 header
    wr_crit(6,   P_ETH, 0, 0, 32'h0100_0000, 32'h0100_0000);   // multicast destination
    wr_crit(KS,  P_IP4, 0, 0, 32'h0000_0080, 32'h0000_00FF);   // IPv4 bytes 4-7 (flags/frag)
    wr_crit(2*KS, P_IP4, 0, 0, 32'h0006_0000, 32'h00FF_0000);  // IPv4 protocol = TCP
    wr_crit(3*KS, P_IP4, 0, 0, 32'h0A00_0000, 32'hFF00_0000);  // IPv4 source 10/8
    // random criteria: one nibble of one sub-word at a random index
    for (int c = 7; c < K; c++) if (c % KS != 0) begin
      int sh = 4 * ($urandom % 8);
      wr_crit(c, $urandom % 7, $urandom % 4, $urandom % 4 == 0,
              32'($urandom) & (32'hF << sh), 32'hF << sh);
    end
    // named rules (rule 0 has the highest priority)
    v = '0; m = '0; v[4] = 1; m[4] = 1; v[1] = 1; m[1] = 1; wr_rule(0, v, m);  // VLAN and port 80
    v = '0; m = '0; v[1] = 1; m[1] = 1; wr_rule(1, v, m);                        // port 80
    v = '0; m = '0; v[2*KS] = 1; m[2*KS] = 1; v[3*KS] = 1; m[3*KS] = 1; m[3] = 1; wr_rule(2, v, m); // TCP from 10/8 without payload
    v = '0; m = '0; v[2] = 1; m[2] = 1; wr_rule(3, v, m);                        // UDP
    v = '0; m = '0; v[5] = 1; m[5] = 1; m[6] = 1; wr_rule(4, v, m);              // IPv6 unicast
    v = '0; m = '0; v[KS] = 1; m[KS] = 1; wr_rule(5, v, m);                      // IPv4 flags
    // random rules of two or three random criteria
    for (int r = 6; r < N - 8; r++) begin
      v = '0; m = '0;
      repeat (2 + $urandom % 2) begin
        int c = $urandom % K;
        v[c] = 1; m[c] = 1;
      end
      wr_rule(r, v, m);
    end

    // generate and model all packets, then send
    for (int i = 0; i < NPKT; i++) begin
      bit tr;
      gen_packet(pkts[i], tr);
      if (tr) n_trunc++;
      count_mechanisms(pkts[i]);
      model_packet(pkts[i], i, i >= NPKT_GAP + NPKT_B2B);
      if (i == NPKT_GAP - 1) gap_words = exp_words.size();
    end
    for (int i = 0; i < NPKT_GAP; i++) send_packet(pkts[i], i);
    repeat (40) @(negedge clk);
    check(words_seen == gap_words, $sformatf("gapped phase: %0d decoder words, expected %0d", words_seen, gap_words));
    gaps = 0; b2b_phase = 1;
    for (int i = NPKT_GAP; i < NPKT_GAP + NPKT_B2B; i++) send_packet(pkts[i], i);
    repeat (40) @(negedge clk);
    // throughput: one decoder word per clock, no bubbles, back to back
    check(b2b_last - b2b_first + 1 == b2b_words,
          $sformatf("back-to-back: %0d words in %0d clocks", b2b_words, b2b_last - b2b_first + 1));
    // header-only phase, back to back
    hdr_only = 1; b2b_first = -1; b2b_words = 0;
    for (int i = NPKT_GAP + NPKT_B2B; i < NPKT; i++) send_packet(pkts[i], i);
    repeat (40) @(negedge clk);
    check(b2b_last - b2b_first + 1 == b2b_words,
          $sformatf("header-only: %0d words in %0d clocks", b2b_words, b2b_last - b2b_first + 1));
    check(exp_words.size() == 0 && exp_cats.size() == 0,
          $sformatf("left over: %0d words, %0d categories", exp_words.size(), exp_cats.size()));
    check(cats_seen == NPKT, "one category per packet");

    $display("mechanisms: stall=%0d varlen=%0d vlan=%0d ipip=%0d ipv6=%0d jt_miss=%0d trunc=%0d payload=%0d",
             n_stall, n_varlen, n_vlan, n_ipip, n_ip6, n_miss, n_trunc, n_payload);
    $display("            header-only: payload dropped=%0d source skipped=%0d", n_ho_drop, n_skip);
    $display("            sub-CAM hits=%0d/%0d/%0d/%0d hit=%0d multi=%0d nohit=%0d",
             n_sub[0], n_sub[1], n_sub[2], n_sub[3], n_hit, n_multi, n_nohit);
    check(n_stall > 0, "realignment stall happened");
    check(n_varlen > 0, "variable-length IPv4 header happened");
    check(n_vlan > 0, "VLAN happened");
    check(n_ipip > 0, "IP-in-IP happened");
    check(n_ip6 > 0, "IPv6 happened");
    check(n_miss > 0, "jump table miss happened");
    check(n_trunc > 0, "truncated packet happened");
    check(n_payload > 0, "payload words happened");
    check(n_ho_drop > 0, "header-only decoding dropped a payload");
    check(n_skip > 0, "source skipped the rest of a packet");
    for (int s = 0; s < NSUB; s++) check(n_sub[s] > 0, $sformatf("sub-CAM %0d matched", s));
    check(n_multi > 0, "several rules matched one packet");
    check(n_nohit > 0, "packet without a rule happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
