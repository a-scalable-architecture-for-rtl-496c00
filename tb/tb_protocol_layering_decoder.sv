// tb_protocol_layering_decoder: self-checking test of the Protocol Layering
// Decoder at a non-default size: 8-byte words, 16 protocol ids, 5-bit word
// position (saturates at 31 words).
// Programs Ethernet, VLAN, IPv4 (variable length, IP-in-IP) , TCP (variable
// length) and UDP, and sends random packets (some with long payloads, some
// truncated) with random input gaps, then back to back. A reference parser
// written from the protocol formats predicts every output word: aligned data
// with bytes past the header cleared, {protocol, position} index, sop, eop,
// byte count and last-word-of-layer flag. In the back-to-back phase the
// decoder must deliver one word per clock without bubbles. Each mechanism
// (stall, realignment, jump-table miss, position saturation, truncation)
// must occur.
module tb_protocol_layering_decoder;
  import pc_pkg::*;
  localparam int W = 8, POS_W = 5, PROTO_W = 4, JT_DEPTH = 8, REF_W = 8, BW = 4;
  localparam int P_ETH = 1, P_VLAN = 2, P_IP4 = 3, P_TCP = 5, P_UDP = 6;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [PROTO_W-1:0] start_proto, mc_waddr, jt_wkey_proto, jt_wtarget;
  logic mc_we, jt_we, jt_wvalid;
  mc_instr_t mc_wdata;
  logic [2:0] jt_waddr;
  logic [15:0] jt_wkey_val;
  logic in_valid, in_ready, in_sop, in_eop, out_valid, out_sop, out_eop, out_layer_last;
  logic [8*W-1:0] in_data, out_data;
  logic [BW-1:0] in_bytes, out_bytes;
  logic [REF_W-1:0] in_ref, out_ref;
  logic [PROTO_W+POS_W-1:0] out_index;
  logic hdr_only = 0, in_skip;

  protocol_layering_decoder #(.W(W), .POS_W(POS_W), .PROTO_W(PROTO_W), .JT_DEPTH(JT_DEPTH),
                              .REF_W(REF_W)) dut (.*);

  int checks = 0, failures = 0;
  int n_stall = 0, n_align = 0, n_miss = 0, n_sat = 0, n_trunc = 0;
  typedef struct { logic [8*W-1:0] data; logic [PROTO_W+POS_W-1:0] index; bit sop, eop, last; int nb, r; } ew_t;
  ew_t exp_q[$];
  typedef struct { int proto; int off; int len; bit full; } seg_t;

  task automatic fail(string s);
    failures++;
    if (failures < 10) $display("FAIL %0t: %s", $time, s);
  endtask

  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic mc_instr_t mk(bit term, bit hlf, int hoff, int hsh, int hsc, int hadd, int noff, int nmask);
    mc_instr_t i = '0;
    i.term = term; i.hl_fixed = hlf; i.hl_off = 8'(hoff); i.hl_shift = 4'(hsh); i.hl_mask = 16'hF;
    i.hl_scale = 3'(hsc); i.hl_add = 12'(hadd); i.np_off = 8'(noff); i.np_mask = 16'(nmask);
    return i;
  endfunction

  // reference parser
  task automatic model(byte unsigned p[$], int r);
    seg_t segs[$];
    int off = 0, proto = P_ETH, len, nxt, key, nw, k;
    bit done = 0, first = 1;
    while (!done) begin
      case (proto)
        P_ETH:  begin len = 14; key = (off + 13 < p.size()) ? {p[off+12], p[off+13]} : -1; end
        P_VLAN: begin len = 4;  key = (off + 3 < p.size()) ? {p[off+2], p[off+3]} : -1; end
        P_IP4:  begin len = (p[off] & 15) * 4; key = (off + 9 < p.size()) ? p[off+9] : -1; end
        P_TCP:  begin len = (off + 12 < p.size()) ? (p[off+12] >> 4) * 4 : 999; key = -1; end
        default: begin len = 8; key = -1; end
      endcase
      nxt = 0;
      if (proto == P_ETH || proto == P_VLAN) nxt = (key == 'h0800) ? P_IP4 : (key == 'h8100) ? P_VLAN : 0;
      if (proto == P_IP4) nxt = (key == 6) ? P_TCP : (key == 17) ? P_UDP : (key == 4) ? P_IP4 : 0;
      if (off + len >= p.size()) begin len = p.size() - off; done = 1; end
      segs.push_back('{proto, off, len, 1});
      if (len % W != 0 && !done) n_align++;
      off += len;
      if (!done && nxt == 0) begin
        if (proto != P_TCP && proto != P_UDP) n_miss++;
        segs.push_back('{0, off, p.size() - off, 1});
        done = 1;
      end
      proto = nxt;
    end
    foreach (segs[i]) begin
      nw = (segs[i].len + W - 1) / W;
      for (k = 0; k < nw; k++) begin
        ew_t e;
        e.data = '0;
        for (int b = 0; b < W; b++) if (k*W + b < segs[i].len) e.data[8*(W-1-b) +: 8] = p[segs[i].off + k*W + b];
        if (k > 31) n_sat++;
        e.index = {PROTO_W'(segs[i].proto), POS_W'((k > 31) ? 31 : k)};
        e.sop = first; first = 0;
        e.eop = (i == segs.size() - 1) && (k == nw - 1);
        e.nb = (segs[i].len - k*W < W) ? segs[i].len - k*W : W;
        e.last = (segs[i].proto != 0) && (k == nw - 1);
        e.r = r;
        exp_q.push_back(e);
      end
    end
  endtask

  function automatic void gen(ref byte unsigned q[$]);
    int ihl, l4, tun;
    q.delete();
    repeat (12) q.push_back(8'($urandom));
    if ($urandom % 4 == 0) begin q.push_back(8'h81); q.push_back(8'h00); q.push_back(8'($urandom)); q.push_back(8'($urandom)); end
    if ($urandom % 8 == 0) begin q.push_back(8'h88); q.push_back(8'hB5); end   // unknown EtherType
    else begin
      q.push_back(8'h08); q.push_back(8'h00);
      tun = ($urandom % 6 == 0);
      l4 = $urandom % 3;
      for (int t = 0; t <= tun; t++) begin
        ihl = 5 + (($urandom % 3 == 0) ? $urandom % 4 : 0);
        q.push_back(8'h40 | 8'(ihl)); repeat (8) q.push_back(8'($urandom));
        q.push_back((t < tun) ? 8'd4 : (l4 == 0) ? 8'd6 : (l4 == 1) ? 8'd17 : 8'd50);
        repeat (10 + (ihl - 5) * 4) q.push_back(8'($urandom));
      end
      if (l4 == 0) begin
        int doff = 5 + $urandom % 3;
        repeat (12) q.push_back(8'($urandom)); q.push_back(8'(doff << 4));
        repeat (7 + (doff - 5) * 4) q.push_back(8'($urandom));
      end else if (l4 == 1) repeat (8) q.push_back(8'($urandom));
    end
    repeat (($urandom % 5 == 0) ? 200 + $urandom % 100 : $urandom % 40) q.push_back(8'($urandom));
  endfunction

  bit gaps = 1;
  task automatic send(byte unsigned p[$], int r);
    int nw = (p.size() + W - 1) / W;
    bit acc;
    for (int k = 0; k < nw; k++) begin
      while (gaps && $urandom % 4 == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_sop = (k == 0); in_eop = (k == nw - 1);
      in_bytes = in_eop ? 4'(p.size() - k*W) : 4'(W); in_ref = 8'(r);
      in_data = '0;
      for (int b = 0; b < W; b++) if (k*W + b < p.size()) in_data[8*(W-1-b) +: 8] = p[k*W + b];
      #1 acc = in_ready;
      while (!acc) begin n_stall++; @(negedge clk); #1 acc = in_ready; end
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  int cyc = 0, first_b2b = -1, last_b2b = 0, words_b2b = 0;
  bit b2b = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst && out_valid) begin
      ew_t e;
      checks++;
      if (exp_q.size() == 0) fail("unexpected word");
      else begin
        e = exp_q.pop_front();
        if (out_data !== e.data || out_index !== e.index || out_sop !== e.sop || out_eop !== e.eop ||
            int'(out_bytes) != e.nb || int'(out_ref) != e.r || (out_layer_last !== e.last && !e.eop))
          fail($sformatf("word: idx %h d %h sop %b eop %b nb %0d last %b; exp idx %h d %h sop %b eop %b nb %0d last %b",
               out_index, out_data, out_sop, out_eop, out_bytes, out_layer_last,
               e.index, e.data, e.sop, e.eop, e.nb, e.last));
      end
      if (b2b) begin if (first_b2b < 0) first_b2b = cyc; last_b2b = cyc; words_b2b++; end
    end
  end

  initial begin
    byte unsigned p[$];
    start_proto = P_ETH; {mc_we, jt_we, jt_wvalid, in_valid, in_sop, in_eop} = '0;
    mc_waddr = 0; mc_wdata = '0; jt_waddr = 0; jt_wkey_proto = 0; jt_wkey_val = 0; jt_wtarget = 0;
    in_data = 0; in_bytes = 0; in_ref = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk); mc_we = 1; mc_waddr = P_ETH;  mc_wdata = mk(0, 1, 0, 0, 0, 14, 12, 'hFFFF);
    @(negedge clk); mc_waddr = P_VLAN; mc_wdata = mk(0, 1, 0, 0, 0, 4, 2, 'hFFFF);
    @(negedge clk); mc_waddr = P_IP4;  mc_wdata = mk(0, 0, 0, 8, 2, 0, 8, 'h00FF);
    @(negedge clk); mc_waddr = P_TCP;  mc_wdata = mk(1, 0, 12, 12, 2, 0, 0, 0);
    @(negedge clk); mc_waddr = P_UDP;  mc_wdata = mk(1, 1, 0, 0, 0, 8, 0, 0);
    @(negedge clk); mc_we = 0; jt_we = 1; jt_wvalid = 1;
    jt_waddr = 0; jt_wkey_proto = P_ETH;  jt_wkey_val = 'h0800; jt_wtarget = P_IP4;
    @(negedge clk); jt_waddr = 1; jt_wkey_proto = P_ETH;  jt_wkey_val = 'h8100; jt_wtarget = P_VLAN;
    @(negedge clk); jt_waddr = 2; jt_wkey_proto = P_VLAN; jt_wkey_val = 'h0800; jt_wtarget = P_IP4;
    @(negedge clk); jt_waddr = 3; jt_wkey_proto = P_IP4;  jt_wkey_val = 6;      jt_wtarget = P_TCP;
    @(negedge clk); jt_waddr = 4; jt_wkey_proto = P_IP4;  jt_wkey_val = 17;     jt_wtarget = P_UDP;
    @(negedge clk); jt_waddr = 5; jt_wkey_proto = P_IP4;  jt_wkey_val = 4;      jt_wtarget = P_IP4;
    @(negedge clk); jt_we = 0;
    for (int i = 0; i < 200; i++) begin
      gen(p);
      if ($urandom % 10 == 0) begin
        int cut = 1 + $urandom % p.size();
        while (p.size() > cut) void'(p.pop_back());
        n_trunc++;
      end
      model(p, i & 255);
      if (i == 120) begin repeat (10) @(negedge clk); gaps = 0; b2b = 1; end
      send(p, i & 255);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) fail($sformatf("%0d words missing", exp_q.size()));
    checks++;
    if (last_b2b - first_b2b + 1 != words_b2b) fail($sformatf("b2b: %0d words in %0d clocks", words_b2b, last_b2b - first_b2b + 1));
    $display("stall=%0d align=%0d miss=%0d sat=%0d trunc=%0d", n_stall, n_align, n_miss, n_sat, n_trunc);
    checks++;
    if (n_stall == 0 || n_align == 0 || n_miss == 0 || n_sat == 0 || n_trunc == 0) fail("mechanism missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
