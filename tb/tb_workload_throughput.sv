// tb_workload_throughput: runs the two throughput workloads the design is
// meant for and measures them in clock cycles.
//   * Default classifier (128-bit words): back-to-back 200-byte packets of
//     Ethernet (14) + IPv4 (20) + TCP (20) + 146 bytes payload. Expected
//     1 + 2 + 2 + 10 = 15 decoder words per packet, one per clock; at 60 MHz
//     this is 60e6 * 16 * 8 * 212/240 = 6.78 Gbit/s of line rate (12-byte
//     inter-frame gap), and 4 Mpackets/s.
//   * Classifier with 32-bit words, 64 criteria, 32 rules: back-to-back
//     64-byte Ethernet/IPv4/TCP frames, expected 4 + 5 + 5 + 3 = 17 words per
//     packet; at 42 MHz this gives 2.47 Mpackets/s.
//   * Default classifier in header-only mode, same 200-byte packets, the
//     source skipping the rest of each packet when asked: expected only
//     1 + 2 + 2 = 5 decoder words and clocks per packet, which at 60 MHz is
//     60e6 * 212 * 8 / 5 = 20.35 Gbit/s of line rate.
// All must classify every packet into rule 0 ("is TCP") with no bubble
// between decoder words.
module tb_workload_throughput;
  import pc_pkg::*;
  localparam int NPKT = 40;
  localparam int P_ETH = 1, P_IP4 = 3, P_TCP = 5;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  // shared configuration (sliced for the small instance)
  logic [4:0] start_proto, mc_waddr, jt_wkey_proto, jt_wtarget;
  logic mc_we, jt_we, jt_wvalid, crit_we, crit_valid, rule_we, rule_valid;
  mc_instr_t mc_wdata;
  logic [4:0] jt_waddr;
  logic [15:0] jt_wkey_val;
  logic [11:0] crit_idx_val, crit_idx_mask;
  logic [31:0] crit_pat_val, crit_pat_mask;
  logic [255:0] rule_val, rule_mask;

  // large instance
  logic a_ho, a_skip;
  logic a_valid, a_ready, a_sop, a_eop, a_cv, a_hit;
  logic [127:0] a_data; logic [4:0] a_bytes; logic [15:0] a_ref, a_cref; logic [6:0] a_rule;
  packet_classifier u_big (
    .clk, .rst, .start_proto, .mc_we, .mc_waddr, .mc_wdata, .jt_we, .jt_waddr, .jt_wvalid,
    .jt_wkey_proto, .jt_wkey_val, .jt_wtarget, .crit_we, .crit_addr(8'd0), .crit_valid,
    .crit_idx_val, .crit_idx_mask, .crit_pat_val, .crit_pat_mask, .rule_we, .rule_addr(7'd0),
    .rule_valid, .rule_val, .rule_mask, .hdr_only(a_ho), .in_skip(a_skip),
    .in_valid(a_valid), .in_ready(a_ready), .in_data(a_data),
    .in_sop(a_sop), .in_eop(a_eop), .in_bytes(a_bytes), .in_ref(a_ref), .cat_valid(a_cv),
    .cat_hit(a_hit), .cat_rule(a_rule), .cat_ref(a_cref));

  // prototype-sized instance
  logic b_valid, b_ready, b_sop, b_eop, b_cv, b_hit;
  logic [31:0] b_data; logic [2:0] b_bytes; logic [15:0] b_ref, b_cref; logic [4:0] b_rule;
  packet_classifier #(.W(4), .K(64), .N(32)) u_small (
    .clk, .rst, .start_proto, .mc_we, .mc_waddr, .mc_wdata, .jt_we, .jt_waddr, .jt_wvalid,
    .jt_wkey_proto, .jt_wkey_val, .jt_wtarget, .crit_we, .crit_addr(6'd0), .crit_valid,
    .crit_idx_val, .crit_idx_mask, .crit_pat_val(crit_pat_val[7:0]), .crit_pat_mask(crit_pat_mask[7:0]),
    .rule_we, .rule_addr(5'd0), .rule_valid, .rule_val(rule_val[63:0]), .rule_mask(rule_mask[63:0]),
    .hdr_only(1'b0), .in_skip(),
    .in_valid(b_valid), .in_ready(b_ready), .in_data(b_data), .in_sop(b_sop), .in_eop(b_eop),
    .in_bytes(b_bytes), .in_ref(b_ref), .cat_valid(b_cv), .cat_hit(b_hit), .cat_rule(b_rule),
    .cat_ref(b_cref));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    #5_000_000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic void mkpkt(ref byte unsigned p[$], input int len);
    p.delete();
    repeat (12) p.push_back(8'($urandom));
    p.push_back(8'h08); p.push_back(8'h00);
    p.push_back(8'h45); p.push_back(8'h00); p.push_back(8'(len - 14 >> 8)); p.push_back(8'(len - 14));
    repeat (5) p.push_back(8'($urandom)); p.push_back(8'd6); repeat (10) p.push_back(8'($urandom));
    repeat (12) p.push_back(8'($urandom)); p.push_back(8'h50); repeat (7) p.push_back(8'($urandom));
    while (p.size() < len) p.push_back(8'($urandom));
  endfunction

  // word counters and cycle spans of the decoder outputs
  int cyc = 0, a_first = -1, a_last, a_words = 0, b_first = -1, b_last, b_words = 0;
  int a_cats = 0, b_cats = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst && u_big.d_valid) begin if (a_first < 0) a_first = cyc; a_last = cyc; a_words++; end
    if (!rst && u_small.d_valid) begin if (b_first < 0) b_first = cyc; b_last = cyc; b_words++; end
    if (!rst && a_cv) begin a_cats++; check(a_hit && a_rule == 0 && int'(a_cref) == a_cats - 1, "big: category"); end
    if (!rst && b_cv) begin b_cats++; check(b_hit && b_rule == 0 && int'(b_cref) == b_cats - 1, "small: category"); end
  end

  int a_skips = 0;
  task automatic drive_big(int base);
    byte unsigned p[$];
    bit acc;
    for (int i = 0; i < NPKT; i++) begin
      mkpkt(p, 200);
      for (int k = 0; k < (p.size() + 15) / 16; k++) begin
        a_valid = 1; a_sop = (k == 0); a_eop = (k == (p.size() + 15) / 16 - 1);
        a_bytes = a_eop ? 5'(p.size() - 16*k) : 5'd16; a_ref = 16'(base + i); a_data = '0;
        for (int b = 0; b < 16; b++) if (16*k + b < p.size()) a_data[8*(15-b) +: 8] = p[16*k + b];
        #1 acc = a_ready;
        while (!acc && !(k > 0 && a_skip)) begin @(negedge clk); #1 acc = a_ready; end
        if (k > 0 && a_skip) begin a_skips++; break; end
        @(negedge clk);
      end
    end
    a_valid = 0;
  endtask

  task automatic drive_small();
    byte unsigned p[$];
    bit acc;
    for (int i = 0; i < NPKT; i++) begin
      mkpkt(p, 64);
      for (int k = 0; k < 16; k++) begin
        b_valid = 1; b_sop = (k == 0); b_eop = (k == 15); b_bytes = 3'd4; b_ref = 16'(i);
        for (int b = 0; b < 4; b++) b_data[8*(3-b) +: 8] = p[4*k + b];
        #1 acc = b_ready;
        while (!acc) begin @(negedge clk); #1 acc = b_ready; end
        @(negedge clk);
      end
    end
    b_valid = 0;
  endtask

  task automatic wr_mc(int a, bit term, bit hlf, int hoff, int hsh, int hadd, bit npf, int noff, int nmask);
    mc_instr_t i = '0;
    i.term = term; i.hl_fixed = hlf; i.hl_off = 8'(hoff); i.hl_shift = 4'(hsh); i.hl_mask = 16'hF;
    i.hl_scale = 3'd2; i.hl_add = 12'(hadd); i.np_fixed = npf; i.np_off = 8'(noff); i.np_mask = 16'(nmask);
    @(negedge clk); mc_we = 1; mc_waddr = 5'(a); mc_wdata = i;
    @(negedge clk); mc_we = 0;
  endtask
  task automatic wr_jt(int a, int kp, int kv, int t);
    @(negedge clk); jt_we = 1; jt_waddr = 5'(a); jt_wkey_proto = 5'(kp); jt_wkey_val = 16'(kv); jt_wtarget = 5'(t);
    @(negedge clk); jt_we = 0;
  endtask

  initial begin
    a_ho = 0;
    start_proto = P_ETH; {mc_we, jt_we, crit_we, rule_we, a_valid, b_valid, a_sop, a_eop, b_sop, b_eop} = '0;
    jt_wvalid = 1; crit_valid = 1; rule_valid = 1; mc_waddr = 0; mc_wdata = '0; jt_waddr = 0;
    jt_wkey_proto = 0; jt_wkey_val = 0; jt_wtarget = 0; a_data = 0; b_data = 0; a_bytes = 0; b_bytes = 0;
    a_ref = 0; b_ref = 0;
    crit_idx_val = {5'(P_TCP), 7'd0}; crit_idx_mask = '1; crit_pat_val = '0; crit_pat_mask = '0;
    rule_val = 256'd1; rule_mask = 256'd1;
    repeat (2) @(negedge clk);
    rst = 0;
    wr_mc(P_ETH, 0, 1, 0, 0, 14, 0, 12, 'hFFFF);
    wr_mc(P_IP4, 0, 0, 0, 8, 0, 0, 8, 'h00FF);
    wr_mc(P_TCP, 1, 0, 12, 12, 0, 1, 0, 0);
    wr_jt(0, P_ETH, 'h0800, P_IP4);
    wr_jt(1, P_IP4, 6, P_TCP);
    @(negedge clk); crit_we = 1; @(negedge clk); crit_we = 0; rule_we = 1; @(negedge clk); rule_we = 0;
    fork
      drive_big(0);
      drive_small();
    join
    repeat (30) @(negedge clk);
    check(a_words == 15 * NPKT, $sformatf("big: %0d words for %0d packets, expected 15 each", a_words, NPKT));
    check(a_last - a_first + 1 == a_words, $sformatf("big: %0d words in %0d clocks", a_words, a_last - a_first + 1));
    check(b_words == 17 * NPKT, $sformatf("small: %0d words for %0d packets, expected 17 each", b_words, NPKT));
    check(b_last - b_first + 1 == b_words, $sformatf("small: %0d words in %0d clocks", b_words, b_last - b_first + 1));
    check(a_cats == NPKT && b_cats == NPKT, "one category per packet");
    $display("128-bit: %0d clocks per 200-byte packet -> %0.2f Gbit/s line rate at 60 MHz",
             (a_last - a_first + 1) / NPKT, 60.0e6 * 212 * 8 / ((a_last - a_first + 1) / NPKT) / 1e9);
    $display("32-bit: %0d clocks per 64-byte frame -> %0.2f Mpackets/s at 42 MHz",
             (b_last - b_first + 1) / NPKT, 42.0 / ((b_last - b_first + 1) / NPKT));
    // header-only decoding on the default classifier
    a_ho = 1; a_first = -1; a_words = 0;
    drive_big(NPKT);
    repeat (30) @(negedge clk);
    check(a_words == 5 * NPKT, $sformatf("header-only: %0d words for %0d packets, expected 5 each", a_words, NPKT));
    check(a_last - a_first + 1 == a_words, $sformatf("header-only: %0d words in %0d clocks", a_words, a_last - a_first + 1));
    check(a_skips == NPKT, $sformatf("header-only: source skipped %0d of %0d packets", a_skips, NPKT));
    check(a_cats == 2 * NPKT, "header-only: one category per packet");
    $display("128-bit header-only: %0d clocks per 200-byte packet -> %0.2f Gbit/s line rate at 60 MHz",
             (a_last - a_first + 1) / NPKT, 60.0e6 * 212 * 8 / ((a_last - a_first + 1) / NPKT) / 1e9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
