// tb_workload_large: the largest configuration evaluated for the architecture,
// 512 criteria and 256 rules at 128-bit words, run end to end.
//
// With these sizes every criteria sub-CAM (128 entries) is built from two CAMs
// of 64, and every Rule CAM (256 rules) from four CAMs of 64, so the test
// places its criteria and rules in the upper CAMs:
//   criterion 127 (sub-CAM 0, upper half): TCP destination port 80
//   criterion 511 (sub-CAM 3 key = TCP bytes 12-15, upper half): SYN flag set
//   criterion 300 (sub-CAM 2, lower half): IPv4 protocol = TCP
//   criterion 100 (sub-CAM 0, upper half): TCP destination port 443
//   rule 70  (second rule CAM): port 80 and not TCP       -> can never match
//   rule 130 (third rule CAM):  port 80 and TCP
//   rule 200 (fourth rule CAM): port 443 and SYN
//   rule 255 (last rule):       TCP
// Random Ethernet/IPv4/TCP packets with ports 80, 443 or random and a random
// SYN flag are sent back to back; the expected category follows from the
// port and flag. Also checks one decoder word per clock.
module tb_workload_large;
  import pc_pkg::*;
  localparam int K = 512, N = 256, NPKT = 60;
  localparam int P_ETH = 1, P_IP4 = 3, P_TCP = 5;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [4:0] start_proto, mc_waddr, jt_wkey_proto, jt_wtarget, jt_waddr;
  logic mc_we, jt_we, jt_wvalid, crit_we, crit_valid, rule_we, rule_valid;
  mc_instr_t mc_wdata;
  logic [15:0] jt_wkey_val;
  logic [8:0] crit_addr;
  logic [7:0] rule_addr;
  logic [11:0] crit_idx_val, crit_idx_mask;
  logic [31:0] crit_pat_val, crit_pat_mask;
  logic [K-1:0] rule_val, rule_mask;
  logic hdr_only, in_skip, in_valid, in_ready, in_sop, in_eop, cat_valid, cat_hit;
  logic [127:0] in_data; logic [4:0] in_bytes; logic [15:0] in_ref, cat_ref; logic [7:0] cat_rule;

  packet_classifier #(.K(K), .N(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  initial begin
    #5_000_000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int exp_rule[$];
  int n_80 = 0, n_443syn = 0, n_other = 0;

  function automatic void mkpkt(ref byte unsigned p[$], input int len, input int port, input bit syn);
    p.delete();
    repeat (12) p.push_back(8'($urandom));
    p.push_back(8'h08); p.push_back(8'h00);
    p.push_back(8'h45); p.push_back(8'h00); p.push_back(8'(len - 14 >> 8)); p.push_back(8'(len - 14));
    repeat (5) p.push_back(8'($urandom)); p.push_back(8'd6); repeat (10) p.push_back(8'($urandom));
    p.push_back(8'($urandom)); p.push_back(8'($urandom));           // source port
    p.push_back(8'(port >> 8)); p.push_back(8'(port));               // destination port
    repeat (8) p.push_back(8'($urandom));                            // sequence, acknowledgement
    p.push_back(8'h50); p.push_back(syn ? 8'h02 : 8'h10);           // offset 5, flags
    repeat (6) p.push_back(8'($urandom));
    while (p.size() < len) p.push_back(8'($urandom));
  endfunction

  int cyc = 0, first = -1, last = 0, words = 0, cats = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst && dut.d_valid) begin if (first < 0) first = cyc; last = cyc; words++; end
    if (!rst && cat_valid) begin
      int e;
      e = exp_rule.pop_front();
      cats++;
      check(cat_hit && int'(cat_rule) == e && int'(cat_ref) == cats - 1,
            $sformatf("packet %0d: hit %b rule %0d, expected rule %0d", cats - 1, cat_hit, cat_rule, e));
    end
  end

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
  task automatic wr_crit(int c, int proto, logic [31:0] pv, logic [31:0] pm);
    @(negedge clk); crit_we = 1; crit_addr = 9'(c); crit_idx_val = {5'(proto), 7'd0}; crit_idx_mask = '1;
    crit_pat_val = pv; crit_pat_mask = pm;
    @(negedge clk); crit_we = 0;
  endtask
  task automatic wr_rule(int r, int c1, bit v1, int c2, bit use2, bit v2);
    @(negedge clk); rule_we = 1; rule_addr = 8'(r); rule_val = '0; rule_mask = '0;
    rule_val[c1] = v1; rule_mask[c1] = 1;
    if (use2) begin rule_val[c2] = v2; rule_mask[c2] = 1; end
    @(negedge clk); rule_we = 0;
  endtask

  initial begin
    byte unsigned p[$];
    bit acc;
    hdr_only = 0; start_proto = P_ETH;
    {mc_we, jt_we, crit_we, rule_we, in_valid, in_sop, in_eop} = '0;
    jt_wvalid = 1; crit_valid = 1; rule_valid = 1; mc_waddr = 0; mc_wdata = '0; jt_waddr = 0;
    jt_wkey_proto = 0; jt_wkey_val = 0; jt_wtarget = 0; crit_addr = 0; rule_addr = 0;
    crit_idx_val = 0; crit_idx_mask = 0; crit_pat_val = 0; crit_pat_mask = 0; rule_val = '0; rule_mask = '0;
    in_data = 0; in_bytes = 0; in_ref = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    wr_mc(P_ETH, 0, 1, 0, 0, 14, 0, 12, 'hFFFF);
    wr_mc(P_IP4, 0, 0, 0, 8, 0, 0, 8, 'h00FF);
    wr_mc(P_TCP, 1, 0, 12, 12, 0, 1, 0, 0);
    wr_jt(0, P_ETH, 'h0800, P_IP4);
    wr_jt(1, P_IP4, 6, P_TCP);
    wr_crit(127, P_TCP, 32'h0000_0050, 32'h0000_FFFF);   // sub-word 0 = ports
    wr_crit(100, P_TCP, 32'h0000_01BB, 32'h0000_FFFF);   // sub-word 0 = ports
    wr_crit(300, P_IP4, 32'h0006_0000, 32'h00FF_0000);   // sub-word 2 = TTL, protocol, checksum
    wr_crit(511, P_TCP, 32'h0002_0000, 32'h0002_0000);   // sub-word 3 = offset, flags, window
    wr_rule(70, 127, 1, 300, 1, 0);
    wr_rule(130, 127, 1, 300, 1, 1);
    wr_rule(200, 100, 1, 511, 1, 1);
    wr_rule(255, 300, 1, 0, 0, 0);
    repeat (2) @(negedge clk);
    for (int i = 0; i < NPKT; i++) begin
      int sel, port;
      bit syn;
      sel = $urandom % 3;
      syn = $urandom % 2;
      port = (sel == 0) ? 80 : (sel == 1) ? 443 : 1024 + $urandom % 1000;
      mkpkt(p, 64 + $urandom % 200, port, syn);
      if (port == 80) begin exp_rule.push_back(130); n_80++; end
      else if (port == 443 && syn) begin exp_rule.push_back(200); n_443syn++; end
      else begin exp_rule.push_back(255); n_other++; end
      for (int k = 0; k < (p.size() + 15) / 16; k++) begin
        in_valid = 1; in_sop = (k == 0); in_eop = (k == (p.size() + 15) / 16 - 1);
        in_bytes = in_eop ? 5'(p.size() - 16*k) : 5'd16; in_ref = 16'(i); in_data = '0;
        for (int b = 0; b < 16; b++) if (16*k + b < p.size()) in_data[8*(15-b) +: 8] = p[16*k + b];
        #1 acc = in_ready;
        while (!acc) begin @(negedge clk); #1 acc = in_ready; end
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (30) @(negedge clk);
    check(cats == NPKT, $sformatf("%0d categories for %0d packets", cats, NPKT));
    check(last - first + 1 == words, $sformatf("%0d decoder words in %0d clocks", words, last - first + 1));
    check(n_80 > 0 && n_443syn > 0 && n_other > 0, "every rule was reached");
    $display("512 criteria / 256 rules: port 80 -> rule 130: %0d, 443+SYN -> rule 200: %0d, other TCP -> rule 255: %0d",
             n_80, n_443syn, n_other);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
