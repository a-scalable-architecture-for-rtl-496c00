// tb_result_unit: self-checking test of the Result Unit.
// Uses 64 criteria split into four Rule CAMs of 16 bits, 32 rules (each Rule
// CAM divided into four CAMs of 8 rules), groups of 8
// in the priority multiplexer. Rules are written with care-1 bits,
// care-0 bits ("criterion must not match") and don't-cares, some invalid.
// Packet match vectors, random and built to satisfy chosen rules, are applied
// one per clock; the model searches all rules and takes the lowest number.
// Checks hit, rule, reference and the four-clock latency.
module tb_result_unit;
  localparam int K = 64, N = 32, SEG_W = 16, GROUP = 8, REF_W = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic cfg_we, cfg_valid, pmv_valid, cat_valid, cat_hit;
  logic [4:0] cfg_addr, cat_rule;
  logic [K-1:0] cfg_val, cfg_mask, pmv;
  logic [REF_W-1:0] pmv_ref, cat_ref;

  result_unit #(.K(K), .N(N), .SEG_W(SEG_W), .GROUP(GROUP), .RULE_DEPTH(8), .REF_W(REF_W)) dut (.*);

  int checks = 0, failures = 0, cyc = 0, n_hit = 0, n_miss = 0;
  logic rv [N];
  logic [K-1:0] rval [N], rmask [N];
  typedef struct { bit hit; int rule; int tag; int cyc; } exp_t;
  exp_t q[$];

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (!rst && cat_valid) begin
      exp_t e;
      e = q.pop_front();
      checks++;
      if (cat_hit !== e.hit || (e.hit && int'(cat_rule) != e.rule) || int'(cat_ref) != e.tag ||
          cyc - e.cyc != 4) begin
        failures++;
        $display("FAIL: hit %b rule %0d ref %0d lat %0d, exp hit %b rule %0d ref %0d",
                 cat_hit, cat_rule, cat_ref, cyc - e.cyc, e.hit, e.rule, e.tag);
      end
    end
  end

  initial begin
    cfg_we = 0; cfg_valid = 0; cfg_addr = 0; cfg_val = 0; cfg_mask = 0;
    pmv_valid = 0; pmv = 0; pmv_ref = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int r = 0; r < N; r++) begin
      logic [K-1:0] m, v;
      m = '0; v = '0;
      begin
        int c0 = $urandom % K;
        m[c0] = 1; v[c0] = 1;         // at least one criterion required
      end
      repeat (1 + $urandom % 3) begin
        int c = $urandom % K;
        m[c] = 1; v[c] = ($urandom % 4 != 0);
      end
      rv[r] = ($urandom % 8 != 0); rval[r] = v; rmask[r] = m;
      @(negedge clk);
      cfg_we = 1; cfg_addr = 5'(r); cfg_valid = rv[r]; cfg_val = v; cfg_mask = m;
    end
    @(negedge clk); cfg_we = 0;
    for (int t = 0; t < 300; t++) begin
      exp_t e;
      logic [K-1:0] p;
      if ($urandom % 2) begin
        int r = $urandom % N;
        p = ({$urandom, $urandom} & ~rmask[r]) | (rval[r] & rmask[r]);
      end else if ($urandom % 3 == 0) begin
        p = '0;
      end else begin
        p = {$urandom, $urandom} & {$urandom, $urandom};
      end
      pmv_valid = ($urandom % 5 != 0); pmv = p; pmv_ref = REF_W'(t);
      if (pmv_valid) begin
        e.hit = 0; e.rule = 0;
        for (int r = N-1; r >= 0; r--)
          if (rv[r] && ((p & rmask[r]) == (rval[r] & rmask[r]))) begin e.hit = 1; e.rule = r; end
        if (e.hit) n_hit++; else n_miss++;
        e.tag = t & 255; e.cyc = cyc + 1;
        q.push_back(e);
      end
      @(negedge clk);
    end
    pmv_valid = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (q.size() != 0 || n_hit == 0 || n_miss == 0) begin
      failures++; $display("FAIL: %0d left, %0d hits, %0d misses", q.size(), n_hit, n_miss);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
