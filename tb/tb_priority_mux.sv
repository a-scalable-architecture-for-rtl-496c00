// tb_priority_mux: self-checking test of the pipelined priority multiplexer.
// Sends one random request vector per clock (sparse, dense, empty, single bit)
// and checks two clocks later that hit, idx (lowest set bit) and the tag come
// out, with the exact two-clock latency.
module tb_priority_mux;
  localparam int N = 64, GROUP = 8, TAG_W = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid, out_valid, hit;
  logic [N-1:0] req;
  logic [TAG_W-1:0] in_tag, out_tag;
  logic [5:0] idx;

  priority_mux #(.N(N), .GROUP(GROUP), .TAG_W(TAG_W)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  typedef struct { bit hit; int idx; int tag; int cyc; } exp_t;
  exp_t q[$];

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (!rst && out_valid) begin
      exp_t e;
      checks++;
      e = q.pop_front();
      if (hit !== e.hit || (e.hit && int'(idx) != e.idx) || int'(out_tag) != e.tag || cyc - e.cyc != 2) begin
        failures++;
        $display("FAIL: hit %b idx %0d tag %0d lat %0d, exp hit %b idx %0d tag %0d",
                 hit, idx, out_tag, cyc - e.cyc, e.hit, e.idx, e.tag);
      end
    end
  end

  initial begin
    in_valid = 0; req = '0; in_tag = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 400; t++) begin
      exp_t e;
      @(negedge clk);
      in_valid = ($urandom % 4 != 0);
      case ($urandom % 4)
        0: req = '0;
        1: req = N'(1) << ($urandom % N);
        2: req = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
        default: req = {$urandom, $urandom};
      endcase
      in_tag = TAG_W'(t);
      if (in_valid) begin
        e.hit = (req != 0); e.idx = 0;
        for (int i = N-1; i >= 0; i--) if (req[i]) e.idx = i;
        e.tag = t & 255; e.cyc = cyc + 1;
        q.push_back(e);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: %0d results missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
