// tb_match_accumulator: self-checking test of the Match Accumulator.
// Streams packets of 1 to 6 words with random word match vectors (with idle
// clocks between words) and checks that one clock after each eop word the
// packet match vector equals the OR of that packet's vectors only, with the
// packet's reference, and that pmv_valid is high for exactly those clocks.
module tb_match_accumulator;
  localparam int K = 64, REF_W = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic wmv_valid, wmv_sop, wmv_eop, pmv_valid;
  logic [K-1:0] wmv, pmv;
  logic [REF_W-1:0] wmv_ref, pmv_ref;

  match_accumulator #(.K(K), .REF_W(REF_W)) dut (.*);

  int checks = 0, failures = 0;
  logic [K-1:0] expq[$];
  int refq[$];

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (!rst && pmv_valid) begin
    checks++;
    if (expq.size() == 0 || pmv !== expq[0] || int'(pmv_ref) != refq[0]) begin
      failures++;
      $display("FAIL: pmv %h ref %0d", pmv, pmv_ref);
    end
    if (expq.size() != 0) begin void'(expq.pop_front()); void'(refq.pop_front()); end
  end

  initial begin
    wmv_valid = 0; wmv = '0; wmv_sop = 0; wmv_eop = 0; wmv_ref = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int p = 0; p < 100; p++) begin
      int nw;
      logic [K-1:0] acc;
      nw = 1 + $urandom % 6;
      acc = '0;
      for (int w = 0; w < nw; w++) begin
        @(negedge clk);
        while ($urandom % 3 == 0) begin
          wmv_valid = 0; wmv = {$urandom, $urandom}; wmv_sop = 1; wmv_eop = 1; @(negedge clk);
        end
        wmv_valid = 1; wmv_sop = (w == 0); wmv_eop = (w == nw - 1); wmv_ref = REF_W'(p);
        wmv = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
        acc |= wmv;
        if (wmv_eop) begin expq.push_back(acc); refq.push_back(p); end
      end
    end
    @(negedge clk); wmv_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL: %0d vectors missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
