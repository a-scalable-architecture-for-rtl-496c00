// tb_pld_next_protocol: self-checking test of the Next Protocol unit.
// Uses 4-byte words so that the next-protocol field can lie in any word and
// straddle two words. For random headers and instructions (fixed value, or
// field offset and mask) it streams the header word by word and checks that
// np_known rises exactly when the field has been seen and that np_val equals
// the masked field (or the fixed value).
module tb_pld_next_protocol;
  import pc_pkg::*;
  localparam int W = 4, POS_W = 7;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic fire, np_known;
  logic [POS_W-1:0] pos;
  logic [8*W-1:0] word;
  mc_instr_t instr;
  logic [15:0] np_val;

  pld_next_protocol #(.W(W), .POS_W(POS_W)) dut (.*);

  int checks = 0, failures = 0, n_field = 0;
  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    byte unsigned h [24];
    int ek;
    int unsigned ev;
    fire = 0; pos = 0; word = 0; instr = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 200; t++) begin
      foreach (h[i]) h[i] = 8'($urandom);
      instr = '0;
      instr.np_fixed = ($urandom % 4 == 0);
      instr.np_off   = 8'($urandom % 20);
      instr.np_mask  = ($urandom % 2) ? 16'hFFFF : 16'($urandom);
      instr.np_value = 16'($urandom);
      ev = instr.np_fixed ? instr.np_value : ({h[instr.np_off], h[instr.np_off + 1]} & instr.np_mask);
      for (int p = 0; p < 6; p++) begin
        pos = POS_W'(p);
        for (int b = 0; b < W; b++) word[8*(W-1-b) +: 8] = h[p*W + b];
        fire = 1;
        #1;
        ek = instr.np_fixed || ((instr.np_off + 1) / W <= p);
        checks++;
        if (np_known !== 1'(ek) || (ek && int'(np_val) != ev)) begin
          failures++;
          $display("FAIL t=%0d pos %0d: known %b val %h, exp %0d %h", t, p, np_known, np_val, ek, ev);
        end
        if (ek && !instr.np_fixed) n_field++;
        @(negedge clk);
      end
    end
    checks++;
    if (n_field == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
