// tb_pld_header_length: self-checking test of the Header Length unit.
// Uses 4-byte words so that the length field can lie in any word and even
// straddle two words. For random headers and random instructions (fixed
// length, or field offset/shift/mask/scale/add) it streams the header word by
// word and checks in every word that hl_known rises exactly when both field
// bytes have been seen and that hdr_len then equals the value computed from
// the header bytes.
module tb_pld_header_length;
  import pc_pkg::*;
  localparam int W = 4, POS_W = 7;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic fire, hl_known;
  logic [POS_W-1:0] pos;
  logic [8*W-1:0] word;
  mc_instr_t instr;
  logic [LEN_W-1:0] hdr_len;

  pld_header_length #(.W(W), .POS_W(POS_W)) dut (.*);

  int checks = 0, failures = 0, n_known = 0, n_fixed = 0;
  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    byte unsigned h [24];
    int ek;
    int unsigned ev, f;
    fire = 0; pos = 0; word = 0; instr = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 200; t++) begin
      foreach (h[i]) h[i] = 8'($urandom);
      instr = '0;
      instr.hl_fixed = ($urandom % 4 == 0);
      instr.hl_off   = 8'($urandom % 20);
      instr.hl_shift = 4'($urandom % 13);
      instr.hl_mask  = 16'($urandom);
      instr.hl_scale = 3'($urandom % 4);
      instr.hl_add   = 12'($urandom % 64);
      f  = {h[instr.hl_off], h[instr.hl_off + 1]};
      ev = instr.hl_fixed ? instr.hl_add
                          : ((((f >> instr.hl_shift) & instr.hl_mask) << instr.hl_scale) + instr.hl_add) & 12'hFFF;
      for (int p = 0; p < 6; p++) begin
        pos = POS_W'(p);
        for (int b = 0; b < W; b++) word[8*(W-1-b) +: 8] = h[p*W + b];
        fire = 1;
        #1;
        ek = instr.hl_fixed || ((instr.hl_off + 1) / W <= p);
        checks++;
        if (hl_known !== 1'(ek) || (ek && int'(hdr_len) != ev)) begin
          failures++;
          $display("FAIL t=%0d pos %0d: known %b len %0d, exp %0d %0d", t, p, hl_known, hdr_len, ek, ev);
        end
        if (ek && !instr.hl_fixed) n_known++;
        if (instr.hl_fixed) n_fixed++;
        @(negedge clk);
      end
    end
    checks++;
    if (n_known == 0 || n_fixed == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
