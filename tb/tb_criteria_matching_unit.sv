// tb_criteria_matching_unit: self-checking test of the Criteria Matching Unit.
// 64-bit words cut into four 16-bit sub-words, 32 criteria (8 per sub-CAM,
// each sub-CAM divided into two CAMs of 4),
// 8-bit index. Criteria get random index values (some ignoring the word
// position) and random nibble/byte patterns; data words are random or copies
// of a criterion's pattern placed in its own sub-word. The model evaluates
// criterion c on sub-word c/8 of the word. Checks the word match vector,
// sop/eop/reference and the one-clock latency, and that every sub-CAM matched.
module tb_criteria_matching_unit;
  localparam int W = 8, NSUB = 4, K = 32, IDX_W = 8, REF_W = 8, SUBW = 16, KS = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic cfg_we, cfg_valid, in_valid, in_sop, in_eop, wmv_valid, wmv_sop, wmv_eop;
  logic [4:0] cfg_addr;
  logic [IDX_W-1:0] cfg_idx_val, cfg_idx_mask, in_index;
  logic [SUBW-1:0] cfg_pat_val, cfg_pat_mask;
  logic [8*W-1:0] in_data;
  logic [REF_W-1:0] in_ref, wmv_ref;
  logic [K-1:0] wmv;

  criteria_matching_unit #(.W(W), .NSUB(NSUB), .K(K), .IDX_W(IDX_W), .CRIT_DEPTH(4), .REF_W(REF_W)) dut (.*);

  int checks = 0, failures = 0;
  int n_sub [NSUB];
  logic cv [K];
  logic [IDX_W-1:0] civ [K], cim [K];
  logic [SUBW-1:0] cpv [K], cpm [K];
  logic [K-1:0] exp_v;
  bit exp_valid, exp_sop, exp_eop;
  int exp_ref;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cfg_we = 0; cfg_valid = 0; cfg_addr = 0; cfg_idx_val = 0; cfg_idx_mask = 0;
    cfg_pat_val = 0; cfg_pat_mask = 0; in_valid = 0; in_sop = 0; in_eop = 0;
    in_index = 0; in_data = 0; in_ref = 0;
    for (int s = 0; s < NSUB; s++) n_sub[s] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int c = 0; c < K; c++) begin
      int sh = 4 * ($urandom % 3);
      cv[c] = ($urandom % 8 != 0);
      civ[c] = {4'($urandom % 4), 4'($urandom % 3)};
      cim[c] = ($urandom % 3 == 0) ? 8'hF0 : 8'hFF;
      cpm[c] = (16'h00FF << sh) & 16'(($urandom % 2) ? 16'hFFFF : 16'h0F0F);
      cpv[c] = 16'($urandom) & cpm[c];
      @(negedge clk);
      cfg_we = 1; cfg_addr = 5'(c); cfg_valid = cv[c]; cfg_idx_val = civ[c]; cfg_idx_mask = cim[c];
      cfg_pat_val = cpv[c]; cfg_pat_mask = cpm[c];
    end
    @(negedge clk); cfg_we = 0;
    for (int t = 0; t < 400; t++) begin
      in_valid = ($urandom % 4 != 0);
      in_sop = ($urandom % 2); in_eop = ($urandom % 2); in_ref = REF_W'(t);
      in_index = {4'($urandom % 4), 4'($urandom % 3)};
      in_data = {$urandom, $urandom};
      if ($urandom % 2) begin
        int c = $urandom % K;
        in_index = civ[c];
        in_data[8*W-1-(c/KS)*SUBW -: SUBW] = cpv[c] | (16'($urandom) & ~cpm[c]);
      end
      @(posedge clk);
      exp_valid = in_valid; exp_sop = in_valid && in_sop; exp_eop = in_valid && in_eop; exp_ref = t & 255;
      exp_v = '0;
      if (in_valid)
        for (int c = 0; c < K; c++)
          if (cv[c] && ((in_index & cim[c]) == (civ[c] & cim[c])) &&
              ((in_data[8*W-1-(c/KS)*SUBW -: SUBW] & cpm[c]) == cpv[c])) begin
            exp_v[c] = 1; n_sub[c/KS]++;
          end
      @(negedge clk);
      checks++;
      if (wmv_valid !== exp_valid || wmv !== exp_v || wmv_sop !== exp_sop || wmv_eop !== exp_eop ||
          (exp_valid && int'(wmv_ref) != exp_ref)) begin
        failures++;
        $display("FAIL t=%0d: wmv %h exp %h valid %b", t, wmv, exp_v, wmv_valid);
      end
    end
    for (int s = 0; s < NSUB; s++) begin
      checks++;
      if (n_sub[s] == 0) begin failures++; $display("FAIL: sub-CAM %0d never matched", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
