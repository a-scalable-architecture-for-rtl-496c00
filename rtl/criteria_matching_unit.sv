// criteria_matching_unit: Criteria Matching Unit (Criteria CAM).
//
// Compares every indexed data word with all K criteria at once and outputs the
// K-bit word match vector. As in the document's reduced Criteria CAM, the
// W-byte word is cut into NSUB sub-words (default four of 32 bits, sub-word 0 =
// the first bytes of the word); each sub-word, with the word index prepended,
// is searched in its own ternary sub-CAM of K/NSUB entries, and there is no AND
// stage between sub-CAMs: a criterion is a pattern on one sub-word at one
// index. Criterion c lives in sub-CAM c / (K/NSUB) and is bit c of the vector.
// For many criteria a sub-CAM is itself divided by depth into CAMs of
// CRIT_DEPTH entries (one CAM if K/NSUB <= CRIT_DEPTH), as the document
// suggests; the division is invisible from outside, and 64 is this design's
// choice.
// Entries are {index value, index mask, pattern value, pattern mask}, so a
// criterion can ignore the word position or the protocol. Writes: cfg_addr is
// the criterion number. Timing: one word per clock, vector registered (one
// cycle latency), with sop/eop/reference passed alongside.
module criteria_matching_unit #(
  parameter int W     = 16,
  parameter int NSUB  = 4,
  parameter int K     = 256,
  parameter int IDX_W = 12,
  parameter int CRIT_DEPTH = 64,
  parameter int REF_W = 16,
  localparam int SUBW = 8*W/NSUB,
  localparam int KS   = K/NSUB,
  localparam int CD   = (CRIT_DEPTH < KS) ? CRIT_DEPTH : KS,
  localparam int CAW  = (CD > 1) ? $clog2(CD) : 1,
  localparam int KAW  = $clog2(K)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             cfg_we,
  input  logic [KAW-1:0]   cfg_addr,
  input  logic             cfg_valid,
  input  logic [IDX_W-1:0] cfg_idx_val,
  input  logic [IDX_W-1:0] cfg_idx_mask,
  input  logic [SUBW-1:0]  cfg_pat_val,
  input  logic [SUBW-1:0]  cfg_pat_mask,
  input  logic             in_valid,
  input  logic [8*W-1:0]   in_data,
  input  logic [IDX_W-1:0] in_index,
  input  logic             in_sop,
  input  logic             in_eop,
  input  logic [REF_W-1:0] in_ref,
  output logic             wmv_valid,
  output logic [K-1:0]     wmv,
  output logic             wmv_sop,
  output logic             wmv_eop,
  output logic [REF_W-1:0] wmv_ref
);
  logic [K-1:0] match;

  // sub-CAM s, part b: criteria s*KS + b*CD ... s*KS + b*CD + CD-1
  for (genvar s = 0; s < NSUB; s++) begin : g_sub
    for (genvar b = 0; b < KS / CD; b++) begin : g_part
      logic we_p;
      assign we_p = cfg_we && (int'(cfg_addr) / CD == s * (KS / CD) + b);
      tcam #(.DEPTH(CD), .WIDTH(IDX_W+SUBW)) u_cam (
        .clk, .rst,
        .we(we_p),
        .waddr(CAW'(int'(cfg_addr) % CD)),
        .wvalid(cfg_valid),
        .wval({cfg_idx_val, cfg_pat_val}),
        .wmask({cfg_idx_mask, cfg_pat_mask}),
        .key({in_index, in_data[8*W-1-s*SUBW -: SUBW]}),
        .match(match[s*KS + b*CD +: CD])
      );
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wmv_valid <= 1'b0;
      wmv       <= '0;
      wmv_sop   <= 1'b0;
      wmv_eop   <= 1'b0;
      wmv_ref   <= '0;
    end else begin
      wmv_valid <= in_valid;
      wmv       <= in_valid ? match : '0;
      wmv_sop   <= in_valid && in_sop;
      wmv_eop   <= in_valid && in_eop;
      wmv_ref   <= in_ref;
    end
  end
endmodule
