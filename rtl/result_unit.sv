// result_unit: Result Unit (Rule CAMs, AND stage, priority multiplexer).
//
// Maps a packet match vector of K criteria bits to the highest-priority rule
// it fulfils. Each of the N rules is a ternary pattern over the K criteria
// bits (care and 1: criterion must have matched; care and 0: must not have
// matched; don't care: irrelevant). As the document proposes for wide CAMs,
// the K bits are split into K/SEG_W Rule CAMs of N entries x SEG_W bits; their
// per-rule outputs are combined by an AND stage, and the pipelined priority
// multiplexer picks the rule with the lowest index. So that the CAMs do not
// become too deep, each Rule CAM is further divided by depth into N/RULE_DEPTH
// CAMs of RULE_DEPTH rules each (one CAM if N <= RULE_DEPTH; N must be a
// multiple of it), as the document suggests for many rules; the division is
// invisible from outside. The value 64 is this design's choice.
// Writes: cfg_addr is the
// rule number, cfg_val/cfg_mask span all K bits (all Rule CAMs are written
// together). Pipeline: Rule CAM register, AND register, two priority stages:
// category four clocks after pmv_valid, one packet per clock.
module result_unit #(
  parameter int K     = 256,
  parameter int N     = 128,
  parameter int SEG_W = 64,
  parameter int GROUP = 16,
  parameter int RULE_DEPTH = 64,
  parameter int REF_W = 16,
  localparam int NSEG = K / SEG_W,
  localparam int RD   = (RULE_DEPTH < N) ? RULE_DEPTH : N,
  localparam int NBANK = N / RD,
  localparam int BAW  = (RD > 1) ? $clog2(RD) : 1,
  localparam int RAW  = $clog2(N)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             cfg_we,
  input  logic [RAW-1:0]   cfg_addr,
  input  logic             cfg_valid,
  input  logic [K-1:0]     cfg_val,
  input  logic [K-1:0]     cfg_mask,
  input  logic             pmv_valid,
  input  logic [K-1:0]     pmv,
  input  logic [REF_W-1:0] pmv_ref,
  output logic             cat_valid,
  output logic             cat_hit,
  output logic [RAW-1:0]   cat_rule,
  output logic [REF_W-1:0] cat_ref
);
  logic [N-1:0]     seg_match [NSEG];
  logic [N-1:0]     seg_q     [NSEG];
  logic [N-1:0]     and_d, and_q;
  logic             v1_q, v2_q;
  logic [REF_W-1:0] ref1_q, ref2_q;

  // Rule CAM for criteria segment s and rules b*RD ... b*RD+RD-1
  for (genvar s = 0; s < NSEG; s++) begin : g_seg
    for (genvar b = 0; b < NBANK; b++) begin : g_bank
      tcam #(.DEPTH(RD), .WIDTH(SEG_W)) u_rule_cam (
        .clk, .rst, .we(cfg_we && int'(cfg_addr) / RD == b),
        .waddr(BAW'(int'(cfg_addr) % RD)), .wvalid(cfg_valid),
        .wval(cfg_val[s*SEG_W +: SEG_W]), .wmask(cfg_mask[s*SEG_W +: SEG_W]),
        .key(pmv[s*SEG_W +: SEG_W]), .match(seg_match[s][b*RD +: RD])
      );
    end
  end

  always_comb begin
    and_d = '1;
    for (int s = 0; s < NSEG; s++) and_d &= seg_q[s];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v1_q   <= 1'b0;
      v2_q   <= 1'b0;
      ref1_q <= '0;
      ref2_q <= '0;
      and_q  <= '0;
      for (int s = 0; s < NSEG; s++) seg_q[s] <= '0;
    end else begin
      v1_q   <= pmv_valid;
      ref1_q <= pmv_ref;
      seg_q  <= seg_match;
      v2_q   <= v1_q;
      ref2_q <= ref1_q;
      and_q  <= and_d;
    end
  end

  priority_mux #(.N(N), .GROUP(GROUP), .TAG_W(REF_W)) u_pmux (
    .clk, .rst, .in_valid(v2_q), .req(and_q), .in_tag(ref2_q),
    .out_valid(cat_valid), .hit(cat_hit), .idx(cat_rule), .out_tag(cat_ref)
  );
endmodule
