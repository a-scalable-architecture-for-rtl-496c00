// packet_classifier: complete packet classification module.
//
// Pipeline: Protocol Layering Decoder -> Criteria Matching Unit -> Match
// Accumulator -> Result Unit. Packets enter as a stream of W-byte words with a
// reference (e.g. the buffer address the packet was stored at); for every
// packet one category comes out: cat_hit and cat_rule (number of the
// highest-priority rule fulfilled, rule 0 highest) together with the packet's
// reference. The decoder labels each word with {protocol, word position};
// criteria are ternary patterns on one 32-bit sub-word at a given index; rules
// are ternary patterns over the packet's set of matched criteria.
//
// Defaults: 128-bit words (four 32-bit criteria sub-CAMs), 256 criteria and
// 128 rules, 32 protocol ids. The word width and sub-word split are the
// document's implemented configuration; 256 criteria / 128 rules is one of the
// configurations it evaluates, chosen here as default.
// Timing: one word per clock through the whole pipeline (the decoder stalls
// in_ready when it realigns a header). An accepted input word reaches the
// decoder output after at least two clocks; the category appears six clocks
// after the decoder has output the packet's last word (Criteria CAM register,
// Accumulator, Rule CAM register, AND register, two priority stages). All
// tables are written through the configuration ports, one entry per clock;
// packets should not be classified while a table they use is being written.
// hdr_only selects header-only decoding (only header words are classified;
// in_skip tells the source it may drop the rest of the current packet and
// send the next one), which the document gives as the way to raise the line
// rate for long packets.
module packet_classifier #(
  parameter int W        = 16,
  parameter int NSUB     = 4,
  parameter int K        = 256,
  parameter int N        = 128,
  parameter int PROTO_W  = 5,
  parameter int POS_W    = 7,
  parameter int JT_DEPTH = 32,
  parameter int SEG_W    = 64,
  parameter int GROUP    = 16,
  parameter int RULE_DEPTH = 64,
  parameter int CRIT_DEPTH = 64,
  parameter int REF_W    = 16,
  localparam int BW      = $clog2(W+1),
  localparam int IDX_W   = PROTO_W + POS_W,
  localparam int SUBW    = 8*W/NSUB
) (
  input  logic                        clk,
  input  logic                        rst,
  // decoder tables
  input  logic [PROTO_W-1:0]          start_proto,
  input  logic                        hdr_only,
  input  logic                        mc_we,
  input  logic [PROTO_W-1:0]          mc_waddr,
  input  pc_pkg::mc_instr_t           mc_wdata,
  input  logic                        jt_we,
  input  logic [$clog2(JT_DEPTH)-1:0] jt_waddr,
  input  logic                        jt_wvalid,
  input  logic [PROTO_W-1:0]          jt_wkey_proto,
  input  logic [15:0]                 jt_wkey_val,
  input  logic [PROTO_W-1:0]          jt_wtarget,
  // criteria
  input  logic                        crit_we,
  input  logic [$clog2(K)-1:0]        crit_addr,
  input  logic                        crit_valid,
  input  logic [IDX_W-1:0]            crit_idx_val,
  input  logic [IDX_W-1:0]            crit_idx_mask,
  input  logic [SUBW-1:0]             crit_pat_val,
  input  logic [SUBW-1:0]             crit_pat_mask,
  // rules
  input  logic                        rule_we,
  input  logic [$clog2(N)-1:0]        rule_addr,
  input  logic                        rule_valid,
  input  logic [K-1:0]                rule_val,
  input  logic [K-1:0]                rule_mask,
  // packets
  input  logic                        in_valid,
  output logic                        in_ready,
  output logic                        in_skip,
  input  logic [8*W-1:0]              in_data,
  input  logic                        in_sop,
  input  logic                        in_eop,
  input  logic [BW-1:0]               in_bytes,
  input  logic [REF_W-1:0]            in_ref,
  // categories
  output logic                        cat_valid,
  output logic                        cat_hit,
  output logic [$clog2(N)-1:0]        cat_rule,
  output logic [REF_W-1:0]            cat_ref
);
  logic             d_valid, d_sop, d_eop, d_layer_last;
  logic [8*W-1:0]   d_data;
  logic [IDX_W-1:0] d_index;
  logic [BW-1:0]    d_bytes;
  logic [REF_W-1:0] d_ref;

  logic             w_valid, w_sop, w_eop;
  logic [K-1:0]     w_mv;
  logic [REF_W-1:0] w_ref;

  logic             p_valid;
  logic [K-1:0]     p_mv;
  logic [REF_W-1:0] p_ref;

  protocol_layering_decoder #(
    .W(W), .POS_W(POS_W), .PROTO_W(PROTO_W), .JT_DEPTH(JT_DEPTH), .REF_W(REF_W)
  ) u_pld (
    .clk, .rst, .start_proto, .hdr_only, .mc_we, .mc_waddr, .mc_wdata,
    .jt_we, .jt_waddr, .jt_wvalid, .jt_wkey_proto, .jt_wkey_val, .jt_wtarget,
    .in_valid, .in_ready, .in_skip, .in_data, .in_sop, .in_eop, .in_bytes, .in_ref,
    .out_valid(d_valid), .out_data(d_data), .out_index(d_index), .out_sop(d_sop),
    .out_eop(d_eop), .out_bytes(d_bytes), .out_layer_last(d_layer_last), .out_ref(d_ref)
  );

  criteria_matching_unit #(
    .W(W), .NSUB(NSUB), .K(K), .IDX_W(IDX_W), .CRIT_DEPTH(CRIT_DEPTH), .REF_W(REF_W)
  ) u_cmu (
    .clk, .rst, .cfg_we(crit_we), .cfg_addr(crit_addr), .cfg_valid(crit_valid),
    .cfg_idx_val(crit_idx_val), .cfg_idx_mask(crit_idx_mask),
    .cfg_pat_val(crit_pat_val), .cfg_pat_mask(crit_pat_mask),
    .in_valid(d_valid), .in_data(d_data), .in_index(d_index), .in_sop(d_sop),
    .in_eop(d_eop), .in_ref(d_ref),
    .wmv_valid(w_valid), .wmv(w_mv), .wmv_sop(w_sop), .wmv_eop(w_eop), .wmv_ref(w_ref)
  );

  match_accumulator #(.K(K), .REF_W(REF_W)) u_acc (
    .clk, .rst, .wmv_valid(w_valid), .wmv(w_mv), .wmv_sop(w_sop), .wmv_eop(w_eop),
    .wmv_ref(w_ref), .pmv_valid(p_valid), .pmv(p_mv), .pmv_ref(p_ref)
  );

  result_unit #(.K(K), .N(N), .SEG_W(SEG_W), .GROUP(GROUP), .RULE_DEPTH(RULE_DEPTH),
                .REF_W(REF_W)) u_res (
    .clk, .rst, .cfg_we(rule_we), .cfg_addr(rule_addr), .cfg_valid(rule_valid),
    .cfg_val(rule_val), .cfg_mask(rule_mask),
    .pmv_valid(p_valid), .pmv(p_mv), .pmv_ref(p_ref),
    .cat_valid, .cat_hit, .cat_rule, .cat_ref
  );
endmodule
