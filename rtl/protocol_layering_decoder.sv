// protocol_layering_decoder: microprogrammed Protocol Layering Decoder.
//
// Turns a packet stream into a stream of indexed data words: every protocol
// header is realigned to start at byte 0 of a word, and each output word
// carries the index {protocol id, word position within that protocol}. The
// decoder knows protocols only through two user-programmable tables:
//   * the Microcode Memory (one mc_instr_t per protocol id): where the header
//     length and the next-protocol fields are, or their fixed values;
//   * the Jump Table (binary CAM): {protocol id, next-protocol value} ->
//     protocol id of the encapsulated protocol.
// A packet starts with protocol start_proto; after the last header that the
// tables can resolve, the rest of the packet is labelled PAYLOAD_ID (0).
// With hdr_only = 1 (header-only decoding, the document's modification for
// higher throughput) no payload words are output: the last header word is
// marked as the packet's end, the rest of the packet is dropped and in_skip
// tells the source it may continue with the next packet straight away, so a
// packet costs only sum(ceil(H_i/W)) clocks. hdr_only may change only between
// packets.
// Units as in the document's decoder diagram: Shifter, Header Length, Next
// Protocol, Microcode Memory, Jump Table, Counter & Index Generator and the
// Layer Decoder Control. Decisions for a word are made in the cycle it is at
// the front of the Shifter; the output is registered. Throughput: one output
// word per clock, sum(ceil(H_i/W)) + ceil(R/W) words per packet (the input is
// stalled by in_ready when a header ends inside a word). Latency: an input word
// reaches the output two clocks after it is accepted, at the earliest.
module protocol_layering_decoder #(
  parameter int W        = 16,
  parameter int POS_W    = 7,
  parameter int PROTO_W  = 5,
  parameter int JT_DEPTH = 32,
  parameter int REF_W    = 16,
  localparam int BW      = $clog2(W+1)
) (
  input  logic                        clk,
  input  logic                        rst,
  // configuration
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
  // packet input
  input  logic                        in_valid,
  output logic                        in_ready,
  output logic                        in_skip,
  input  logic [8*W-1:0]              in_data,
  input  logic                        in_sop,
  input  logic                        in_eop,
  input  logic [BW-1:0]               in_bytes,
  input  logic [REF_W-1:0]            in_ref,
  // indexed data words
  output logic                        out_valid,
  output logic [8*W-1:0]              out_data,
  output logic [PROTO_W+POS_W-1:0]    out_index,
  output logic                        out_sop,
  output logic                        out_eop,
  output logic [BW-1:0]               out_bytes,
  output logic                        out_layer_last,
  output logic [REF_W-1:0]            out_ref
);
  import pc_pkg::*;

  logic             win_valid, win_sop, win_eop, fire, start, layer_end;
  logic             flush, pkt_end;
  logic [8*W-1:0]   win_data;
  logic [REF_W-1:0] win_ref;
  logic [BW-1:0]    take, win_bytes;
  logic [POS_W-1:0] pos;
  logic [PROTO_W-1:0] cur_proto, jt_target;
  mc_instr_t        instr;
  logic [LEN_W-1:0] hdr_len;
  logic             hl_known, np_known, jt_hit;
  logic [15:0]      np_val;

  pld_shifter #(.W(W), .REF_W(REF_W)) u_shifter (
    .clk, .rst, .in_valid, .in_ready, .in_data, .in_sop, .in_eop, .in_bytes, .in_ref,
    .win_valid, .win_data, .win_sop, .win_ref, .fire, .flush, .in_skip, .take, .win_bytes, .win_eop
  );

  pld_microcode_mem #(.PROTO_W(PROTO_W)) u_mcmem (
    .clk, .we(mc_we), .waddr(mc_waddr), .wdata(mc_wdata), .raddr(cur_proto), .rdata(instr)
  );

  pld_header_length #(.W(W), .POS_W(POS_W)) u_hlen (
    .clk, .rst, .fire, .pos, .word(win_data), .instr, .hdr_len, .hl_known
  );

  pld_next_protocol #(.W(W), .POS_W(POS_W)) u_nproto (
    .clk, .rst, .fire, .pos, .word(win_data), .instr, .np_val, .np_known
  );

  pld_jump_table #(.PROTO_W(PROTO_W), .DEPTH(JT_DEPTH)) u_jtab (
    .clk, .rst, .we(jt_we), .waddr(jt_waddr), .wvalid(jt_wvalid),
    .wkey_proto(jt_wkey_proto), .wkey_val(jt_wkey_val), .wtarget(jt_wtarget),
    .key_proto(cur_proto), .key_val(np_val), .hit(jt_hit), .target(jt_target)
  );

  pld_control #(.W(W), .POS_W(POS_W), .PROTO_W(PROTO_W)) u_ctrl (
    .clk, .rst, .start_proto, .hdr_only, .win_valid, .win_eop, .pos, .hdr_len, .hl_known,
    .term(instr.term), .np_known, .jt_hit, .jt_target,
    .fire, .flush, .pkt_end, .take, .cur_proto, .start, .layer_end
  );

  pld_counter_index #(.W(W), .POS_W(POS_W), .PROTO_W(PROTO_W), .REF_W(REF_W)) u_cidx (
    .clk, .rst, .fire, .start, .layer_end, .cur_proto, .win_data, .win_bytes,
    .win_sop, .win_eop(pkt_end), .win_ref, .pos, .out_valid, .out_data, .out_index,
    .out_sop, .out_eop, .out_bytes, .out_layer_last, .out_ref
  );
endmodule
