// pld_control: Layer Decoder Control of the Protocol Layering Decoder.
//
// A three-state machine (ST_IDLE between packets, ST_HDR inside a protocol
// header, ST_PAY inside the payload) together with the current-protocol
// register. Each cycle with a valid window it fires, and decides:
//   * how many bytes the current output word consumes (take): W in the payload
//     and inside a header; in the last word of a header only the bytes left of
//     that header, so that the next header starts word-aligned. A word is the
//     last of its header when the length is known and
//     hdr_len <= (pos+1)*W.
//   * at the last word of a header, which protocol follows: the Jump Table
//     target on a hit, otherwise (miss, terminal instruction or next-protocol
//     field not yet seen) payload.
//   * at the end of a packet, back to ST_IDLE, where the next packet starts
//     with protocol start_proto.
//   * in header-only mode (hdr_only = 1), whether the packet ends here: the
//     word that would be followed by payload is treated as the packet's last
//     word and 'flush' tells the Shifter to drop the rest of the packet. The
//     document names this modification of the decoder as a way to raise the
//     throughput; how it is signalled is this design's choice.
// All outputs are combinational from the state and the current word; fire is
// simply win_valid, as nothing downstream can hold the decoder back. The
// document only says the control is a finite state machine; the states and
// rules are this design's choices.
module pld_control #(
  parameter int W       = 16,
  parameter int POS_W   = 7,
  parameter int PROTO_W = 5,
  localparam int BW     = $clog2(W+1)
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [PROTO_W-1:0]        start_proto,
  input  logic                      hdr_only,
  input  logic                      win_valid,
  input  logic                      win_eop,
  input  logic [POS_W-1:0]          pos,
  input  logic [pc_pkg::LEN_W-1:0]  hdr_len,
  input  logic                      hl_known,
  input  logic                      term,
  input  logic                      np_known,
  input  logic                      jt_hit,
  input  logic [PROTO_W-1:0]        jt_target,
  output logic                      fire,
  output logic                      flush,
  output logic                      pkt_end,
  output logic [BW-1:0]             take,
  output logic [PROTO_W-1:0]        cur_proto,
  output logic                      start,
  output logic                      layer_end
);
  import pc_pkg::*;

  localparam int LW = LEN_W + 2;

  pld_state_t         state_q, state_d;
  logic [PROTO_W-1:0] proto_q, proto_d;
  logic [LW-1:0]      done_bytes, end_bytes;
  logic               last_word;
  logic [PROTO_W-1:0] next_proto;
  logic               in_payload;

  always_comb begin
    start      = (state_q == ST_IDLE);
    cur_proto  = start ? start_proto : proto_q;
    in_payload = start ? (start_proto == PROTO_W'(PAYLOAD_ID)) : (state_q == ST_PAY);
    fire       = win_valid;

    done_bytes = LW'(pos) * LW'(W);
    end_bytes  = done_bytes + LW'(W);
    last_word  = !in_payload && hl_known && (LW'(hdr_len) <= end_bytes);
    layer_end  = last_word;
    if (last_word && LW'(hdr_len) > done_bytes) take = BW'(LW'(hdr_len) - done_bytes);
    else                                        take = BW'(W);

    next_proto = (!term && np_known && jt_hit) ? jt_target : PROTO_W'(PAYLOAD_ID);
    flush      = hdr_only && fire && !win_eop &&
                 (in_payload || (last_word && next_proto == PROTO_W'(PAYLOAD_ID)));
    pkt_end    = win_eop || flush;

    state_d = state_q;
    proto_d = proto_q;
    if (fire) begin
      if (pkt_end) begin
        state_d = ST_IDLE;
      end else if (in_payload) begin
        state_d = ST_PAY;
        proto_d = PROTO_W'(PAYLOAD_ID);
      end else if (last_word) begin
        proto_d = next_proto;
        state_d = (next_proto == PROTO_W'(PAYLOAD_ID)) ? ST_PAY : ST_HDR;
      end else begin
        state_d = ST_HDR;
        proto_d = cur_proto;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= ST_IDLE;
      proto_q <= '0;
    end else begin
      state_q <= state_d;
      proto_q <= proto_d;
    end
  end
endmodule
