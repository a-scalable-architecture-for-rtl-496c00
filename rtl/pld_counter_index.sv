// pld_counter_index: Counter & Index Generator of the Protocol Layering Decoder.
//
// Keeps the position of the current data word within the current protocol
// (0 for the first word of every header and of the payload; saturates at
// 2**POS_W-1) and provides it to the Header Length and Next Protocol units.
// It also registers the decoder output: each word is labelled with the index
// {protocol id, word position}, bytes beyond the consumed ones (the start of
// the next header, or past the packet end) are cleared to 0, and sop/eop, the
// valid byte count, a last-word-of-layer flag and the packet reference are
// passed along. One register stage; one word per clock. The index content
// follows the document; the clearing, widths and saturation are this design's.
module pld_counter_index #(
  parameter int W       = 16,
  parameter int POS_W   = 7,
  parameter int PROTO_W = 5,
  parameter int REF_W   = 16,
  localparam int BW     = $clog2(W+1)
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       fire,
  input  logic                       start,
  input  logic                       layer_end,
  input  logic [PROTO_W-1:0]         cur_proto,
  input  logic [8*W-1:0]             win_data,
  input  logic [BW-1:0]              win_bytes,
  input  logic                       win_sop,
  input  logic                       win_eop,
  input  logic [REF_W-1:0]           win_ref,
  output logic [POS_W-1:0]           pos,
  output logic                       out_valid,
  output logic [8*W-1:0]             out_data,
  output logic [PROTO_W+POS_W-1:0]   out_index,
  output logic                       out_sop,
  output logic                       out_eop,
  output logic [BW-1:0]              out_bytes,
  output logic                       out_layer_last,
  output logic [REF_W-1:0]           out_ref
);
  logic [POS_W-1:0] pos_q;
  logic [8*W-1:0]   masked;

  assign pos = start ? '0 : pos_q;

  always_comb begin
    for (int i = 0; i < W; i++)
      masked[8*(W-1-i) +: 8] = (i < int'(win_bytes)) ? win_data[8*(W-1-i) +: 8] : 8'h00;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pos_q          <= '0;
      out_valid      <= 1'b0;
      out_data       <= '0;
      out_index      <= '0;
      out_sop        <= 1'b0;
      out_eop        <= 1'b0;
      out_bytes      <= '0;
      out_layer_last <= 1'b0;
      out_ref        <= '0;
    end else begin
      out_valid <= fire;
      if (fire) begin
        if (win_eop || layer_end) pos_q <= '0;
        else if (pos != '1)       pos_q <= pos + 1'b1;
        else                      pos_q <= pos;
        out_data       <= masked;
        out_index      <= {cur_proto, pos};
        out_sop        <= win_sop;
        out_eop        <= win_eop;
        out_bytes      <= win_bytes;
        out_layer_last <= layer_end;
        out_ref        <= win_ref;
      end
    end
  end
endmodule
