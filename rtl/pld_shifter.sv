// pld_shifter: Shifter of the Protocol Layering Decoder.
//
// Segments and realigns the packet so that every protocol header starts at
// byte 0 of a new data word (document, Sec. 3.3 and 4.3). It is a 2W-byte byte
// buffer with a barrel shifter on both sides:
//   * The front W bytes form the window that the decoder sees in this cycle.
//   * When the decoder fires it consumes 'take' bytes (W, or fewer in the last
//     word of a header); the remaining bytes shift down to byte 0, so the next
//     header starts aligned. The consumed bytes are counted by win_bytes.
//   * A new input word is appended behind the remaining bytes whenever it
//     fits. If less than W bytes are consumed, the input is stalled: this is
//     where the alignment overhead of the document's throughput formula arises.
// A packet's first word enters only once the previous packet has drained, so
// the buffer never mixes packets. Window valid: at least W bytes held, or the
// packet end is in the buffer. Interface: valid/ready input with sop, eop and
// the byte count of the last word (in_bytes, W otherwise); a packet reference
// travels with the packet (win_ref). No backpressure on the window side.
// Header-only decoding: 'flush' (given with fire, after the last header word)
// empties the buffer and discards input words up to the next packet start;
// in_skip is high while that is so, telling the source it may skip to the
// next packet at once (it is combinational from registered state only). The
// document asks only that the decoder then starts on the next packet; the
// flush/skip handshake is this design's choice, as is the buffer organisation.
module pld_shifter #(
  parameter int W     = 16,
  parameter int REF_W = 16,
  localparam int BW   = $clog2(W+1),
  localparam int CW   = $clog2(2*W+1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [8*W-1:0]   in_data,
  input  logic             in_sop,
  input  logic             in_eop,
  input  logic [BW-1:0]    in_bytes,
  input  logic [REF_W-1:0] in_ref,
  output logic             win_valid,
  output logic [8*W-1:0]   win_data,
  output logic             win_sop,
  output logic [REF_W-1:0] win_ref,
  input  logic             fire,
  input  logic             flush,
  output logic             in_skip,
  input  logic [BW-1:0]    take,
  output logic [BW-1:0]    win_bytes,
  output logic             win_eop
);
  logic [7:0]       buf_q [2*W];
  logic [CW-1:0]    cnt_q;
  logic             has_eop_q;
  logic             sop_q;
  logic [REF_W-1:0] ref_q;
  logic             drop_q;

  logic [7:0]    buf_d [2*W];
  logic [CW-1:0] cnt_after;
  logic [CW-1:0] take_f;
  logic          accept, append, drop_now;
  logic [BW-1:0] n_in;

  always_comb begin
    win_valid = (cnt_q >= CW'(W)) || (has_eop_q && cnt_q != '0);
    for (int i = 0; i < W; i++) win_data[8*(W-1-i) +: 8] = buf_q[i];
    win_sop   = sop_q;
    win_ref   = ref_q;
    win_bytes = (CW'(take) < cnt_q) ? take : BW'(cnt_q);
    win_eop   = has_eop_q && (cnt_q <= CW'(take));
    take_f    = !fire ? '0 : flush ? cnt_q : CW'(win_bytes);
    cnt_after = cnt_q - take_f;
    in_ready  = has_eop_q ? (cnt_after == '0) : (cnt_after <= CW'(W));
    accept    = in_valid && in_ready;
    // rest of the packet not wanted: drop input words up to the next sop
    drop_now  = drop_q || (fire && flush);
    in_skip   = drop_now;
    append    = accept && !(drop_now && !in_sop);
    n_in      = in_eop ? in_bytes : BW'(W);
    // consume: shift the remaining bytes down to byte 0
    for (int i = 0; i < 2*W; i++)
      buf_d[i] = (i + int'(take_f) < 2*W) ? buf_q[i + int'(take_f)] : 8'h00;
    // append the input word behind the remaining bytes
    if (append)
      for (int j = 0; j < W; j++)
        if (j < int'(n_in)) buf_d[int'(cnt_after) + j] = in_data[8*(W-1-j) +: 8];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_q     <= '0;
      has_eop_q <= 1'b0;
      sop_q     <= 1'b0;
      ref_q     <= '0;
      drop_q    <= 1'b0;
      for (int i = 0; i < 2*W; i++) buf_q[i] <= 8'h00;
    end else begin
      buf_q     <= buf_d;
      cnt_q     <= cnt_after + (append ? CW'(n_in) : '0);
      has_eop_q <= (has_eop_q && cnt_after != '0) || (append && in_eop);
      drop_q    <= (drop_q || (fire && flush && !has_eop_q)) && !(accept && (in_sop || in_eop));
      if (accept && in_sop) begin
        sop_q <= 1'b1;
        ref_q <= in_ref;
      end else if (fire) begin
        sop_q <= 1'b0;
      end
    end
  end


  // A packet may only start in an empty buffer (previous packet drained).
  assert property (@(posedge clk) disable iff (rst) (accept && in_sop) |-> cnt_after == '0)
    else $error("pld_shifter: sop accepted into a non-empty buffer");
  assert property (@(posedge clk) disable iff (rst) fire |-> win_valid)
    else $error("pld_shifter: fire without a valid window");

endmodule
