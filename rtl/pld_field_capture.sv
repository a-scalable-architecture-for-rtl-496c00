// pld_field_capture: extracts a 16-bit big-endian field from a protocol header
// that arrives word by word. Helper of the Header Length and Next Protocol units.
//
// The field occupies header bytes off and off+1. Each of the two bytes lies in
// header word (off+b)/W at byte (off+b)%W. While the current word (position
// pos within the header) carries a field byte, that byte is taken straight from
// the word; at the end of the cycle (fire) it is also stored, so it is still
// available in later words. 'known' is high once both bytes have been seen,
// i.e. both lie in words 0..pos. Purely combinational output, one register
// per field byte. Both bytes must lie within the header.
module pld_field_capture #(
  parameter int W     = 16,  // data word width in bytes
  parameter int POS_W = 7    // width of the word position
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     fire,
  input  logic [POS_W-1:0]         pos,
  input  logic [8*W-1:0]           word,
  input  logic [pc_pkg::HL_OFF_W-1:0] off,
  output logic [15:0]              field,
  output logic                     known
);
  logic [7:0] cap_q [2];
  logic [7:0] byte_now [2];
  logic       in_word [2];
  logic       seen [2];

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      int unsigned abs_off, widx, bidx;
      abs_off     = int'(off) + b;
      widx        = abs_off / W;
      bidx        = abs_off % W;
      in_word[b]  = (widx == int'(pos));
      seen[b]     = (widx <= int'(pos));
      byte_now[b] = word[8*(W-1-bidx) +: 8];
    end
    field[15:8] = in_word[0] ? byte_now[0] : cap_q[0];
    field[7:0]  = in_word[1] ? byte_now[1] : cap_q[1];
    known       = seen[0] && seen[1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cap_q[0] <= '0;
      cap_q[1] <= '0;
    end else if (fire) begin
      for (int b = 0; b < 2; b++)
        if (in_word[b]) cap_q[b] <= byte_now[b];
    end
  end
endmodule
