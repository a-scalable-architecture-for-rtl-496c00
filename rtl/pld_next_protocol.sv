// pld_next_protocol: Next Protocol unit of the Protocol Layering Decoder.
//
// Produces the value that identifies the protocol carried in the payload of
// the current header: either the fixed value np_value of the microcode
// instruction (np_fixed) or the 16-bit field at byte np_off of the header
// ANDed with np_mask (e.g. the IPv4 protocol byte: np_off=8, np_mask=0x00FF).
// The field is extracted and buffered while the header streams past. Outputs
// are combinational for the current word; np_known is high once the field has
// been seen. The value goes to the Jump Table. The role follows the document;
// the field format is this design's choice.
module pld_next_protocol #(
  parameter int W     = 16,
  parameter int POS_W = 7
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              fire,
  input  logic [POS_W-1:0]  pos,
  input  logic [8*W-1:0]    word,
  input  pc_pkg::mc_instr_t instr,
  output logic [15:0]       np_val,
  output logic              np_known
);
  logic [15:0] field;
  logic        field_known;

  pld_field_capture #(.W(W), .POS_W(POS_W)) u_cap (
    .clk, .rst, .fire, .pos, .word,
    .off(instr.np_off), .field, .known(field_known)
  );

  always_comb begin
    if (instr.np_fixed) begin
      np_val   = instr.np_value;
      np_known = 1'b1;
    end else begin
      np_val   = field & instr.np_mask;
      np_known = field_known;
    end
  end
endmodule
