// pld_header_length: Header Length unit of the Protocol Layering Decoder.
//
// Interprets the header-length part of the current microcode instruction: a
// fixed length (hl_fixed) or a 16-bit field at byte hl_off of the header that is
// shifted, masked, scaled by 2**hl_scale and offset by hl_add, e.g. IPv4:
// ((field16(0) >> 12) & 0xF) << 2. The field is extracted and buffered while the
// header streams past (pld_field_capture). Outputs are combinational for the
// current word: hdr_len in bytes and hl_known, high once the length field has
// been seen (always for a fixed length). The role of the unit follows the
// document; the arithmetic is this design's choice.
module pld_header_length #(
  parameter int W     = 16,
  parameter int POS_W = 7
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    fire,
  input  logic [POS_W-1:0]        pos,
  input  logic [8*W-1:0]          word,
  input  pc_pkg::mc_instr_t       instr,
  output logic [pc_pkg::LEN_W-1:0] hdr_len,
  output logic                    hl_known
);
  import pc_pkg::*;

  logic [15:0] field;
  logic        field_known;
  logic [15:0] raw;
  logic [LEN_W+7:0] scaled;

  pld_field_capture #(.W(W), .POS_W(POS_W)) u_cap (
    .clk, .rst, .fire, .pos, .word,
    .off(instr.hl_off), .field, .known(field_known)
  );

  always_comb begin
    raw    = (field >> instr.hl_shift) & instr.hl_mask;
    scaled = (LEN_W+8)'(raw) << instr.hl_scale;
    if (instr.hl_fixed) begin
      hdr_len  = instr.hl_add;
      hl_known = 1'b1;
    end else begin
      hdr_len  = LEN_W'(scaled) + instr.hl_add;
      hl_known = field_known;
    end
  end
endmodule
