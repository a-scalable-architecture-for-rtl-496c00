// pc_pkg: types and constants shared by the packet classifier.
//
// Byte order: a data word of W bytes is held MSB first, so byte 0 (the first
// byte on the wire) is bits [8*W-1 -: 8]. A 32-bit sub-word therefore reads
// as a network-order integer.
//
// mc_instr_t is one microcode instruction of the Protocol Layering Decoder,
// one per protocol. The document says an instruction holds "the position of the
// header length field or a fixed length as well as the position of the field
// specifying the next protocol"; the field layout below (16-bit fields,
// shift/mask/scale/add arithmetic, terminal flag) is this design's own choice.
//   header length = hl_fixed ? hl_add
//                            : (((field16(hl_off) >> hl_shift) & hl_mask) << hl_scale) + hl_add
//   next protocol = np_fixed ? np_value : (field16(np_off) & np_mask)
//   term          : no protocol follows; the rest of the packet is payload
// field16(off) is the big-endian 16-bit value of header bytes off and off+1.
package pc_pkg;

  localparam int HL_OFF_W = 8;   // byte offset of a field within its header
  localparam int LEN_W    = 12;  // header length in bytes
  localparam int FIELD_W  = 16;  // width of an extracted field

  // Protocol id 0 labels payload (everything after the last decoded header).
  localparam int PAYLOAD_ID = 0;

  typedef struct packed {
    logic                term;
    logic                hl_fixed;
    logic [HL_OFF_W-1:0] hl_off;
    logic [3:0]          hl_shift;
    logic [FIELD_W-1:0]  hl_mask;
    logic [2:0]          hl_scale;
    logic [LEN_W-1:0]    hl_add;
    logic                np_fixed;
    logic [HL_OFF_W-1:0] np_off;
    logic [FIELD_W-1:0]  np_mask;
    logic [FIELD_W-1:0]  np_value;
  } mc_instr_t;

  // Decoder control states.
  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,  // next word is the first word of a packet
    ST_HDR  = 2'd1,  // inside a protocol header
    ST_PAY  = 2'd2   // inside the payload
  } pld_state_t;

endpackage
