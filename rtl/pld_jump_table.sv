// pld_jump_table: Jump Table of the Protocol Layering Decoder.
//
// A binary (exact-match) CAM, as the document suggests, that maps the next
// protocol value to the microcode address (protocol id) of that protocol. The
// search key is {current protocol id, 16-bit next-protocol value}; including
// the current protocol keeps the number spaces of different protocols apart
// (an EtherType and an IP protocol number can be equal), a choice of this
// design. DEPTH entries, each {valid, key, target}; the lowest matching entry
// wins. Lookup is combinational; writes are synchronous; valid bits reset to 0.
module pld_jump_table #(
  parameter int PROTO_W = 5,
  parameter int DEPTH   = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic                     wvalid,
  input  logic [PROTO_W-1:0]       wkey_proto,
  input  logic [15:0]              wkey_val,
  input  logic [PROTO_W-1:0]       wtarget,
  input  logic [PROTO_W-1:0]       key_proto,
  input  logic [15:0]              key_val,
  output logic                     hit,
  output logic [PROTO_W-1:0]       target
);
  logic               vld   [DEPTH];
  logic [PROTO_W-1:0] kp    [DEPTH];
  logic [15:0]        kv    [DEPTH];
  logic [PROTO_W-1:0] tgt   [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) vld[i] <= 1'b0;
    end else if (we) begin
      vld[waddr] <= wvalid;
    end
  end

  always_ff @(posedge clk) begin
    if (we) begin
      kp[waddr]  <= wkey_proto;
      kv[waddr]  <= wkey_val;
      tgt[waddr] <= wtarget;
    end
  end

  always_comb begin
    hit    = 1'b0;
    target = '0;
    for (int i = DEPTH-1; i >= 0; i--) begin
      if (vld[i] && kp[i] == key_proto && kv[i] == key_val) begin
        hit    = 1'b1;
        target = tgt[i];
      end
    end
  end
endmodule
