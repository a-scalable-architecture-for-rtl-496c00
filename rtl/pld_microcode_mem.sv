// pld_microcode_mem: Microcode Memory of the Protocol Layering Decoder.
//
// One mc_instr_t instruction per protocol id, 2**PROTO_W entries, written
// through a synchronous write port by the host and read asynchronously by the
// decoder at the current protocol id (a distributed-RAM style memory, so the
// instruction of a new protocol is usable in the cycle after the header change).
// The document makes this memory user-programmable; its depth, the read timing
// and the write port are this design's choices. Contents are not reset and
// must be written before use.
module pld_microcode_mem #(
  parameter int PROTO_W = 5
) (
  input  logic                clk,
  input  logic                we,
  input  logic [PROTO_W-1:0]  waddr,
  input  pc_pkg::mc_instr_t   wdata,
  input  logic [PROTO_W-1:0]  raddr,
  output pc_pkg::mc_instr_t   rdata
);
  pc_pkg::mc_instr_t mem [2**PROTO_W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
