// tcam: ternary content-addressable memory, the building block of the
// Criteria CAMs and the Rule CAMs.
//
// DEPTH entries of WIDTH bits, each with a value, a care mask (1 = compare this
// bit, 0 = "don't care") and a valid bit. match[i] is high when entry i is
// valid and key agrees with its value on every cared-for bit. The search is
// combinational over all entries in parallel; entries are written one per
// clock through a synchronous write port; valid bits reset to 0. The ternary
// semantics follow the document; the write port is this design's choice.
module tcam #(
  parameter int DEPTH = 64,
  parameter int WIDTH = 44,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic             wvalid,
  input  logic [WIDTH-1:0] wval,
  input  logic [WIDTH-1:0] wmask,
  input  logic [WIDTH-1:0] key,
  output logic [DEPTH-1:0] match
);
  logic [WIDTH-1:0] val_q  [DEPTH];
  logic [WIDTH-1:0] mask_q [DEPTH];
  logic [DEPTH-1:0] vld_q;

  always_ff @(posedge clk) begin
    if (rst)     vld_q        <= '0;
    else if (we) vld_q[waddr] <= wvalid;
  end

  always_ff @(posedge clk) begin
    if (we) begin
      val_q[waddr]  <= wval & wmask;
      mask_q[waddr] <= wmask;
    end
  end

  always_comb begin
    for (int i = 0; i < DEPTH; i++)
      match[i] = vld_q[i] && (((key & mask_q[i]) ^ val_q[i]) == '0);
  end
endmodule
