// match_accumulator: Match Accumulator (Accumulator Buffer).
//
// ORs the word match vector of every word of a packet into a K-bit register.
// The first word of a packet (sop) starts a new accumulation; at the last word
// (eop) the complete packet match vector, including that word, is output for
// one clock with pmv_valid and the packet reference. One word per clock;
// packet match vector registered one clock after the eop word. Behaviour
// follows the document; the sop/eop framing is this design's.
module match_accumulator #(
  parameter int K     = 256,
  parameter int REF_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wmv_valid,
  input  logic [K-1:0]     wmv,
  input  logic             wmv_sop,
  input  logic             wmv_eop,
  input  logic [REF_W-1:0] wmv_ref,
  output logic             pmv_valid,
  output logic [K-1:0]     pmv,
  output logic [REF_W-1:0] pmv_ref
);
  logic [K-1:0] acc_q, acc_d;

  assign acc_d = (wmv_sop ? '0 : acc_q) | wmv;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_q     <= '0;
      pmv_valid <= 1'b0;
      pmv       <= '0;
      pmv_ref   <= '0;
    end else begin
      pmv_valid <= wmv_valid && wmv_eop;
      if (wmv_valid) begin
        acc_q <= acc_d;
        if (wmv_eop) begin
          pmv     <= acc_d;
          pmv_ref <= wmv_ref;
        end
      end
    end
  end
endmodule
