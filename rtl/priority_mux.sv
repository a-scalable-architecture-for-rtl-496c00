// priority_mux: pipelined priority multiplexer of the Result Unit.
//
// Selects, of N request bits, the one with the highest priority; rule 0 has
// the highest priority (lowest index wins). As the document proposes, small
// priority multiplexers are cascaded with a register at each output: the first
// stage encodes groups of GROUP requests each, the second stage selects among
// the N/GROUP group winners. Outputs hit (any request) and idx. Two clock
// latency, one request vector per clock; a tag (packet reference) travels with
// it. The grouping into two stages is this design's choice. N must be a
// multiple of GROUP.
module priority_mux #(
  parameter int N     = 128,
  parameter int GROUP = 16,
  parameter int TAG_W = 16,
  localparam int NG   = N / GROUP,
  localparam int IW   = $clog2(N),
  localparam int GW   = (GROUP > 1) ? $clog2(GROUP) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [N-1:0]     req,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic             hit,
  output logic [IW-1:0]    idx,
  output logic [TAG_W-1:0] out_tag
);
  logic          g_hit_d [NG];
  logic [GW-1:0] g_idx_d [NG];
  logic          g_hit_q [NG];
  logic [GW-1:0] g_idx_q [NG];
  logic          v1_q;
  logic [TAG_W-1:0] tag1_q;
  logic          hit_d;
  logic [IW-1:0] idx_d;

  // stage 1: one priority encoder per group
  always_comb begin
    for (int g = 0; g < NG; g++) begin
      g_hit_d[g] = 1'b0;
      g_idx_d[g] = '0;
      for (int i = GROUP-1; i >= 0; i--) begin
        if (req[g*GROUP + i]) begin
          g_hit_d[g] = 1'b1;
          g_idx_d[g] = GW'(i);
        end
      end
    end
  end

  // stage 2: select the first group with a hit
  always_comb begin
    hit_d = 1'b0;
    idx_d = '0;
    for (int g = NG-1; g >= 0; g--) begin
      if (g_hit_q[g]) begin
        hit_d = 1'b1;
        idx_d = IW'(g*GROUP) + IW'(g_idx_q[g]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v1_q      <= 1'b0;
      tag1_q    <= '0;
      out_valid <= 1'b0;
      hit       <= 1'b0;
      idx       <= '0;
      out_tag   <= '0;
      for (int g = 0; g < NG; g++) begin
        g_hit_q[g] <= 1'b0;
        g_idx_q[g] <= '0;
      end
    end else begin
      v1_q      <= in_valid;
      tag1_q    <= in_tag;
      g_hit_q   <= g_hit_d;
      g_idx_q   <= g_idx_d;
      out_valid <= v1_q;
      hit       <= v1_q && hit_d;
      idx       <= idx_d;
      out_tag   <= tag1_q;
    end
  end
endmodule
