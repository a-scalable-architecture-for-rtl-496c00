// tb_pld_counter_index: self-checking test of the Counter & Index Generator.
// Drives random fire/start/layer_end/eop sequences and random words. A model
// keeps the word position (0 at start, after a layer end and after eop,
// otherwise +1 saturating at 15 with POS_W=4) and checks the position output
// every clock, and one clock after each fire the registered word: index =
// {protocol, position}, bytes past win_bytes cleared, sop/eop/bytes/layer
// flag/reference. Saturation must occur.
module tb_pld_counter_index;
  localparam int W = 8, POS_W = 4, PROTO_W = 3, REF_W = 8, BW = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic fire, start, layer_end, win_sop, win_eop, out_valid, out_sop, out_eop, out_layer_last;
  logic [PROTO_W-1:0] cur_proto;
  logic [8*W-1:0] win_data, out_data;
  logic [BW-1:0] win_bytes, out_bytes;
  logic [REF_W-1:0] win_ref, out_ref;
  logic [POS_W-1:0] pos;
  logic [PROTO_W+POS_W-1:0] out_index;

  pld_counter_index #(.W(W), .POS_W(POS_W), .PROTO_W(PROTO_W), .REF_W(REF_W)) dut (.*);

  int checks = 0, failures = 0, n_sat = 0;
  int mpos = 0;
  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [8*W-1:0] ed;
    int ep, eb;
    bit ef, es, ee, el;
    int er, epr;
    {fire, start, layer_end, win_sop, win_eop} = '0;
    cur_proto = 0; win_data = 0; win_bytes = 0; win_ref = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 600; t++) begin
      fire = ($urandom % 4 != 0);
      start = (t < 200) ? ($urandom % 6 == 0) : ($urandom % 40 == 0);
      layer_end = (t < 200) ? ($urandom % 5 == 0) : 0;
      win_eop = (t < 200) ? ($urandom % 7 == 0) : 0;
      win_sop = $urandom % 2;
      cur_proto = 3'($urandom);
      win_data = {$urandom, $urandom};
      win_bytes = 4'(1 + $urandom % W);
      win_ref = 8'($urandom);
      #1;
      ep = start ? 0 : mpos;
      checks++;
      if (int'(pos) != ep) begin failures++; $display("FAIL t=%0d pos %0d exp %0d", t, pos, ep); end
      ed = '0;
      for (int b = 0; b < W; b++) if (b < int'(win_bytes)) ed[8*(W-1-b) +: 8] = win_data[8*(W-1-b) +: 8];
      ef = fire; es = win_sop; ee = win_eop; el = layer_end; eb = win_bytes; er = win_ref; epr = cur_proto;
      if (fire) begin
        if (win_eop || layer_end) mpos = 0;
        else if (ep == 15) begin mpos = 15; n_sat++; end
        else mpos = ep + 1;
      end
      @(negedge clk);
      checks++;
      if (out_valid !== ef || (ef && (out_data !== ed || out_index !== {3'(epr), 4'(ep)} ||
          out_sop !== es || out_eop !== ee || out_layer_last !== el || int'(out_bytes) != eb ||
          int'(out_ref) != er))) begin
        failures++;
        $display("FAIL t=%0d: out idx %h data %h, exp idx %h data %h", t, out_index, out_data, {3'(epr), 4'(ep)}, ed);
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL: no saturation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
