// tb_pld_control: directed self-checking test of the Layer Decoder Control.
// W = 16. Walks the state machine through: first word of a packet with a
// 14-byte fixed header (take 14, jump to the next protocol), a 20-byte header
// spanning two words (take 16 then 4), a jump-table miss leading to payload,
// end of packet back to the start protocol, a terminal instruction, an
// unknown header length, a next-protocol field not yet seen, a malformed
// length shorter than the words already passed, start protocol = payload, and
// idle cycles that must not change the state.
module tb_pld_control;
  localparam int W = 16, POS_W = 7, PROTO_W = 5;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [PROTO_W-1:0] start_proto, jt_target, cur_proto;
  logic win_valid, win_eop, hl_known, term, np_known, jt_hit, fire, start, layer_end;
  logic hdr_only, flush, pkt_end;
  bit   e_flush = 0;   // expected flush for the next step (header-only mode)
  logic [POS_W-1:0] pos;
  logic [11:0] hdr_len;
  logic [4:0] take;

  pld_control #(.W(W), .POS_W(POS_W), .PROTO_W(PROTO_W)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // apply one word and check the decisions, then clock
  task automatic step(string what, bit v, bit eop, int p, int len, bit known, bit tm, bit npk,
                      bit hit, int tgt, int e_proto, bit e_start, int e_take, bit e_end);
    win_valid = v; win_eop = eop; pos = 7'(p); hdr_len = 12'(len); hl_known = known; term = tm;
    np_known = npk; jt_hit = hit; jt_target = 5'(tgt);
    #1;
    checks++;
    if (fire !== v || int'(cur_proto) != e_proto || start !== e_start ||
        flush !== e_flush || pkt_end !== (v && (eop || e_flush)) ||
        (v && (int'(take) != e_take || layer_end !== e_end))) begin
      failures++;
      $display("FAIL %s: proto %0d start %b take %0d end %b flush %b, exp %0d %b %0d %b %b",
               what, cur_proto, start, take, layer_end, flush, e_proto, e_start, e_take, e_end, e_flush);
    end
    @(negedge clk);
  endtask

  initial begin
    hdr_only = 0;
    start_proto = 1; win_valid = 0; win_eop = 0; pos = 0; hdr_len = 0; hl_known = 0;
    term = 0; np_known = 0; jt_hit = 0; jt_target = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    //    what             v eop pos len kn tm npk hit tgt  proto start take end
    step("idle",           0, 0, 0, 14, 1, 0, 1, 1, 3,    1, 1, 14, 1);
    step("eth word 0",     1, 0, 0, 14, 1, 0, 1, 1, 3,    1, 1, 14, 1);
    step("ip word 0",      1, 0, 0, 20, 1, 0, 1, 1, 5,    3, 0, 16, 0);
    step("ip word 1",      1, 0, 1, 20, 1, 0, 1, 0, 5,    3, 0,  4, 1);
    step("payload 0",      1, 0, 0, 99, 1, 0, 1, 1, 7,    0, 0, 16, 0);
    step("payload eop",    1, 1, 1, 99, 1, 0, 1, 1, 7,    0, 0, 16, 0);
    step("next pkt eth",   1, 0, 0, 14, 1, 0, 1, 1, 6,    1, 1, 14, 1);
    step("terminal hdr",   1, 0, 0,  8, 1, 1, 1, 1, 9,    6, 0,  8, 1);
    step("payload after term",1,1,0, 8, 1, 0, 1, 1, 9,    0, 0, 16, 0);
    step("len unknown",    1, 0, 0,  4, 0, 0, 1, 1, 2,    1, 1, 16, 0);
    step("len known w1",   1, 0, 1, 20, 1, 0, 0, 1, 2,    1, 0,  4, 1);
    step("np unseen->pay", 1, 1, 0, 20, 1, 0, 1, 1, 2,    0, 0, 16, 0);
    step("eth again",      1, 0, 0, 14, 1, 0, 1, 1, 4,    1, 1, 14, 1);
    step("hdr w0",         1, 0, 0, 40, 1, 0, 1, 1, 4,    4, 0, 16, 0);
    step("stall",          0, 0, 1, 40, 1, 0, 1, 1, 4,    4, 0, 16, 0);
    step("hdr w1",         1, 0, 1, 10, 1, 0, 1, 1, 8,    4, 0, 16, 1);
    step("malformed->8",   1, 1, 0, 30, 1, 0, 1, 1, 8,    8, 0, 16, 0);
    // header-only mode: the word before the payload ends the packet
    hdr_only = 1;
    step("ho eth",         1, 0, 0, 14, 1, 0, 1, 1, 3,    1, 1, 14, 1);
    step("ho ip w0",       1, 0, 0, 20, 1, 0, 1, 1, 5,    3, 0, 16, 0);
    e_flush = 1;
    step("ho ip w1 miss",  1, 0, 1, 20, 1, 0, 1, 0, 5,    3, 0,  4, 1);
    step("ho eth term",    1, 0, 0, 14, 1, 1, 1, 1, 4,    1, 1, 14, 1);
    e_flush = 0;
    step("ho stall",       0, 0, 0, 14, 1, 1, 1, 1, 4,    1, 1, 14, 1);
    step("ho eop at hdr",  1, 1, 0, 14, 1, 1, 1, 1, 4,    1, 1, 14, 1);
    start_proto = 0; e_flush = 1;
    step("ho start pay",   1, 0, 0, 14, 1, 0, 1, 1, 3,    0, 1, 16, 0);
    e_flush = 0; hdr_only = 0;
    start_proto = 0;
    step("start payload",  1, 0, 0, 14, 1, 0, 1, 1, 3,    0, 1, 16, 0);
    step("payload",        1, 1, 1, 14, 1, 0, 1, 1, 3,    0, 0, 16, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
