// tb_pld_shifter: self-checking test of the decoder's Shifter.
// Random packets (1 to 60 bytes, 8-byte words) are offered with random gaps;
// each clock the consumer fires at random with a random take of 1..8 bytes.
// A byte-queue model of the packets accepted so far checks every clock: the
// window holds the next unconsumed bytes of the current packet; win_valid,
// win_bytes, win_eop, win_sop and the reference agree; no byte of a packet
// enters before the previous packet has been consumed. Then a second phase
// with continuous input and take = 8 checks one window per clock. A third
// phase flushes packets at random points (header-only decoding): the rest of
// the packet must vanish, later input words of it must be dropped up to the
// next packet, and in_skip must be high exactly while that is so.
module tb_pld_shifter;
  localparam int W = 8, REF_W = 8, BW = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid, in_ready, in_sop, in_eop, win_valid, win_sop, fire, win_eop;
  logic [8*W-1:0] in_data, win_data;
  logic [BW-1:0] in_bytes, take, win_bytes;
  logic [REF_W-1:0] in_ref, win_ref;
  logic flush, in_skip;

  pld_shifter #(.W(W), .REF_W(REF_W)) dut (.*);

  int checks = 0, failures = 0, n_stall = 0, n_partial = 0;
  // model: bytes of accepted packets, in order
  byte unsigned mq[$];     // bytes of the packet at the front (accepted part)
  bit  m_full;             // the front packet has been accepted completely
  bit  m_started;          // some bytes of the front packet were consumed
  int  m_ref;
  byte unsigned pend[$];   // later packets not yet started: none may be accepted

  task automatic fail(string s);
    failures++;
    if (failures < 10) $display("FAIL %0t: %s", $time, s);
  endtask

  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // consumer + checker
  bit b2b = 0, fl_phase = 0, m_drop = 0;
  int n_flush = 0, n_dropped = 0;
  int b2b_windows = 0, b2b_cycles = 0;
  always @(negedge clk) if (!rst) begin
    int k, ew;
    bit ev;
    fire = 0; flush = 0; take = 4'(W);
    #1;
    checks++;
    if (in_skip !== m_drop) fail($sformatf("in_skip %b exp %b", in_skip, m_drop));
    ev = (mq.size() >= W) || (m_full && mq.size() > 0);
    checks++;
    if (win_valid !== ev) fail($sformatf("win_valid %b exp %b (model %0d bytes, full %b)", win_valid, ev, mq.size(), m_full));
    if (b2b) begin b2b_cycles++; if (win_valid) b2b_windows++; end
    if (win_valid && ev) begin
      k = (mq.size() < W) ? mq.size() : W;
      for (int b = 0; b < k; b++) if (win_data[8*(W-1-b) +: 8] != mq[b]) fail($sformatf("byte %0d", b));
      if (win_sop !== !m_started) fail("sop");
      if (int'(win_ref) != m_ref) fail("ref");
      fire = b2b ? 1 : ($urandom % 4 != 0);
      take = b2b ? 4'(W) : 4'(1 + $urandom % W);
      #1;
      ew = (int'(take) < mq.size()) ? int'(take) : mq.size();
      checks++;
      if (int'(win_bytes) != ew || win_eop !== (m_full && mq.size() <= int'(take))) fail("bytes/eop");
      if (fire && fl_phase && !win_eop && $urandom % 3 == 0) begin
        flush = 1;
        n_flush++;
        #1;
        checks++;
        if (in_skip !== 1'b1) fail("in_skip not raised by flush");
        mq.delete();
        m_drop = !m_full;
        m_full = 0; m_started = 0;
      end else if (fire) begin
        if (int'(take) < W) n_partial++;
        repeat (ew) void'(mq.pop_front());
        m_started = 1;
        if (m_full && mq.size() == 0) begin m_full = 0; m_started = 0; end
      end
    end
  end

  // producer
  task automatic send(int len, int r, bit gaps);
    byte unsigned p[$];
    int nw;
    repeat (len) p.push_back(8'($urandom));
    nw = (len + W - 1) / W;
    for (int k = 0; k < nw; k++) begin
      bit acc;
      @(negedge clk); #2;
      while (gaps && $urandom % 3 == 0) begin @(negedge clk); #2; end
      in_valid = 1; in_sop = (k == 0); in_eop = (k == nw - 1);
      in_bytes = in_eop ? 4'(len - k*W) : 4'(W); in_ref = 8'(r);
      in_data = {$urandom, $urandom};
      for (int b = 0; b < W; b++) if (k*W + b < len) in_data[8*(W-1-b) +: 8] = p[k*W + b];
      #1 acc = in_ready;
      while (!acc) begin
        n_stall++;
        @(negedge clk); #3 acc = in_ready;
      end
      @(posedge clk);
      // accepted at this edge
      if (k == 0) begin
        if (mq.size() != 0 || m_full) fail("packet entered before the previous one drained");
        m_ref = r; m_started = 0;
      end
      if (m_drop && k > 0) begin
        n_dropped++;
        if (in_eop) m_drop = 0;
      end else begin
        for (int b = 0; b < W; b++) if (k*W + b < len) mq.push_back(p[k*W + b]);
        if (in_eop) m_full = 1;
      end
      #1 in_valid = 0;
    end
  endtask

  initial begin
    in_valid = 0; in_sop = 0; in_eop = 0; in_data = 0; in_bytes = 0; in_ref = 0;
    fire = 0; flush = 0; take = 0; m_full = 0; m_started = 0; m_ref = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 150; i++) send(1 + $urandom % 60, i, 1);
    repeat (20) @(posedge clk);
    b2b = 1;
    for (int i = 0; i < 20; i++) send(64, 200 + i, 0);
    b2b = 0;
    repeat (5) @(posedge clk);
    fl_phase = 1;
    for (int i = 0; i < 150; i++) send(1 + $urandom % 60, i, 1);
    repeat (20) @(posedge clk);
    checks++;
    if (n_flush == 0 || n_dropped == 0) fail($sformatf("flushes %0d, dropped words %0d", n_flush, n_dropped));
    checks++;
    if (n_stall == 0 || n_partial == 0) fail("no stall or partial take");
    checks++;
    if (b2b_windows < b2b_cycles - 3) fail($sformatf("back to back: %0d windows in %0d clocks", b2b_windows, b2b_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
