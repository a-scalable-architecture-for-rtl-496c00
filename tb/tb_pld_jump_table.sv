// tb_pld_jump_table: self-checking test of the Jump Table.
// Checks that nothing matches after reset, then writes entries keyed by
// {protocol, value} and checks hits, targets, misses for the same value under
// another protocol, the lowest entry winning for duplicate keys, and that
// invalidating an entry removes it.
module tb_pld_jump_table;
  localparam int PROTO_W = 5, DEPTH = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic we, wvalid, hit;
  logic [2:0] waddr;
  logic [PROTO_W-1:0] wkey_proto, wtarget, key_proto, target;
  logic [15:0] wkey_val, key_val;

  pld_jump_table #(.PROTO_W(PROTO_W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(int a, bit v, int kp, int kv, int t);
    @(negedge clk);
    we = 1; waddr = 3'(a); wvalid = v; wkey_proto = 5'(kp); wkey_val = 16'(kv); wtarget = 5'(t);
    @(negedge clk); we = 0;
  endtask
  task automatic look(int kp, int kv, bit eh, int et);
    key_proto = 5'(kp); key_val = 16'(kv); #1;
    checks++;
    if (hit !== eh || (eh && int'(target) != et)) begin
      failures++; $display("FAIL key %0d/%h: hit %b target %0d, exp %b %0d", kp, kv, hit, target, eh, et);
    end
  endtask

  initial begin
    we = 0; wvalid = 0; waddr = 0; wkey_proto = 0; wkey_val = 0; wtarget = 0; key_proto = 0; key_val = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    look(0, 0, 0, 0);
    look(1, 16'h0800, 0, 0);
    wr(0, 1, 1, 'h0800, 3);
    wr(1, 1, 1, 'h86DD, 4);
    wr(2, 1, 3, 6, 5);
    wr(3, 1, 3, 17, 6);
    wr(5, 1, 4, 6, 9);
    wr(6, 1, 4, 6, 10);          // duplicate key: entry 5 wins
    look(1, 'h0800, 1, 3);
    look(1, 'h86DD, 1, 4);
    look(3, 6, 1, 5);
    look(3, 17, 1, 6);
    look(1, 6, 0, 0);            // same value, other protocol
    look(3, 'h0800, 0, 0);
    look(4, 6, 1, 9);
    wr(5, 0, 4, 6, 9);           // invalidate entry 5
    look(4, 6, 1, 10);
    wr(6, 0, 4, 6, 10);
    look(4, 6, 0, 0);
    for (int t = 0; t < 50; t++) look(7 + $urandom % 20, $urandom, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
