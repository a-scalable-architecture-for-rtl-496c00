// tb_tcam: self-checking test of the ternary CAM.
// Writes random value/mask entries (some invalid), searches random keys and
// keys built from stored entries, and compares the match vector with a model
// that evaluates every entry bit by bit. Also checks reset clears all entries
// and that rewriting an entry replaces it.
module tb_tcam;
  localparam int DEPTH = 16, WIDTH = 20;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic we, wvalid;
  logic [3:0] waddr;
  logic [WIDTH-1:0] wval, wmask, key;
  logic [DEPTH-1:0] match;

  tcam #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  int checks = 0, failures = 0;
  logic mv [DEPTH];
  logic [WIDTH-1:0] mval [DEPTH], mmask [DEPTH];

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [DEPTH-1:0] model(logic [WIDTH-1:0] k);
    logic [DEPTH-1:0] r;
    for (int i = 0; i < DEPTH; i++) begin
      r[i] = mv[i];
      for (int b = 0; b < WIDTH; b++)
        if (mmask[i][b] && (k[b] != mval[i][b])) r[i] = 0;
    end
    return r;
  endfunction

  task automatic search(logic [WIDTH-1:0] k);
    key = k; #1;
    checks++;
    if (match !== model(k)) begin
      failures++;
      $display("FAIL key %h: match %h expected %h", k, match, model(k));
    end
  endtask

  initial begin
    we = 0; wvalid = 0; waddr = 0; wval = 0; wmask = 0; key = 0;
    for (int i = 0; i < DEPTH; i++) begin mv[i] = 0; mval[i] = 0; mmask[i] = 0; end
    repeat (2) @(negedge clk);
    rst = 0;
    search('0);
    search('1);
    for (int round = 0; round < 3; round++) begin
      for (int i = 0; i < DEPTH; i++) begin
        @(negedge clk);
        we = 1; waddr = 4'(i); wvalid = ($urandom % 5 != 0);
        wval = WIDTH'($urandom); wmask = WIDTH'($urandom) & WIDTH'($urandom);
        if (i == 3) wmask = '0;               // matches every key when valid
        mv[i] = wvalid; mval[i] = wval; mmask[i] = wmask;
      end
      @(negedge clk); we = 0;
      for (int t = 0; t < 100; t++) search(WIDTH'($urandom));
      for (int i = 0; i < DEPTH; i++) search((mval[i] & mmask[i]) | (WIDTH'($urandom) & ~mmask[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
