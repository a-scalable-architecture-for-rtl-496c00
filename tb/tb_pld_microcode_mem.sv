// tb_pld_microcode_mem: self-checking test of the Microcode Memory.
// Writes random instructions to all 32 addresses in random order, reads every
// address back through the asynchronous read port, overwrites some entries
// and reads again.
module tb_pld_microcode_mem;
  import pc_pkg::*;
  localparam int PROTO_W = 5;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [PROTO_W-1:0] waddr, raddr;
  mc_instr_t wdata, rdata;
  mc_instr_t model [32];

  pld_microcode_mem #(.PROTO_W(PROTO_W)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(int a);
    @(negedge clk);
    we = 1; waddr = 5'(a);
    wdata = mc_instr_t'({$urandom, $urandom, $urandom});
    model[a] = wdata;
    @(negedge clk); we = 0;
  endtask

  task automatic rd_all();
    for (int a = 0; a < 32; a++) begin
      raddr = 5'(a); #1;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL addr %0d: %h exp %h", a, rdata, model[a]); end
    end
  endtask

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = '0;
    for (int a = 0; a < 32; a++) wr(31 - a);
    rd_all();
    for (int k = 0; k < 40; k++) wr($urandom % 32);
    rd_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
